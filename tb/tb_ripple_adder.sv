// tb_ripple_adder: tests the 32-bit ripple carry adder on carry chains that
// run the full width, the extremes and random operands, with both values of
// the carry in.
module tb_ripple_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic        ci, co;

  ripple_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic check(input logic [31:0] va, input logic [31:0] vb, input logic vc);
    longint unsigned ref_sum;
    a = va; b = vb; ci = vc;
    #1;
    ref_sum = longint'(va) + longint'(vb) + longint'(vc);
    checks++;
    if ({co, s} !== 33'(ref_sum)) begin
      failures++;
      if (failures < 10) $display("%0d + %0d + %0d gave %0d", va, vb, vc, {co, s});
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'd0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0, 32'h0, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'h7FFF_FFFF, 32'd1, 1'b0);
    for (int i = 0; i < 20000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
