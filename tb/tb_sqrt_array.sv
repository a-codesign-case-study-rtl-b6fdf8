// tb_sqrt_array: tests the CAS square root array. The 16-bit radicand size is
// checked exhaustively, the default 32-bit size on perfect squares, their
// neighbours, the extremes and random radicands, all against an integer
// square root found by bisection.
module tb_sqrt_array;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a16;
  logic [7:0]  q16;
  logic [31:0] a32;
  logic [15:0] q32;

  sqrt_array #(.N(16)) u_small (.a(a16), .q(q16));
  sqrt_array           u_full  (.a(a32), .q(q32));

  task automatic check32(input logic [31:0] v);
    a32 = v;
    #1;
    checks++;
    if (longint'(q32) != isqrt(longint'(v))) begin
      failures++;
      if (failures < 10) $display("sqrt(%0d) gave %0d", v, q32);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a16 = 16'(i);
      #1;
      checks++;
      if (longint'(q16) != isqrt(longint'(i))) begin
        failures++;
        if (failures < 10) $display("N=16: sqrt(%0d) gave %0d", i, q16);
      end
    end
    check32(32'd0);
    check32(32'hFFFF_FFFF);
    for (int k = 1; k < 65536; k += 97) begin
      check32(32'(k * k));
      check32(32'(k * k - 1));
      check32(32'(k * k + 1));
    end
    check32(32'(65535 * 65535));
    check32(32'(65535 * 65535 - 1));
    for (int i = 0; i < 50000; i++) check32($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
