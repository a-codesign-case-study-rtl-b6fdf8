// tb_sum_of_squares: tests chip 1, z = x*x + y*y with the carry out as ovf,
// on the extremes, sums just below and above 2^32, and random components.
module tb_sum_of_squares;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ovf_seen = 0;
  logic [15:0] x, y;
  logic [31:0] z;
  logic        ovf;

  sum_of_squares dut (.x(x), .y(y), .z(z), .ovf(ovf));

  task automatic check(input logic [15:0] vx, input logic [15:0] vy);
    longint unsigned ref_sum;
    x = vx; y = vy;
    #1;
    ref_sum = longint'(vx) * longint'(vx) + longint'(vy) * longint'(vy);
    checks++;
    if ({ovf, z} !== 33'(ref_sum)) begin
      failures++;
      if (failures < 10) $display("%0d^2 + %0d^2 gave %0d", vx, vy, {ovf, z});
    end
    if (ovf) ovf_seen++;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd0, 16'd0);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'd0);
    check(16'd46340, 16'd46340);   // 4294580800, just below 2^32
    check(16'd46341, 16'd46341);   // just above 2^32
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    checks++;
    if (ovf_seen == 0) begin
      failures++;
      $display("carry out never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
