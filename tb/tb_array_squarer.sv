// tb_array_squarer: exhaustive test of the CAF array squaring unit at the
// 4-bit size of the published drawing and at the default 16-bit size.
// Every input is applied and the output compared with q*q.
module tb_array_squarer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  q4;
  logic [7:0]  a4;
  logic [15:0] q16;
  logic [31:0] a16;

  array_squarer #(.N(4)) u_small (.q(q4), .a(a4));
  array_squarer          u_full  (.q(q16), .a(a16));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      q4 = 4'(i);
      #1;
      checks++;
      if (a4 !== 8'(i * i)) begin
        failures++;
        $display("N=4: %0d^2 gave %0d", i, a4);
      end
    end
    for (int i = 0; i < 65536; i++) begin
      q16 = 16'(i);
      #1;
      checks++;
      if (a16 !== 32'(longint'(i) * longint'(i))) begin
        failures++;
        if (failures < 10) $display("N=16: %0d^2 gave %0d", i, a16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
