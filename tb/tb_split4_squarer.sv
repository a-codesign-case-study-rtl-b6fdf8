// tb_split4_squarer: exhaustive test of the 16-bit split-in-four squaring
// unit against x*x.
module tb_split4_squarer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] x;
  logic [31:0] p;

  split4_squarer dut (.x(x), .p(p));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i);
      #1;
      checks++;
      if (p !== 32'(longint'(i) * longint'(i))) begin
        failures++;
        if (failures < 10) $display("%0d^2 gave %0d", i, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
