// tb_sliced_squarer8: exhaustive test of the 8-bit sliced squaring unit.
module tb_sliced_squarer8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0]  x;
  logic [15:0] p;

  sliced_squarer8 dut (.x(x), .p(p));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (p !== 16'(i * i)) begin
        failures++;
        $display("%0d^2 gave %0d", i, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
