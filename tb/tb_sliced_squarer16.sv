// tb_sliced_squarer16: exhaustive test of the 16-bit sliced squaring unit.
module tb_sliced_squarer16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] x;
  logic [31:0] p;

  sliced_squarer16 dut (.x(x), .p(p));

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
