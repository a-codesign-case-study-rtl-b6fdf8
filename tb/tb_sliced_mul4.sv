// tb_sliced_mul4: exhaustive test of the sliced 4x4 multiplier.
module tb_sliced_mul4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  sliced_mul4 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("%0d * %0d gave %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
