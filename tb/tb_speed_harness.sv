// tb_speed_harness: places a model device inside the timing frame whose
// output changes on the L-th rising edge after its input changed, and
// sweeps the programmed delay. A capture on that same edge still sees the
// old word, so the captured word must be the old result for delays up to L
// and the new result from L+1 on, done must come exactly 'delay' edges after the start
// edge, a delay of 0 must act as 1, and a start during a measurement must
// be ignored.
module tb_speed_harness;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int L = 5;   // delay of the model device, in clk periods

  int checks = 0, failures = 0;
  int cycle = 0;

  logic        rst_n, start, done, busy;
  logic [7:0]  delay;
  logic [15:0] din, dut_in;
  logic [31:0] dut_out, dout;

  speed_harness dut (
    .clk(clk), .rst_n(rst_n), .start(start), .delay(delay), .din(din),
    .dut_in(dut_in), .dut_out(dut_out), .dout(dout), .done(done), .busy(busy)
  );

  // Model device: dut_out follows f(dut_in) = dut_in * 3 + 1 after L edges.
  logic [31:0] pipe [L];
  always @(posedge clk) begin
    pipe[0] <= 32'(dut_in) * 3 + 1;
    for (int i = 1; i < L; i++) pipe[i] <= pipe[i-1];
  end
  assign dut_out = pipe[L-1];

  always @(posedge clk) cycle <= cycle + 1;

  // One measurement: start at a rising edge, wait for done, check timing
  // and the captured word. prev is the word the device held before.
  task automatic measure(input logic [15:0] word, input logic [7:0] dly,
                         input logic [31:0] prev);
    int t0, t1;
    int eff;
    eff = (dly == 0) ? 1 : int'(dly);
    @(negedge clk);
    din = word; delay = dly; start = 1'b1;
    t0 = cycle + 1;   // start is sampled on the coming rising edge
    @(negedge clk);
    start = 1'b0;
    // a second start while busy must change nothing
    din = ~word; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (dut_in !== word) begin
      failures++;
      $display("start during a measurement was not ignored");
    end
    while (!done) @(negedge clk);
    t1 = cycle;
    checks++;
    if (t1 - t0 != eff) begin
      failures++;
      $display("delay %0d: captured after %0d edges", dly, t1 - t0);
    end
    checks++;
    if (eff > L) begin
      if (dout !== 32'(word) * 3 + 1) begin
        failures++;
        $display("delay %0d: captured %0d, expected the new result", dly, dout);
      end
    end else if (dout !== prev) begin
      failures++;
      $display("delay %0d: captured %0d, expected the old result %0d", dly, dout, prev);
    end
    // let the device settle before the next measurement
    repeat (L + 2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev;
    logic [15:0] w;
    rst_n = 1'b0; start = 1'b0; delay = '0; din = '0;
    for (int i = 0; i < L; i++) pipe[i] = 32'd1;
    repeat (L + 2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev = 32'd1;   // f(0)
    for (int d = 0; d <= 2 * L; d++) begin
      w = 16'($urandom);
      measure(w, 8'(d), prev);
      prev = 32'(w) * 3 + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
