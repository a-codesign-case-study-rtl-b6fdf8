// tb_vector_length: streams vectors through the registered vector length
// unit, back-to-back and with gaps, and checks every result against an
// integer square root of x*x + y*y (saturated to 2^32 - 1 with ovf set when
// the sum does not fit 32 bits). It also checks the timing: a vector
// sampled by the input register on one rising edge has its result in the
// output register after the next rising edge.
module tb_vector_length;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int ovf_seen = 0, back_to_back = 0;

  logic        rst_n, in_valid, out_valid, ovf;
  logic [15:0] x, y, len;

  vector_length dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .len(len), .ovf(ovf)
  );

  typedef struct {
    int          issue_cycle;
    logic [15:0] len;
    logic        ovf;
  } expect_t;
  expect_t expq[$];

  always @(posedge clk) cycle <= cycle + 1;

  // Compare outputs on the falling edge, after the registers settled.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      expect_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result %0d", len);
      end else begin
        e = expq.pop_front();
        if (len !== e.len || ovf !== e.ovf) begin
          failures++;
          if (failures < 10) $display("len %0d ovf %0d, expected %0d %0d", len, ovf, e.len, e.ovf);
        end
        checks++;
        if (cycle - e.issue_cycle != 1) begin
          failures++;
          $display("result %0d edges after sampling, expected 1", cycle - e.issue_cycle);
        end
      end
    end
  end

  task automatic send(input logic [15:0] vx, input logic [15:0] vy);
    expect_t e;
    longint unsigned z;
    z = longint'(vx) * longint'(vx) + longint'(vy) * longint'(vy);
    e.ovf = (z > 64'hFFFF_FFFF);
    e.len = 16'(isqrt(e.ovf ? 64'hFFFF_FFFF : z));
    if (e.ovf) ovf_seen++;
    @(negedge clk);
    x = vx; y = vy; in_valid = 1'b1;
    e.issue_cycle = cycle + 1;   // sampled at the coming rising edge
    expq.push_back(e);
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      x = 16'($urandom); y = 16'($urandom);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    send(16'd3, 16'd4);
    send(16'd0, 16'd0);
    send(16'd65535, 16'd0);
    send(16'd65535, 16'd65535);
    send(16'd46341, 16'd46341);
    send(16'd46340, 16'd46340);
    idle(3);
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
      else back_to_back++;
      // a quarter of the vectors use small components
      if ($urandom_range(0, 3) == 0) send(16'($urandom_range(0, 300)), 16'($urandom_range(0, 300)));
      else send(16'($urandom), 16'($urandom));
    end
    idle(5);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results missing", expq.size());
    end
    checks++;
    if (ovf_seen == 0 || back_to_back == 0) begin
      failures++;
      $display("overflow or back-to-back issue never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
