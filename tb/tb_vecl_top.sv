// tb_vecl_top: end-to-end test of the whole design at its default sizes.
//
// Vector length unit: a stream of vectors, back-to-back and with gaps,
// including the extremes and sums that overflow 32 bits; every length is
// compared with an integer square root of x*x + y*y (saturated on
// overflow) and must appear one edge after its vector was sampled.
//
// Measurement board: each of the three timing frames is started with
// random test words and a programmed delay; the captured word must equal
// the unit's function of the word (square or square root) and done must
// come exactly 'delay' edges after the start edge. A start during a
// measurement must be ignored.
//
// Mechanisms counted, each of which must occur at least once: vector
// results, back-to-back vectors, overflow saturation, a completed
// measurement in each frame, and a start ignored while busy.
module tb_vecl_top;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_vec = 0, n_b2b = 0, n_ovf = 0, n_sq = 0, n_rt = 0, n_ar = 0, n_busy = 0;

  logic        rst_n;
  logic        vl_in_valid, vl_out_valid, vl_ovf;
  logic [15:0] vl_x, vl_y, vl_len;
  logic        sq_start, sq_done, sq_busy;
  logic [7:0]  sq_delay, rt_delay, ar_delay;
  logic [15:0] sq_din, ar_din, rt_dout;
  logic [31:0] sq_dout, rt_din, ar_dout;
  logic        rt_start, rt_done, rt_busy, ar_start, ar_done, ar_busy;

  vecl_top dut (
    .clk(clk), .rst_n(rst_n),
    .vl_in_valid(vl_in_valid), .vl_x(vl_x), .vl_y(vl_y),
    .vl_out_valid(vl_out_valid), .vl_len(vl_len), .vl_ovf(vl_ovf),
    .sq_start(sq_start), .sq_delay(sq_delay), .sq_din(sq_din),
    .sq_dout(sq_dout), .sq_done(sq_done), .sq_busy(sq_busy),
    .rt_start(rt_start), .rt_delay(rt_delay), .rt_din(rt_din),
    .rt_dout(rt_dout), .rt_done(rt_done), .rt_busy(rt_busy),
    .ar_start(ar_start), .ar_delay(ar_delay), .ar_din(ar_din),
    .ar_dout(ar_dout), .ar_done(ar_done), .ar_busy(ar_busy)
  );

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- vector length unit ----------------
  typedef struct {
    int          issue_cycle;
    logic [15:0] len;
    logic        ovf;
  } expect_t;
  expect_t expq[$];

  always @(negedge clk) begin
    if (rst_n && vl_out_valid) begin
      expect_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected vector result");
      end else begin
        e = expq.pop_front();
        if (vl_len !== e.len || vl_ovf !== e.ovf) begin
          failures++;
          if (failures < 10) $display("len %0d ovf %0d, expected %0d %0d", vl_len, vl_ovf, e.len, e.ovf);
        end
        if (cycle - e.issue_cycle != 1) begin
          failures++;
          $display("vector result %0d edges after sampling", cycle - e.issue_cycle);
        end
        n_vec++;
      end
    end
  end

  task automatic send(input logic [15:0] vx, input logic [15:0] vy);
    expect_t e;
    longint unsigned z;
    z = longint'(vx) * longint'(vx) + longint'(vy) * longint'(vy);
    e.ovf = (z > 64'hFFFF_FFFF);
    e.len = 16'(isqrt(e.ovf ? 64'hFFFF_FFFF : z));
    if (e.ovf) n_ovf++;
    @(negedge clk);
    if (vl_in_valid) n_b2b++;
    vl_x = vx; vl_y = vy; vl_in_valid = 1'b1;
    e.issue_cycle = cycle + 1;
    expq.push_back(e);
  endtask

  task automatic vl_idle();
    @(negedge clk);
    vl_in_valid = 1'b0;
  endtask

  // ---------------- measurement frames ----------------
  // kind: 0 sliced squarer, 1 square root array, 2 CAF array squarer
  task automatic measure(input int kind, input logic [31:0] word, input logic [7:0] dly);
    int t0, eff;
    logic [31:0] got, want;
    logic d;
    eff = (dly == 0) ? 1 : int'(dly);
    @(negedge clk);
    case (kind)
      0: begin sq_din = word[15:0]; sq_delay = dly; sq_start = 1'b1; end
      1: begin rt_din = word;       rt_delay = dly; rt_start = 1'b1; end
      default: begin ar_din = word[15:0]; ar_delay = dly; ar_start = 1'b1; end
    endcase
    t0 = cycle + 1;
    @(negedge clk);
    sq_start = 1'b0; rt_start = 1'b0; ar_start = 1'b0;
    // a second start with another word while the frame is busy
    if (eff > 1) begin
      case (kind)
        0: begin sq_din = ~word[15:0]; sq_start = 1'b1; end
        1: begin rt_din = ~word;       rt_start = 1'b1; end
        default: begin ar_din = ~word[15:0]; ar_start = 1'b1; end
      endcase
      n_busy++;
      @(negedge clk);
      sq_start = 1'b0; rt_start = 1'b0; ar_start = 1'b0;
    end
    forever begin
      d = (kind == 0) ? sq_done : (kind == 1) ? rt_done : ar_done;
      if (d) break;
      @(negedge clk);
    end
    got  = (kind == 0) ? sq_dout : (kind == 1) ? 32'(rt_dout) : ar_dout;
    want = (kind == 1) ? 32'(isqrt(longint'(word)))
                       : 32'(longint'(word[15:0]) * longint'(word[15:0]));
    checks++;
    if (got !== want) begin
      failures++;
      $display("frame %0d: word %0d captured %0d, expected %0d", kind, word, got, want);
    end
    checks++;
    if (cycle - t0 != eff) begin
      failures++;
      $display("frame %0d: capture %0d edges after start, delay %0d", kind, cycle - t0, eff);
    end
    case (kind)
      0: n_sq++;
      1: n_rt++;
      default: n_ar++;
    endcase
  endtask

  task automatic require(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("%-28s %0d", what, n);
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
    rst_n = 1'b0;
    vl_in_valid = 1'b0; vl_x = '0; vl_y = '0;
    sq_start = 1'b0; sq_delay = '0; sq_din = '0;
    rt_start = 1'b0; rt_delay = '0; rt_din = '0;
    ar_start = 1'b0; ar_delay = '0; ar_din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // the vector length unit
    send(16'd3, 16'd4);
    send(16'd0, 16'd0);
    send(16'd65535, 16'd65535);
    send(16'd46340, 16'd46340);
    send(16'd46341, 16'd46341);
    vl_idle();
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 3) == 0) vl_idle();
      send(16'($urandom), 16'($urandom));
    end
    vl_idle();
    repeat (4) @(negedge clk);

    // the measurement board
    for (int i = 0; i < 30; i++) begin
      measure(i % 3, $urandom, 8'($urandom_range(0, 12)));
    end
    measure(0, 32'hFFFF, 8'd4);
    measure(1, 32'hFFFF_FFFF, 8'd4);
    measure(2, 32'hFFFF, 8'd4);

    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d vector results missing", expq.size());
    end
    require("vector results", n_vec);
    require("back-to-back vectors", n_b2b);
    require("overflow saturations", n_ovf);
    require("sliced squarer captures", n_sq);
    require("square root captures", n_rt);
    require("array squarer captures", n_ar);
    require("starts ignored while busy", n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
