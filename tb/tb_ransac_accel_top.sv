// tb_ransac_accel_top: end-to-end test of the RANSAC accelerator at its
// default size (two 128-point buffers).
//
// The testbench plays both neighbours of the design: a feature-matching
// source that streams frames of matched point pairs (a known affine motion
// with pixel noise on the inliers plus random outliers), and the processor
// that runs the RANSAC loop in software and uses the accelerator for the
// fitness score. It checks every score against the integer reference
// model, every run's length against N + 4 cycles, and that:
//   - a frame streams into one buffer while runs work on the other,
//   - a frame ending during a run has its swap held back until the run ends
//     (and the run still sees the old frame),
//   - processor accesses are stalled during a run,
//   - a frame longer than the buffer is cut and flagged,
//   - the score accumulator saturates,
//   - the frame sizes 12, 24, ..., 108 all score correctly,
//   - a software RANSAC loop (random 3-point samples, a one-point early
//     rejection test, hardware scoring, best-model update) finds a model
//     that scores about as well as the true motion.
// Each of these mechanisms is counted and must happen at least once.
module tb_ransac_accel_top;
  import ransac_pkg::*;
  import ransac_ref_pkg::*;

  localparam int unsigned DEPTH  = 128;   // the design's default
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned AVS_W  = ADDR_W + 2;
  localparam int MAXF = 160;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid = 1'b0;
  logic             in_last = 1'b0;
  point_t           in_point = '0;
  logic             in_ready;
  logic [AVS_W-1:0] avs_address = '0;
  logic             avs_read = 1'b0;
  logic             avs_write = 1'b0;
  logic [31:0]      avs_writedata = '0;
  logic [31:0]      avs_readdata;
  logic             avs_waitrequest;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_runs = 0, n_stalled = 0, n_deferred = 0, n_overflow = 0;
  int n_saturated = 0, n_concurrent = 0, n_swaps = 0, n_rejected = 0;

  ransac_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // observation of internal events
  // run_active: the controller is in its busy state (state encoding 1)
  logic run_active, swap_wait_q = 1'b0;
  assign run_active = (dut.u_ctrl.state != 0);
  always @(posedge clk) begin
    swap_wait_q <= dut.u_switch.swap_wait;
    if (rst_n && dut.u_switch.swap_wait && !swap_wait_q) n_deferred++;
    if (rst_n && (dut.wr_en != 2'b00) && run_active) n_concurrent++;
  end

  // ---------------- frames ------------------------------------------------
  // three frame slots
  int     fn [3];
  longint fx1 [3][MAXF], fy1 [3][MAXF], fx2 [3][MAXF], fy2 [3][MAXF];

  // true motion of the current test, quantised as the hardware sees it
  affine_t th;

  function automatic longint hv(input affine_t h, input int k);
    case (k)
      0: return longint'(h.h0);
      1: return longint'(h.h1);
      2: return longint'(h.h2);
      3: return longint'(h.h3);
      4: return longint'(h.h4);
      default: return longint'(h.h5);
    endcase
  endfunction

  function automatic longint clampc(input longint v);
    return (v < 0) ? 0 : (v > 2047) ? 2047 : v;
  endfunction

  function automatic longint qround(input real v, input real scale);
    real s = v * scale;
    longint q = (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
  endfunction

  // Random motion: small rotation and scale plus a shift.
  function automatic void new_motion();
    real ang = (real'($urandom_range(200)) - 100.0) / 1000.0;   // +-0.1 rad
    real sc  = 0.95 + real'($urandom_range(100)) / 1000.0;
    th.h0 = to16(qround(sc * $cos(ang), 4096.0));
    th.h1 = to16(qround(-sc * $sin(ang), 4096.0));
    th.h2 = to16(qround(real'($urandom_range(120)) - 60.0, 32.0));
    th.h3 = to16(qround(sc * $sin(ang), 4096.0));
    th.h4 = to16(qround(sc * $cos(ang), 4096.0));
    th.h5 = to16(qround(real'($urandom_range(120)) - 60.0, 32.0));
  endfunction

  function automatic void make_frame(input int f, input int n, input int n_out);
    fn[f] = n;
    for (int i = 0; i < n; i++) begin
      real fx, fy;
      fx1[f][i] = 200 + longint'($urandom_range(1600));
      fy1[f][i] = 200 + longint'($urandom_range(1600));
      if ((i * 37) % n < n_out) begin
        fx2[f][i] = longint'($urandom_range(2047));
        fy2[f][i] = longint'($urandom_range(2047));
      end else begin
        fx = (real'(fx1[f][i] * hv(th, 0) + fy1[f][i] * hv(th, 1)) + real'(hv(th, 2)) * 128.0) / 4096.0;
        fy = (real'(fx1[f][i] * hv(th, 3) + fy1[f][i] * hv(th, 4)) + real'(hv(th, 5)) * 128.0) / 4096.0;
        fx2[f][i] = clampc(longint'($floor(fx + 0.5)) + longint'($urandom_range(2)) - 1);
        fy2[f][i] = clampc(longint'($floor(fy + 0.5)) + longint'($urandom_range(2)) - 1);
      end
    end
  endfunction

  bit end_frame_now = 1'b0;

  // Streams a frame; with wait_run set, the final point is held back until
  // end_frame_now is set and a run is in progress, so that the frame
  // ends during that run.
  task automatic stream(input int f, input bit wait_run);
    for (int i = 0; i < fn[f]; i++) begin
      if (wait_run && i == fn[f] - 1) begin
        in_valid = 1'b0;
        while (!(run_active && end_frame_now)) @(negedge clk);
      end
      in_valid = 1'b1;
      in_last  = (i == fn[f] - 1);
      in_point = '{x1: coord_t'(fx1[f][i]), y1: coord_t'(fy1[f][i]),
                   x2: coord_t'(fx2[f][i]), y2: coord_t'(fy2[f][i])};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  // ---------------- processor bus -----------------------------------------
  int stall_cycles;
  semaphore bus = new(1);

  task automatic av_write(input logic [AVS_W-1:0] a, input logic [31:0] d);
    bus.get();
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    stall_cycles = 0;
    #1;
    while (avs_waitrequest) begin
      @(negedge clk);
      stall_cycles++;
      #1;
    end
    @(negedge clk);
    avs_write = 1'b0;
    if (stall_cycles > 0) n_stalled++;
    bus.put();
  endtask

  task automatic av_read(input logic [AVS_W-1:0] a, output logic [31:0] d);
    bus.get();
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    stall_cycles = 0;
    #1;
    while (avs_waitrequest) begin
      @(negedge clk);
      stall_cycles++;
      #1;
    end
    d = avs_readdata;
    @(negedge clk);
    avs_read = 1'b0;
    if (stall_cycles > 1) n_stalled++;
    bus.put();
  endtask

  function automatic logic [AVS_W-1:0] reg_a(input logic [2:0] r);
    return AVS_W'(r);
  endfunction

  function automatic logic [AVS_W-1:0] win_a(input int idx, input bit half);
    return {1'b1, ADDR_W'(idx), half};
  endfunction

  function automatic longint ref_score(input int f, input affine_t h, input longint thd2);
    longint acc = 0;
    int n = (fn[f] > DEPTH) ? DEPTH : fn[f];
    for (int i = 0; i < n; i++)
      acc = ref_add(acc, ref_point_score(fx1[f][i], fy1[f][i], fx2[f][i], fy2[f][i],
                                         hv(h, 0), hv(h, 1), hv(h, 2), hv(h, 3), hv(h, 4),
                                         hv(h, 5), thd2));
    return acc;
  endfunction

  // Scores hypothesis h on the processed frame f; returns the hardware score.
  task automatic score_hyp(input int f, input affine_t h, input longint thd2,
                           output longint s);
    logic [31:0] d;
    int n = (fn[f] > DEPTH) ? DEPTH : fn[f];
    longint r;
    av_write(reg_a(REG_H01), {h.h1, h.h0});
    av_write(reg_a(REG_H23), {h.h3, h.h2});
    av_write(reg_a(REG_H45), {h.h5, h.h4});
    av_write(reg_a(REG_THDIST), 32'(thd2));
    av_write(reg_a(REG_CTRL), 32'h1);
    // the read is issued in the run's second cycle: n + 3 busy cycles
    // remain, then its own wait state
    av_read(reg_a(REG_SCORE), d);
    check(stall_cycles == n + 4,
          $sformatf("run over %0d points: read stalled %0d cycles, expected %0d",
                    n, stall_cycles, n + 4));
    s = longint'(d);
    r = ref_score(f, h, thd2);
    check(s == r, $sformatf("score %0d expected %0d (n=%0d)", s, r, n));
    if (s == SCORE_MAX) n_saturated++;
    n_runs++;
  endtask

  task automatic wait_frame(input logic [7:0] fc);
    logic [31:0] d;
    do av_read(reg_a(REG_CTRL), d); while (d[ST_FRAME_LO +: 8] != fc);
    n_swaps++;
  endtask

  // The true motion with one term moved by 200..1000 LSBs.
  function automatic affine_t wrong_hyp();
    affine_t h = th;
    param_t  dlt = param_t'(($urandom_range(1) != 0 ? 1 : -1) * (200 + int'($urandom_range(800))));
    case ($urandom_range(5))
      0: h.h0 += dlt;
      1: h.h1 += dlt;
      2: h.h2 += dlt;
      3: h.h3 += dlt;
      4: h.h4 += dlt;
      default: h.h5 += dlt;
    endcase
    return h;
  endfunction

  // ---------------- software RANSAC on the processor ----------------------
  // Three distinct random samples, affine model by Cramer's rule, a
  // one-point early rejection test, hardware fitness score, best update.
  task automatic sw_ransac(input int f, input int iters, input longint thd2,
                           output longint best);
    best = SCORE_MAX + 1;
    for (int it = 0; it < iters; it++) begin
      int s[3];
      real px1[3], py1[3], px2[3], py2[3];
      real det, a[6];
      affine_t h;
      longint sc;
      logic [31:0] d;
      bit ok;
      s[0] = $urandom_range(fn[f] - 1);
      do s[1] = $urandom_range(fn[f] - 1); while (s[1] == s[0]);
      do s[2] = $urandom_range(fn[f] - 1); while (s[2] == s[0] || s[2] == s[1]);
      for (int k = 0; k < 3; k++) begin
        av_read(win_a(s[k], 1'b0), d);
        px1[k] = real'(d[10:0]); py1[k] = real'(d[26:16]);
        av_read(win_a(s[k], 1'b1), d);
        px2[k] = real'(d[10:0]); py2[k] = real'(d[26:16]);
      end
      det = px1[0] * (py1[1] - py1[2]) - py1[0] * (px1[1] - px1[2])
          + (px1[1] * py1[2] - px1[2] * py1[1]);
      if (det < 1000.0 && det > -1000.0) continue;   // near-collinear sample
      for (int c = 0; c < 2; c++) begin
        real v0 = (c == 0) ? px2[0] : py2[0];
        real v1 = (c == 0) ? px2[1] : py2[1];
        real v2 = (c == 0) ? px2[2] : py2[2];
        real ka, kb, kc;
        ka = (v0 * (py1[1] - py1[2]) - py1[0] * (v1 - v2) + (v1 * py1[2] - v2 * py1[1])) / det;
        kb = (px1[0] * (v1 - v2) - v0 * (px1[1] - px1[2]) + (px1[1] * v2 - px1[2] * v1)) / det;
        kc = (px1[0] * (py1[1] * v2 - py1[2] * v1) - py1[0] * (px1[1] * v2 - px1[2] * v1)
              + v0 * (px1[1] * py1[2] - px1[2] * py1[1])) / det;
        a[3*c] = ka; a[3*c+1] = kb; a[3*c+2] = kc;
      end
      h.h0 = to16(qround(a[0], 4096.0)); h.h1 = to16(qround(a[1], 4096.0));
      h.h2 = to16(qround(a[2], 32.0));
      h.h3 = to16(qround(a[3], 4096.0)); h.h4 = to16(qround(a[4], 4096.0));
      h.h5 = to16(qround(a[5], 32.0));
      // early rejection: one random point must agree with the model
      begin
        int t = $urandom_range(fn[f] - 1);
        ok = ref_point_score(fx1[f][t], fy1[f][t], fx2[f][t], fy2[f][t],
                             hv(h, 0), hv(h, 1), hv(h, 2), hv(h, 3), hv(h, 4), hv(h, 5),
                             thd2) < thd2;
      end
      if (!ok) begin
        n_rejected++;
        continue;
      end
      score_hyp(f, h, thd2, sc);
      if (sc < best) best = sc;
    end
  endtask

  // ---------------- test sequence -----------------------------------------
  localparam int FA = 0, FB = 1, FC = 2;
  longint thd2 = 9 * 4096;   // 3-pixel threshold

  initial begin
    logic [31:0] d;
    longint s_true, s_wrong, best;
    affine_t h;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // frame A: 100 points, 20 outliers
    new_motion();
    make_frame(FA, 100, 20);
    stream(FA, 0);
    wait_frame(8'd1);
    av_read(reg_a(REG_COUNT), d);
    check(d == 32'd100, "frame A count");
    // the processor reads the whole frame through the window
    for (int i = 0; i < fn[FA]; i++) begin
      av_read(win_a(i, 1'b0), d);
      check(longint'(d[10:0]) == fx1[FA][i] && longint'(d[26:16]) == fy1[FA][i], $sformatf("A point %0d first half", i));
      av_read(win_a(i, 1'b1), d);
      check(longint'(d[10:0]) == fx2[FA][i] && longint'(d[26:16]) == fy2[FA][i], $sformatf("A point %0d second half", i));
    end

    // frame B streams in while hypotheses are scored on frame A; B ends
    // during a run, so its swap must wait
    make_frame(FB, 108, 20);
    fork
      stream(FB, 1);
      begin
        longint sw[4];
        for (int k = 0; k < 4; k++) begin
          h = wrong_hyp();
          score_hyp(FA, h, thd2, sw[k]);
        end
        // frame B ends during this run; the run must still score frame A
        end_frame_now = 1'b1;
        score_hyp(FA, th, thd2, s_true);
        for (int k = 0; k < 4; k++)
          check(s_true < sw[k], "true motion scores best on frame A");
      end
    join
    wait_frame(8'd2);
    av_read(reg_a(REG_COUNT), d);
    check(d == 32'd108, "frame B count");
    score_hyp(FB, th, thd2, s_true);
    check(s_true < 20 * thd2 + 108 * 2 * 4096, "true motion fits frame B");

    // software RANSAC on frame B
    sw_ransac(FB, 30, thd2, best);
    check(best <= 2 * s_true, $sformatf("RANSAC best %0d against true %0d", best, s_true));

    // frame sizes 12 .. 108
    for (int n = 12; n <= 108; n += 12) begin
      new_motion();
      make_frame(FC, n, n / 5);
      stream(FC, 0);
      wait_frame(8'(n_swaps + 1));
      av_read(reg_a(REG_CTRL), d);
      check(!d[ST_OVERFLOW], "no overflow");
      score_hyp(FC, th, thd2, s_true);
      h = wrong_hyp();
      score_hyp(FC, h, thd2, s_wrong);
      check(s_true <= s_wrong, $sformatf("true motion scores best, n=%0d", n));
    end

    // overflow: 140 points into a 128-point buffer
    make_frame(FC, 140, 10);
    stream(FC, 0);
    wait_frame(8'(n_swaps + 1));
    av_read(reg_a(REG_CTRL), d);
    check(d[ST_OVERFLOW], "overflow flagged");
    if (d[ST_OVERFLOW]) n_overflow++;
    av_read(reg_a(REG_COUNT), d);
    check(d == DEPTH, "overflowed frame keeps DEPTH points");
    score_hyp(FC, th, thd2, s_true);

    // saturation: a wrong model with a 30-pixel threshold
    h = wrong_hyp();
    h.h2 += 16'sd3000;
    score_hyp(FC, h, 900 * 4096 / 2, s_wrong);

    check(n_runs > 0,       "runs happened");
    check(n_stalled > 0,    "processor stalls happened");
    check(n_deferred > 0,   "deferred swaps happened");
    check(n_concurrent > 0, "streaming during a run happened");
    check(n_overflow > 0,   "overflow happened");
    check(n_saturated > 0,  "saturation happened");
    check(n_swaps > 0,      "buffer swaps happened");
    check(n_rejected > 0,   "early rejections happened");
    $display("runs=%0d stalls=%0d deferred=%0d concurrent=%0d overflow=%0d saturated=%0d swaps=%0d rejected=%0d",
             n_runs, n_stalled, n_deferred, n_concurrent, n_overflow, n_saturated, n_swaps, n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
