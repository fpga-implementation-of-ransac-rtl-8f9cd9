// tb_video_frames: the accelerator in its intended operating mode, at full
// size and real time: 30 frames per second at a 100 MHz clock.
//
// Each frame period is 3,333,333 cycles. A feature-matching model emits the
// 100 matched point pairs of the next frame evenly over the whole period,
// with in_last at the period's end, so the input stream always runs in
// parallel with the processing of the previous frame. After each swap, a
// processor model runs RANSAC on the new frame with a time-dependent
// stop: iterations start only while less than the 25 ms budget (2,500,000
// cycles) has elapsed. The software steps cost what they cost on a 100 MHz
// soft processor, taken as idle delays: sampling 40.56 us, hypothesis
// generation 58.05 us, one-point early rejection 31.65 us, best-model
// update 0.68 us. Fitness scoring is done by the accelerator.
//
// Checks: the next frame streams into the other buffer during the RANSAC
// loop; every hardware score against the integer reference model; each
// run's N + 4 cycles; the RANSAC loop ends before the next frame's swap,
// so no swap is ever held back; the number of iterations matches the
// budget divided by the per-iteration cost; and the best hypothesis of
// each frame scores within 2x of the true motion.
module tb_video_frames;
  import ransac_pkg::*;
  import ransac_ref_pkg::*;

  localparam int unsigned DEPTH  = 128;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned AVS_W  = ADDR_W + 2;

  localparam int FRAME_CYC  = 3_333_333;  // 30 fps at 100 MHz
  localparam int BUDGET_CYC = 2_500_000;  // 25 ms RANSAC budget
  localparam int NPTS       = 100;
  localparam int NOUT       = 20;
  localparam int NFRAMES    = 3;          // frames processed
  // software step costs in cycles at 100 MHz
  localparam int C_SAMPLE = 4056, C_HYP = 5805, C_TDD = 3165, C_UPD = 68;

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
  int n_runs = 0, n_rejected = 0, n_concurrent = 0, n_held = 0;
  bit in_ransac = 1'b0;   // the processor is inside a frame's RANSAC loop
  longint cycle = 0;

  ransac_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat ((NFRAMES + 2) * FRAME_CYC) @(posedge clk);
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

  always @(posedge clk) begin
    if (rst_n && dut.u_switch.swap_wait) n_held++;
    if (rst_n && (dut.wr_en != 2'b00) && in_ransac) n_concurrent++;
  end

  // ---------------- frames: slot = frame number mod 2 ----------------------
  longint fx1 [2][NPTS], fy1 [2][NPTS], fx2 [2][NPTS], fy2 [2][NPTS];
  affine_t motion [2];

  function automatic longint clampc(input longint v);
    return (v < 0) ? 0 : (v > 2047) ? 2047 : v;
  endfunction

  function automatic longint qround(input real v, input real scale);
    real s = v * scale;
    longint q = (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
  endfunction

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

  function automatic void make_frame(input int f);
    real ang = (real'($urandom_range(200)) - 100.0) / 1000.0;
    real sc  = 0.95 + real'($urandom_range(100)) / 1000.0;
    affine_t th;
    th.h0 = to16(qround(sc * $cos(ang), 4096.0));
    th.h1 = to16(qround(-sc * $sin(ang), 4096.0));
    th.h2 = to16(qround(real'($urandom_range(120)) - 60.0, 32.0));
    th.h3 = to16(qround(sc * $sin(ang), 4096.0));
    th.h4 = to16(qround(sc * $cos(ang), 4096.0));
    th.h5 = to16(qround(real'($urandom_range(120)) - 60.0, 32.0));
    motion[f] = th;
    for (int i = 0; i < NPTS; i++) begin
      real fx, fy;
      fx1[f][i] = 200 + longint'($urandom_range(1600));
      fy1[f][i] = 200 + longint'($urandom_range(1600));
      if ((i * 37) % NPTS < NOUT) begin
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

  function automatic longint ref_score(input int f, input affine_t h, input longint thd2);
    longint acc = 0;
    for (int i = 0; i < NPTS; i++)
      acc = ref_add(acc, ref_point_score(fx1[f][i], fy1[f][i], fx2[f][i], fy2[f][i],
                                         hv(h, 0), hv(h, 1), hv(h, 2), hv(h, 3), hv(h, 4),
                                         hv(h, 5), thd2));
    return acc;
  endfunction

  // ---------------- feature-matching source --------------------------------
  // Frame k's points are spread over period k; its last point ends the period.
  initial begin : source
    longint t0, due;
    @(posedge rst_n);
    for (int k = 0; k <= NFRAMES; k++) begin
      t0 = cycle;
      make_frame(k % 2);
      for (int i = 0; i < NPTS; i++) begin
        due = t0 + longint'(i + 1) * FRAME_CYC / NPTS - 1;
        while (cycle < due) @(negedge clk);
        in_valid = 1'b1;
        in_last  = (i == NPTS - 1);
        in_point = '{x1: coord_t'(fx1[k % 2][i]), y1: coord_t'(fy1[k % 2][i]),
                     x2: coord_t'(fx2[k % 2][i]), y2: coord_t'(fy2[k % 2][i])};
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 1'b0;
        in_last  = 1'b0;
      end
    end
  end

  // ---------------- processor ----------------------------------------------
  int stall_cycles;

  task automatic av_write(input logic [AVS_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    #1;
    while (avs_waitrequest) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic av_read(input logic [AVS_W-1:0] a, output logic [31:0] d);
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
  endtask

  function automatic logic [AVS_W-1:0] reg_a(input logic [2:0] r);
    return AVS_W'(r);
  endfunction

  function automatic logic [AVS_W-1:0] win_a(input int idx, input bit half);
    return {1'b1, ADDR_W'(idx), half};
  endfunction

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic score_hyp(input int f, input affine_t h, input longint thd2,
                           output longint s);
    logic [31:0] d;
    av_write(reg_a(REG_H01), {h.h1, h.h0});
    av_write(reg_a(REG_H23), {h.h3, h.h2});
    av_write(reg_a(REG_H45), {h.h5, h.h4});
    av_write(reg_a(REG_THDIST), 32'(thd2));
    av_write(reg_a(REG_CTRL), 32'h1);
    av_read(reg_a(REG_SCORE), d);
    check(stall_cycles == NPTS + 4, $sformatf("run stalled %0d cycles", stall_cycles));
    s = longint'(d);
    check(s == ref_score(f, h, thd2), "score matches the reference");
    n_runs++;
  endtask

  // One frame of time-bounded RANSAC on the processed buffer.
  task automatic ransac_frame(input int f, input longint thd2, output int iters,
                              output longint best);
    longint t0 = cycle;
    best  = SCORE_MAX + 1;
    iters = 0;
    while (cycle - t0 < BUDGET_CYC) begin
      int s[3];
      real px1[3], py1[3], px2[3], py2[3];
      real det, a[6];
      affine_t h;
      longint sc;
      logic [31:0] d;
      longint ts = cycle;
      iters++;
      // 1. sample three distinct points
      s[0] = $urandom_range(NPTS - 1);
      do s[1] = $urandom_range(NPTS - 1); while (s[1] == s[0]);
      do s[2] = $urandom_range(NPTS - 1); while (s[2] == s[0] || s[2] == s[1]);
      for (int k = 0; k < 3; k++) begin
        av_read(win_a(s[k], 1'b0), d);
        px1[k] = real'(d[10:0]); py1[k] = real'(d[26:16]);
        av_read(win_a(s[k], 1'b1), d);
        px2[k] = real'(d[10:0]); py2[k] = real'(d[26:16]);
      end
      idle(C_SAMPLE - int'(cycle - ts));
      // 2. hypothesis by Cramer's rule
      idle(C_HYP);
      det = px1[0] * (py1[1] - py1[2]) - py1[0] * (px1[1] - px1[2])
          + (px1[1] * py1[2] - px1[2] * py1[1]);
      if (det < 1000.0 && det > -1000.0) begin
        n_rejected++;
        continue;
      end
      for (int c = 0; c < 2; c++) begin
        real v0 = (c == 0) ? px2[0] : py2[0];
        real v1 = (c == 0) ? px2[1] : py2[1];
        real v2 = (c == 0) ? px2[2] : py2[2];
        a[3*c]   = (v0 * (py1[1] - py1[2]) - py1[0] * (v1 - v2) + (v1 * py1[2] - v2 * py1[1])) / det;
        a[3*c+1] = (px1[0] * (v1 - v2) - v0 * (px1[1] - px1[2]) + (px1[1] * v2 - px1[2] * v1)) / det;
        a[3*c+2] = (px1[0] * (py1[1] * v2 - py1[2] * v1) - py1[0] * (px1[1] * v2 - px1[2] * v1)
                    + v0 * (px1[1] * py1[2] - px1[2] * py1[1])) / det;
      end
      h.h0 = to16(qround(a[0], 4096.0)); h.h1 = to16(qround(a[1], 4096.0));
      h.h2 = to16(qround(a[2], 32.0));
      h.h3 = to16(qround(a[3], 4096.0)); h.h4 = to16(qround(a[4], 4096.0));
      h.h5 = to16(qround(a[5], 32.0));
      // 3. one-point early rejection
      idle(C_TDD);
      begin
        int t = $urandom_range(NPTS - 1);
        if (ref_point_score(fx1[f][t], fy1[f][t], fx2[f][t], fy2[f][t],
                            hv(h, 0), hv(h, 1), hv(h, 2), hv(h, 3), hv(h, 4), hv(h, 5),
                            thd2) >= thd2) begin
          n_rejected++;
          continue;
        end
      end
      // 4. fitness score in hardware
      score_hyp(f, h, thd2, sc);
      // 5. best-model update
      idle(C_UPD);
      if (sc < best) best = sc;
    end
  endtask

  initial begin : processor
    logic [31:0] d;
    longint thd2;
    longint best, s_true;
    int iters;
    // per-iteration cost bounds in cycles
    int c_min, c_max;
    thd2  = 9 * 4096;
    c_min = C_SAMPLE + C_HYP;                                  // near-collinear sample
    c_max = C_SAMPLE + C_HYP + C_TDD + C_UPD + 10 * 6 + NPTS + 20;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NFRAMES; k++) begin
      // wait for frame k to be swapped in
      do begin
        idle(1000);
        av_read(reg_a(REG_CTRL), d);
      end while (d[ST_FRAME_LO +: 8] != 8'(k + 1));
      av_read(reg_a(REG_COUNT), d);
      check(d == NPTS, "frame point count");
      in_ransac = 1'b1;
      ransac_frame(k % 2, thd2, iters, best);
      in_ransac = 1'b0;
      s_true = ref_score(k % 2, motion[k % 2], thd2);
      check(best <= 2 * s_true, $sformatf("frame %0d: best %0d against true %0d", k, best, s_true));
      check(iters >= BUDGET_CYC / c_max && iters <= BUDGET_CYC / c_min + 1,
            $sformatf("frame %0d: %0d iterations in the budget", k, iters));
      av_read(reg_a(REG_CTRL), d);
      check(d[ST_FRAME_LO +: 8] == 8'(k + 1), "RANSAC ended before the next frame");
      $display("frame %0d: %0d iterations, best score %0d (true motion %0d)", k, iters, best, s_true);
    end
    check(n_held == 0, "no swap was held back");
    check(n_concurrent > 0, "next frame streamed in during RANSAC");
    check(n_rejected > 0, "early rejections happened");
    $display("runs=%0d rejected=%0d concurrent_writes=%0d", n_runs, n_rejected, n_concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
