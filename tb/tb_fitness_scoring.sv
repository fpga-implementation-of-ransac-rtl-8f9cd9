// tb_fitness_scoring: self-checking test of the fitness-scoring pipeline.
//
// Streams sets of random point pairs through the pipeline for random and
// hand-made hypotheses and compares the accumulated score against the
// integer reference model, cycle by cycle: with point i presented in cycle
// c0+i, the sum over points 0..i must appear in cycle c0+i+4 and not
// earlier. Also checks exact fits (score 0), the outlier penalty, clamping
// of huge residuals, accumulator saturation, clear, and input gaps.
module tb_fitness_scoring;
  import ransac_pkg::*;
  import ransac_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clear = 1'b0;
  logic       in_valid = 1'b0;
  point_t     in_point = '0;
  affine_t    hyp = '0;
  score_t     thdist2 = '0;
  logic [2:0] stage_valid;
  score_t     score;

  int checks = 0, failures = 0;

  fitness_scoring dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  localparam int MAXN = 160;
  longint px1[MAXN], py1[MAXN], px2[MAXN], py2[MAXN];
  longint h[6];
  longint thd2;

  // Expected running sums: exp_sum[i] = sum of points 0..i-1.
  longint exp_sum[MAXN+1];

  task automatic run_set(input int n, input int gap_pct);
    int   cyc;
    int   sent;
    int   in_cycle[MAXN];
    int   c0;
    // apply hypothesis, clear
    hyp = '{h0: to16(h[0]), h1: to16(h[1]), h2: to16(h[2]),
            h3: to16(h[3]), h4: to16(h[4]), h5: to16(h[5])};
    thdist2 = score_t'(thd2);
    exp_sum[0] = 0;
    for (int i = 0; i < n; i++)
      exp_sum[i+1] = ref_add(exp_sum[i], ref_point_score(px1[i], py1[i], px2[i], py2[i],
                             h[0], h[1], h[2], h[3], h[4], h[5], thd2));
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(score == 0, "clear zeroes the score");
    // stream, recording the cycle of each point
    cyc = 0; sent = 0;
    while (sent < n || cyc < 200000) begin
      if (sent < n && ($urandom_range(99) >= gap_pct)) begin
        in_valid = 1'b1;
        in_point = '{x1: coord_t'(px1[sent]), y1: coord_t'(py1[sent]),
                     x2: coord_t'(px2[sent]), y2: coord_t'(py2[sent])};
        in_cycle[sent] = cyc;
        sent++;
      end else begin
        in_valid = 1'b0;
        in_point = '0;
      end
      @(negedge clk);
      cyc++;
      // score in cycle cyc: includes every point presented at or before cyc-4
      begin
        int k = 0;
        while (k < sent && in_cycle[k] <= cyc - 4) k++;
        check(score == score_t'(exp_sum[k]),
              $sformatf("n=%0d cycle %0d: score %0d expected %0d (%0d points)",
                        n, cyc, score, exp_sum[k], k));
        if (sent == n && k == n) break;
      end
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(score == score_t'(exp_sum[n]), "score holds after the run");
    check(stage_valid == 3'b000, "pipeline drained");
  endtask

  function automatic void rand_points(input int n);
    for (int i = 0; i < n; i++) begin
      px1[i] = $urandom_range(2047);
      py1[i] = $urandom_range(2047);
      px2[i] = $urandom_range(2047);
      py2[i] = $urandom_range(2047);
    end
  endfunction

  // Points that a given affine map sends exactly onto integer positions:
  // translation-only maps with integer shifts.
  function automatic void shift_points(input int n, input int sx, input int sy,
                                       input int n_out);
    for (int i = 0; i < n; i++) begin
      px1[i] = $urandom_range(1900) + 50;
      py1[i] = $urandom_range(1900) + 50;
      px2[i] = px1[i] + sx;
      py2[i] = py1[i] + sy;
      if (i < n_out) px2[i] = (px2[i] + 500) % 2048;  // gross outlier
    end
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(score == 0 && stage_valid == 0, "reset state");

    // 1. exact translation, no outliers: score must be 0
    shift_points(100, 7, -5, 0);
    h = '{4096, 0, 7*32, 0, 4096, -5*32};
    thd2 = 9 * 4096;
    run_set(100, 0);
    check(score == 0, "exact fit scores 0");

    // 2. same with 10 gross outliers: exactly 10 penalties
    shift_points(100, 7, -5, 10);
    run_set(100, 0);
    check(score == score_t'(10 * 9 * 4096), "ten outliers cost ten penalties");

    // 3. half-pixel error on every point: 0.25 px^2 each (inlier)
    shift_points(64, 3, 3, 0);
    h = '{4096, 0, 3*32 + 16, 0, 4096, 3*32};
    run_set(64, 0);
    check(score == score_t'(64 * 1024), "half-pixel residuals cost 0.25 each");

    // 4. random hypotheses and points, back to back and with gaps
    for (int t = 0; t < 20; t++) begin
      int n = $urandom_range(120) + 1;
      rand_points(n);
      for (int j = 0; j < 6; j++) h[j] = longint'($signed(16'($urandom)));
      thd2 = $urandom_range((1 << 21) - 1);
      run_set(n, (t % 2) ? 30 : 0);
    end

    // 5. near-identity hypotheses on mostly consistent data (small residuals)
    for (int t = 0; t < 10; t++) begin
      int n = 108;
      shift_points(n, $urandom_range(20) - 10, $urandom_range(20) - 10, 20);
      h = '{4096 + $urandom_range(40) - 20, $urandom_range(40) - 20,
            $urandom_range(800) - 400, $urandom_range(40) - 20,
            4096 + $urandom_range(40) - 20, $urandom_range(800) - 400};
      thd2 = ($urandom_range(30) + 1) * 4096;
      run_set(n, (t % 3 == 0) ? 50 : 0);
    end

    // 6. saturation: 150 outliers at the largest penalty
    rand_points(150);
    h = '{0, 0, 0, 0, 0, 0};
    thd2 = (1 << 21) - 1;
    run_set(150, 0);
    check(score == score_t'((1 << 21) - 1), "accumulator saturates");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
