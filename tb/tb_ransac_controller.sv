// tb_ransac_controller: self-checking test of the RANSAC controller.
//
// Surrounds the controller with behavioural stand-ins: a point buffer with
// one cycle of read latency, and a three-stage valid shift register in
// place of the fitness pipeline. Acting as the processor it writes and reads
// back the hypothesis registers, reads point pairs through the window and
// the status word, then starts runs of several lengths and checks that the
// run is busy for exactly N + 4 cycles, that the N buffer points reach the
// pipeline in order, one per cycle, that the accumulator is cleared once per
// run, that processor accesses are stalled during the run and that the
// score register then shows the pipeline's score.
module tb_ransac_controller;
  import ransac_pkg::*;

  localparam int unsigned DEPTH  = 16;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1);
  localparam int unsigned AVS_W  = ADDR_W + 2;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [AVS_W-1:0]  avs_address = '0;
  logic              avs_read = 1'b0;
  logic              avs_write = 1'b0;
  logic [31:0]       avs_writedata = '0;
  logic [31:0]       avs_readdata;
  logic              avs_waitrequest;
  logic [ADDR_W-1:0] rd_addr;
  point_t            rd_data;
  logic [CNT_W-1:0]  buf_count = '0;
  logic              buf_bank = 1'b0;
  logic              buf_overflow = 1'b0;
  logic [7:0]        buf_frame_cnt = '0;
  logic              hold;
  logic              fs_clear, fs_valid;
  point_t            fs_point;
  affine_t           fs_hyp;
  score_t            fs_thdist2;
  logic [2:0]        fs_stage_valid;
  score_t            fs_score = '0;

  int checks = 0, failures = 0;

  ransac_controller #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // buffer stand-in
  point_t mem [DEPTH];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  // pipeline stand-in: valid bits of stages 1..3
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fs_stage_valid <= '0;
    else        fs_stage_valid <= {fs_stage_valid[1:0], fs_valid};

  // monitor of what enters the pipeline
  point_t seen [$];
  int     n_clear = 0;
  always @(posedge clk) begin
    if (fs_valid) seen.push_back(fs_point);
    if (fs_clear) n_clear++;
  end

  int stall_cycles;

  task automatic av_write(input logic [AVS_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    stall_cycles = 0;
    while (1) begin
      @(posedge clk);
      if (!avs_waitrequest) break;
      stall_cycles++;
    end
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic av_read(input logic [AVS_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    stall_cycles = 0;
    while (1) begin
      #1;
      if (!avs_waitrequest) break;
      stall_cycles++;
      @(negedge clk);
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

  // Starts a run of n points and measures how long the controller is busy.
  task automatic run(input int n, input bit read_during);
    logic [31:0] d;
    int busy;
    for (int i = 0; i < DEPTH; i++)
      mem[i] = '{x1: coord_t'($urandom), y1: coord_t'($urandom),
                 x2: coord_t'($urandom), y2: coord_t'($urandom)};
    buf_count = CNT_W'(n);
    seen.delete();
    n_clear = 0;
    fs_score = score_t'($urandom);
    av_write(reg_a(REG_CTRL), 32'h1);
    if (read_during) begin
      // a read issued in the second busy cycle waits for the rest of the
      // run (n + 3 cycles) plus its own wait state
      av_read(reg_a(REG_SCORE), d);
      if (n > 0)
        check(stall_cycles == n + 4,
              $sformatf("read stalled %0d cycles, expected %0d", stall_cycles, n + 4));
      busy = n + 4;
    end else begin
      busy = 0;
      @(negedge clk);      // bus idle; waitrequest now means busy
      buf_count = CNT_W'($urandom_range(DEPTH)); // must not affect the run
      while (avs_waitrequest) begin
        check(hold, "hold during the run");
        busy++;
        @(negedge clk);
      end
      busy += 1;           // the cycle after the start write was already busy
      if (n > 0)
        check(busy == n + 4, $sformatf("busy %0d cycles, expected %0d", busy, n + 4));
      check(!hold, "hold released after the run");
      av_read(reg_a(REG_SCORE), d);
    end
    check(d == 32'(fs_score), "score register shows the pipeline score");
    check(n_clear == 1, "one clear per run");
    check(seen.size() == n, $sformatf("%0d points entered, expected %0d", seen.size(), n));
    for (int i = 0; i < n && i < seen.size(); i++)
      check(seen[i] == mem[i], $sformatf("point %0d in order", i));
    av_read(reg_a(REG_CTRL), d);
    check(d[ST_BUSY] == 1'b0 && d[ST_DONE] == 1'b1, "status idle and done");
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // hypothesis registers
    av_write(reg_a(REG_H01), 32'h1234_0fed);
    av_write(reg_a(REG_H23), 32'hf00d_8001);
    av_write(reg_a(REG_H45), 32'h7fff_a5a5);
    av_write(reg_a(REG_THDIST), 32'h0009_0000);
    check(stall_cycles == 0, "idle write takes one cycle");
    check(fs_hyp.h0 == 16'h0fed && fs_hyp.h1 == 16'h1234 && fs_hyp.h2 == 16'h8001 &&
          fs_hyp.h3 == 16'hf00d && fs_hyp.h4 == 16'ha5a5 && fs_hyp.h5 == 16'h7fff,
          "hypothesis terms reach the pipeline");
    check(fs_thdist2 == score_t'(32'h0009_0000), "threshold reaches the pipeline");
    av_read(reg_a(REG_H23), d);
    check(d == 32'hf00d_8001, "H23 read back");
    check(stall_cycles == 1, "idle read has one wait state");
    av_read(reg_a(REG_THDIST), d);
    check(d == 32'h0009_0000, "THDIST read back");

    // status and count pass-through
    buf_bank = 1'b1; buf_overflow = 1'b1; buf_frame_cnt = 8'h5a; buf_count = CNT_W'(11);
    av_read(reg_a(REG_CTRL), d);
    check(d[ST_BANK] && d[ST_OVERFLOW] && d[ST_FRAME_LO +: 8] == 8'h5a && !d[ST_BUSY],
          "status word");
    av_read(reg_a(REG_COUNT), d);
    check(d == 32'd11, "count register");

    // point window
    for (int i = 0; i < DEPTH; i++)
      mem[i] = '{x1: coord_t'($urandom), y1: coord_t'($urandom),
                 x2: coord_t'($urandom), y2: coord_t'($urandom)};
    for (int i = 0; i < DEPTH; i++) begin
      av_read(win_a(i, 1'b0), d);
      check(d == {5'b0, mem[i].y1, 5'b0, mem[i].x1}, $sformatf("window point %0d first half", i));
      av_read(win_a(i, 1'b1), d);
      check(d == {5'b0, mem[i].y2, 5'b0, mem[i].x2}, $sformatf("window point %0d second half", i));
    end

    // runs
    run(1, 0);
    run(12, 0);
    run(DEPTH, 0);
    run(7, 1);
    run(DEPTH, 1);
    run(0, 0);
    // a write during a run is held off and lands afterwards
    buf_count = CNT_W'(10);
    av_write(reg_a(REG_CTRL), 32'h1);
    av_write(reg_a(REG_H01), 32'hbeef_cafe);
    check(stall_cycles == 10 + 4 - 1, $sformatf("write stalled %0d cycles", stall_cycles));
    check(fs_hyp.h0 == 16'hcafe && fs_hyp.h1 == 16'hbeef, "held write lands after the run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
