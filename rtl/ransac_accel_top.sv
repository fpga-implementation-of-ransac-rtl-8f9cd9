// ransac_accel_top: RANSAC fitness-scoring accelerator with double-buffered
// point storage, for real-time affine estimation between video frames.
//
// Matched point pairs of each frame arrive on a valid/ready stream and are
// written into one of two point buffers while the processor's RANSAC loop
// works on the previous frame, held in the other. At each frame's end the
// buffer switching controller swaps the two. For every hypothesis the
// processor writes the six affine terms and the outlier threshold and
// starts a run; the RANSAC controller then takes the processed buffer over
// and streams its points, one per cycle, through the three-stage fitness
// scoring pipeline. A run over N points takes N + 4 cycles, during which
// the processor is held off with waitrequest; the score is then readable.
//
//   stream ──> buffer_switch_ctrl ──> point_buffer 0 / 1 ──> (read mux)
//                                                              │
//   processor <──> ransac_controller <─────────────────────────┘
//                        │
//                        └──> fitness_scoring
//
// The processor (sampling, hypothesis generation, early rejection, best
// model, time-bounded loop) and the upstream feature matching are outside
// this block; their buses are the ports below. See ransac_controller for
// the register map.
module ransac_accel_top
  import ransac_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,                 // points per buffer
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned CNT_W  = $clog2(DEPTH + 1),
  parameter int unsigned AVS_W  = ADDR_W + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // point pairs from feature matching
  input  logic             in_valid,
  input  logic             in_last,
  input  point_t           in_point,
  output logic             in_ready,
  // processor slave port
  input  logic [AVS_W-1:0] avs_address,
  input  logic             avs_read,
  input  logic             avs_write,
  input  logic [31:0]      avs_writedata,
  output logic [31:0]      avs_readdata,
  output logic             avs_waitrequest
);

  logic [1:0]        wr_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  point_t            wr_data, rd_data0, rd_data1, rd_data;
  logic              bank, overflow, hold;
  logic [CNT_W-1:0]  count;
  logic [7:0]        frame_cnt;

  logic              fs_clear, fs_valid;
  point_t            fs_point;
  affine_t           fs_hyp;
  score_t            fs_thdist2, fs_score;
  logic [2:0]        fs_stage_valid;

  buffer_switch_ctrl #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .CNT_W(CNT_W)) u_switch (
    .clk, .rst_n,
    .in_valid, .in_last, .in_point, .in_ready,
    .hold,
    .wr_en, .wr_addr, .wr_data,
    .rd_data0, .rd_data1, .rd_data,
    .bank, .count, .overflow, .frame_cnt, .swap_wait()
  );

  point_buffer #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_buf0 (
    .clk, .wr_en(wr_en[0]), .wr_addr, .wr_data, .rd_addr, .rd_data(rd_data0)
  );

  point_buffer #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_buf1 (
    .clk, .wr_en(wr_en[1]), .wr_addr, .wr_data, .rd_addr, .rd_data(rd_data1)
  );

  ransac_controller #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .CNT_W(CNT_W), .AVS_W(AVS_W)) u_ctrl (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_waitrequest,
    .rd_addr, .rd_data,
    .buf_count(count), .buf_bank(bank), .buf_overflow(overflow),
    .buf_frame_cnt(frame_cnt), .hold,
    .fs_clear, .fs_valid, .fs_point, .fs_hyp, .fs_thdist2,
    .fs_stage_valid, .fs_score
  );

  fitness_scoring u_fs (
    .clk, .rst_n,
    .clear(fs_clear), .in_valid(fs_valid), .in_point(fs_point),
    .hyp(fs_hyp), .thdist2(fs_thdist2),
    .stage_valid(fs_stage_valid), .score(fs_score)
  );

endmodule
