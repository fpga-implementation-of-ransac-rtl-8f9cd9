// ransac_controller: link between the processor, the double buffer and the
// fitness-scoring pipeline.
//
// The processor runs the RANSAC loop in software (sampling, hypothesis
// generation, early rejection, best-model update) and hands each surviving
// hypothesis to this block for fitness scoring. The controller has two
// states:
//   IDLE - the processor owns the processed buffer: it can read the point
//          pairs through the point window and write the hypothesis
//          registers. Writing 1 to bit 0 of CTRL starts a run.
//   BUSY - the hardware owns the buffer. An address counter walks the
//          buffer one point per cycle into the fitness pipeline; every
//          processor access is held off with waitrequest until the run is
//          over. After the last address the controller stays busy until
//          the last point has passed the pipeline, then returns to IDLE.
// A run over N points is busy for exactly N + 4 cycles (one buffer read
// cycle and three pipeline stages before the first point is added), after
// which SCORE holds the fitness score.
//
// Processor port: a 32-bit Avalon-MM-style slave with word addresses.
// Address MSB 0 selects a register (ransac_pkg REG_*), 1 selects the point
// window: address {1, index, half} reads point pair `index`, half 0 giving
// {y1, x1} and half 1 {y2, x2}, each coordinate in the low 11 bits of a
// 16-bit field. Two 16-bit affine terms are written per word. Reads take
// two cycles (one wait state, matching the buffer's read latency); writes
// take one. The two states and the one-point-per-cycle counter follow the
// design; the register map, the wait-state protocol and the read window are
// this design's own choices.
module ransac_controller
  import ransac_pkg::*;
#(
  parameter int unsigned DEPTH   = 128,
  parameter int unsigned ADDR_W  = $clog2(DEPTH),
  parameter int unsigned CNT_W   = $clog2(DEPTH + 1),
  parameter int unsigned AVS_W   = ADDR_W + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor slave port
  input  logic [AVS_W-1:0]  avs_address,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  output logic              avs_waitrequest,
  // read bus of the processed buffer
  output logic [ADDR_W-1:0] rd_addr,
  input  point_t            rd_data,
  // state of the double buffer
  input  logic [CNT_W-1:0]  buf_count,
  input  logic              buf_bank,
  input  logic              buf_overflow,
  input  logic [7:0]        buf_frame_cnt,
  output logic              hold,          // keep the processed buffer fixed
  // fitness scoring pipeline
  output logic              fs_clear,
  output logic              fs_valid,
  output point_t            fs_point,
  output affine_t           fs_hyp,
  output score_t            fs_thdist2,
  input  logic [2:0]        fs_stage_valid,
  input  score_t            fs_score
);

  typedef enum logic {IDLE, BUSY} state_e;
  state_e state;

  logic [CNT_W-1:0] addr_cnt;    // next point to fetch
  logic [CNT_W-1:0] run_len;     // points in this run
  logic             rd_valid;    // buffer read data is a point of the run
  logic             done;        // a run has finished since the last start
  logic             rd_phase;    // second cycle of a processor read
  logic             is_reg, start, fetch, finish;
  logic [2:0]       reg_sel;
  logic [ADDR_W-1:0] win_index;

  assign is_reg    = !avs_address[AVS_W-1];
  assign reg_sel   = avs_address[2:0];
  assign win_index = avs_address[ADDR_W:1];

  assign start  = (state == IDLE) && avs_write && is_reg
               && (reg_sel == REG_CTRL) && avs_writedata[0];
  assign fetch  = (state == BUSY) && (addr_cnt < run_len);
  // Last point is in stage 3 this cycle and nothing follows it.
  assign finish = (state == BUSY) && (addr_cnt == run_len) && !rd_valid
               && !fs_stage_valid[0] && !fs_stage_valid[1];

  assign hold   = (state == BUSY) || start;

  // Memory access: hardware in BUSY, processor in IDLE.
  assign rd_addr = (state == BUSY) ? addr_cnt[ADDR_W-1:0] : win_index;

  assign avs_waitrequest = (state == BUSY) || (avs_read && !rd_phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      addr_cnt   <= '0;
      run_len    <= '0;
      rd_valid   <= 1'b0;
      done       <= 1'b0;
      rd_phase   <= 1'b0;
      fs_hyp     <= '0;
      fs_thdist2 <= '0;
    end else begin
      rd_valid <= fetch;
      if (fetch) addr_cnt <= addr_cnt + 1'b1;
      rd_phase <= (state == IDLE) && avs_read && !rd_phase;

      unique case (state)
        IDLE: begin
          if (avs_write && is_reg) begin
            unique case (reg_sel)
              REG_H01:    {fs_hyp.h1, fs_hyp.h0} <= avs_writedata;
              REG_H23:    {fs_hyp.h3, fs_hyp.h2} <= avs_writedata;
              REG_H45:    {fs_hyp.h5, fs_hyp.h4} <= avs_writedata;
              REG_THDIST: fs_thdist2 <= avs_writedata[SCORE_W-1:0];
              default: ;
            endcase
          end
          if (start) begin
            state    <= BUSY;
            addr_cnt <= '0;
            run_len  <= buf_count;
            done     <= 1'b0;
          end
        end
        BUSY: begin
          if (finish) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign fs_clear = start;
  assign fs_valid = rd_valid;
  assign fs_point = rd_data;

  // Read data, valid in the second cycle of a read (waitrequest low).
  always_comb begin
    avs_readdata = '0;
    if (!is_reg) begin
      if (avs_address[0]) avs_readdata = {5'b0, rd_data.y2, 5'b0, rd_data.x2};
      else                avs_readdata = {5'b0, rd_data.y1, 5'b0, rd_data.x1};
    end else begin
      unique case (reg_sel)
        REG_CTRL: begin
          avs_readdata[ST_BUSY]     = (state == BUSY);
          avs_readdata[ST_DONE]     = done;
          avs_readdata[ST_BANK]     = buf_bank;
          avs_readdata[ST_OVERFLOW] = buf_overflow;
          avs_readdata[ST_FRAME_LO +: 8] = buf_frame_cnt;
        end
        REG_H01:    avs_readdata = {fs_hyp.h1, fs_hyp.h0};
        REG_H23:    avs_readdata = {fs_hyp.h3, fs_hyp.h2};
        REG_H45:    avs_readdata = {fs_hyp.h5, fs_hyp.h4};
        REG_THDIST: avs_readdata = 32'(fs_thdist2);
        REG_COUNT:  avs_readdata = 32'(buf_count);
        REG_SCORE:  avs_readdata = 32'(fs_score);
        default:    avs_readdata = '0;
      endcase
    end
  end

  // Points enter the pipeline only during a run.
  a_fetch_busy: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> state == BUSY);
  // A run never reads past the points of the processed frame.
  a_fetch_range: assert property (@(posedge clk) disable iff (!rst_n)
    fetch |-> addr_cnt < CNT_W'(DEPTH));
  // A run with points ends exactly when its last point is in stage 3.
  a_finish_last: assert property (@(posedge clk) disable iff (!rst_n)
    finish && (run_len != 0) |-> fs_stage_valid[2]);
  // The processor is never granted an access during a run.
  a_stall_busy: assert property (@(posedge clk) disable iff (!rst_n)
    state == BUSY |-> avs_waitrequest);

endmodule
