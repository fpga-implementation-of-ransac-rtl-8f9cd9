// buffer_switch_ctrl: double-buffer switching controller.
//
// Two point buffers form a double buffer. While the point pairs of the
// current frame stream into one buffer (the filling buffer), the RANSAC
// side works on the other one (the processed buffer). At the end of each
// frame's data, marked by in_last on the frame's final point, the roles of
// the two buffers are swapped by switching which buffer the input bus and
// which the read bus reach; the number of points written becomes the
// processed buffer's point count.
//
// Interface: a valid/ready point stream with an end-of-frame flag; write
// ports to both buffers; the read data of both buffers in, the processed
// buffer's read data out (selected with the bank as it was when the address
// was issued, to match the buffers' one-cycle read latency).
//
// The swap takes effect in the cycle after the last point is accepted. The
// software must finish its RANSAC loop before the frame ends; if a
// fitness-scoring run is still in progress (hold = 1) the swap waits for its
// end, and in_ready is held low meanwhile so that no point of the next
// frame is lost. Points beyond DEPTH in one frame are dropped and the
// frame is flagged as overflowed. Deferring the swap and the overflow flag
// are this design's own choices.
module buffer_switch_ctrl
  import ransac_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int unsigned CNT_W  = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // point stream from feature matching
  input  logic              in_valid,
  input  logic              in_last,     // final point of the frame
  input  point_t            in_point,
  output logic              in_ready,
  // fitness scoring in progress: the processed buffer must not change
  input  logic              hold,
  // write side of the two buffers
  output logic [1:0]        wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output point_t            wr_data,
  // read side of the two buffers
  input  point_t            rd_data0,
  input  point_t            rd_data1,
  output point_t            rd_data,     // processed buffer's read data
  // state
  output logic              bank,        // index of the processed buffer
  output logic [CNT_W-1:0]  count,       // points in the processed buffer
  output logic              overflow,    // processed frame had > DEPTH points
  output logic [7:0]        frame_cnt,   // swaps since reset
  output logic              swap_wait    // a swap is held back by hold
);

  logic [CNT_W-1:0] wr_cnt;
  logic             wr_ovf;
  logic             pending;
  logic             bank_q;
  logic             accept, room, do_swap;

  assign in_ready = !pending;
  assign accept   = in_valid && in_ready;
  assign room     = wr_cnt < CNT_W'(DEPTH);
  assign do_swap  = pending && !hold;
  assign swap_wait = pending && hold;

  // The filling buffer is the one not being processed.
  always_comb begin
    wr_en         = 2'b00;
    wr_en[!bank]  = accept && room;
    wr_addr       = wr_cnt[ADDR_W-1:0];
    wr_data       = in_point;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      wr_ovf    <= 1'b0;
      pending   <= 1'b0;
      bank      <= 1'b0;
      bank_q    <= 1'b0;
      count     <= '0;
      overflow  <= 1'b0;
      frame_cnt <= '0;
    end else begin
      bank_q <= bank;
      if (accept) begin
        if (room) wr_cnt <= wr_cnt + 1'b1;
        else      wr_ovf <= 1'b1;
        if (in_last) pending <= 1'b1;
      end
      if (do_swap) begin
        bank      <= !bank;
        count     <= wr_cnt;
        overflow  <= wr_ovf;
        wr_cnt    <= '0;
        wr_ovf    <= 1'b0;
        pending   <= 1'b0;
        frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  assign rd_data = bank_q ? rd_data1 : rd_data0;

  // No point is accepted while a swap is pending.
  a_no_accept_pending: assert property (@(posedge clk) disable iff (!rst_n)
    pending |-> !accept);
  // The write pointer never passes the buffer's end.
  a_wr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_cnt <= CNT_W'(DEPTH));

endmodule
