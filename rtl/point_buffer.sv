// point_buffer: one of the two on-chip memories of the double buffer.
//
// Holds up to DEPTH matched point pairs of one video frame. It has a write
// port, used by the input stream while this buffer is the filling one, and
// a read port with one cycle of latency (address in cycle c, data in cycle
// c+1), used by the processor or the fitness-scoring pipeline while this
// buffer is the processed one. Written as an array so that FPGA tools map
// it onto block RAM; the contents are not reset.
//
// DEPTH = 128 is this design's choice: it is the next power of two above
// the largest frame (108 point pairs) evaluated for the design.
module point_buffer
  import ransac_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  point_t            wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output point_t            rd_data
);

  point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
