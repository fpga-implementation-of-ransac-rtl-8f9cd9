// ransac_pkg: types and constants shared by the RANSAC fitness-scoring
// accelerator.
//
// Fixed-point formats follow the precision table of the design: point
// coordinates are 11-bit integers, the four linear affine terms are Q4.12,
// the two translation terms are Q11.5 and the fitness score is Q9.12. All
// affine terms are 16 bits so that two of them fit one 32-bit processor
// write. Coordinates are taken as unsigned pixel positions and the affine
// terms as two's complement; the register map below is this design's own.
package ransac_pkg;

  // ---- point pair -------------------------------------------------------
  localparam int unsigned COORD_W = 11;              // integer pixel coordinate
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x1;   // point in the first frame
    coord_t y1;
    coord_t x2;   // matched point in the second frame
    coord_t y2;
  } point_t;

  localparam int unsigned POINT_W = $bits(point_t);  // 44

  // ---- affine hypothesis -----------------------------------------------
  localparam int unsigned PARAM_W   = 16;
  localparam int unsigned LIN_FRAC  = 12;            // H0 H1 H3 H4: Q4.12
  localparam int unsigned TRN_FRAC  = 5;             // H2 H5:       Q11.5
  typedef logic signed [PARAM_W-1:0] param_t;

  typedef struct packed {
    param_t h0;   // x2' = x1*h0 + y1*h1 + h2
    param_t h1;
    param_t h2;
    param_t h3;   // y2' = x1*h3 + y1*h4 + h5
    param_t h4;
    param_t h5;
  } affine_t;

  // ---- fitness score ----------------------------------------------------
  localparam int unsigned SCORE_INT  = 9;
  localparam int unsigned SCORE_FRAC = 12;
  localparam int unsigned SCORE_W    = SCORE_INT + SCORE_FRAC;  // 21
  typedef logic [SCORE_W-1:0] score_t;

  // Residual kept with this many fraction bits before squaring, so that its
  // square lands on the score's 12 fraction bits.
  localparam int unsigned DIFF_FRAC = SCORE_FRAC / 2;            // 6
  // Integer bits kept of the residual: any |d| >= 2^DIFF_INT already gives a
  // square above the largest representable score, so clamping is exact.
  localparam int unsigned DIFF_INT  = (SCORE_INT + 1) / 2;       // 5
  localparam int unsigned DIFF_W    = DIFF_INT + DIFF_FRAC;      // 11

  // ---- processor register map (32-bit words, word address) -------------
  // Address MSB = 0 selects a register, 1 selects the point window of the
  // buffer that is being processed (two words per point).
  localparam logic [2:0] REG_CTRL   = 3'd0;  // W: bit0 start. R: status
  localparam logic [2:0] REG_H01    = 3'd1;  // {H1, H0}
  localparam logic [2:0] REG_H23    = 3'd2;  // {H3, H2}
  localparam logic [2:0] REG_H45    = 3'd3;  // {H5, H4}
  localparam logic [2:0] REG_THDIST = 3'd4;  // thdist^2, Q9.12
  localparam logic [2:0] REG_COUNT  = 3'd5;  // R: points in processing buffer
  localparam logic [2:0] REG_SCORE  = 3'd6;  // R: last fitness score

  // Status word bit positions (REG_CTRL read).
  localparam int unsigned ST_BUSY     = 0;
  localparam int unsigned ST_DONE     = 1;
  localparam int unsigned ST_BANK     = 2;
  localparam int unsigned ST_OVERFLOW = 3;
  localparam int unsigned ST_FRAME_LO = 8;   // bits 15:8 frame counter

  // Number of cycles between the first buffer address and the cycle in
  // which the first residual is added: buffer read plus three pipeline
  // stages. A run over N points takes N + FS_LATENCY cycles.
  localparam int unsigned FS_LATENCY = 4;

endpackage
