// dssc_pkg -- shared types, constants and bit-layout helpers of the Data
// Segmentation Section Code (DSSC).
//
// DSSC protects a 16-bit word with 16 redundancy bits. The data bits are
// viewed as a 4x4 matrix whose rows are the groups A, B, C, D and whose
// columns are the bit positions 1..4 inside a group. Data bit d[4*row+col]
// (row 0 = A .. 3 = D, col 0 = column 1 .. 3 = column 4) is therefore A1 =
// d[0], A4 = d[3], B1 = d[4], ..., D4 = d[15].
//
// The 32-bit codeword is {redundancy field, data}. The redundancy field is
// four nibbles, one per matrix row of the code drawing:
//   field[3:0]   = {CbA24, CbA13, Di2, Di1}
//   field[7:4]   = {CbB24, CbB13, Di4, Di3}
//   field[11:8]  = {CbC24, CbC13, P2,  P1 }
//   field[15:12] = {CbD24, CbD13, P4,  P3 }
// This layout is not spelled out in words by the code's definition; it is the
// one that reproduces the published encoder vector (data 16'h1b3a gives
// codeword 32'h47c01b3a) and the published input-to-output timing paths of
// the encoder. The three correction regions (two adjacent columns each) are
// columns 1-2, columns 3-4 and columns 2-3.
package dssc_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned RED_W  = 16;
  localparam int unsigned CODE_W = DATA_W + RED_W;
  localparam int unsigned ROWS   = 4;
  localparam int unsigned COLS   = 4;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CODE_W-1:0] code_t;
  typedef logic [RED_W-1:0]  field_t;

  // Redundancy (or syndrome) bits by name. Index 0 of each vector is the
  // first bit of that kind: di[0] = Di1, p[3] = P4, cb13[1] = CbB13,
  // cb24[3] = CbD24.
  typedef struct packed {
    logic [3:0] di;
    logic [3:0] p;
    logic [3:0] cb13;
    logic [3:0] cb24;
  } red_t;

  // Correction region chosen by the decoder.
  typedef enum logic [1:0] {
    REGION_NONE = 2'd0,  // no data correction
    REGION_1    = 2'd1,  // columns 1 and 2
    REGION_2    = 2'd2,  // columns 3 and 4
    REGION_3    = 2'd3   // columns 2 and 3
  } region_e;

  // Data bit at matrix position (row, col), both counted from 0.
  function automatic logic mat(data_t d, int unsigned row, int unsigned col);
    return d[COLS*row + col];
  endfunction

  // Redundancy bits in codeword order.
  function automatic field_t red_to_field(red_t r);
    field_t f;
    f[3:0]   = {r.cb24[0], r.cb13[0], r.di[1], r.di[0]};
    f[7:4]   = {r.cb24[1], r.cb13[1], r.di[3], r.di[2]};
    f[11:8]  = {r.cb24[2], r.cb13[2], r.p[1],  r.p[0]};
    f[15:12] = {r.cb24[3], r.cb13[3], r.p[3],  r.p[2]};
    return f;
  endfunction

  function automatic red_t field_to_red(field_t f);
    red_t r;
    r.di   = {f[5],  f[4],  f[1],  f[0]};
    r.p    = {f[13], f[12], f[9],  f[8]};
    r.cb13 = {f[14], f[10], f[6],  f[2]};
    r.cb24 = {f[15], f[11], f[7],  f[3]};
    return r;
  endfunction

  // The "shift" of the correction step: the check-bit syndrome of row X
  // names which of the two columns of the region are wrong. SCbX13 lands
  // on the region's column taken from the pair {1,3}, SCbX24 on the one
  // taken from the pair {2,4}.
  function automatic data_t place_pattern(logic [3:0] s13, logic [3:0] s24,
                                          region_e region);
    data_t       e;
    int unsigned c13;
    int unsigned c24;
    e = '0;
    unique case (region)
      REGION_1: begin c13 = 0; c24 = 1; end
      REGION_2: begin c13 = 2; c24 = 3; end
      REGION_3: begin c13 = 2; c24 = 1; end
      default:  begin c13 = 0; c24 = 1; end
    endcase
    if (region != REGION_NONE) begin
      for (int unsigned row = 0; row < ROWS; row++) begin
        e[COLS*row + c13] = s13[row];
        e[COLS*row + c24] = s24[row];
      end
    end
    return e;
  endfunction

endpackage
