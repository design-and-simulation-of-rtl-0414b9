// dssc_redundancy -- redundancy calculator of the DSSC code.
//
// Purely combinational. The 16 data bits are divided into the groups A..D
// (the rows of a 4x4 matrix, see dssc_pkg) and 16 redundancy bits are
// formed by XOR, exactly as the code defines them:
//   Di1 = A1^B2^C1^D2   Di2 = A2^B1^C2^D1   (diagonals over columns 1-2)
//   Di3 = A3^B4^C3^D4   Di4 = A4^B3^C4^D3   (diagonals over columns 3-4)
//   Pj  = Aj^Bj^Cj^Dj                       (column parities)
//   CbX13 = X1^X3       CbX24 = X2^X4       (per-group check bits)
// The encoder uses it on the data to be stored; the decoder uses it on the
// received data (the recalculated RDi, RP, RCb) and, being linear, on
// candidate error patterns to predict their syndromes.
//
// Interface: data_i (16 bits) in, red_o (dssc_pkg::red_t) out, no clock.
module dssc_redundancy
  import dssc_pkg::*;
(
  input  data_t data_i,
  output red_t  red_o
);

  always_comb begin
    red_o = '0;
    for (int unsigned h = 0; h < 2; h++) begin
      // h = 0: columns 1-2, h = 1: columns 3-4
      red_o.di[2*h]   = mat(data_i, 0, 2*h)   ^ mat(data_i, 1, 2*h+1) ^
                        mat(data_i, 2, 2*h)   ^ mat(data_i, 3, 2*h+1);
      red_o.di[2*h+1] = mat(data_i, 0, 2*h+1) ^ mat(data_i, 1, 2*h)   ^
                        mat(data_i, 2, 2*h+1) ^ mat(data_i, 3, 2*h);
    end
    for (int unsigned col = 0; col < COLS; col++)
      red_o.p[col] = mat(data_i, 0, col) ^ mat(data_i, 1, col) ^
                     mat(data_i, 2, col) ^ mat(data_i, 3, col);
    for (int unsigned row = 0; row < ROWS; row++) begin
      red_o.cb13[row] = mat(data_i, row, 0) ^ mat(data_i, row, 2);
      red_o.cb24[row] = mat(data_i, row, 1) ^ mat(data_i, row, 3);
    end
  end

endmodule
