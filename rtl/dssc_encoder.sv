// dssc_encoder -- DSSC encoder: 16 data bits in, 32-bit codeword out.
//
// Combinational, as in the published design (its timing report shows only
// input-to-output paths). The codeword carries the data unchanged in bits
// 15:0 and the 16 redundancy bits of dssc_redundancy in bits 31:16, in the
// field order given in dssc_pkg (which reproduces the published example
// 16'h1b3a -> 32'h47c01b3a).
//
// Interface: data_i (16) -> code_o (32), no clock, no reset.
module dssc_encoder
  import dssc_pkg::*;
(
  input  data_t data_i,
  output code_t code_o
);

  red_t red;

  dssc_redundancy u_red (
    .data_i (data_i),
    .red_o  (red)
  );

  assign code_o = {red_to_field(red), data_i};

endmodule
