// dssc_xor_shift -- "XOR & shift" correction step of the DSSC decoder.
//
// The check-bit syndrome (SCbX13, SCbX24 for each group X) is shifted onto
// the two columns of the selected region, giving a 16-bit error pattern,
// and XORed onto the received data bits. With REGION_NONE the data passes
// unchanged. Region 1 uses columns 1 (from the 1/3 pair) and 2 (from the
// 2/4 pair), region 2 columns 3 and 4, region 3 columns 3 and 2.
// Combinational.
//
// Interface: data_i (received data), s13_i / s24_i (SCb syndromes, index =
// group A..D), region_i in; data_o (corrected data) out.
module dssc_xor_shift
  import dssc_pkg::*;
(
  input  data_t      data_i,
  input  logic [3:0] s13_i,
  input  logic [3:0] s24_i,
  input  region_e    region_i,
  output data_t      data_o
);

  assign data_o = data_i ^ place_pattern(s13_i, s24_i, region_i);

endmodule
