// dssc_top -- DSSC codec for a memory word: encoder and decoder.
//
// Write side: data_i (16 bits) is encoded into the 32-bit codeword code_o,
// which is what the protected memory stores. Read side: the 32-bit word
// read back from the memory, possibly hit by a multiple cell upset, enters
// on code_i and leaves decoded and corrected on data_o. The memory itself
// sits outside, between code_o and code_i, so the two halves are
// independent and fully combinational, like the published encoder and
// decoder.
//
// Status outputs of the decoder: err_o (some syndrome bit is set),
// corrected_o (data bits were flipped), uncorr_o (a data error was seen
// that no region explains), cond_i_o (an SDi or SP syndrome bit is set),
// cond_ii_o (two or more SCb syndrome bits are set), region_o (region used
// for the correction).
module dssc_top
  import dssc_pkg::*;
(
  input  data_t   data_i,
  output code_t   code_o,
  input  code_t   code_i,
  output data_t   data_o,
  output logic    err_o,
  output logic    corrected_o,
  output logic    uncorr_o,
  output logic    cond_i_o,
  output logic    cond_ii_o,
  output region_e region_o
);

  dssc_encoder u_enc (
    .data_i (data_i),
    .code_o (code_o)
  );

  dssc_decoder u_dec (
    .code_i      (code_i),
    .data_o      (data_o),
    .err_o       (err_o),
    .corrected_o (corrected_o),
    .uncorr_o    (uncorr_o),
    .cond_i_o    (cond_i_o),
    .cond_ii_o   (cond_ii_o),
    .region_o    (region_o)
  );

endmodule
