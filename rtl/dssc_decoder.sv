// dssc_decoder -- DSSC decoder: 32-bit codeword in, corrected 16 data bits
// out.
//
// Three combinational steps, as the code defines them: syndrome appraisal
// (dssc_syndrome), verification of the decoding conditions and selection
// of the erroneous region (dssc_region_select), and correction of that
// region by XOR with the shifted check-bit syndrome (dssc_xor_shift).
// Every error confined to columns 1-2, every single-bit error in the 32-bit
// word and every double error of adjacent cells is corrected; some
// patterns in regions 2 and 3 share their syndrome with a pattern of a
// region tried earlier and cannot be told apart by any decoder.
//
// The published decoder has only the codeword input and the data output;
// the status outputs are this design's addition and may be left open.
//
// Interface: code_i (32) in; data_o (16), err_o (some syndrome bit set),
// corrected_o (data bits were changed), uncorr_o (data error seen but no
// region matched), cond_i_o / cond_ii_o (which decoding condition held, see
// dssc_region_select), region_o out. No clock.
module dssc_decoder
  import dssc_pkg::*;
(
  input  code_t   code_i,
  output data_t   data_o,
  output logic    err_o,
  output logic    corrected_o,
  output logic    uncorr_o,
  output logic    cond_i_o,
  output logic    cond_ii_o,
  output region_e region_o
);

  data_t rx_data;
  red_t  syn;

  dssc_syndrome u_syn (
    .code_i (code_i),
    .data_o (rx_data),
    .syn_o  (syn)
  );

  dssc_region_select u_sel (
    .syn_i     (syn),
    .region_o  (region_o),
    .err_o     (err_o),
    .cond_i_o  (cond_i_o),
    .cond_ii_o (cond_ii_o),
    .uncorr_o  (uncorr_o)
  );

  dssc_xor_shift u_fix (
    .data_i   (rx_data),
    .s13_i    (syn.cb13),
    .s24_i    (syn.cb24),
    .region_i (region_o),
    .data_o   (data_o)
  );

  assign corrected_o = (data_o != rx_data);

endmodule
