// dssc_syndrome -- syndrome appraisal, first step of DSSC decoding.
//
// The redundancy bits are recalculated from the received data bits
// (RDi, RP, RCb) and XORed with the redundancy bits that were stored:
//   SDi = Di ^ RDi,  SP = P ^ RP,  SCb = Cb ^ RCb.
// A syndrome bit is 1 where the stored and the recalculated bit disagree.
// Combinational.
//
// Interface: code_i (32-bit codeword) in; syn_o (dssc_pkg::red_t, the 16
// syndrome bits by name) and data_o (the received, uncorrected data bits)
// out.
module dssc_syndrome
  import dssc_pkg::*;
(
  input  code_t code_i,
  output data_t data_o,
  output red_t  syn_o
);

  red_t stored;
  red_t recalc;

  assign data_o = code_i[DATA_W-1:0];
  assign stored = field_to_red(code_i[CODE_W-1:DATA_W]);

  dssc_redundancy u_recalc (
    .data_i (data_o),
    .red_o  (recalc)
  );

  assign syn_o = stored ^ recalc;

endmodule
