// dssc_region_select -- verification of the decoding conditions and
// selection of the erroneous data region (DSSC decoding steps II and III).
//
// Conditions: correction is attempted when (i) at least one bit of SDi or
// SP is 1, or (ii) two or more bits of SCb are 1. A lone SCb bit with clean
// SDi and SP means only a stored check bit was hit, and the data is left
// alone.
//
// Region selection: the data bits are divided into three regions of two
// adjacent columns: region 1 = columns 1-2, region 2 = columns 3-4,
// region 3 = columns 2-3. For an error confined to one region, SCbX13 and
// SCbX24 name exactly which bits of row X are wrong, one bit per column of
// the region. So for each region the SCb vector is placed on that region's
// columns (dssc_pkg::place_pattern) and the diagonal and parity syndromes
// that this error pattern would cause are predicted with dssc_redundancy
// (the code is linear). The first region, in the order 1, 2, 3, whose
// prediction equals the observed SDi and SP is selected. If none matches,
// nothing is corrected, and the error is reported as uncorrectable unless
// exactly one syndrome bit is set (an upset of one stored diagonal or
// parity bit, which leaves the data intact).
// The prediction-and-compare rule and the priority order are this design's
// choice; the published text only names the conditions and the regions.
//
// Combinational. Interface: syn_i (16 syndrome bits) in; region_o
// (REGION_NONE when no correction), err_o (any syndrome bit set), cond_i_o
// and cond_ii_o (the two conditions), uncorr_o (conditions met, no region
// matched) out.
module dssc_region_select
  import dssc_pkg::*;
(
  input  red_t    syn_i,
  output region_e region_o,
  output logic    err_o,
  output logic    cond_i_o,
  output logic    cond_ii_o,
  output logic    uncorr_o
);

  localparam int unsigned NREG = 3;
  localparam region_e CAND [NREG] = '{REGION_1, REGION_2, REGION_3};

  data_t           pattern [NREG];
  red_t            predict [NREG];
  logic [NREG-1:0] match;

  for (genvar k = 0; k < NREG; k++) begin : g_cand
    assign pattern[k] = place_pattern(syn_i.cb13, syn_i.cb24, CAND[k]);

    dssc_redundancy u_predict (
      .data_i (pattern[k]),
      .red_o  (predict[k])
    );

    assign match[k] = (predict[k].di == syn_i.di) && (predict[k].p == syn_i.p);
  end

  assign err_o     = |syn_i;
  assign cond_i_o  = |{syn_i.di, syn_i.p};
  assign cond_ii_o = $countones({syn_i.cb13, syn_i.cb24}) >= 2;

  always_comb begin
    region_o = REGION_NONE;
    uncorr_o = 1'b0;
    if (cond_i_o || cond_ii_o) begin
      if      (match[0]) region_o = REGION_1;
      else if (match[1]) region_o = REGION_2;
      else if (match[2]) region_o = REGION_3;
      else               uncorr_o = ($countones(syn_i) != 1);
    end
  end

endmodule
