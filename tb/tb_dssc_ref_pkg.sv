// tb_dssc_ref_pkg -- reference model of the DSSC code for the testbenches.
//
// Written independently of the RTL: every redundancy bit is spelled out
// from its defining equation with the data-bit numbers written by hand
// (A1 = d[0] .. A4 = d[3], B1 = d[4] .. D4 = d[15]), and the decoder is a
// brute-force search: for region 1, then 2, then 3, try all 256 error
// patterns inside the region and take the first whose redundancy equals the
// syndrome of the received word.
package tb_dssc_ref_pkg;

  // Redundancy field in codeword order (codeword bits 31:16).
  function automatic logic [15:0] ref_field(logic [15:0] d);
    logic [15:0] f;
    f[0]  = d[0] ^ d[5] ^ d[8]  ^ d[13];  // Di1 = A1^B2^C1^D2
    f[1]  = d[1] ^ d[4] ^ d[9]  ^ d[12];  // Di2 = A2^B1^C2^D1
    f[2]  = d[0] ^ d[2];                  // CbA13
    f[3]  = d[1] ^ d[3];                  // CbA24
    f[4]  = d[2] ^ d[7] ^ d[10] ^ d[15];  // Di3 = A3^B4^C3^D4
    f[5]  = d[3] ^ d[6] ^ d[11] ^ d[14];  // Di4 = A4^B3^C4^D3
    f[6]  = d[4] ^ d[6];                  // CbB13
    f[7]  = d[5] ^ d[7];                  // CbB24
    f[8]  = d[0] ^ d[4] ^ d[8]  ^ d[12];  // P1
    f[9]  = d[1] ^ d[5] ^ d[9]  ^ d[13];  // P2
    f[10] = d[8] ^ d[10];                 // CbC13
    f[11] = d[9] ^ d[11];                 // CbC24
    f[12] = d[2] ^ d[6] ^ d[10] ^ d[14];  // P3
    f[13] = d[3] ^ d[7] ^ d[11] ^ d[15];  // P4
    f[14] = d[12] ^ d[14];                // CbD13
    f[15] = d[13] ^ d[15];                // CbD24
    return f;
  endfunction

  function automatic logic [31:0] ref_encode(logic [15:0] d);
    return {ref_field(d), d};
  endfunction

  // Field bit numbers of each named redundancy bit.
  // Di1..4 -> 0,1,4,5; P1..4 -> 8,9,12,13; CbX13 -> 2,6,10,14; CbX24 -> 3,7,11,15
  function automatic logic [3:0] ref_di(logic [15:0] f);
    return {f[5], f[4], f[1], f[0]};
  endfunction
  function automatic logic [3:0] ref_p(logic [15:0] f);
    return {f[13], f[12], f[9], f[8]};
  endfunction
  function automatic logic [3:0] ref_cb13(logic [15:0] f);
    return {f[14], f[10], f[6], f[2]};
  endfunction
  function automatic logic [3:0] ref_cb24(logic [15:0] f);
    return {f[15], f[11], f[7], f[3]};
  endfunction

  // Syndrome field of a received word: stored field ^ recalculated field.
  function automatic logic [15:0] ref_syndrome(logic [31:0] w);
    return w[31:16] ^ ref_field(w[15:0]);
  endfunction

  // Error pattern with the 8 bits of m placed in region k (1..3):
  // m[2*row] goes to the left column, m[2*row+1] to the right column.
  function automatic logic [15:0] ref_region_pattern(int k, logic [7:0] m);
    logic [15:0] e;
    int left;
    e = '0;
    left = (k == 1) ? 0 : (k == 2) ? 2 : 1;
    for (int row = 0; row < 4; row++) begin
      e[4*row + left]     = m[2*row];
      e[4*row + left + 1] = m[2*row+1];
    end
    return e;
  endfunction

  // Brute-force decoder. Returns the corrected data; region is 0 when the
  // data is left alone.
  function automatic logic [15:0] ref_decode(logic [31:0] w, output int region,
                                             output logic uncorr);
    logic [15:0] s;
    logic [15:0] e;
    s = ref_syndrome(w);
    region = 0;
    uncorr = 1'b0;
    if (s == '0) return w[15:0];
    for (int k = 1; k <= 3; k++) begin
      for (int m = 1; m < 256; m++) begin
        e = ref_region_pattern(k, m[7:0]);
        if (ref_field(e) == s) begin
          region = k;
          return w[15:0] ^ e;
        end
      end
    end
    // nothing matches: one set syndrome bit is an upset of one stored
    // redundancy bit and harmless; more than one is flagged
    if ($countones(s) >= 2) uncorr = 1'b1;
    return w[15:0];
  endfunction

endpackage
