// tb_dssc_top -- end-to-end testbench of dssc_top (all defaults).
//
// A small memory of 32-bit words lives in the testbench between the
// encoder output and the decoder input. Each round writes random data
// through the encoder, hits the stored words with multiple cell upsets
// (error masks of several shapes), reads every word back through the
// decoder and checks it:
//   - against the original data where the code guarantees a correction
//     (clean words, upsets confined to columns 1-2, single-bit upsets,
//     adjacent double upsets, the published example),
//   - against the brute-force reference decoder in every case, including
//     region, status flags and the condition that fired.
// It counts how often each decoder mechanism happened (clean read,
// correction in region 1, 2 and 3, condition (i), condition (ii) alone,
// harmless single redundancy upset, uncorrectable report) and counts a
// failure for any that never did.
module tb_dssc_top;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned WORDS           = 64;
  localparam int unsigned ROUNDS          = 200;
  localparam int unsigned WATCHDOG_CYCLES = 2 * WORDS * ROUNDS + 1000;

  logic    clk = 1'b0;
  data_t   data_in;
  code_t   code_out;
  code_t   code_in;
  data_t   data_out;
  logic    err;
  logic    corrected;
  logic    uncorr;
  logic    cond_i;
  logic    cond_ii;
  region_e region;

  logic [31:0] mem      [WORDS];
  logic [15:0] golden   [WORDS];
  logic        must_fix [WORDS];
  int      checks   = 0;
  int      failures = 0;

  typedef enum int {
    EV_CLEAN, EV_REGION1, EV_REGION2, EV_REGION3, EV_COND_I, EV_COND_II_ONLY,
    EV_RED_ONLY, EV_UNCORR, EV_N
  } event_e;
  int      seen [EV_N];

  always #5 clk = ~clk;

  dssc_top dut (
    .data_i      (data_in),
    .code_o      (code_out),
    .code_i      (code_in),
    .data_o      (data_out),
    .err_o       (err),
    .corrected_o (corrected),
    .uncorr_o    (uncorr),
    .cond_i_o    (cond_i),
    .cond_ii_o   (cond_ii),
    .region_o    (region)
  );

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  // Upset mask for one stored word; sets must_fix when the code guarantees
  // that the original data comes back.
  function automatic logic [31:0] upset(int shape, output logic fix);
    int r;
    int c;
    fix = 1'b0;
    r = $urandom() % 4;
    c = $urandom() % 4;
    case (shape)
      0: begin fix = 1'b1; return '0; end
      1: begin fix = 1'b1; return 32'h1 << ($urandom() % 32); end
      2: begin fix = 1'b1; return {16'h0, ref_region_pattern(1, 8'($urandom()))}; end
      3: begin fix = 1'b1; return (c < 3) ? (32'h3 << (4*r + c)) : (32'h11 << c); end
      4: return {16'h0, ref_region_pattern(2, 8'($urandom()))};
      5: return {16'h0, ref_region_pattern(3, 8'($urandom()))};
      // two cells of one column, two rows apart: no diagonal or parity
      // syndrome, only the check bits see it
      6: return {16'h0, 16'h0101 << ($urandom() % 4) << (4 * ($urandom() % 2))};
      7: return (($urandom() % 2) == 1) ? {16'h0, 16'h0303} << (4 * ($urandom() % 3))
                                 : 32'h3 << (16 + $urandom() % 15);
      default: return $urandom();
    endcase
  endfunction

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          exp_region;
    logic        exp_uncorr;
    logic [15:0] exp_data;
    logic [31:0] mask;
    logic        fix;
    foreach (seen[i]) seen[i] = 0;
    code_in = '0;

    for (int round = 0; round < ROUNDS; round++) begin
      // write phase
      for (int a = 0; a < WORDS; a++) begin
        @(posedge clk);
        data_in = (round == 0 && a == 0) ? 16'h1b3a : 16'($urandom());
        #1;
        checks++;
        if (code_out != ref_encode(data_in))
          fail($sformatf("encode %h: %h expected %h", data_in, code_out,
                         ref_encode(data_in)));
        mem[a]    = code_out;
        golden[a] = data_in;
      end
      // upsets between write and read
      for (int a = 0; a < WORDS; a++) begin
        if (round == 0 && a == 0) begin
          mask = 32'h0000_4000;        // published example: 47c01b3a -> 47c05b3a
          fix  = 1'b1;
        end else
          mask = upset((a + round) % 9, fix);
        mem[a]      ^= mask;
        must_fix[a] = fix;
      end
      // read phase
      for (int a = 0; a < WORDS; a++) begin
        @(posedge clk);
        code_in = mem[a];
        #1;
        exp_data = ref_decode(code_in, exp_region, exp_uncorr);
        checks++;
        if (data_out != exp_data || int'(region) != exp_region ||
            uncorr != exp_uncorr || err != (ref_syndrome(code_in) != 0) ||
            corrected != (exp_data != code_in[15:0]))
          fail($sformatf("read %h: data %h/%h region %0d/%0d uncorr %b/%b",
                         code_in, data_out, exp_data, region, exp_region,
                         uncorr, exp_uncorr));
        if (must_fix[a]) begin
          checks++;
          if (data_out != golden[a])
            fail($sformatf("read %h: data %h, written %h", code_in, data_out,
                           golden[a]));
        end
        if (!err)                     seen[EV_CLEAN]++;
        if (region == REGION_1)       seen[EV_REGION1]++;
        if (region == REGION_2)       seen[EV_REGION2]++;
        if (region == REGION_3)       seen[EV_REGION3]++;
        if (cond_i && corrected)      seen[EV_COND_I]++;
        if (cond_ii && !cond_i && corrected) seen[EV_COND_II_ONLY]++;
        if (err && !corrected && !uncorr)    seen[EV_RED_ONLY]++;
        if (uncorr)                   seen[EV_UNCORR]++;
      end
    end

    $display("clean %0d, region1 %0d, region2 %0d, region3 %0d, cond(i) %0d, cond(ii) only %0d, redundancy-only %0d, uncorrectable %0d",
             seen[EV_CLEAN], seen[EV_REGION1], seen[EV_REGION2], seen[EV_REGION3],
             seen[EV_COND_I], seen[EV_COND_II_ONLY], seen[EV_RED_ONLY], seen[EV_UNCORR]);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) fail($sformatf("mechanism %s never happened", event_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
