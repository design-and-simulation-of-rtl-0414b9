// tb_dssc_region_select -- self-checking testbench of dssc_region_select.
//
// Applies all 65536 syndrome values. For each, the expected region and the
// uncorrectable flag come from the brute-force reference decoder (a word
// with all-zero data has its syndrome equal to its stored field), and the
// condition flags from the syndrome bits themselves. Also counts how many
// syndromes selected each region, and fails if one region was never chosen.
module tb_dssc_region_select;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 70000;

  logic    clk = 1'b0;
  red_t    syn;
  region_e region;
  logic    err;
  logic    cond_i;
  logic    cond_ii;
  logic    uncorr;
  int      checks   = 0;
  int      failures = 0;
  int      exp_region;
  logic    exp_uncorr;
  logic [15:0] s;
  logic [15:0] unused_data;
  int      seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  dssc_region_select dut (
    .syn_i     (syn),
    .region_o  (region),
    .err_o     (err),
    .cond_i_o  (cond_i),
    .cond_ii_o (cond_ii),
    .uncorr_o  (uncorr)
  );

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("syndrome %h: %s = %0d, expected %0d", s, what, got, exp);
    end
  endtask

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(posedge clk);
      s = v[15:0];
      syn.di   = ref_di(s);
      syn.p    = ref_p(s);
      syn.cb13 = ref_cb13(s);
      syn.cb24 = ref_cb24(s);
      #1;
      unused_data = ref_decode({s, 16'h0000}, exp_region, exp_uncorr);
      expect_eq("region", int'(region), exp_region);
      expect_eq("uncorr", int'(uncorr), int'(exp_uncorr));
      expect_eq("err", int'(err), int'(s != 0));
      expect_eq("cond_i", int'(cond_i), int'((ref_di(s) | ref_p(s)) != 0));
      expect_eq("cond_ii", int'(cond_ii),
                int'($countones({ref_cb13(s), ref_cb24(s)}) >= 2));
      seen[exp_region]++;
    end
    for (int k = 1; k <= 3; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("syndromes per region: none %0d r1 %0d r2 %0d r3 %0d",
             seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
