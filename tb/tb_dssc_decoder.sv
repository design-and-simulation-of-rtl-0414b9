// tb_dssc_decoder -- self-checking testbench of dssc_decoder.
//
// 1. The published example: 32'h47c05b3a (32'h47c01b3a with data bit 14,
//    cell D3, flipped) must decode to 16'h1b3a.
// 2. Guarantees: every single-bit error of the 32-bit word, every double
//    error of horizontally or vertically adjacent data cells, and every
//    error pattern inside columns 1-2, must give back the original data.
// 3. Random words with random error masks must match the brute-force
//    reference decoder in data, region and flags.
// The decoder is combinational: outputs are checked one time step after
// the input changes, in the same cycle.
module tb_dssc_decoder;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned N_RANDOM        = 20000;
  localparam int unsigned WATCHDOG_CYCLES = 40000;

  logic    clk = 1'b0;
  code_t   code;
  data_t   data;
  logic    err;
  logic    corrected;
  logic    uncorr;
  logic    cond_i;
  logic    cond_ii;
  region_e region;
  int      checks   = 0;
  int      failures = 0;
  logic [15:0] d;
  logic [15:0] exp_data;
  int      exp_region;
  logic    exp_uncorr;

  always #5 clk = ~clk;

  dssc_decoder dut (
    .code_i      (code),
    .data_o      (data),
    .err_o       (err),
    .corrected_o (corrected),
    .uncorr_o    (uncorr),
    .cond_i_o    (cond_i),
    .cond_ii_o   (cond_ii),
    .region_o    (region)
  );

  task automatic apply(logic [31:0] w);
    @(posedge clk);
    code = w;
    #1;
  endtask

  task automatic expect_data(logic [15:0] exp);
    checks++;
    if (data != exp) begin
      failures++;
      if (failures < 10) $display("code %h: data %h expected %h", code, data, exp);
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
    // published example
    apply(32'h47c05b3a);
    expect_data(16'h1b3a);
    checks++;
    if (!corrected || !err || uncorr) failures++;
    apply(32'h47c01b3a);
    expect_data(16'h1b3a);
    checks++;
    if (corrected || err || uncorr) failures++;

    // every single-bit error
    for (int b = 0; b < 32; b++) begin
      d = 16'($urandom());
      apply(ref_encode(d) ^ (32'h1 << b));
      expect_data(d);
      checks++;
      if (uncorr || !err || (corrected != (b < 16))) failures++;
    end

    // adjacent double errors in the data matrix
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        d = 16'($urandom());
        if (c < 3) begin
          apply(ref_encode(d) ^ (32'h3 << (4*r + c)));
          expect_data(d);
        end
        if (r < 3) begin
          apply(ref_encode(d) ^ (32'h11 << (4*r + c)));
          expect_data(d);
        end
      end

    // every pattern inside columns 1-2
    for (int m = 1; m < 256; m++) begin
      d = 16'($urandom());
      apply(ref_encode(d) ^ {16'h0, ref_region_pattern(1, m[7:0])});
      expect_data(d);
    end

    // random words and masks against the reference decoder
    for (int n = 0; n < N_RANDOM; n++) begin
      d = 16'($urandom());
      case (n % 4)
        0: apply(ref_encode(d) ^ {16'h0, ref_region_pattern(1 + n % 3, 8'($urandom()))});
        1: apply(ref_encode(d) ^ {16'h0, ref_region_pattern(1 + (n / 4) % 3, 8'($urandom()))});
        2: apply(ref_encode(d) ^ (32'h1 << ($urandom() % 32)) ^ (32'h1 << ($urandom() % 32)));
        default: apply(ref_encode(d) ^ $urandom());
      endcase
      exp_data = ref_decode(code, exp_region, exp_uncorr);
      expect_data(exp_data);
      checks++;
      if (int'(region) != exp_region || uncorr != exp_uncorr ||
          corrected != (exp_data != code[15:0]) ||
          err != (ref_syndrome(code) != 0)) begin
        failures++;
        if (failures < 10)
          $display("code %h: region %0d/%0d uncorr %b/%b", code, region, exp_region,
                   uncorr, exp_uncorr);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
