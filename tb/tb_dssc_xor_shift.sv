// tb_dssc_xor_shift -- self-checking testbench of dssc_xor_shift.
//
// Random data and check-bit syndromes for each region. The expected output
// is built bit by bit from a hand-written table of the two columns of each
// region (region 1: columns 1,2; region 2: 3,4; region 3: 3 from the 1/3
// pair and 2 from the 2/4 pair); with no region the data must pass as is.
module tb_dssc_xor_shift;
  import dssc_pkg::*;

  localparam int unsigned N_VECTORS       = 20000;
  localparam int unsigned WATCHDOG_CYCLES = N_VECTORS + 100;

  logic       clk = 1'b0;
  data_t      din;
  data_t      dout;
  logic [3:0] s13;
  logic [3:0] s24;
  region_e    region;
  int         checks   = 0;
  int         failures = 0;
  data_t      exp;
  // column (0-based) that SCbX13 / SCbX24 corrects, for regions 1..3
  int         col13 [4] = '{0, 0, 2, 2};
  int         col24 [4] = '{0, 1, 3, 1};

  always #5 clk = ~clk;

  dssc_xor_shift dut (
    .data_i   (din),
    .s13_i    (s13),
    .s24_i    (s24),
    .region_i (region),
    .data_o   (dout)
  );

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N_VECTORS; n++) begin
      @(posedge clk);
      din    = 16'($urandom());
      s13    = 4'($urandom());
      s24    = 4'($urandom());
      region = region_e'(n % 4);
      #1;
      exp = din;
      if (n % 4 != 0)
        for (int r = 0; r < 4; r++) begin
          exp[4*r + col13[n%4]] ^= s13[r];
          exp[4*r + col24[n%4]] ^= s24[r];
        end
      checks++;
      if (dout != exp) begin
        failures++;
        if (failures < 10)
          $display("region %0d data %h s13 %b s24 %b: out %h expected %h",
                   n % 4, din, s13, s24, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
