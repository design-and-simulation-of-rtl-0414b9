// tb_dssc_redundancy -- self-checking testbench of dssc_redundancy.
//
// Applies all 65536 data words and compares every named redundancy bit
// (Di1..4, P1..4, CbA13..CbD24) with the hand-written equations of
// tb_dssc_ref_pkg. The block is combinational; each word is applied on a
// clock edge of the testbench and checked one time step later.
module tb_dssc_redundancy;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 70000;

  logic  clk = 1'b0;
  data_t data;
  red_t  red;
  int    checks   = 0;
  int    failures = 0;
  logic [15:0] f;

  always #5 clk = ~clk;

  dssc_redundancy dut (
    .data_i (data),
    .red_o  (red)
  );

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
      data = v[15:0];
      #1;
      f = ref_field(data);
      checks++;
      if (red.di != ref_di(f) || red.p != ref_p(f) ||
          red.cb13 != ref_cb13(f) || red.cb24 != ref_cb24(f)) begin
        failures++;
        if (failures < 10)
          $display("data %h: di %b/%b p %b/%b cb13 %b/%b cb24 %b/%b", data,
                   red.di, ref_di(f), red.p, ref_p(f), red.cb13, ref_cb13(f),
                   red.cb24, ref_cb24(f));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
