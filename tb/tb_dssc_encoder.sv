// tb_dssc_encoder -- self-checking testbench of dssc_encoder.
//
// First the published example (16'h1b3a must encode to 32'h47c01b3a), then
// all 65536 data words against the reference encoder of tb_dssc_ref_pkg.
// The encoder is combinational: the codeword must be valid in the same
// cycle, checked one time step after the data changes.
module tb_dssc_encoder;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 70000;

  logic  clk = 1'b0;
  data_t data;
  code_t code;
  int    checks   = 0;
  int    failures = 0;

  always #5 clk = ~clk;

  dssc_encoder dut (
    .data_i (data),
    .code_o (code)
  );

  task automatic check(logic [31:0] exp);
    checks++;
    if (code !== exp) begin
      failures++;
      if (failures < 10) $display("data %h: code %h expected %h", data, code, exp);
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
    @(posedge clk);
    data = 16'h1b3a;
    #1 check(32'h47c01b3a);
    for (int v = 0; v < 65536; v++) begin
      @(posedge clk);
      data = v[15:0];
      #1 check(ref_encode(data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
