// tb_dssc_syndrome -- self-checking testbench of dssc_syndrome.
//
// Encodes random data with the reference encoder, flips random bits of the
// 32-bit word (none, one, or a random mask), and compares the data output
// and each named syndrome vector with the reference syndrome (stored
// redundancy XOR redundancy recalculated from the received data).
module tb_dssc_syndrome;
  import dssc_pkg::*;
  import tb_dssc_ref_pkg::*;

  localparam int unsigned N_VECTORS       = 20000;
  localparam int unsigned WATCHDOG_CYCLES = N_VECTORS + 100;

  logic        clk = 1'b0;
  code_t       code;
  data_t       data;
  red_t        syn;
  int          checks   = 0;
  int          failures = 0;
  logic [15:0] s;
  logic [31:0] mask;

  always #5 clk = ~clk;

  dssc_syndrome dut (
    .code_i (code),
    .data_o (data),
    .syn_o  (syn)
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
      case (n % 3)
        0:       mask = '0;
        1:       mask = 32'h1 << (n % 32);
        default: mask = $urandom();
      endcase
      code = ref_encode(16'($urandom())) ^ mask;
      #1;
      s = ref_syndrome(code);
      checks++;
      if (data != code[15:0] || syn.di != ref_di(s) || syn.p != ref_p(s) ||
          syn.cb13 != ref_cb13(s) || syn.cb24 != ref_cb24(s)) begin
        failures++;
        if (failures < 10)
          $display("code %h: syn %h expected field %h", code, syn, s);
      end
      // a clean word must give an all-zero syndrome
      if (mask == '0) begin
        checks++;
        if (syn != '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
