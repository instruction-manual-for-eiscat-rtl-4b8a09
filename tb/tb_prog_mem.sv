// Self-checking testbench for prog_mem: writes random 16-bit pages of all
// 64 locations through the data-field bus (addresses 8..15), checks that a
// write to any other address changes nothing, and reads every location back
// as one 128-bit word.
module tb_prog_mem;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  df_wr_t df_wr;
  logic [5:0] rd_addr;
  logic [127:0] instr;

  prog_mem #(.DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [127:0] model [64];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    df_wr = '0; rd_addr = 0;
    for (int l = 0; l < 64; l++)
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        d = 16'($urandom);
        df_wr = '{en: 1, addr: 6'(8 + p), sub: 6'(l), data: d};
        model[l][p*16 +: 16] = d;
      end
    // writes to other data-field addresses leave the program alone
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      df_wr = '{en: 1, addr: 6'($urandom_range(16, 63)), sub: 6'($urandom), data: 16'($urandom)};
    end
    @(negedge clk); df_wr = '0;
    for (int r = 0; r < 3; r++)
      for (int l = 0; l < 64; l++) begin
        @(negedge clk);
        rd_addr = 6'(l);
        #1 checks++;
        if (instr !== model[l]) begin
          failures++;
          $display("FAIL location %0d: %h vs %h", l, instr, model[l]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
