// Top-level testbench with a narrow (18-bit) accumulator, for the paths the
// default-size test does not reach:
//   - the instructions come from the fixed-program PROM (statusword bit 3),
//     modelled here as the correlation program of corr_asm_pkg;
//   - the samples come from the test memory (statusword bit 4), modelled as
//     a constant full-scale sample, so the buffer memory is never used;
//   - the full-scale lag products overflow the accumulator, which must set
//     the master overflow bit of the control word and ERROR INTERRUPT.
module tb_corr_overflow;
  import corr_pkg::*;
  import corr_asm_pkg::*;

  localparam int L = 4;
  localparam int T = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic cmd_start_computer, cmd_start_radar, cmd_start_panel, cmd_start_transfer;
  logic cmd_reset, cmd_addr_load, cmd_data_load, cmd_intr_program, cmd_intr_reset;
  logic [5:0] ld_addr, ld_sub, prom_addr;
  logic [15:0] ld_data;
  logic manual, clock_single, clock_advance, transfer_inhibit, data_received;
  logic [15:0] dma_data, status_word, control_word, buf_addr, buf_data, test_data;
  logic data_ready, dma_request, run, flag, error_interrupt;
  logic [127:0] prom_data;
  logic [15:0] edb_in, edb_out, eab_in, eab_out, ext_mem_data;
  logic edb_oe, eab_oe;
  logic [2:0] slave_ovf;

  eiscat_correlator #(.SAMPLE_W(8), .ACC_W(18)) dut (.*);

  instr_t prog [64];
  assign prom_data = prog[prom_addr];
  assign test_data = 16'h7F7F;
  assign buf_data  = 16'h0101;
  assign edb_in = '0; assign eab_in = '0; assign ext_mem_data = '0;
  assign data_received = data_ready;

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic load(input logic [5:0] a, input logic [5:0] sb, input logic [15:0] d);
    @(negedge clk); cmd_addr_load = 1; ld_addr = a; ld_sub = sb;
    @(negedge clk); cmd_addr_load = 0; cmd_data_load = 1; ld_data = d;
    @(negedge clk); cmd_data_load = 0;
  endtask

  int n_ovf = 0, n_test = 0;
  always @(posedge clk) begin
    if (dut.acc_ovf) n_ovf++;
    if (dut.exec && dut.ins.ari.s1 != 0 && dut.int_xy == 16'h7F7F) n_test++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    build(prog);
    rst_n = 0;
    {cmd_start_computer, cmd_start_radar, cmd_start_panel, cmd_start_transfer} = '0;
    {cmd_reset, cmd_addr_load, cmd_data_load, cmd_intr_program, cmd_intr_reset} = '0;
    ld_addr = 0; ld_sub = 0; ld_data = 0;
    manual = 0; clock_single = 0; clock_advance = 0; transfer_inhibit = 0; slave_ovf = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load(A_APBRS, 2, 16'd1);
    load(A_APMRS, 1, 16'd1);
    load(A_DATAI, 0, 16'd1);
    load(A_LCR1, 0, 16'(T - 3));
    load(A_LCR2, 0, 16'(L - 1));
    load(A_SAR, 0, 16'd1);
    load(A_CRA, 0, 16'd1);
    // computer start, mixed mode, test memory, fixed programs
    load(A_STAT, 0, 16'b0001_10_00_0101_1000);
    check("no error before", error_interrupt, 0);
    pulse(cmd_start_computer);
    repeat (4) @(negedge clk);
    check("running from PROM", run, 1);
    n = 0;
    while (run && n < 20000) begin @(negedge clk); n++; end
    check("finished", run, 0);
    check("master overflow bit", control_word[7], 1);
    check("error interrupt", error_interrupt, 1);
    check("no command errors", control_word[3:0], 0);
    $display("overflows=%0d test-memory operand loads=%0d", n_ovf, n_test);
    check("overflow seen", n_ovf > 0, 1);
    check("test samples used", n_test > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
