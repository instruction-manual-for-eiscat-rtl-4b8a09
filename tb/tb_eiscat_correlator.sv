// End-to-end testbench of the correlator module at its default parameters.
//
// The testbench plays the computer and the radar controller. It loads the
// statusword, the registers and a correlation program (corr_asm_pkg) through
// ADDRESS LOAD / DATA LOAD, fills a behavioural buffer memory with complex
// samples, starts the program with START COMPUTE, and reads the results
// back with START TRANSFER and the DMA handshake, answering DATA READY
// after random delays. Expected lag products are computed here from the
// samples. A second run with new samples checks accumulation on top of the
// stored results (SET 1 read path). Along the way it exercises single-cycle
// clock mode, a program interrupt and its resume, a refused start (busy),
// slave overflow reporting and the RESET command. Every mechanism is counted
// and a mechanism that never happened counts as a failure.
module tb_eiscat_correlator;
  import corr_pkg::*;
  import corr_asm_pkg::*;

  localparam int L = 8;     // lags
  localparam int T = 16;    // samples per lag

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

  eiscat_correlator dut (.*);

  // behavioural buffer memory
  logic [15:0] bufmem [256];
  assign buf_data = bufmem[buf_addr[7:0]];
  assign test_data = 16'h0000;
  assign prom_data = '0;
  assign edb_in = 16'h0000;
  assign eab_in = 16'h0000;
  assign ext_mem_data = 16'h0000;

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
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

  // ---------------- the computer side of the DMA ----------------
  logic [15:0] words [$];
  int n_dma_wait = 0;
  initial begin
    data_received = 0;
    forever begin
      @(negedge clk);
      data_received = 0;
      if (data_ready) begin
        repeat ($urandom_range(0, 6)) begin @(negedge clk); n_dma_wait++; end
        words.push_back(dma_data);
        data_received = 1;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_reload = 0, n_push = 0, n_pop = 0, n_mixed = 0, n_ireg = 0,
      n_zero_start = 0, n_mem_read = 0, n_intr = 0, n_ice = 0;
  always @(posedge clk) begin
    if (dut.stall && dut.phase_end) n_stall++;
    if (dut.rl_wr.en) n_reload++;
    if (dut.ice) n_ice++;
    if (dut.ice && dut.exec && dut.active_code[3:2] == 2'b10) n_push++;
    if (dut.ice && dut.exec && dut.active_code[3:2] == 2'b00) n_pop++;
    if (dut.exec && !dut.phase && status_word[6]) n_mixed++;
    if (dut.exec && !dut.phase && dut.ins.io.strobe_ireg) n_ireg++;
    if (dut.ice && dut.exec && dut.ins.acc.strobe_io && dut.ins.acc.read) begin
      if (dut.u_acc.rd_mem) n_mem_read++; else n_zero_start++;
    end
    if (dut.ice && dut.intr_take) n_intr++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(logic [7:0] v); return $signed(v); endfunction

  longint exp1 [L], exp2 [L];
  instr_t prog [64];

  task automatic fill_and_expect(input int seed_off);
    logic [15:0] s;
    for (int i = 0; i < 256; i++) begin
      s = 16'($urandom);
      bufmem[i] = s;
    end
    for (int l = 0; l < L; l++)
      for (int t = 0; t < T; t++) begin
        exp1[l] += sx(bufmem[t+l][15:8]) * sx(bufmem[t][15:8]) + sx(bufmem[t+l][7:0]) * sx(bufmem[t][7:0]);
        exp2[l] += sx(bufmem[t+l][7:0]) * sx(bufmem[t][15:8]) - sx(bufmem[t+l][15:8]) * sx(bufmem[t][7:0]);
      end
  endtask

  task automatic wait_idle(input string what);
    int n = 0;
    while (run && n < 50000) begin @(negedge clk); n++; end
    check({what, " finished"}, run, 0);
  endtask

  task automatic start_compute();
    load(A_STAT, 0, 16'b0011_10_00_0100_0000);   // ident 3, computer, mixed mode
    pulse(cmd_start_computer);
    repeat (4) @(negedge clk);
    check("running", run, 1);
  endtask

  task automatic transfer_and_check(input string what);
    logic [15:0] w;
    longint v;
    words.delete();
    load(A_STAT, 0, 16'b0011_01_00_0100_0000);   // radar controller starts
    pulse(cmd_start_transfer);
    repeat (4) @(negedge clk);
    wait_idle({what, " transfer"});
    repeat (20) @(negedge clk);
    check({what, " word count"}, words.size(), 4 * L + 2);
    if (words.size() == 4 * L + 2) begin
      for (int l = 0; l < L; l++) begin
        v = longint'($signed({words[4*l+1], words[4*l]}));
        check({what, " channel 1"}, v, exp1[l]);
        v = longint'($signed({words[4*l+3], words[4*l+2]}));
        check({what, " channel 2"}, v, exp2[l]);
      end
      check({what, " test word 1"}, words[4*L], (4 << 11) | (1 << 6) | (5 << 3) | 6);
      check({what, " test word 2"}, words[4*L+1], (42 << 9) | (3 << 4) | 9);
    end
    check({what, " transfer source"}, status_word[9:8], 0);
  endtask

  initial begin
    int steps, nchg;
    rst_n = 0;
    {cmd_start_computer, cmd_start_radar, cmd_start_panel, cmd_start_transfer} = '0;
    {cmd_reset, cmd_addr_load, cmd_data_load, cmd_intr_program, cmd_intr_reset} = '0;
    ld_addr = 0; ld_sub = 0; ld_data = 0;
    manual = 0; clock_single = 0; clock_advance = 0; transfer_inhibit = 0; slave_ovf = 0;
    for (int l = 0; l < L; l++) begin exp1[l] = 0; exp2[l] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // program and registers
    build(prog);
    for (int loc = 0; loc < 64; loc++)
      for (int p = 0; p < 8; p++) load(6'(A_RAM0 + p), 6'(loc), prog[loc][p*16 +: 16]);
    load(A_APBRS, 2, 16'd1);
    load(A_APMRS, 1, 16'd1);
    load(A_DATAI, 0, 16'd1);
    load(A_LCR1, 0, 16'(T - 3));
    load(A_LCR2, 0, 16'(L - 1));
    load(A_SAR, 0, 16'd1);
    load(A_CRA, 0, 16'd1);
    check("ready", status_word[0], 1);

    // ---- run 1, with some single-cycle steps ----
    fill_and_expect(0);
    start_compute();
    clock_single = 1;
    repeat (4) @(negedge clk);
    nchg = n_ice;
    for (steps = 0; steps < 5; steps++) begin
      repeat (6) @(negedge clk);
      pulse(clock_advance);
      repeat (6) @(negedge clk);
    end
    check("single-cycle: one instruction per advance", n_ice - nchg, 5);
    clock_single = 0;
    // a start while busy is refused
    pulse(cmd_start_computer);
    check("busy start error", control_word[2], 1);
    check("error interrupt", error_interrupt, 1);
    wait_idle("run 1");
    transfer_and_check("run 1");

    // ---- run 2: new samples accumulate on top, with an interrupt ----
    fill_and_expect(1);
    start_compute();
    repeat (40) @(negedge clk);
    pulse(cmd_intr_program);
    repeat (20) @(negedge clk);
    check("stopped at 63", prom_addr, 63);
    check("not running while stopped", run, 0);
    repeat (20) @(negedge clk);
    pulse(cmd_intr_reset);
    repeat (4) @(negedge clk);
    check("resumed", run, 1);
    wait_idle("run 2");
    transfer_and_check("run 2");

    // ---- slave overflow report and RESET ----
    @(negedge clk); slave_ovf = 3'b010; @(negedge clk); slave_ovf = 0;
    check("slave 2 overflow bit", control_word[5], 1);
    pulse(cmd_reset);
    check("reset clears errors", control_word[7:0], 0);
    check("reset clears ready", status_word[0], 0);
    check("module ident in control word", control_word[15:12], 3);

    $display("mechanisms: stall=%0d dma_wait=%0d reload=%0d push=%0d pop=%0d mixed=%0d ireg=%0d zero_start=%0d mem_read=%0d intr=%0d",
             n_stall, n_dma_wait, n_reload, n_push, n_pop, n_mixed, n_ireg, n_zero_start, n_mem_read, n_intr);
    check("stall seen", n_stall > 0, 1);
    check("reload seen", n_reload > 0, 1);
    check("push/pop seen", n_push > 0 && n_pop > 0, 1);
    check("mixed mode seen", n_mixed > 0 && n_ireg > 0, 1);
    check("zero start seen", n_zero_start > 0, 1);
    check("memory read seen", n_mem_read > 0, 1);
    check("interrupt seen", n_intr, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
