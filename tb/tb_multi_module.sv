// Two-module testbench: a master and a slave correlator sharing the external
// data bus (EDB) and external address bus (EAB), as in a multi-correlator
// system.
//
// Both modules get their own program and their own behavioural buffer
// memory and are started by the same START COMPUTE pulse, so they run in
// lock step. In every loop instruction the master steps its APB through
// buffer addresses a0 .. a0+N-1, drives that address on the EAB (ENABLE
// EAB) and its own sample on the EDB (ENABLE EDB). The slave takes its
// buffer address from the EAB (SELECT BUFFER ADDRESS) and strobes the EDB
// into its I-register (STROBE I-REG), so its multiplier sees the master's
// sample as the external operand. Over N samples:
//   master result word 0 = sum Xm(a)^2
//   slave  result word 0 = sum Xm(a) * Xs(a)
// Both sums are computed here from the two buffer memories and compared
// with the result memories. The testbench also checks that the two modules
// never drive a bus at the same time, and counts the cycles in which each
// bus carried a value from one module to the other. The bus wiring (a
// wired OR of the enabled drivers) belongs to this testbench.
module tb_multi_module;
  import corr_pkg::*;

  localparam int N  = 24;     // samples
  localparam int A0 = 37;     // first buffer address

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  // per-module signals, index 0 = master, 1 = slave
  logic        cmd_start [2];
  logic        cmd_addr_load [2], cmd_data_load [2];
  logic [5:0]  ld_addr [2], ld_sub [2];
  logic [15:0] ld_data [2];
  logic [15:0] dma_data [2], status_word [2], control_word [2];
  logic [15:0] buf_addr [2], buf_data [2];
  logic        data_ready [2], dma_request [2], run [2], flag [2], error_interrupt [2];
  logic [5:0]  prom_addr [2];
  logic [15:0] edb_out [2], eab_out [2];
  logic        edb_oe [2], eab_oe [2];
  logic [15:0] edb_bus, eab_bus;
  logic [2:0]  slave_ovf [2];

  logic [15:0] bufmem [2][256];

  assign edb_bus = (edb_oe[0] ? edb_out[0] : 16'h0) | (edb_oe[1] ? edb_out[1] : 16'h0);
  assign eab_bus = (eab_oe[0] ? eab_out[0] : 16'h0) | (eab_oe[1] ? eab_out[1] : 16'h0);
  assign slave_ovf[0] = {2'b00, control_word[1][7]};
  assign slave_ovf[1] = 3'b000;

  for (genvar m = 0; m < 2; m++) begin : g_mod
    assign buf_data[m] = bufmem[m][buf_addr[m][7:0]];
    eiscat_correlator u (
      .clk, .rst_n,
      .cmd_start_computer(cmd_start[m]), .cmd_start_radar(1'b0), .cmd_start_panel(1'b0),
      .cmd_start_transfer(1'b0), .cmd_reset(1'b0),
      .cmd_addr_load(cmd_addr_load[m]), .ld_addr(ld_addr[m]), .ld_sub(ld_sub[m]),
      .cmd_data_load(cmd_data_load[m]), .ld_data(ld_data[m]),
      .cmd_intr_program(1'b0), .cmd_intr_reset(1'b0),
      .manual(1'b0), .clock_single(1'b0), .clock_advance(1'b0), .transfer_inhibit(1'b0),
      .data_received(1'b0), .dma_data(dma_data[m]), .data_ready(data_ready[m]),
      .dma_request(dma_request[m]), .status_word(status_word[m]), .control_word(control_word[m]),
      .run(run[m]), .flag(flag[m]), .error_interrupt(error_interrupt[m]),
      .buf_addr(buf_addr[m]), .buf_data(buf_data[m]), .test_data(16'h0),
      .prom_addr(prom_addr[m]), .prom_data(128'h0),
      .edb_in(edb_bus), .edb_out(edb_out[m]), .edb_oe(edb_oe[m]),
      .eab_in(eab_bus), .eab_out(eab_out[m]), .eab_oe(eab_oe[m]),
      .slave_ovf(slave_ovf[m]), .ext_mem_data(16'h0)
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic load(input int m, input logic [5:0] a, input logic [5:0] sb, input logic [15:0] d);
    @(negedge clk); cmd_addr_load[m] = 1; ld_addr[m] = a; ld_sub[m] = sb;
    @(negedge clk); cmd_addr_load[m] = 0; cmd_data_load[m] = 1; ld_data[m] = d;
    @(negedge clk); cmd_data_load[m] = 0;
  endtask

  // ---------------- bus activity ----------------
  int n_eab = 0, n_edb = 0, n_clash = 0;
  always @(posedge clk) begin
    if (edb_oe[0] && edb_oe[1]) n_clash++;
    if (eab_oe[0] && eab_oe[1]) n_clash++;
    if (eab_oe[0] && g_mod[1].u.ins.io.sel_bufaddr && g_mod[1].u.exec && !g_mod[1].u.phase) n_eab++;
    if (edb_oe[0] && g_mod[1].u.ins.io.strobe_ireg && g_mod[1].u.exec && !g_mod[1].u.phase) n_edb++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t nop();
    instr_t w;
    w = '0;
    w.pro.cond = 6'd32; w.pro.code_a = 4'd4;     // continue
    w.apb.src = 3'd2; w.apb.dst = 3'd1;           // OUT = Q, no write
    w.apm.src = 3'd2; w.apm.dst = 3'd1;
    return w;
  endfunction

  // program for module m: 1 init, 2 prime, 3 first product (READ = 1, so
  // the sum starts from 0), 4 loop, 5 last product and write, 6-8 drain
  function automatic void build(input int m, ref instr_t prog [64]);
    instr_t w, body;
    for (int i = 0; i < 64; i++) prog[i] = nop();
    w = nop();
    w.pro.lc1 = 3'd2;                                        // LC1 = LCR1
    w.acc.clear1 = 1'b1; w.acc.clear2 = 1'b1;
    prog[1] = w;
    body = nop();
    body.apm = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'd0, b: 4'd0};  // address RS0 = 0
    if (m == 0) begin
      // OUT = RS0, RS0 += Data I; own address on EAB, own samples on EDB
      body.apb = '{src: 3'd5, fn: 3'd0, dst: 3'd2, a: 4'd0, b: 4'd0, sel: 1'b0};
      body.io.en_eab = 1'b1; body.io.en_edb = 1'b1;
      body.ari.m1a = 3'd0; body.ari.m1b = 2'd0;              // X int * X int
    end else begin
      body.io.sel_bufaddr = 1'b1; body.io.strobe_ireg = 1'b1;
      body.ari.m1a = 3'd2; body.ari.m1b = 2'd0;              // X ext * X int
    end
    body.ari.s1 = 2'd3;
    body.ari.m12 = 4'd15;                                    // ALU12 = M1
    prog[2] = body;
    w = body; w.acc.strobe_io = 1'b1; w.acc.read = 1'b1;
    prog[3] = w;
    w.acc.read = 1'b0;
    w.pro.lc1 = 3'd1;
    w.pro.cond = 6'd57; w.pro.code_a = 4'd6; w.pro.code_b = 4'd4; w.pro.jump = 6'd4;
    prog[4] = w;
    w = nop();
    w.apm = body.apm; w.ari.m12 = 4'd15;
    w.acc.strobe_io = 1'b1; w.acc.write = 1'b1;
    prog[5] = w;
    w = nop(); w.pro.code_a = 4'd6; w.pro.jump = 6'd0;
    prog[8] = w;
  endfunction

  function automatic int sx(logic [7:0] v); return $signed(v); endfunction

  initial begin
    instr_t prog [64];
    longint e_m, e_s;
    rst_n = 0;
    for (int m = 0; m < 2; m++) begin
      cmd_start[m] = 0; cmd_addr_load[m] = 0; cmd_data_load[m] = 0;
      ld_addr[m] = 0; ld_sub[m] = 0; ld_data[m] = 0;
      for (int i = 0; i < 256; i++) bufmem[m][i] = 16'($urandom);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int m = 0; m < 2; m++) begin
      build(m, prog);
      for (int loc = 0; loc < 9; loc++)
        for (int p = 0; p < 8; p++) load(m, 6'(A_RAM0 + p), 6'(loc), prog[loc][p*16 +: 16]);
      load(m, A_APBRS, 0, 16'(A0));
      load(m, A_APMRS, 0, 16'd0);
      load(m, A_DATAI, 0, 16'd1);
      load(m, A_LCR1, 0, 16'(N - 3));
      load(m, A_SAR, 0, 16'd1);
      load(m, A_CRA, 0, 16'd1);
      load(m, A_STAT, 0, 16'(((m + 1) << 12) | (2 << 10)));    // ident, computer start
    end

    @(negedge clk); cmd_start[0] = 1; cmd_start[1] = 1;
    @(negedge clk); cmd_start[0] = 0; cmd_start[1] = 0;
    repeat (4) @(negedge clk);
    check("master running", run[0], 1);
    check("slave running", run[1], 1);
    for (int n = 0; n < 2000 && (run[0] || run[1]); n++) @(negedge clk);
    check("master finished", run[0], 0);
    check("slave finished", run[1], 0);
    repeat (10) @(negedge clk);

    e_m = 0; e_s = 0;
    for (int i = 0; i < N; i++) begin
      e_m += sx(bufmem[0][A0+i][15:8]) * sx(bufmem[0][A0+i][15:8]);
      e_s += sx(bufmem[0][A0+i][15:8]) * sx(bufmem[1][A0+i][15:8]);
    end
    check("master sum", longint'($signed(g_mod[0].u.u_acc.u_mem1.mem[0])), e_m);
    check("slave sum",  longint'($signed(g_mod[1].u.u_acc.u_mem1.mem[0])), e_s);
    check("no bus clash", n_clash, 0);
    check("address over EAB", n_eab, N);
    check("samples over EDB", n_edb, N);
    check("no errors", error_interrupt[0] || error_interrupt[1], 0);
    $display("bus transfers: eab=%0d edb=%0d, sums %0d %0d", n_eab, n_edb, e_m, e_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
