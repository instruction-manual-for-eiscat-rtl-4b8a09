// One programmable correlator module for incoherent-scatter radar.
//
// The module computes lag products of complex radar samples and accumulates
// them in a result memory, under a 64-word microprogram of 128-bit
// instructions. Each instruction drives seven units in parallel:
//   PRO  program sequencing and loop counters       (pro_sequencer)
//   APB  buffer-memory address processor (16 bit)   (addr_proc)
//   APM  result-memory address processor (12 bit)   (addr_proc)
//   ARI  four multipliers, ALU12 and ALU34          (ari_unit)
//   ACC  two accumulators and result memories        (acc_unit)
//   OUT  DMA transfer to the computer                (out_unit)
//   I/O  buffer address modes, external buses, flag (io_unit)
// plus the program memory (prog_mem) and the statusword / command logic
// (rt_control).
//
// Timing: clk runs two clocks per instruction cycle (phase 0 and 1). All
// instruction effects land at the end of phase 1, except the I-register on
// the external data bus, which is strobed at the end of phase 0 (used by
// the mixed address mode). The instruction at the PC is read
// combinationally from the program memory, or from the fixed-program PROM
// port when statusword bit 3 is set. Locations 0 (idle) and 63 (stopped by
// an interrupt) are not executed.
//
// Registers and program pages are loaded by ADDRESS LOAD / DATA LOAD;
// a RELOAD instruction writes SAR, BAR or LCR1..3 from the APB output one
// instruction later over the same data-field bus. The buffer memory, the
// test memory and the PROM are outside this module; their ports are
// brought out. The bidirectional external data and address buses are split
// into in / out / output-enable.
//
// The unit structure, the instruction-field widths and the register map
// follow the document. The two-clock cycle, the field order inside the PRO
// and OUT fields, the sample format (X in the upper, Y in the lower byte),
// the accumulator width and the pipeline of the accumulators are this
// design's choices.
module eiscat_correlator
  import corr_pkg::*;
#(
  parameter int unsigned SAMPLE_W = 8,     // bits of X and of Y
  parameter int unsigned ACC_W    = 32     // accumulator / result word
) (
  input  logic         clk,
  input  logic         rst_n,
  // real-time commands and host loading
  input  logic         cmd_start_computer,
  input  logic         cmd_start_radar,
  input  logic         cmd_start_panel,
  input  logic         cmd_start_transfer,
  input  logic         cmd_reset,
  input  logic         cmd_addr_load,
  input  logic [5:0]   ld_addr,
  input  logic [5:0]   ld_sub,
  input  logic         cmd_data_load,
  input  logic [15:0]  ld_data,
  input  logic         cmd_intr_program,
  input  logic         cmd_intr_reset,
  // panel switches
  input  logic         manual,
  input  logic         clock_single,
  input  logic         clock_advance,
  input  logic         transfer_inhibit,
  // DMA to the computer
  input  logic         data_received,
  output logic [15:0]  dma_data,
  output logic         data_ready,
  output logic         dma_request,
  // status
  output logic [15:0]  status_word,
  output logic [15:0]  control_word,
  output logic         run,
  output logic         flag,
  output logic         error_interrupt,
  // buffer memory and test memory
  output logic [15:0]  buf_addr,
  input  logic [15:0]  buf_data,
  input  logic [15:0]  test_data,
  // fixed-program PROM
  output logic [5:0]   prom_addr,
  input  logic [127:0] prom_data,
  // multi-correlator buses
  input  logic [15:0]  edb_in,
  output logic [15:0]  edb_out,
  output logic         edb_oe,
  input  logic [15:0]  eab_in,
  output logic [15:0]  eab_out,
  output logic         eab_oe,
  input  logic [2:0]   slave_ovf,
  input  logic [15:0]  ext_mem_data
);
  localparam int unsigned PW = 2 * SAMPLE_W + 1;

  logic        phase, phase_end, ice, stall;
  logic        go_reset, go_start, go_transfer, go_resume, intr_req, intr_take;
  df_wr_t      host_wr, rl_wr, df_wr;
  logic [5:0]  pc, sar, next_pc;
  logic        exec;
  logic [11:0] lc1, lc2, lc3;
  logic [3:0]  active_code;
  logic [127:0] ram_word;
  instr_t      ins;
  logic [15:0] apb_out;
  logic [11:0] apm_out;
  logic [15:0] int_xy, ext_xy, bar;
  logic signed [PW-1:0] alu12, alu34;
  logic [ACC_W-1:0] mem1_rd, mem2_rd, o1, o2;
  logic        set1, set2, acc_ovf, src_we;
  logic [1:0]  src;
  logic [15:0] tw1, tw2;
  apb_instr_t  apm_as_apb;

  assign df_wr     = rl_wr.en ? rl_wr : host_wr;
  assign prom_addr = pc;
  assign ins       = instr_t'(status_word[3] ? prom_data : ram_word);

  assign tw1 = {1'b0, active_code, 2'b00, ins.apb.dst, ins.apb.fn, ins.apb.src};
  assign tw2 = {1'b0, next_pc, 1'b0, ins.apb.b, ins.apb.a};

  assign apm_as_apb = '{src: ins.apm.src, fn: ins.apm.fn, dst: ins.apm.dst,
                        a: ins.apm.a, b: ins.apm.b, sel: 1'b0};

  rt_control u_rt (
    .clk, .rst_n,
    .cmd_start_computer, .cmd_start_radar, .cmd_start_panel, .cmd_start_transfer,
    .cmd_reset, .cmd_addr_load, .ld_addr, .ld_sub, .cmd_data_load, .ld_data,
    .cmd_intr_program, .cmd_intr_reset,
    .manual, .clock_single, .clock_advance,
    .pc, .stall, .intr_taken(intr_take), .acc_ovf, .slave_ovf, .src_we, .src,
    .phase, .phase_end, .ice, .host_wr,
    .go_reset, .go_start, .go_transfer, .go_resume, .intr_req,
    .status_word, .control_word, .run, .error_interrupt);

  prog_mem #(.DEPTH(64)) u_pmem (
    .clk, .df_wr, .rd_addr(pc), .instr(ram_word));

  pro_sequencer u_pro (
    .clk, .rst_n, .phase_end, .ice, .pro(ins.pro), .apb_out, .df_wr,
    .go_reset, .go_start, .go_transfer, .go_resume, .intr_req,
    .pc, .exec, .intr_take, .lc1, .lc2, .lc3, .sar, .rl_wr,
    .active_code, .next_pc);

  addr_proc #(.W(16), .HAS_SELECT(1'b1), .HAS_DATAI(1'b1),
              .RS_ADDR(A_APBRS), .DATAI_ADDR(A_DATAI)) u_apb (
    .clk, .rst_n, .ice, .exec, .ins(ins.apb), .lc1_lo(lc1[3:0]), .df_wr,
    .out(apb_out));

  addr_proc #(.W(12), .HAS_SELECT(1'b0), .HAS_DATAI(1'b0),
              .RS_ADDR(A_APMRS), .DATAI_ADDR(6'd0)) u_apm (
    .clk, .rst_n, .ice, .exec, .ins(apm_as_apb), .lc1_lo(lc1[3:0]), .df_wr,
    .out(apm_out));

  io_unit u_io (
    .clk, .rst_n, .phase, .ice, .exec, .io(ins.io), .df_wr,
    .mixed_mode(status_word[6]), .test_source(status_word[4]),
    .apb_out, .buf_data, .test_data, .edb_in, .eab_in,
    .buf_addr, .int_xy, .ext_xy, .edb_out, .edb_oe, .eab_out, .eab_oe,
    .flag, .bar);

  ari_unit #(.SW(SAMPLE_W)) u_ari (
    .clk, .rst_n, .ice, .exec, .ari(ins.ari), .swap_ext(status_word[7]),
    .int_xy(int_xy[2*SAMPLE_W-1:0]), .ext_xy(ext_xy[2*SAMPLE_W-1:0]),
    .alu12, .alu34);

  acc_unit #(.ACC_W(ACC_W), .PW(PW), .DEPTH(4096)) u_acc (
    .clk, .rst_n, .ice, .exec, .acc(ins.acc), .addr(apm_out),
    .alu12, .alu34, .stat_continue(status_word[5]),
    .mem1_rd, .mem2_rd, .o1, .o2, .set1, .set2, .ovf(acc_ovf));

  out_unit #(.ACC_W(ACC_W)) u_out (
    .clk, .rst_n, .ice, .exec, .clear(go_reset), .out_i(ins.out_f),
    .mem1_rd, .mem2_rd, .ext_mem_data, .test_word1(tw1), .test_word2(tw2),
    .transfer_inhibit, .data_received,
    .dma_data, .data_ready, .dma_request, .stall, .src_we, .src);
endmodule
