// Real-time control: instruction-cycle timing, statusword, control word,
// host loading and real-time commands.
//
// Timing: an instruction cycle is two clocks, phase 0 and phase 1.
// phase_end marks phase 1; ice ("instruction cycle end") is phase_end unless
// the OUT unit stalls the instruction or single-cycle mode waits for a
// CLOCK ADVANCE push (one instruction per push).
//
// Host loading: ADDRESS LOAD latches a 6-bit register address and 6-bit
// sub-address and sets statusword bit 2; it is refused with control-word
// error bit 0 while the correlator is busy. DATA LOAD then writes 16 bits
// to that address over host_wr and clears bit 2. The statusword (address 1,
// only its settable bits 15..10 and 7..3) and CORRELATOR READY (address 63,
// bit 0) are held here.
//
// Commands (one-clock pulses): START COMPUTE from the computer or the radar
// controller, START TRANSFER from the radar controller. A start is granted
// in remote operation, when not busy, ready, and when the statusword enables
// its source (0 panel, 1 radar controller, 2 computer); it then starts the
// program at SAR (compute) or 32 (transfer) at the end of the current
// instruction cycle. Refusals set control-word bits 1 (manual operation),
// 2 (busy) and 3 (not ready); a start from a source that is not enabled is
// ignored. RESET returns the PC to 0, clears the error bits and READY.
// INTERRUPT PROGRAM stays pending until the sequencer takes it; INTERRUPT
// RESET resumes a program stopped at location 63.
//
// Statusword: [15:12] module ident, [11:10] start source, [9:8] transfer
// source (set by the OUT unit), [7..3] slave mode, mixed address mode,
// continue experiment, test data, fixed programs, [2] address loaded,
// [1] busy (PC not 0 and not 63), [0] ready. Control word: [15:12] module
// ident, [7] master accumulator overflow, [6:4] slave 3..1 overflow, [3:0]
// command errors. Error bits stay until RESET; ERROR INTERRUPT is their OR.
// Bit maps and command responses follow the document; the two-clock cycle,
// the command pulses and the panel-start input are this design's choices.
module rt_control
  import corr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // commands
  input  logic        cmd_start_computer,
  input  logic        cmd_start_radar,
  input  logic        cmd_start_panel,
  input  logic        cmd_start_transfer,
  input  logic        cmd_reset,
  input  logic        cmd_addr_load,
  input  logic [5:0]  ld_addr,
  input  logic [5:0]  ld_sub,
  input  logic        cmd_data_load,
  input  logic [15:0] ld_data,
  input  logic        cmd_intr_program,
  input  logic        cmd_intr_reset,
  // panel switches
  input  logic        manual,
  input  logic        clock_single,
  input  logic        clock_advance,
  // from the units
  input  logic [5:0]  pc,
  input  logic        stall,
  input  logic        intr_taken,
  input  logic        acc_ovf,
  input  logic [2:0]  slave_ovf,      // slaves 1..3
  input  logic        src_we,
  input  logic [1:0]  src,
  // outputs
  output logic        phase,
  output logic        phase_end,
  output logic        ice,
  output df_wr_t      host_wr,
  output logic        go_reset,
  output logic        go_start,
  output logic        go_transfer,
  output logic        go_resume,
  output logic        intr_req,
  output logic [15:0] status_word,
  output logic [15:0] control_word,
  output logic        run,
  output logic        error_interrupt
);
  logic [3:0] ident;
  logic [1:0] start_src, xfer_src;
  logic [4:0] pbits;                  // statusword bits 7..3
  logic       addr_loaded, ready;
  logic [5:0] la_addr, la_sub;
  logic [3:0] err;
  logic [3:0] ovf;                    // [3] master, [2:0] slave 3..1
  logic       adv_pend;

  assign run       = (pc != PC_IDLE) && (pc != PC_SERVICE);
  assign phase_end = phase;
  assign ice       = phase_end && !stall && !(clock_single && !adv_pend);

  assign status_word  = {ident, start_src, xfer_src, pbits, addr_loaded, run, ready};
  assign control_word = {ident, 4'b0000, ovf, err};
  assign error_interrupt = |{ovf, err};

  assign host_wr.en   = cmd_data_load && addr_loaded;
  assign host_wr.addr = la_addr;
  assign host_wr.sub  = la_sub;
  assign host_wr.data = ld_data;

  logic start_req, can_start;
  assign start_req = cmd_start_computer || cmd_start_radar || cmd_start_transfer;
  assign can_start = !run && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      ident <= '0; start_src <= '0; xfer_src <= '0; pbits <= '0;
      addr_loaded <= 1'b0; ready <= 1'b0;
      la_addr <= '0; la_sub <= '0;
      err <= '0; ovf <= '0;
      go_reset <= 1'b0; go_start <= 1'b0; go_transfer <= 1'b0; go_resume <= 1'b0;
      intr_req <= 1'b0; adv_pend <= 1'b0;
    end else begin
      phase <= !phase;

      // commands are applied at the end of the instruction cycle
      if (phase_end) begin
        go_reset <= 1'b0; go_start <= 1'b0; go_transfer <= 1'b0; go_resume <= 1'b0;
      end

      if (clock_advance) adv_pend <= 1'b1;
      else if (ice) adv_pend <= 1'b0;

      // ---- start commands ----
      if (start_req && manual) err[1] <= 1'b1;
      if (start_req && !manual && run) err[2] <= 1'b1;
      if (start_req && !manual && !ready) err[3] <= 1'b1;
      if (!manual && can_start) begin
        if (cmd_start_computer && start_src == 2'd2) go_start <= 1'b1;
        if (cmd_start_radar    && start_src == 2'd1) go_start <= 1'b1;
        if (cmd_start_transfer && start_src == 2'd1) go_transfer <= 1'b1;
      end
      if (cmd_start_panel && manual && can_start && start_src == 2'd0)
        go_start <= 1'b1;

      // ---- interrupts ----
      if (cmd_intr_program) intr_req <= 1'b1;
      else if (intr_taken && ice) intr_req <= 1'b0;
      if (cmd_intr_reset && pc == PC_SERVICE) go_resume <= 1'b1;

      // ---- host loading ----
      if (cmd_addr_load) begin
        if (run) err[0] <= 1'b1;
        else begin
          la_addr <= ld_addr;
          la_sub  <= ld_sub;
          addr_loaded <= 1'b1;
        end
      end else if (host_wr.en) begin
        addr_loaded <= 1'b0;
        if (la_addr == A_STAT) begin
          ident     <= ld_data[15:12];
          start_src <= ld_data[11:10];
          pbits     <= ld_data[7:3];
        end
        if (la_addr == A_CRA) ready <= ld_data[0];
      end

      // ---- transfer source, overflow ----
      if (src_we) xfer_src <= src;
      if (acc_ovf) ovf[3] <= 1'b1;
      ovf[2:0] <= ovf[2:0] | slave_ovf;

      // ---- reset command ----
      if (cmd_reset) begin
        go_reset <= 1'b1;
        go_start <= 1'b0; go_transfer <= 1'b0; go_resume <= 1'b0;
        intr_req <= 1'b0;
        err <= '0; ovf <= '0;
        ready <= 1'b0;
      end
    end
  end
endmodule
