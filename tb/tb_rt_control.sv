// Directed self-checking testbench for rt_control: statusword and control
// word bit maps, address/data loading, start-command granting and each
// refusal error, reset, program interrupt and resume, overflow bits,
// transfer source, the two-clock instruction cycle, stall and single-cycle
// clock mode.
module tb_rt_control;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic cmd_start_computer, cmd_start_radar, cmd_start_panel, cmd_start_transfer;
  logic cmd_reset, cmd_addr_load, cmd_data_load, cmd_intr_program, cmd_intr_reset;
  logic [5:0] ld_addr, ld_sub, pc;
  logic [15:0] ld_data;
  logic manual, clock_single, clock_advance, stall, intr_taken, acc_ovf, src_we;
  logic [2:0] slave_ovf;
  logic [1:0] src;
  logic phase, phase_end, ice, go_reset, go_start, go_transfer, go_resume, intr_req;
  df_wr_t host_wr;
  logic [15:0] status_word, control_word;
  logic run, error_interrupt;

  rt_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic load(input logic [5:0] a, input logic [5:0] sb, input logic [15:0] d);
    @(negedge clk); cmd_addr_load = 1; ld_addr = a; ld_sub = sb;
    @(negedge clk); cmd_addr_load = 0;
    check("addr loaded bit", status_word[2], 1);
    cmd_data_load = 1; ld_data = d;
    #1 check("host_wr.en", host_wr.en, 1);
    check("host_wr.addr", host_wr.addr, a);
    check("host_wr.sub", host_wr.sub, sb);
    @(negedge clk); cmd_data_load = 0;
    check("addr loaded cleared", status_word[2], 0);
  endtask

  // count ice pulses
  int n_ice = 0;
  always @(posedge clk) if (ice) n_ice++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    bit seen;
    rst_n = 0;
    {cmd_start_computer, cmd_start_radar, cmd_start_panel, cmd_start_transfer} = '0;
    {cmd_reset, cmd_addr_load, cmd_data_load, cmd_intr_program, cmd_intr_reset} = '0;
    ld_addr = 0; ld_sub = 0; ld_data = 0; pc = 0;
    manual = 0; clock_single = 0; clock_advance = 0; stall = 0; intr_taken = 0;
    acc_ovf = 0; src_we = 0; slave_ovf = 0; src = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // two-clock instruction cycle
    k = n_ice; repeat (10) @(posedge clk); #1;
    check("ice every second clock", n_ice - k, 5);

    // statusword load: ident 5, computer start source, bits 7..3 = 10101
    load(A_STAT, 0, 16'b0101_10_11_10101_111);
    check("status", status_word, 16'b0101_10_00_10101_000);
    check("control ident", control_word[15:12], 5);

    // start while not ready -> error 3
    pulse(cmd_start_computer);
    check("not ready error", control_word[3], 1);
    check("error interrupt", error_interrupt, 1);
    check("no start", go_start, 0);

    // ready, start from a source that is not enabled -> ignored
    load(A_CRA, 0, 16'd1);
    check("ready", status_word[0], 1);
    pulse(cmd_start_radar);
    check("radar start ignored", go_start, 0);
    // computer start granted, held until the end of the cycle
    pulse(cmd_start_computer);
    seen = go_start;
    repeat (2) @(negedge clk);
    check("start granted", seen, 1);
    check("start consumed", go_start, 0);

    // busy: address load -> error 0, start -> error 2
    pc = 6'd7; #1;
    check("busy bit", status_word[1], 1);
    check("run", run, 1);
    @(negedge clk); cmd_addr_load = 1; @(negedge clk); cmd_addr_load = 0;
    check("busy load error", control_word[0], 1);
    check("no address loaded", status_word[2], 0);
    pulse(cmd_start_computer);
    check("busy start error", control_word[2], 1);
    pc = 6'd63; #1;
    check("not busy at 63", run, 0);
    pc = 0;

    // manual operation -> error 1
    manual = 1;
    pulse(cmd_start_computer);
    check("manual error", control_word[1], 1);
    manual = 0;

    // overflow bits and transfer source
    pulse(acc_ovf);
    @(negedge clk); slave_ovf = 3'b101; @(negedge clk); slave_ovf = 0;
    check("overflow bits", control_word[7:4], 4'b1101);
    @(negedge clk); src_we = 1; src = 2'd3; @(negedge clk); src_we = 0;
    check("transfer source", status_word[9:8], 3);

    // reset clears errors and ready
    pulse(cmd_reset);
    check("errors cleared", control_word[7:0], 0);
    check("ready cleared", status_word[0], 0);
    check("no error interrupt", error_interrupt, 0);
    repeat (2) @(negedge clk);

    // transfer start by radar controller
    load(A_STAT, 0, 16'b0101_01_00_00000_000);
    load(A_CRA, 0, 16'd1);
    pulse(cmd_start_transfer);
    seen = go_transfer;
    repeat (2) @(negedge clk);
    check("transfer start", seen, 1);
    // panel start in manual with panel source
    load(A_STAT, 0, 16'b0101_00_00_00000_000);
    manual = 1;
    pulse(cmd_start_panel);
    seen = go_start;
    check("panel start", seen, 1);
    check("no manual error for panel", control_word[1], 0);
    repeat (2) @(negedge clk);
    manual = 0;

    // interrupt program / reset
    pulse(cmd_intr_program);
    check("intr pending", intr_req, 1);
    @(negedge clk); intr_taken = 1;
    while (!ice) @(negedge clk);
    @(negedge clk); intr_taken = 0;
    check("intr taken", intr_req, 0);
    pc = 6'd63;
    pulse(cmd_intr_reset);
    seen = go_resume;
    check("resume", seen, 1);
    pc = 0;

    // stall and single-cycle mode
    @(negedge clk); stall = 1;
    k = n_ice; repeat (8) @(posedge clk); #1;
    check("stall blocks ice", n_ice - k, 0);
    @(negedge clk); stall = 0; clock_single = 1;
    k = n_ice; repeat (8) @(posedge clk); #1;
    check("single mode holds", n_ice - k, 0);
    pulse(clock_advance);
    repeat (8) @(posedge clk); #1;
    check("one advance, one cycle", n_ice - k, 1);
    clock_single = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
