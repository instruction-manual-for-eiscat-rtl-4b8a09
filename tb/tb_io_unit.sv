// Self-checking testbench for io_unit.
//
// Two clocks per instruction cycle, as in the top. Checks, for random I/O
// fields and statusword modes: the buffer address in both halves of the
// cycle (normal and mixed mode, internal or external address), the EAB and
// EDB drive, the sample source (buffer or test memory), the I-register
// strobed at the end of the first half, and FLAG set / clear. BAR is loaded
// over the data-field bus.
module tb_io_unit;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, phase, ice, exec, mixed_mode, test_source;
  io_instr_t io;
  df_wr_t df_wr;
  logic [15:0] apb_out, buf_data, test_data, edb_in, eab_in;
  logic [15:0] buf_addr, int_xy, ext_xy, edb_out, eab_out, bar;
  logic edb_oe, eab_oe, flag;

  io_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer memory model: address-dependent samples
  function automatic logic [15:0] bufm(logic [15:0] a); return a * 16'd7 + 16'd3; endfunction
  assign buf_data = bufm(buf_addr);

  initial begin
    logic [15:0] m_bar, m_ireg, a1, ebus, dbus;
    bit m_flag;
    int n_mixed = 0, n_eab = 0, n_edb = 0, n_ireg = 0;
    rst_n = 0; phase = 0; ice = 0; exec = 0; mixed_mode = 0; test_source = 0;
    io = '0; df_wr = '0; apb_out = 0; test_data = 0; edb_in = 0; eab_in = 0;
    m_ireg = 0; m_flag = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    df_wr = '{en: 1, addr: A_BAR, sub: 0, data: 16'd1000}; m_bar = 1000;
    @(negedge clk); df_wr = '0;
    check("bar", bar, 1000);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phase 0
      @(negedge clk);
      phase = 0; ice = 0;
      io = io_instr_t'($urandom);
      io.set_f = ($urandom_range(0, 5) == 0); io.clear_f = ($urandom_range(0, 5) == 0);
      exec = ($urandom_range(0, 7) != 0);
      mixed_mode = $urandom_range(0, 1); test_source = $urandom_range(0, 1);
      apb_out = 16'($urandom); test_data = 16'($urandom);
      edb_in = 16'($urandom); eab_in = 16'($urandom);
      #1;
      a1 = mixed_mode ? apb_out + m_bar : apb_out;
      ebus = (exec && io.en_eab) ? a1 : eab_in;
      check("eab_oe", eab_oe, exec && io.en_eab);
      check("eab_out", eab_out, a1);
      check("buf_addr p0", buf_addr, (exec && io.sel_bufaddr) ? ebus : a1);
      check("int_xy p0", int_xy, test_source ? test_data : bufm(buf_addr));
      dbus = (exec && io.en_edb) ? int_xy : edb_in;
      check("edb_oe", edb_oe, exec && io.en_edb);
      if (exec && io.en_edb) check("edb_out", edb_out, int_xy);
      if (mixed_mode) n_mixed++;
      if (exec && io.en_eab) n_eab++;
      if (exec && io.en_edb) n_edb++;
      if (exec && io.strobe_ireg) begin m_ireg = dbus; n_ireg++; end
      @(posedge clk); #1;
      check("ext_xy", ext_xy, m_ireg);
      // phase 1
      @(negedge clk);
      phase = 1; ice = 1;
      #1;
      a1 = apb_out;
      ebus = (exec && io.en_eab) ? a1 : eab_in;
      check("buf_addr p1", buf_addr, (exec && io.sel_bufaddr) ? ebus : a1);
      if (exec && io.set_f) m_flag = 1;
      else if (exec && io.clear_f) m_flag = 0;
      @(posedge clk); #1;
      check("flag", flag, m_flag);
      check("ext_xy held", ext_xy, m_ireg);
    end
    check("events seen", n_mixed > 0 && n_eab > 0 && n_edb > 0 && n_ireg > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
