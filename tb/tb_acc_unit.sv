// Self-checking testbench for acc_unit.
//
// A random stream of ACC instructions (STROBE, READ, WRITE, SET/CLEAR 1 and
// 2), APM addresses in a small range and ALU values runs against a model of
// the two-stage accumulator pipeline and of both result memories. Checked
// every cycle: the memory words at the address, both O-registers, SET 1,
// SET 2 and the overflow pulse. The accumulator is narrowed to 20 bits so
// that overflow happens. Counted: memory reads, zero-starts, internal
// accumulations, writes, overflows and continue-experiment SET 2 events.
module tb_acc_unit;
  import corr_pkg::*;

  localparam int ACC_W = 20;
  localparam int PW = 17;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ice, exec, stat_continue;
  acc_instr_t acc;
  logic [11:0] addr;
  logic signed [PW-1:0] alu12, alu34;
  logic [ACC_W-1:0] mem1_rd, mem2_rd, o1, o2;
  logic set1, set2, ovf;

  acc_unit #(.ACC_W(ACC_W), .PW(PW), .DEPTH(4096)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  localparam longint M = 64'd1 << ACC_W;
  longint mem1[int], mem2[int];
  function automatic longint rd(ref longint m[int], input int a);
    return m.exists(a) ? m[a] : 0;
  endfunction
  function automatic longint sgn(longint v);   // ACC_W-bit signed value
    return (v >= M / 2) ? v - M : v;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r1, r2, m_o1, m_o2, m_i1, m_i2, m_p1, m_p2, b1, b2, s1v, s2v;
    bit m_set1, m_set2, v_d, rd_d, wr_d, s1n, s2n, ov;
    int addr_d;
    int n_read = 0, n_zero = 0, n_int = 0, n_wr = 0, n_ovf = 0, n_cont = 0;
    rst_n = 0; ice = 0; exec = 0; acc = '0; addr = 0; alu12 = 0; alu34 = 0;
    stat_continue = 0;
    m_o1 = 0; m_o2 = 0; m_i1 = 0; m_i2 = 0; m_p1 = 0; m_p2 = 0;
    m_set1 = 0; m_set2 = 0; v_d = 0; rd_d = 0; wr_d = 0; addr_d = 0;
    // the memories start at random values: clear the used range first
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      ice = 1; exec = 1; addr = 12'(a); alu12 = 0; alu34 = 0;
      acc = '{strobe_io: 1, write: 1, read: 1, clear1: 1, set1: 0, clear2: 1, set2: 0};
      @(negedge clk);
      acc = '0;
    end
    @(negedge clk); @(negedge clk);
    for (int a = 0; a < 8; a++) begin mem1[a] = 0; mem2[a] = 0; end
    m_o1 = 0; m_o2 = 0; m_set1 = 0; m_set2 = 0; v_d = 0; rd_d = 0; wr_d = 0;

    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      acc = acc_instr_t'($urandom);
      acc.set1 = ($urandom_range(0, 5) == 0);
      acc.set2 = ($urandom_range(0, 9) == 0);
      acc.clear1 = ($urandom_range(0, 7) == 0);
      acc.clear2 = ($urandom_range(0, 7) == 0);
      addr = 12'($urandom_range(0, 7));
      alu12 = PW'($urandom_range(0, 70000) - 35000);
      alu34 = PW'($urandom_range(0, 70000) - 35000);
      exec = ($urandom_range(0, 7) != 0);
      stat_continue = (cyc >= 10000);
      ice = ($urandom_range(0, 9) != 0);
      #1;
      check("mem1 read", mem1_rd, rd(mem1, addr));
      check("mem2 read", mem2_rd, rd(mem2, addr));
      b1 = rd_d ? m_i1 : m_o1;  b2 = rd_d ? m_i2 : m_o2;
      s1v = (b1 + m_p1 + M) % M; s2v = (b2 + m_p2 + M) % M;
      ov = v_d && ((sgn(b1) + m_p1 != sgn(s1v)) || (sgn(b2) + m_p2 != sgn(s2v)));
      check("ovf", ovf, ice && ov);
      r1 = rd(mem1, addr); r2 = rd(mem2, addr);   // read happens before the write lands
      if (ice) begin
        // stage 2
        if (ov) n_ovf++;
        if (wr_d) begin
          mem1[addr_d] = v_d ? s1v : m_o1;
          mem2[addr_d] = v_d ? s2v : m_o2;
          n_wr++;
        end
        if (v_d) begin
          if (!rd_d) n_int++;
          m_o1 = s1v; m_o2 = s2v;
        end
        // stage 1
        s1n = (m_set1 && !acc.clear1) || acc.set1;
        s2n = (m_set2 && !acc.clear2) || acc.set2 || (stat_continue && !s1n && acc.read);
        if (exec && stat_continue && !s1n && acc.read && !((m_set2 && !acc.clear2) || acc.set2))
          n_cont++;
        v_d = exec && acc.strobe_io; rd_d = exec && acc.read; wr_d = exec && acc.write;
        addr_d = addr;
        if (exec) begin
          m_set1 = s1n; m_set2 = s2n;
          m_p1 = alu12; m_p2 = alu34;
          if (acc.strobe_io && acc.read) begin
            if (s1n || s2n) begin
              m_i1 = r1; m_i2 = r2; n_read++;
            end else begin
              m_i1 = 0; m_i2 = 0; n_zero++;
            end
          end
        end
      end
      @(posedge clk); #1;
      check("o1", o1, m_o1);
      check("o2", o2, m_o2);
      check("set1", set1, m_set1);
      check("set2", set2, m_set2);
    end
    $display("events: read=%0d zero=%0d internal=%0d write=%0d ovf=%0d continue=%0d",
             n_read, n_zero, n_int, n_wr, n_ovf, n_cont);
    check("events seen", n_read > 0 && n_zero > 0 && n_int > 0 && n_wr > 0 && n_ovf > 0 && n_cont > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
