// Self-checking testbench for pro_sequencer.
//
// Every clock is one instruction cycle here (phase_end = ice = 1). Random
// PRO instructions, drawn only from the documented codes, run against a
// reference model of the sequencer written from the code tables. The
// condition codes are checked with a bit-pattern formula of the table, so the
// table in the design and the model are independent. Loop-load registers
// are small so that counters hit zero often. Checked every cycle: exec,
// picked code, next PC, the PC, the three loop counters and the delayed
// reload write. Also counted: pushes, pops, returns, reloads, interrupts.
module tb_pro_sequencer;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, phase_end, ice;
  pro_instr_t pro;
  logic [15:0] apb_out;
  df_wr_t df_wr;
  logic go_reset, go_start, go_transfer, go_resume, intr_req;
  logic [5:0] pc, sar, next_pc;
  logic exec, intr_take;
  logic [11:0] lc1, lc2, lc3;
  df_wr_t rl_wr;
  logic [3:0] active_code;

  pro_sequencer dut (.*);

  int checks = 0, failures = 0;
  int n_push = 0, n_pop = 0, n_ret = 0, n_reload = 0, n_intr = 0, n_resume = 0,
      n_cont3 = 0, n_b = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 4) $display("FAIL %s: got %0d expected %0d (t=%0t) lc1op=%0d pc=%0d lcr1a=%0d lcr1=%0d", what, got, exp, $time, pro.lc1, m_pc, m_lcr1a, m_lcr[0]);
    end
  endtask

  // ---------------- reference model ----------------
  int m_pc, m_sar, m_bp, m_lc[3], m_lcr[3], m_lcr1a, m_rs[4];
  bit m_rl_pend; int m_rl_addr, m_rl_val;

  const int conds[] = '{32,40,48,56,57,58,59,60,61,62,63,50,51,54,55,44,45,46,47,
                        38,39,27,30,29,31,19,22,23,11,14,13,15,3,5,7};

  // 0 = A, 1 = B, 2 = continue
  function automatic int m_choice(int c, bit z1, bit z2, bit z3);
    bit [5:0] b = c[5:0];
    bit tb, ta;
    if (c == 5) return !z3 ? 1 : (!z2 ? 0 : 2);    // printed table row
    if (b[5]) begin
      tb = (b[0] & z1) | (b[1] & (z2 ^ !b[3])) | (b[2] & (z3 ^ !b[4]));
      return tb ? 1 : 0;
    end
    tb = (b[0] & (z1 ^ !b[4])) | (b[2] & (z3 ^ !b[4]));
    ta = b[1] & (z2 ^ !b[3]);
    return tb ? 1 : (ta ? 0 : 2);
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ch, code, act, npc, lcn[3];
    bit z1, z2, z3, exr, take, prev_reload, apply_rl;
    rst_n = 0; phase_end = 1; ice = 1; pro = '0; apb_out = 0; df_wr = '0;
    go_reset = 0; go_start = 0; go_transfer = 0; go_resume = 0; intr_req = 0;
    m_pc = 0; m_sar = 0; m_bp = 0; m_lcr1a = 0; m_rl_pend = 0;
    foreach (m_lc[i]) begin m_lc[i] = 0; m_lcr[i] = 0; end
    foreach (m_rs[i]) m_rs[i] = 0;
    prev_reload = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // host loads of SAR and LCR1..3
    @(negedge clk);
    df_wr = '{en: 1, addr: A_SAR, sub: 0, data: 16'd5}; m_sar = 5;
    @(negedge clk);
    df_wr = '{en: 1, addr: A_LCR1, sub: 0, data: 16'd2}; m_lcr[0] = 2;
    @(negedge clk);
    df_wr = '{en: 1, addr: A_LCR2, sub: 0, data: 16'd3}; m_lcr[1] = 3;
    @(negedge clk);
    df_wr = '{en: 1, addr: A_LCR3, sub: 0, data: 16'd1}; m_lcr[2] = 1;
    @(negedge clk);
    df_wr = '0;
    check("sar loaded", sar, 5);

    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      go_start = 0; go_resume = 0; intr_req = 0;
      // restart when idle or stopped
      if (m_pc == 0) go_start = 1;
      if (m_pc == 63) go_resume = 1;
      if ($urandom_range(0, 99) == 0) intr_req = 1;
      pro.cond   = 6'(conds[$urandom_range(0, conds.size()-1)]);
      pro.code_a = 4'($urandom_range(0, 15));
      pro.code_b = 4'($urandom_range(0, 15));
      pro.jump   = 6'($urandom_range(1, 62));
      pro.lc1    = 3'($urandom_range(0, 7));
      pro.lc2    = 2'(($urandom_range(0, 2) == 2) ? 3 : $urandom_range(0, 1));
      pro.lc3    = 2'($urandom_range(0, 3));
      pro.lcr1a  = 1'($urandom_range(0, 1));
      pro.reload = 1'($urandom_range(0, 5) == 0);
      case ($urandom_range(0, 3))
        0: pro.rl_addr = 5'd4;  1: pro.rl_addr = 5'd18;
        2: pro.rl_addr = 5'd19; default: pro.rl_addr = 5'd20;
      endcase
      apb_out = 16'($urandom_range(1, 4));
      if (prev_reload) begin     // programming rule after a reload
        pro.reload = 0;
        if (pro.lc1 inside {3'd2, 3'd3}) pro.lc1 = 3'd1;
        if (pro.lc2 == 2'd3) pro.lc2 = 2'd1;
        if (pro.lc3 == 2'd2) pro.lc3 = 2'd1;
      end
      #1;
      // ---- expected combinational outputs ----
      z1 = (m_lc[0] == 0); z2 = (m_lc[1] == 0); z3 = (m_lc[2] == 0);
      ch = m_choice(pro.cond, z1, z2, z3);
      code = (ch == 0) ? pro.code_a : (ch == 1) ? pro.code_b : 4;
      act = code % 4;
      npc = (act == 0) ? (m_pc + 1) % 64 : (act == 1) ? m_rs[0] : (act == 2) ? pro.jump : m_sar;
      exr = (m_pc != 0) && (m_pc != 63);
      take = intr_req && exr && act == 0;
      check("active_code", active_code, code);
      check("next_pc", next_pc, npc);
      check("exec", exec, exr && !take);
      check("intr_take", intr_take, take);
      check("rl_wr.en", rl_wr.en, m_rl_pend);
      if (m_rl_pend) begin
        check("rl_wr.addr", rl_wr.addr, m_rl_addr);
        check("rl_wr.data", rl_wr.data, m_rl_val);
      end
      // ---- model update ----
      // the testbench feeds the reload back like the top does
      df_wr = rl_wr;
      prev_reload = 0;
      apply_rl = m_rl_pend;
      if (go_start) m_pc = m_sar;
      else if (go_resume) begin m_pc = m_bp; n_resume++; end
      else if (take) begin m_bp = m_pc; m_pc = 63; n_intr++; end
      else if (exr) begin
        if (ch == 2) n_cont3++;
        if (ch == 1) n_b++;
        if (act == 1) n_ret++;
        if (code / 4 == 0) begin
          m_rs[0] = m_rs[1]; m_rs[1] = m_rs[2]; m_rs[2] = m_rs[3]; n_pop++;
        end else if (code / 4 == 2) begin
          m_rs[3] = m_rs[2]; m_rs[2] = m_rs[1]; m_rs[1] = m_rs[0];
          m_rs[0] = (m_pc + 1) % 64; n_push++;
        end
        m_pc = npc;
        lcn = m_lc;
        case (pro.lc1)
          1: lcn[0] = (m_lc[0] + 4095) % 4096;
          2: lcn[0] = m_lcr[0];
          3: lcn[0] = m_lcr1a;
          4: if (z1) begin lcn[0] = m_lcr[0]; if (pro.lc2 == 0) lcn[1] = (m_lc[1] + 4095) % 4096; end
             else lcn[0] = m_lc[0] - 1;
          5: lcn[0] = (z1 || z3) ? m_lcr1a : m_lc[0] - 1;
          6: lcn[0] = z1 ? m_lcr[0] : m_lc[0] - 1;
          7: lcn[0] = z1 ? m_lcr1a : m_lc[0] - 1;
          default: ;
        endcase
        if (pro.lc2 == 1) lcn[1] = (m_lc[1] + 4095) % 4096;
        if (pro.lc2 == 3) lcn[1] = m_lcr[1];
        if (pro.lc3 == 1) lcn[2] = (m_lc[2] + 4095) % 4096;
        if (pro.lc3 == 2) lcn[2] = m_lcr[2];
        if (pro.lc3 == 3) lcn[2] = z3 ? m_lcr[2] : m_lc[2] - 1;
        if (pro.lcr1a) m_lcr1a = m_lc[0];
        m_lc = lcn;
        if (pro.reload) begin
          m_rl_pend = 1; m_rl_addr = pro.rl_addr; m_rl_val = apb_out; prev_reload = 1;
        end
      end
      // the delayed reload lands at the end of this cycle
      if (apply_rl) begin
        n_reload++;
        case (m_rl_addr)
          4: m_sar = m_rl_val % 64;
          18: m_lcr[0] = m_rl_val; 19: m_lcr[1] = m_rl_val; 20: m_lcr[2] = m_rl_val;
          default: ;
        endcase
        if (!(exr && !take && pro.reload)) m_rl_pend = 0;
      end
      @(posedge clk); #1;
      check("pc", pc, m_pc);
      check("lc1", lc1, m_lc[0]);
      check("lc2", lc2, m_lc[1]);
      check("lc3", lc3, m_lc[2]);
    end

    // reset command returns to location 0
    @(negedge clk); go_start = 0; go_resume = 0; go_reset = 1; df_wr = '0;
    @(posedge clk); #1 check("reset pc", pc, 0);
    go_reset = 0;

    $display("events: push=%0d pop=%0d return=%0d reload=%0d intr=%0d resume=%0d cont=%0d codeB=%0d",
             n_push, n_pop, n_ret, n_reload, n_intr, n_resume, n_cont3, n_b);
    check("events seen", (n_push > 0 && n_pop > 0 && n_ret > 0 && n_reload > 0 &&
                          n_intr > 0 && n_resume > 0 && n_cont3 > 0 && n_b > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
