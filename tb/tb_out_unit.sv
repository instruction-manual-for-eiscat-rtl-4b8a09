// Self-checking testbench for out_unit.
//
// Random OUT instructions (all transfer codes, both SOURCE cases, with and
// without INHIBIT CLOCK) run with a randomly answering computer. The
// testbench closes the stall loop like the top does (ice = not stall) and
// checks DMA data, DATA-READY, DMA-REQUEST, the stall and the statusword
// source write against a model. Transfer-inhibit test mode and the reset
// clear are exercised too; stalls, transfers of each kind and test-mode
// holds are counted.
module tb_out_unit;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ice, exec, clear, transfer_inhibit, data_received;
  out_instr_t out_i;
  logic [31:0] mem1_rd, mem2_rd;
  logic [15:0] ext_mem_data, test_word1, test_word2, dma_data;
  logic data_ready, dma_request, stall, src_we;
  logic [1:0] src;

  out_unit #(.ACC_W(32)) dut (.*);

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

  initial begin
    bit m_pend, m_req, xfer, e_stall;
    logic [15:0] m_data, w;
    int n_stall = 0, n_mem = 0, n_ext = 0, n_tw = 0, n_tihold = 0;
    rst_n = 0; ice = 0; exec = 0; clear = 0; transfer_inhibit = 0; data_received = 0;
    out_i = '0; mem1_rd = 0; mem2_rd = 0; ext_mem_data = 0; test_word1 = 0; test_word2 = 0;
    m_pend = 0; m_req = 0; m_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      out_i = out_instr_t'($urandom);
      exec = ($urandom_range(0, 7) != 0);
      mem1_rd = $urandom; mem2_rd = $urandom; ext_mem_data = 16'($urandom);
      test_word1 = 16'($urandom); test_word2 = 16'($urandom);
      data_received = ($urandom_range(0, 5) == 0);
      transfer_inhibit = (cyc >= 15000);
      clear = ($urandom_range(0, 999) == 0);
      xfer = exec && out_i.transfer && out_i.code >= 2;
      e_stall = exec && m_pend && (out_i.inhibit_clk || (transfer_inhibit && xfer));
      #1;
      ice = !stall;
      #1;
      check("stall", stall, e_stall);
      check("data_ready", data_ready, m_pend && !transfer_inhibit);
      check("dma_request", dma_request, m_req);
      check("src_we", src_we, ice && xfer && out_i.code <= 5);
      if (xfer) check("src", src, out_i.source);
      if (e_stall) n_stall++;
      if (e_stall && transfer_inhibit && !out_i.inhibit_clk) n_tihold++;
      case (out_i.code)
        2: w = out_i.source == 0 ? mem1_rd[15:0]  : ext_mem_data;
        3: w = out_i.source == 0 ? mem1_rd[31:16] : ext_mem_data;
        4: w = out_i.source == 0 ? mem2_rd[15:0]  : ext_mem_data;
        5: w = out_i.source == 0 ? mem2_rd[31:16] : ext_mem_data;
        6: w = test_word1;
        default: w = test_word2;
      endcase
      m_req = m_pend && !transfer_inhibit && !data_received && !clear;
      if (clear) m_pend = 0;
      else if (ice && xfer) begin
        m_pend = 1; m_data = w;
        if (out_i.code >= 6) n_tw++;
        else if (out_i.source == 0) n_mem++;
        else n_ext++;
      end else if (data_received) m_pend = 0;
      @(posedge clk); #1;
      check("dma_data", dma_data, m_data);
    end
    $display("events: stall=%0d mem=%0d ext=%0d testword=%0d testmode_hold=%0d",
             n_stall, n_mem, n_ext, n_tw, n_tihold);
    check("events seen", n_stall > 0 && n_mem > 0 && n_ext > 0 && n_tw > 0 && n_tihold > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
