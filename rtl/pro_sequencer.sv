// PRO unit: program sequencing of the correlator.
//
// Holds the program counter, a four-deep LIFO of return addresses, the
// 12-bit loop counters LC1..LC3, their load registers LCR1..LCR3, the
// temporary LCR1A, and the start-address register SAR. Each executed
// instruction tests the loop counters (their values before the
// instruction) with its 6-bit condition code and picks code A, code B or
// "continue". The picked 4-bit code gives the next PC (PC+1, return address,
// jump address or SAR) and a stack action (pop for codes 0-3, push of PC+1
// for codes 8-11, none otherwise). The loop-counter sub-instructions run in
// the same instruction cycle.
//
// RELOAD copies the APB output of the instruction into SAR, BAR or LCR1..3.
// The write lands at the end of the following instruction cycle (a reload
// takes two cycles); rl_wr carries it so that BAR, which lives in the I/O
// unit, sees it too.
//
// Locations 0 (idle) and 63 (stopped at an interrupt) are not executed:
// exec is low there and the PC holds. Real-time commands, applied at the end
// of an instruction cycle (phase_end): reset (PC=0), start compute (PC=SAR),
// start transfer (PC=32), interrupt resume (PC=saved breakpoint). A pending
// program interrupt is taken by the first executed instruction whose next
// PC would be PC+1: that instruction is not executed (exec low), its
// address is saved and the PC goes to 63.
//
// Timing: all state changes on clk when ice (instruction-cycle end, not
// stalled) is high. Condition table, code table, loop-counter tables, the
// stack depth and the reload addresses follow the document. Wrap-around of
// a counter decremented at 0, the handling of undefined codes (treated as
// NOOP / continue) and LC2 priority are this design's choices.
module pro_sequencer
  import corr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        phase_end,   // last clock of an instruction cycle
  input  logic        ice,         // instruction cycle completes
  input  pro_instr_t  pro,
  input  logic [15:0] apb_out,     // reload value
  input  df_wr_t      df_wr,       // merged data-field write bus
  input  logic        go_reset,
  input  logic        go_start,
  input  logic        go_transfer,
  input  logic        go_resume,
  input  logic        intr_req,    // program interrupt pending
  output logic [5:0]  pc,
  output logic        exec,        // this instruction is executed
  output logic        intr_take,   // interrupt taken at this instruction
  output logic [11:0] lc1,
  output logic [11:0] lc2,
  output logic [11:0] lc3,
  output logic [5:0]  sar,
  output df_wr_t      rl_wr,       // delayed register reload
  output logic [3:0]  active_code, // picked code (4 = continue)
  output logic [5:0]  next_pc
);
  typedef enum logic [1:0] {CH_A, CH_B, CH_CONT} choice_e;

  logic [11:0] lcr1, lcr2, lcr3, lcr1a;
  logic [5:0]  rs [4];
  logic [5:0]  bp;
  logic        rl_pend;
  logic [4:0]  rl_addr_q;
  logic [15:0] rl_val_q;

  logic z1, z2, z3;
  assign z1 = (lc1 == '0);
  assign z2 = (lc2 == '0);
  assign z3 = (lc3 == '0);

  choice_e choice;
  always_comb begin
    unique case (pro.cond)
      6'd32, 6'd40, 6'd48, 6'd56: choice = CH_A;
      6'd57: choice = z1 ? CH_B : CH_A;
      6'd58: choice = z2 ? CH_B : CH_A;
      6'd59: choice = (z1 | z2) ? CH_B : CH_A;
      6'd60: choice = z3 ? CH_B : CH_A;
      6'd61: choice = (z1 | z3) ? CH_B : CH_A;
      6'd62: choice = (z2 | z3) ? CH_B : CH_A;
      6'd63: choice = (z1 | z2 | z3) ? CH_B : CH_A;
      6'd50: choice = !z2 ? CH_B : CH_A;
      6'd51: choice = (z1 | !z2) ? CH_B : CH_A;
      6'd54: choice = (!z2 | z3) ? CH_B : CH_A;
      6'd55: choice = (z1 | !z2 | z3) ? CH_B : CH_A;
      6'd44: choice = !z3 ? CH_B : CH_A;
      6'd45: choice = (z1 | !z3) ? CH_B : CH_A;
      6'd46: choice = (z2 | !z3) ? CH_B : CH_A;
      6'd47: choice = (z1 | z2 | !z3) ? CH_B : CH_A;
      6'd38: choice = (!z2 | !z3) ? CH_B : CH_A;
      6'd39: choice = (z1 | !z2 | !z3) ? CH_B : CH_A;
      6'd27: choice = z1 ? CH_B : z2 ? CH_A : CH_CONT;
      6'd30: choice = z3 ? CH_B : z2 ? CH_A : CH_CONT;
      6'd29: choice = (z1 | z3) ? CH_B : CH_CONT;
      6'd31: choice = (z1 | z3) ? CH_B : z2 ? CH_A : CH_CONT;
      6'd19: choice = z1 ? CH_B : !z2 ? CH_A : CH_CONT;
      6'd22: choice = z3 ? CH_B : !z2 ? CH_A : CH_CONT;
      6'd23: choice = (z1 | z3) ? CH_B : !z2 ? CH_A : CH_CONT;
      6'd11: choice = !z1 ? CH_B : z2 ? CH_A : CH_CONT;
      6'd14: choice = !z3 ? CH_B : z2 ? CH_A : CH_CONT;
      6'd13: choice = (!z1 | !z3) ? CH_B : CH_CONT;
      6'd15: choice = (!z1 | !z3) ? CH_B : z2 ? CH_A : CH_CONT;
      6'd3:  choice = !z1 ? CH_B : !z2 ? CH_A : CH_CONT;
      6'd5:  choice = !z3 ? CH_B : !z2 ? CH_A : CH_CONT;
      6'd7:  choice = (!z1 | !z3) ? CH_B : !z2 ? CH_A : CH_CONT;
      default: choice = CH_CONT;
    endcase
  end

  logic [5:0] pc1;
  assign pc1 = pc + 6'd1;

  always_comb begin
    unique case (choice)
      CH_A:    active_code = pro.code_a;
      CH_B:    active_code = pro.code_b;
      default: active_code = 4'd4;           // continue, no stack action
    endcase
    unique case (active_code[1:0])
      2'd0: next_pc = pc1;
      2'd1: next_pc = rs[0];
      2'd2: next_pc = pro.jump;
      default: next_pc = sar;
    endcase
  end

  logic exec_raw;
  assign exec_raw  = (pc != PC_IDLE) && (pc != PC_SERVICE);
  assign intr_take = intr_req && exec_raw && (active_code[1:0] == 2'd0);
  assign exec      = exec_raw && !intr_take;

  assign rl_wr.en   = rl_pend && ice;
  assign rl_wr.addr = {1'b0, rl_addr_q};
  assign rl_wr.sub  = '0;
  assign rl_wr.data = rl_val_q;

  // loop-counter next values
  logic [11:0] lc1_n, lc2_n, lc3_n;
  logic        lc1_dec_lc2;
  always_comb begin
    lc1_n = lc1; lc2_n = lc2; lc3_n = lc3; lc1_dec_lc2 = 1'b0;
    unique case (pro.lc1)
      3'd1: lc1_n = lc1 - 12'd1;
      3'd2: lc1_n = lcr1;
      3'd3: lc1_n = lcr1a;
      3'd4: if (z1) begin lc1_n = lcr1; lc1_dec_lc2 = 1'b1; end
            else lc1_n = lc1 - 12'd1;
      3'd5: lc1_n = (z1 | z3) ? lcr1a : lc1 - 12'd1;
      3'd6: lc1_n = z1 ? lcr1 : lc1 - 12'd1;
      3'd7: lc1_n = z1 ? lcr1a : lc1 - 12'd1;
      default: ;
    endcase
    unique case (pro.lc2)
      2'd1: lc2_n = lc2 - 12'd1;
      2'd3: lc2_n = lcr2;
      default: if (lc1_dec_lc2) lc2_n = lc2 - 12'd1;
    endcase
    unique case (pro.lc3)
      2'd1: lc3_n = lc3 - 12'd1;
      2'd2: lc3_n = lcr3;
      2'd3: lc3_n = z3 ? lcr3 : lc3 - 12'd1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= PC_IDLE; bp <= PC_IDLE; sar <= '0;
      lc1 <= '0; lc2 <= '0; lc3 <= '0;
      lcr1 <= '0; lcr2 <= '0; lcr3 <= '0; lcr1a <= '0;
      for (int i = 0; i < 4; i++) rs[i] <= '0;
      rl_pend <= 1'b0; rl_addr_q <= '0; rl_val_q <= '0;
    end else begin
      // data-field writes (host load or delayed reload)
      if (df_wr.en) begin
        unique case (df_wr.addr)
          A_SAR:  sar  <= df_wr.data[5:0];
          A_LCR1: lcr1 <= df_wr.data[11:0];
          A_LCR2: lcr2 <= df_wr.data[11:0];
          A_LCR3: lcr3 <= df_wr.data[11:0];
          default: ;
        endcase
      end
      if (ice) rl_pend <= 1'b0;

      if (phase_end && go_reset) begin
        pc <= PC_IDLE;
        rl_pend <= 1'b0;
      end else if (phase_end && go_start) begin
        pc <= sar;
      end else if (phase_end && go_transfer) begin
        pc <= PC_TRANSFER;
      end else if (phase_end && go_resume) begin
        pc <= bp;
      end else if (ice && intr_take) begin
        bp <= pc;
        pc <= PC_SERVICE;
      end else if (ice && exec) begin
        pc <= next_pc;
        if (active_code[3:2] == 2'b00) begin          // pop
          rs[0] <= rs[1]; rs[1] <= rs[2]; rs[2] <= rs[3];
        end else if (active_code[3:2] == 2'b10) begin // push PC+1
          rs[0] <= pc1; rs[1] <= rs[0]; rs[2] <= rs[1]; rs[3] <= rs[2];
        end
        lc1 <= lc1_n; lc2 <= lc2_n; lc3 <= lc3_n;
        if (pro.lcr1a) lcr1a <= lc1;
        if (pro.reload) begin
          rl_pend   <= 1'b1;
          rl_addr_q <= pro.rl_addr;
          rl_val_q  <= apb_out;
        end
      end
    end
  end

  // Programming rule: the instruction after a RELOAD may not reload or load
  // a loop counter.
  property p_reload_spacing;
    @(posedge clk) disable iff (!rst_n)
      (ice && exec && rl_pend) |-> !(pro.reload || pro.lc1 inside {3'd2, 3'd3}
                                     || pro.lc2 == 2'd3 || pro.lc3 == 2'd2);
  endproperty
  a_reload_spacing: assert property (p_reload_spacing)
    else $error("instruction after RELOAD reloads or loads a loop counter");
endmodule
