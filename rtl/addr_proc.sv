// Address processor (APB for the buffer memory, APM for the result memory).
//
// A register stack of 16 words, a Q register and an eight-function ALU.
// Per instruction the ALU-SOURCE code picks the R and S operands from
// RS(A), RS(B), Q, zero and the Data I-register, ALU-FUNCTION combines them
// (R+S, S-R, R-S, OR, AND, (not R) AND S, XOR, XNOR) and ALU-DESTINATION
// says where the result F goes: Q, RS(B) unshifted, halved or doubled
// (optionally with Q), and whether OUT shows F or RS(A). A-address only
// reads; B-address reads and writes. With SELECT (APB only) the low four
// bits of loop counter LC1 replace the B-address.
//
// OUT is combinational from the current registers, so the address of an
// instruction is available during that instruction's cycle; the register
// updates happen at its end (ice). The stack is loaded over the data-field
// bus at RS_ADDR with the sub-address as index. For the APB a stack load
// passes through the Data I-register (it is written with the same data),
// which is also loadable on its own at DATAI_ADDR. The APM has no Data
// I-register: its DATAI operand reads as 0.
//
// Codes, widths (16 bits APB, 12 bits APM) and stack size follow the
// document. Shifts bring in zeros and subtraction is exact two's-complement;
// these, and the reset values, are this design's choices.
module addr_proc
  import corr_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter bit          HAS_SELECT = 1'b1,
  parameter bit          HAS_DATAI  = 1'b1,
  parameter logic [5:0]  RS_ADDR    = A_APBRS,
  parameter logic [5:0]  DATAI_ADDR = A_DATAI
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ice,
  input  logic          exec,
  input  apb_instr_t    ins,        // APM: sel tied low
  input  logic [3:0]    lc1_lo,     // LC1 for SELECT
  input  df_wr_t        df_wr,
  output logic [W-1:0]  out
);
  logic [W-1:0] rs [16];
  logic [W-1:0] q, datai;

  logic [3:0]   b_eff;
  assign b_eff = (HAS_SELECT && ins.sel) ? lc1_lo : ins.b;

  logic [W-1:0] ra, rb, r, s, f;
  assign ra = rs[ins.a];
  assign rb = rs[b_eff];

  always_comb begin
    unique case (alu_src_e'(ins.src))
      SRC_AQ: begin r = ra;    s = q;  end
      SRC_AB: begin r = ra;    s = rb; end
      SRC_ZQ: begin r = '0;    s = q;  end
      SRC_ZB: begin r = '0;    s = rb; end
      SRC_ZA: begin r = '0;    s = ra; end
      SRC_DA: begin r = datai; s = ra; end
      SRC_DQ: begin r = datai; s = q;  end
      default: begin r = datai; s = '0; end
    endcase
    unique case (alu_fn_e'(ins.fn))
      FN_ADD:   f = r + s;
      FN_SUBR:  f = s - r;
      FN_SUBS:  f = r - s;
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_XOR:   f = r ^ s;
      default:  f = ~(r ^ s);
    endcase
    out = (alu_dst_e'(ins.dst) == DST_RAMA) ? ra : f;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      datai <= '0;
      for (int i = 0; i < 16; i++) rs[i] <= '0;
    end else begin
      if (df_wr.en && df_wr.addr == RS_ADDR) begin
        rs[df_wr.sub[3:0]] <= df_wr.data[W-1:0];
        if (HAS_DATAI) datai <= df_wr.data[W-1:0];
      end
      if (HAS_DATAI && df_wr.en && df_wr.addr == DATAI_ADDR)
        datai <= df_wr.data[W-1:0];
      if (ice && exec) begin
        unique case (alu_dst_e'(ins.dst))
          DST_QREG:  q <= f;
          DST_NOP:   ;
          DST_RAMA,
          DST_RAMF:  rs[b_eff] <= f;
          DST_RAMQD: begin rs[b_eff] <= f >> 1; q <= q >> 1; end
          DST_RAMD:  rs[b_eff] <= f >> 1;
          DST_RAMQU: begin rs[b_eff] <= f << 1; q <= q << 1; end
          default:   rs[b_eff] <= f << 1;
        endcase
      end
    end
  end
endmodule
