// Shared types and constants of the correlator module.
//
// The 128-bit instruction word is split into seven fields that run in
// parallel: I/O, OUT, ACC, ARI, APM, APB and PRO, from the most significant
// end down, with the field widths 6, 8, 7, 36, 17, 18 and 34 bits. The
// widths and the order of the fields follow the instruction-word map; the
// two top bits [127:126] are unused. The order of the sub-fields inside the
// APB, APM, ARI, ACC and I/O fields follows their printed field maps (first
// printed = most significant). The order of the sub-fields inside the PRO
// and OUT fields is not printed and is this design's own choice.
//
// Data-field registers and program pages are written over one bus, df_wr_t:
// a 6-bit register address, a 6-bit sub-address and 16 bits of data. The
// register addresses are the ones of the programmable-register table.
package corr_pkg;

  // ---------------- data-field register addresses ----------------
  localparam logic [5:0] A_STAT  = 6'd1;
  localparam logic [5:0] A_SAR   = 6'd4;
  localparam logic [5:0] A_BAR   = 6'd5;
  localparam logic [5:0] A_DATAI = 6'd6;
  localparam logic [5:0] A_RAM0  = 6'd8;   // RAM0..RAM7 at 8..15
  localparam logic [5:0] A_APBRS = 6'd16;
  localparam logic [5:0] A_APMRS = 6'd17;
  localparam logic [5:0] A_LCR1  = 6'd18;
  localparam logic [5:0] A_LCR2  = 6'd19;
  localparam logic [5:0] A_LCR3  = 6'd20;
  localparam logic [5:0] A_CRA   = 6'd63;

  // ---------------- fixed program locations ----------------
  localparam logic [5:0] PC_IDLE     = 6'd0;
  localparam logic [5:0] PC_TRANSFER = 6'd32;
  localparam logic [5:0] PC_SERVICE  = 6'd63;

  typedef struct packed {
    logic        en;
    logic [5:0]  addr;
    logic [5:0]  sub;
    logic [15:0] data;
  } df_wr_t;

  // ---------------- instruction fields ----------------
  typedef struct packed {          // 34 bits
    logic [5:0] cond;              // condition code
    logic [3:0] code_a;
    logic [3:0] code_b;
    logic [2:0] lc1;
    logic [1:0] lc2;
    logic [1:0] lc3;
    logic       lcr1a;
    logic       reload;
    logic [4:0] rl_addr;           // 4 SAR, 5 BAR, 18..20 LCR1..3
    logic [5:0] jump;              // jump address
  } pro_instr_t;

  typedef struct packed {          // 18 bits (APM uses 17: no sel)
    logic [2:0] src;
    logic [2:0] fn;
    logic [2:0] dst;
    logic [3:0] a;
    logic [3:0] b;
    logic       sel;
  } apb_instr_t;

  typedef struct packed {          // 17 bits
    logic [2:0] src;
    logic [2:0] fn;
    logic [2:0] dst;
    logic [3:0] a;
    logic [3:0] b;
  } apm_instr_t;

  typedef struct packed {          // 36 bits
    logic [2:0] m1a; logic [1:0] m1b;
    logic [2:0] m2a; logic [1:0] m2b;
    logic [2:0] m3a; logic [1:0] m3b;
    logic [2:0] m4a; logic [1:0] m4b;
    logic [1:0] s1;  logic [1:0] s2;
    logic [1:0] s3;  logic [1:0] s4;
    logic [3:0] m12;
    logic [3:0] m34;
  } ari_instr_t;

  typedef struct packed {          // 7 bits
    logic strobe_io;
    logic write;
    logic read;
    logic clear1;
    logic set1;
    logic clear2;
    logic set2;
  } acc_instr_t;

  typedef struct packed {          // 8 bits
    logic       transfer;
    logic       inhibit_clk;
    logic [1:0] source;            // 0 master, 1..3 slave 1..3
    logic [2:0] code;              // transfer code
    logic       spare;
  } out_instr_t;

  typedef struct packed {          // 6 bits
    logic set_f;
    logic clear_f;
    logic sel_bufaddr;             // 1: buffer address from EAB
    logic strobe_ireg;
    logic en_edb;
    logic en_eab;
  } io_instr_t;

  typedef struct packed {          // 128 bits
    logic [1:0] spare;
    io_instr_t  io;
    out_instr_t out_f;
    acc_instr_t acc;
    ari_instr_t ari;
    apm_instr_t apm;
    apb_instr_t apb;
    pro_instr_t pro;
  } instr_t;

  // ---------------- address-processor codes ----------------
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR = 3'd3,
    FN_AND = 3'd4, FN_NOTRS = 3'd5, FN_XOR = 3'd6, FN_XNOR = 3'd7
  } alu_fn_e;

  typedef enum logic [2:0] {
    DST_QREG = 3'd0, DST_NOP = 3'd1, DST_RAMA = 3'd2, DST_RAMF = 3'd3,
    DST_RAMQD = 3'd4, DST_RAMD = 3'd5, DST_RAMQU = 3'd6, DST_RAMU = 3'd7
  } alu_dst_e;

  // ---------------- ALU12 / ALU34 codes ----------------
  localparam logic [3:0] M_M2      = 4'd5;
  localparam logic [3:0] M_M1_SUB  = 4'd6;
  localparam logic [3:0] M_M1_ADD  = 4'd9;
  localparam logic [3:0] M_MINUS1  = 4'd12;
  localparam logic [3:0] M_M1      = 4'd15;

endpackage
