// ARI unit: the four multipliers and the two product-combining ALUs.
//
// Each of the multipliers 1..4 has an A and a B operand register. The
// operand selectors of multiplier i pick, per instruction, the X or Y part
// of the internal sample (buffer or test memory) or of the external sample
// (the I-register on the external data bus); the A side can also pick the
// constant 1. The strobe code Si (bit 0: A, bit 1: B) loads the selected
// operands into the registers at the end of the instruction cycle. The
// products of the registered operands are combined by ALU12 (multipliers 1
// and 2, data channel 1) and ALU34 (3 and 4, data channel 2): M2, M1-M2,
// M1+M2, -1 or M1, codes 5, 6, 9, 12, 15. Other codes give 0.
//
// With swap_ext high (statusword bit 7, modified operand selections for a
// slave module) the internal and external choices trade places.
//
// Samples are SW-bit two's-complement numbers; a 2*SW-bit sample word
// carries X in its upper and Y in its lower half. The selection codes, the
// strobe codes and the ALU codes follow the document; the sample format and
// the widths are this design's choices.
module ari_unit
  import corr_pkg::*;
#(
  parameter int unsigned SW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ice,
  input  logic                  exec,
  input  ari_instr_t            ari,
  input  logic                  swap_ext,
  input  logic [2*SW-1:0]       int_xy,
  input  logic [2*SW-1:0]       ext_xy,
  output logic signed [2*SW:0]  alu12,
  output logic signed [2*SW:0]  alu34
);
  localparam int unsigned PW = 2 * SW;

  logic signed [SW-1:0] a_reg [4];
  logic signed [SW-1:0] b_reg [4];
  logic signed [PW-1:0] m [4];

  function automatic logic signed [SW-1:0] pick(input logic [1:0] c,
                                                input logic swap,
                                                input logic [2*SW-1:0] ixy,
                                                input logic [2*SW-1:0] exy);
    logic [2*SW-1:0] w;
    w = (c[1] ^ swap) ? exy : ixy;
    return c[0] ? w[SW-1:0] : w[2*SW-1:SW];
  endfunction

  logic [2:0] acode [4];
  logic [1:0] bcode [4];
  logic [1:0] scode [4];
  assign acode = '{ari.m1a, ari.m2a, ari.m3a, ari.m4a};
  assign bcode = '{ari.m1b, ari.m2b, ari.m3b, ari.m4b};
  assign scode = '{ari.s1, ari.s2, ari.s3, ari.s4};

  always_comb
    for (int i = 0; i < 4; i++) m[i] = a_reg[i] * b_reg[i];

  function automatic logic signed [PW:0] combine(input logic [3:0] code,
                                                 input logic signed [PW-1:0] p1,
                                                 input logic signed [PW-1:0] p2);
    unique case (code)
      M_M2:     return (PW+1)'(p2);
      M_M1_SUB: return (PW+1)'(p1) - (PW+1)'(p2);
      M_M1_ADD: return (PW+1)'(p1) + (PW+1)'(p2);
      M_MINUS1: return '1;
      M_M1:     return (PW+1)'(p1);
      default:  return '0;
    endcase
  endfunction

  assign alu12 = combine(ari.m12, m[0], m[1]);
  assign alu34 = combine(ari.m34, m[2], m[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        a_reg[i] <= '0;
        b_reg[i] <= '0;
      end
    end else if (ice && exec) begin
      for (int i = 0; i < 4; i++) begin
        if (scode[i][0])
          a_reg[i] <= acode[i][2] ? SW'(1)
                                  : pick(acode[i][1:0], swap_ext, int_xy, ext_xy);
        if (scode[i][1])
          b_reg[i] <= pick(bcode[i], swap_ext, int_xy, ext_xy);
      end
    end
  end
endmodule
