// ACC unit: the data-channel 1 and 2 accumulators with their result memories.
//
// Both channels run in parallel under the same 7-bit ACC instruction and the
// same APM address; channel 1 adds ALU12, channel 2 adds ALU34.
//
// Two pipeline stages, each one instruction cycle:
//   stage 1 (the instruction's own cycle): with STROBE I/O set, the I-reg
//     is loaded: if READ is set, either with the result-memory word at the
//     APM address or with 0 (see below); the ALU12/ALU34 value is
//     registered; READ, WRITE, STROBE and the address move along.
//   stage 2 (the next cycle): with STROBE, the O-reg becomes (I-reg if READ,
//     else O-reg) + ALU value; READ = 0 is internal accumulation. With
//     WRITE, that new O-reg value (or the held O-reg without STROBE) is
//     written to the result memory at the stage-1 address.
// So read, accumulate and write of one location fit in one instruction, and
// the instruction right after it must not touch that location: it reads
// before the write has landed.
//
// SET 1 and SET 2 are flags set by their bits and cleared by CLEAR 1/2.
// With READ set a memory read happens if SET 2 (which disables SET 1's
// control) or SET 1 is active, otherwise the I-reg is cleared: the first
// pass of an experiment starts from zero. With statusword bit 5 (continue
// experiment), an instruction with READ while SET 1 is off also sets SET 2,
// so accumulation continues from the stored values.
//
// ovf pulses when a stage-2 addition overflows in either channel (two's
// complement). Codes, SET/CLEAR behaviour and the read/write rule follow
// the document; the stage split, the flag update order (clear, then set,
// and the new values decide this instruction) and the widths are this
// design's choices.
module acc_unit
  import corr_pkg::*;
#(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned PW    = 17,    // width of ALU12 / ALU34
  parameter int unsigned DEPTH = 4096
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ice,
  input  logic                      exec,
  input  acc_instr_t                acc,
  input  logic [$clog2(DEPTH)-1:0]  addr,      // APM output
  input  logic signed [PW-1:0]      alu12,
  input  logic signed [PW-1:0]      alu34,
  input  logic                      stat_continue,
  output logic [ACC_W-1:0]          mem1_rd,   // words at addr, for OUT
  output logic [ACC_W-1:0]          mem2_rd,
  output logic [ACC_W-1:0]          o1,
  output logic [ACC_W-1:0]          o2,
  output logic                      set1,
  output logic                      set2,
  output logic                      ovf
);
  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- SET 1 / SET 2 ----------------
  logic s1n, s2n, rd_mem;
  always_comb begin
    s1n = (set1 & ~acc.clear1) | acc.set1;
    s2n = (set2 & ~acc.clear2) | acc.set2 | (stat_continue & ~s1n & acc.read);
    rd_mem = s1n | s2n;
  end

  // ---------------- stage 1 ----------------
  logic [ACC_W-1:0]        i1, i2;
  logic signed [PW-1:0]    p1, p2;
  logic                    v_d, rd_d, wr_d;
  logic [AW-1:0]           addr_d;

  // ---------------- stage 2 ----------------
  logic [ACC_W-1:0] base1, base2, sum1, sum2;
  logic             ov1, ov2;
  always_comb begin
    base1 = rd_d ? i1 : o1;
    base2 = rd_d ? i2 : o2;
    sum1  = base1 + ACC_W'(p1);
    sum2  = base2 + ACC_W'(p2);
    ov1   = (base1[ACC_W-1] == p1[PW-1]) && (sum1[ACC_W-1] != base1[ACC_W-1]);
    ov2   = (base2[ACC_W-1] == p2[PW-1]) && (sum2[ACC_W-1] != base2[ACC_W-1]);
  end
  assign ovf = ice && v_d && (ov1 || ov2);

  logic we;
  logic [ACC_W-1:0] wd1, wd2;
  assign we  = ice && wr_d;
  assign wd1 = v_d ? sum1 : o1;
  assign wd2 = v_d ? sum2 : o2;

  result_mem #(.DEPTH(DEPTH), .DW(ACC_W)) u_mem1 (
    .clk, .raddr(addr), .rdata(mem1_rd), .we, .waddr(addr_d), .wdata(wd1));
  result_mem #(.DEPTH(DEPTH), .DW(ACC_W)) u_mem2 (
    .clk, .raddr(addr), .rdata(mem2_rd), .we, .waddr(addr_d), .wdata(wd2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set1 <= 1'b0; set2 <= 1'b0;
      i1 <= '0; i2 <= '0; p1 <= '0; p2 <= '0;
      o1 <= '0; o2 <= '0;
      v_d <= 1'b0; rd_d <= 1'b0; wr_d <= 1'b0; addr_d <= '0;
    end else if (ice) begin
      // stage 2 of the previous instruction
      if (v_d) begin
        o1 <= sum1;
        o2 <= sum2;
      end
      // stage 1 of this instruction
      v_d  <= exec && acc.strobe_io;
      rd_d <= exec && acc.read;
      wr_d <= exec && acc.write;
      addr_d <= addr;
      if (exec) begin
        set1 <= s1n;
        set2 <= s2n;
        p1 <= alu12;
        p2 <= alu34;
        if (acc.strobe_io && acc.read) begin
          i1 <= rd_mem ? mem1_rd : '0;
          i2 <= rd_mem ? mem2_rd : '0;
        end
      end
    end
  end
endmodule
