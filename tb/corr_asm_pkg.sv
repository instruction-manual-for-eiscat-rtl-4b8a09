// Testbench helpers for writing correlator programs: a no-operation
// instruction and the correlation program used by the end-to-end tests.
//
// The correlation program computes, for lags l = 0..L-1 and samples
// t = 0..T-1 of the buffer memory (X upper byte, Y lower byte),
//   channel 1: sum X(t+l)X(t) + Y(t+l)Y(t)   (real part of s(t+l) s*(t))
//   channel 2: sum Y(t+l)X(t) - X(t+l)Y(t)   (imaginary part)
// into result-memory word l. It runs in mixed address mode: BAR holds the
// lag, so the first half of each cycle fetches s(t+l) into the I-register
// (external sample) and the second half s(t) (internal sample).
// Register set-up expected by the program:
//   APB RS2 = 1, Data I = 1, APM RS1 = 1, LCR1 = T-3, LCR2 = L-1, SAR = 1.
// The transfer program at location 32 sends, per lag, channel-1 low and high
// half and channel-2 low and high half, then test words 1 and 2.
package corr_asm_pkg;
  import corr_pkg::*;

  function automatic instr_t nop();
    instr_t w;
    w = '0;
    w.pro.cond = 6'd32; w.pro.code_a = 4'd4;     // continue
    w.apb.src = 3'd2; w.apb.dst = 3'd1;           // OUT = Q, no write
    w.apm.src = 3'd2; w.apm.dst = 3'd1;
    return w;
  endfunction

  // fills prog[] with the correlation and transfer programs
  function automatic void build(ref instr_t prog [64]);
    instr_t w;
    for (int i = 0; i < 64; i++) prog[i] = nop();
    // 1: init: APB RS1 = 0 (lag), APM RS0 = 0 (result address), LC2 = LCR2
    w = nop();
    w.apb = '{src: 3'd2, fn: 3'd4, dst: 3'd3, a: 4'd0, b: 4'd1, sel: 1'b0};
    w.apm = '{src: 3'd2, fn: 3'd4, dst: 3'd3, a: 4'd0, b: 4'd0};
    w.pro.lc2 = 2'd3;
    w.acc.clear2 = 1'b1;
    prog[1] = w;
    // 2: lag start: BAR <- RS1 (reload), LC1 = LCR1
    w = nop();
    w.apb = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'd1, b: 4'd0, sel: 1'b0};
    w.pro.reload = 1'b1; w.pro.rl_addr = 5'd5;
    w.pro.lc1 = 3'd2;
    prog[2] = w;
    // 3: RS0 = 0 (t)
    w = nop();
    w.apb = '{src: 3'd2, fn: 3'd4, dst: 3'd3, a: 4'd0, b: 4'd0, sel: 1'b0};
    prog[3] = w;
    // 4: prime: fetch s(t+l), s(t); load operands; t++
    w = nop();
    w.apb = '{src: 3'd5, fn: 3'd0, dst: 3'd2, a: 4'd0, b: 4'd0, sel: 1'b0};
    w.io.strobe_ireg = 1'b1; w.io.en_edb = 1'b1;
    w.ari.m1a = 3'd2; w.ari.m1b = 2'd0;   // X ext * X int
    w.ari.m2a = 3'd3; w.ari.m2b = 2'd1;   // Y ext * Y int
    w.ari.m3a = 3'd3; w.ari.m3b = 2'd0;   // Y ext * X int
    w.ari.m4a = 3'd2; w.ari.m4b = 2'd1;   // X ext * Y int
    w.ari.s1 = 2'd3; w.ari.s2 = 2'd3; w.ari.s3 = 2'd3; w.ari.s4 = 2'd3;
    prog[4] = w;
    // 5: as 4, and accumulate the first product with READ
    w.ari.m12 = 4'd9; w.ari.m34 = 4'd6;
    w.acc.strobe_io = 1'b1; w.acc.read = 1'b1;
    w.apm = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'd0, b: 4'd0};
    prog[5] = w;
    // 6: loop: as 5 with internal accumulation, LC1--, until LC1 = 0
    w.acc.read = 1'b0;
    w.pro.lc1 = 3'd1;
    w.pro.cond = 6'd57; w.pro.code_a = 4'd6; w.pro.code_b = 4'd4; w.pro.jump = 6'd6;
    prog[6] = w;
    // 7: drain: accumulate the last product, write; call 20
    w = nop();
    w.ari.m12 = 4'd9; w.ari.m34 = 4'd6;
    w.acc.strobe_io = 1'b1; w.acc.write = 1'b1;
    w.apm = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'd0, b: 4'd0};
    w.pro.code_a = 4'd10; w.pro.jump = 6'd20;
    prog[7] = w;
    // 8: LC2--; if LC2 = 0 continue else next lag
    w = nop();
    w.pro.lc2 = 2'd1;
    w.pro.cond = 6'd58; w.pro.code_a = 4'd6; w.pro.code_b = 4'd4; w.pro.jump = 6'd2;
    prog[8] = w;
    // 9: SET 1 (later runs read the result memory), back to idle
    w = nop();
    w.acc.set1 = 1'b1;
    w.pro.code_a = 4'd6; w.pro.jump = 6'd0;
    prog[9] = w;
    // 20: subroutine: lag++ (RS1 += Data I), result address++ ; return
    w = nop();
    w.apb = '{src: 3'd5, fn: 3'd0, dst: 3'd3, a: 4'd1, b: 4'd1, sel: 1'b0};
    w.apm = '{src: 3'd1, fn: 3'd0, dst: 3'd3, a: 4'd1, b: 4'd0};
    w.pro.code_a = 4'd1;
    prog[20] = w;

    // ---------------- transfer program ----------------
    // 32: APM RS0 = 0, LC2 = LCR2
    w = nop();
    w.apm = '{src: 3'd2, fn: 3'd4, dst: 3'd3, a: 4'd0, b: 4'd0};
    w.pro.lc2 = 2'd3;
    prog[32] = w;
    // 33, 34: dummies before TRANSFER
    // 35..38: channel 1 low/high, channel 2 low/high at APM RS0
    for (int k = 0; k < 4; k++) begin
      w = nop();
      w.apm = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'd0, b: 4'd0};
      w.out_f = '{transfer: 1'b1, inhibit_clk: 1'b1, source: 2'd0, code: 3'(2 + k), spare: 1'b0};
      prog[35 + k] = w;
    end
    // 39: RS0++ ; LC2--; loop
    w = nop();
    w.apm = '{src: 3'd1, fn: 3'd0, dst: 3'd3, a: 4'd1, b: 4'd0};
    w.out_f.transfer = 1'b1;
    w.pro.lc2 = 2'd1;
    w.pro.cond = 6'd58; w.pro.code_a = 4'd6; w.pro.code_b = 4'd4; w.pro.jump = 6'd35;
    prog[39] = w;
    // 40, 41: test words (APB fields chosen to be recognisable, no writes)
    w = nop();
    w.apb = '{src: 3'd6, fn: 3'd5, dst: 3'd1, a: 4'd9, b: 4'd3, sel: 1'b0};
    w.out_f = '{transfer: 1'b1, inhibit_clk: 1'b1, source: 2'd0, code: 3'd6, spare: 1'b0};
    prog[40] = w;
    w.out_f.code = 3'd7;
    prog[41] = w;
    // 42..45: dummies with TRANSFER, without INHIBIT CLOCK
    for (int k = 42; k <= 45; k++) begin
      w = nop(); w.out_f.transfer = 1'b1; prog[k] = w;
    end
    // 46: end of transfer, back to idle
    w = nop();
    w.pro.code_a = 4'd6; w.pro.jump = 6'd0;
    prog[46] = w;
  endfunction
endpackage
