// Self-checking testbench for addr_proc, in its two configurations: the
// 16-bit APB (Data I-register, SELECT by LC1) and the 12-bit APM. Both run
// the same random stream of source / function / destination / address
// codes against a reference model; OUT is checked every cycle and the
// whole register stack and Q (through OUT with source ZA / ZQ) at the end.
module tb_addr_proc;
  import corr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ice, exec;
  apb_instr_t ins, ins_m;
  logic [3:0] lc1_lo;
  df_wr_t df_wr;
  logic [15:0] out_b;
  logic [11:0] out_m;

  addr_proc #(.W(16), .HAS_SELECT(1'b1), .HAS_DATAI(1'b1),
              .RS_ADDR(A_APBRS), .DATAI_ADDR(A_DATAI)) u_apb (
    .clk, .rst_n, .ice, .exec, .ins, .lc1_lo, .df_wr, .out(out_b));
  addr_proc #(.W(12), .HAS_SELECT(1'b0), .HAS_DATAI(1'b0),
              .RS_ADDR(A_APMRS), .DATAI_ADDR(6'd0)) u_apm (
    .clk, .rst_n, .ice, .exec, .ins(ins_m), .lc1_lo, .df_wr, .out(out_m));

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // reference model, one per configuration
  class apmodel;
    int w; bit has_sel, has_d;
    int rs[16]; int q; int d;
    function new(int w_, bit s_, bit d_);
      w = w_; has_sel = s_; has_d = d_; q = 0; d = 0;
      foreach (rs[i]) rs[i] = 0;
    endfunction
    function int mask(int v); return v & ((1 << w) - 1); endfunction
    // returns OUT; applies the update when upd is set
    function int step(int src, int fn, int dst, int a, int b, bit sel, int lc, bit upd);
      int r, s, f, bb, o;
      bb = (has_sel && sel) ? lc : b;
      case (src)
        0: begin r = rs[a]; s = q; end
        1: begin r = rs[a]; s = rs[bb]; end
        2: begin r = 0; s = q; end
        3: begin r = 0; s = rs[bb]; end
        4: begin r = 0; s = rs[a]; end
        5: begin r = d; s = rs[a]; end
        6: begin r = d; s = q; end
        default: begin r = d; s = 0; end
      endcase
      case (fn)
        0: f = r + s;  1: f = s - r;  2: f = r - s;  3: f = r | s;
        4: f = r & s;  5: f = ~r & s; 6: f = r ^ s;  default: f = ~(r ^ s);
      endcase
      f = mask(f);
      o = (dst == 2) ? rs[a] : f;
      if (upd) case (dst)
        0: q = f;
        1: ;
        2, 3: rs[bb] = f;
        4: begin rs[bb] = f >> 1; q = q >> 1; end
        5: rs[bb] = f >> 1;
        6: begin rs[bb] = mask(f << 1); q = mask(q << 1); end
        default: rs[bb] = mask(f << 1);
      endcase
      return o;
    endfunction
  endclass

  apmodel mb, mm;
  int n_sel = 0, n_shift = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eb, em, v;
    mb = new(16, 1, 1); mm = new(12, 0, 0);
    rst_n = 0; ice = 0; exec = 0; ins = '0; ins_m = '0; lc1_lo = 0; df_wr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load both stacks and the Data I-register
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      v = $urandom_range(0, 65535);
      df_wr = '{en: 1, addr: A_APBRS, sub: 6'(i), data: 16'(v)};
      mb.rs[i] = v; mb.d = v;
      @(negedge clk);
      v = $urandom_range(0, 4095);
      df_wr = '{en: 1, addr: A_APMRS, sub: 6'(i), data: 16'(v)};
      mm.rs[i] = v;
    end
    @(negedge clk);
    df_wr = '{en: 1, addr: A_DATAI, sub: 0, data: 16'h1234}; mb.d = 'h1234;
    @(negedge clk); df_wr = '0;

    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      ins = apb_instr_t'($urandom);
      ins_m = ins; ins_m.sel = 1'b0;
      lc1_lo = 4'($urandom);
      exec = ($urandom_range(0, 7) != 0);
      ice = 1;
      if (ins.sel) n_sel++;
      if (ins.dst >= 4) n_shift++;
      #1;
      eb = mb.step(ins.src, ins.fn, ins.dst, ins.a, ins.b, ins.sel, lc1_lo, exec);
      em = mm.step(ins_m.src, ins_m.fn, ins_m.dst, ins_m.a, ins_m.b, 0, 0, exec);
      check("apb out", out_b, eb);
      check("apm out", out_m, em);
    end
    // read back every register through OUT (source ZA, function ADD, NOP)
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      exec = 1;
      ins = '{src: 3'd4, fn: 3'd0, dst: 3'd1, a: 4'(i), b: 4'd0, sel: 1'b0};
      ins_m = ins;
      #1;
      check("apb rs", out_b, mb.rs[i]);
      check("apm rs", out_m, mm.rs[i]);
    end
    @(negedge clk);
    ins = '{src: 3'd2, fn: 3'd0, dst: 3'd1, a: 4'd0, b: 4'd0, sel: 1'b0};
    ins_m = ins;
    #1;
    check("apb q", out_b, mb.q);
    check("apm q", out_m, mm.q);
    check("select and shifts used", n_sel > 0 && n_shift > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
