// Self-checking testbench for ari_unit.
//
// Random operand selections and strobes load the A/B registers from random
// internal and external samples (X upper byte, Y lower byte), with and
// without the slave swap. A model keeps its own copy of the eight operand
// registers; ALU12 and ALU34 are checked for every documented code.
module tb_ari_unit;
  import corr_pkg::*;

  localparam int SW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ice, exec, swap_ext;
  ari_instr_t ari;
  logic [15:0] int_xy, ext_xy;
  logic signed [16:0] alu12, alu34;

  ari_unit #(.SW(SW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  int ma[4], mb[4];
  const int mcodes[] = '{5, 6, 9, 12, 15, 0, 3};

  function automatic int sx(int v); return (v >= 128) ? v - 256 : v; endfunction
  function automatic int pickm(int c, bit sw, int ixy, int exy);
    int w;
    w = ((c / 2) % 2 != int'(sw)) ? exy : ixy;
    return (c % 2) ? sx(w % 256) : sx(w / 256);
  endfunction
  function automatic int comb(int code, int p1, int p2);
    case (code)
      5: return p2; 6: return p1 - p2; 9: return p1 + p2; 12: return -1; 15: return p1;
      default: return 0;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ac[4]; logic [1:0] bc[4], sc[4];
    int e12, e34, n_one = 0, n_swap = 0;
    rst_n = 0; ice = 0; exec = 0; ari = '0; swap_ext = 0; int_xy = 0; ext_xy = 0;
    foreach (ma[i]) begin ma[i] = 0; mb[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      ari = ari_instr_t'({$urandom, 4'($urandom)});
      ari.m12 = 4'(mcodes[$urandom_range(0, mcodes.size()-1)]);
      ari.m34 = 4'(mcodes[$urandom_range(0, mcodes.size()-1)]);
      int_xy = 16'($urandom); ext_xy = 16'($urandom);
      swap_ext = ($urandom_range(0, 3) == 0);
      exec = ($urandom_range(0, 7) != 0);
      ice = 1;
      #1;
      e12 = comb(ari.m12, ma[0] * mb[0], ma[1] * mb[1]);
      e34 = comb(ari.m34, ma[2] * mb[2], ma[3] * mb[3]);
      check("alu12", alu12, e12);
      check("alu34", alu34, e34);
      ac = '{ari.m1a, ari.m2a, ari.m3a, ari.m4a};
      bc = '{ari.m1b, ari.m2b, ari.m3b, ari.m4b};
      sc = '{ari.s1, ari.s2, ari.s3, ari.s4};
      if (exec) for (int i = 0; i < 4; i++) begin
        if (sc[i][0]) begin
          ma[i] = (ac[i] >= 4) ? 1 : pickm(ac[i], swap_ext, int_xy, ext_xy);
          if (ac[i] >= 4) n_one++;
          if (swap_ext) n_swap++;
        end
        if (sc[i][1]) mb[i] = pickm(bc[i], swap_ext, int_xy, ext_xy);
      end
      @(posedge clk);
    end
    check("constant 1 and swap used", n_one > 0 && n_swap > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
