// I/O unit: buffer-memory addressing, sample input and the FLAG output.
//
// Address path: the first selector gives the APB output in normal mode. In
// mixed mode (statusword bit 6) it gives APB output + BAR during the first
// half of the instruction cycle (phase 0) and the APB output during the
// second half (phase 1). That address can be driven onto the external address
// bus (ENABLE EAB). SELECT BUFFER ADDRESS = 1 addresses the buffer memory
// from the external address bus instead (our own address when we drive it).
//
// Data path: the internal X,Y samples come from the buffer memory, or from
// the test memory when statusword bit 4 is set. ENABLE EDB drives them onto
// the external data bus. The I-register captures the external data bus (our
// own samples when we drive it) at the end of the first half of the
// instruction cycle when STROBE I-REG is set; its content is the external
// X,Y sample of the multipliers. In mixed mode it therefore holds the sample
// at APB + BAR while the multipliers are strobed, at the end of the second
// half, with the sample at the APB address.
//
// The bidirectional buses are split into in, out and output-enable signals.
// BAR is loaded at data-field address 5 (host load or program reload). The
// paths, selectors and half-cycle timing follow the document; the split
// buses and reset values are this design's choices.
module io_unit
  import corr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        phase,        // 0: first, 1: second half of the cycle
  input  logic        ice,
  input  logic        exec,
  input  io_instr_t   io,
  input  df_wr_t      df_wr,
  input  logic        mixed_mode,   // statusword bit 6
  input  logic        test_source,  // statusword bit 4
  input  logic [15:0] apb_out,
  input  logic [15:0] buf_data,
  input  logic [15:0] test_data,
  input  logic [15:0] edb_in,
  input  logic [15:0] eab_in,
  output logic [15:0] buf_addr,
  output logic [15:0] int_xy,
  output logic [15:0] ext_xy,
  output logic [15:0] edb_out,
  output logic        edb_oe,
  output logic [15:0] eab_out,
  output logic        eab_oe,
  output logic        flag,
  output logic [15:0] bar
);
  logic [15:0] addr1, ireg, eab_bus, edb_bus;

  assign addr1   = (mixed_mode && !phase) ? apb_out + bar : apb_out;
  assign eab_oe  = exec && io.en_eab;
  assign eab_out = addr1;
  assign eab_bus = eab_oe ? eab_out : eab_in;
  assign buf_addr = (exec && io.sel_bufaddr) ? eab_bus : addr1;

  assign int_xy  = test_source ? test_data : buf_data;
  assign edb_oe  = exec && io.en_edb;
  assign edb_out = int_xy;
  assign edb_bus = edb_oe ? edb_out : edb_in;
  assign ext_xy  = ireg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ireg <= '0;
      flag <= 1'b0;
      bar  <= '0;
    end else begin
      if (df_wr.en && df_wr.addr == A_BAR) bar <= df_wr.data;
      if (!phase && exec && io.strobe_ireg) ireg <= edb_bus;
      if (ice && exec) begin
        if (io.set_f)        flag <= 1'b1;
        else if (io.clear_f) flag <= 1'b0;
      end
    end
  end
endmodule
