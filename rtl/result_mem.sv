// Result memory of one data channel.
//
// DEPTH words of DW bits, addressed by the 12-bit APM output. One
// combinational read port and one write port that writes on the clock edge
// when we is high. A read of the word being written in the same cycle
// returns the old value. The depth (4096, the APM range) follows the
// document; the word width and the port arrangement are this design's
// choices.
module result_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned DW    = 32
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata
);
  logic [DW-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;
endmodule
