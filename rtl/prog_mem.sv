// Program memory: DEPTH locations of one 128-bit instruction word.
//
// For loading, the memory is seen as eight 16-bit pages RAM0..RAM7 at the
// data-field addresses 8..15; the sub-address picks the location. RAM0 holds
// instruction bits [15:0], RAM7 bits [127:112]. For execution all eight pages
// are read in parallel at the same location (the program counter), so the
// read is combinational from rd_addr to instr. Writes take one clock edge.
// Location 0 is the idle location and 63 the service location; both stay
// writable, as in the page table, the sequencer simply does not execute them.
// The page map and the 64 locations follow the document; the combinational
// read is this design's choice.
module prog_mem
  import corr_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  df_wr_t                     df_wr,    // data-field write bus
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,  // program counter
  output logic [127:0]               instr
);
  logic [15:0] page [8][DEPTH];

  logic [2:0] wpage;
  assign wpage = df_wr.addr[2:0];

  always_ff @(posedge clk) begin
    if (df_wr.en && df_wr.addr[5:3] == 3'b001 && 32'(df_wr.sub) < DEPTH)
      page[wpage][df_wr.sub[$clog2(DEPTH)-1:0]] <= df_wr.data;
  end

  always_comb begin
    for (int p = 0; p < 8; p++) instr[p*16 +: 16] = page[p][rd_addr];
  end
endmodule
