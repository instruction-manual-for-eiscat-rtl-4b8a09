// OUT unit: DMA transfer of words from the correlator to the computer.
//
// An executed instruction with TRANSFER set and a transfer code of 2..7
// places one 16-bit word in the DMA data register and raises DATA-READY
// (the CAMAC "data ready" signal); DMA-REQUEST follows DATA-READY one clock
// later. DATA RECEIVED from the computer (or the panel push-button) clears
// both. The word is:
//   code 2 / 3  result memory of channel 1 at the APM address, low / high half
//   code 4 / 5  the same for channel 2
//   code 6 / 7  test word 1 / test word 2
// For codes 2..5 SOURCE picks the master (0, this module's memory) or slave
// 1..3 (the word presented on ext_mem_data); the source is also written to
// statusword bits 9..8. Codes 0 and 1 transfer nothing.
//
// An instruction with INHIBIT CLOCK set is held (stall) while a previous word
// has not been received, so a transfer program can run at the speed of the
// computer. In transfer-inhibit test mode DATA-READY is not sent out and any
// transferring instruction is held until DATA RECEIVED.
//
// Test word 1: bits 14..11 the code that makes the next PC, bits 8..6 / 5..3
// / 2..0 the APB destination / function / source. Test word 2: bits 14..9
// the next PC, 7..4 / 3..0 the APB B / A address. Other bits are 0. These
// layouts, the SOURCE meaning, the DATA-READY / DMA-REQUEST chain and the
// held program in test mode follow the document. The width of the OUT
// field follows it too, but its inner layout, the meaning of each transfer
// code, the stall rule and the split of a result word into two halves are
// this design's reading.
module out_unit
  import corr_pkg::*;
#(
  parameter int unsigned ACC_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ice,
  input  logic              exec,
  input  logic              clear,          // correlator reset
  input  out_instr_t        out_i,
  input  logic [ACC_W-1:0]  mem1_rd,
  input  logic [ACC_W-1:0]  mem2_rd,
  input  logic [15:0]       ext_mem_data,   // word from a slave module
  input  logic [15:0]       test_word1,
  input  logic [15:0]       test_word2,
  input  logic              transfer_inhibit,
  input  logic              data_received,
  output logic [15:0]       dma_data,
  output logic              data_ready,
  output logic              dma_request,
  output logic              stall,
  output logic              src_we,         // write statusword bits 9..8
  output logic [1:0]        src
);
  logic        pending;
  logic        xfer;
  logic [15:0] word;
  logic [31:0] m1, m2;

  assign m1 = 32'(mem1_rd);
  assign m2 = 32'(mem2_rd);

  assign xfer = exec && out_i.transfer && (out_i.code >= 3'd2);

  always_comb begin
    unique case (out_i.code)
      3'd2:    word = (out_i.source == 2'd0) ? m1[15:0]  : ext_mem_data;
      3'd3:    word = (out_i.source == 2'd0) ? m1[31:16] : ext_mem_data;
      3'd4:    word = (out_i.source == 2'd0) ? m2[15:0]  : ext_mem_data;
      3'd5:    word = (out_i.source == 2'd0) ? m2[31:16] : ext_mem_data;
      3'd6:    word = test_word1;
      3'd7:    word = test_word2;
      default: word = '0;
    endcase
  end

  assign stall  = exec && pending &&
                  (out_i.inhibit_clk || (transfer_inhibit && xfer));
  assign src_we = ice && xfer && out_i.code <= 3'd5;
  assign src    = out_i.source;
  assign data_ready = pending && !transfer_inhibit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      dma_data <= '0;
      dma_request <= 1'b0;
    end else begin
      dma_request <= data_ready && !data_received && !clear;
      if (clear) begin
        pending <= 1'b0;
      end else if (ice && xfer) begin
        pending  <= 1'b1;
        dma_data <= word;
      end else if (data_received) begin
        pending <= 1'b0;
      end
    end
  end
endmodule
