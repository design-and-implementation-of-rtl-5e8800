// inbound_sync: the inbound half of the voter. Each word the bus controller
// reads from an I/O board (sensor data) is held in a register until the inbound
// FIFO of every processor still in service reports "buffer empty"; then it is
// written into all four inbound FIFOs in the same clock cycle. All processors
// therefore see each sensor word at the same time, which re-aligns them at
// the start of every sampling period, as the document describes.
//
// Interface: in_valid/in_data/in_ready is a valid-ready handshake from the bus
// controller. be[] are the inbound FIFOs' empty flags, sync_mask (from the
// voter) the processors to wait for; a removed processor is not waited for.
// load pulses for one cycle with load_data valid and is the write enable of
// all four inbound FIFOs. waiting is high while a held word is blocked by a
// processor that has not yet taken its previous word.
// Timing: a word accepted in cycle t is loaded in t+1 at the earliest.
// The one-word holding register is this design's choice.
module inbound_sync
  import mbc_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     in_data,
  output logic             in_ready,
  input  logic [NPROC-1:0] be,
  input  logic [NPROC-1:0] sync_mask,
  output logic             load,
  output logic [W-1:0]     load_data,
  output logic             waiting
);
  logic held;

  assign load     = held && ((be | ~sync_mask) == '1);
  assign waiting  = held && !load;
  assign in_ready = !held || load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held      <= 1'b0;
      load_data <= '0;
    end else begin
      if (in_valid && in_ready) begin
        held      <= 1'b1;
        load_data <= in_data;
      end else if (load) begin
        held <= 1'b0;
      end
    end
  end
endmodule
