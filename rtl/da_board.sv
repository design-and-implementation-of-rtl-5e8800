// da_board: digital part of the 8-channel, 14-bit D/A board.
//
// A bus write to one of the board's eight channel addresses stores the low
// 14 bits of the word in that channel's temporary buffer; the converters are
// not touched. A bus write to the board's update address, or to the global
// update-all or sample-and-update-all address, copies all eight buffers to the
// converter input registers dac_code in the same cycle and pulses dac_load,
// so every output changes at once (document). The board does not answer bus
// reads (the document describes none). Buffers and outputs reset to zero.
//
// Timing: a buffer write on the bus in cycle t is in the buffer after t+2;
// an update in cycle t shows on dac_code after t+2.
module da_board
  import mbc_pkg::*;
#(
  parameter logic [BOARD_BITS-1:0] SLOT = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  iobus_req_t            bus_req,
  output iobus_rsp_t            bus_rsp,
  output logic [CONV_W-1:0]     dac_code [CH_PER_BOARD],
  output logic                  dac_load,
  output logic                  ev_corr
);
  logic                  q_valid, q_wr, q_chan_acc, q_sample, q_update;
  logic [CHAN_BITS-1:0]  q_chan;
  logic [BUS_DATA_W-1:0] q_wdata;
  logic                  acorr, dcorr, cvote;
  logic [CONV_W-1:0]     buffer [CH_PER_BOARD];

  iobus_slave #(.SLOT(SLOT)) u_if (
    .clk, .rst_n, .bus_req, .bus_rsp,
    .q_valid, .q_wr, .q_chan, .q_wdata, .q_chan_acc, .q_sample, .q_update,
    .rd_hit(1'b0), .rd_value('0),
    .ev_addr_corr(acorr), .ev_data_corr(dcorr), .ev_ctl_vote(cvote));

  assign ev_corr = acorr || dcorr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac_load <= 1'b0;
      for (int i = 0; i < CH_PER_BOARD; i++) begin
        buffer[i]   <= '0;
        dac_code[i] <= '0;
      end
    end else begin
      dac_load <= q_update;
      if (q_chan_acc && q_wr) buffer[q_chan] <= q_wdata[CONV_W-1:0];
      if (q_update)
        for (int i = 0; i < CH_PER_BOARD; i++) dac_code[i] <= buffer[i];
    end
  end
endmodule
