// ad_board: digital part of the 8-channel, 14-bit A/D board.
//
// The board has one sample-and-hold and one converter per channel, so all
// eight channels are sampled at the same instant and convert in parallel. A
// bus write to the board's update address, or to the global sample-all or
// sample-and-update-all address, raises conv_start for one cycle; this
// samples and starts all eight converters together (document). When the
// converters report conv_done their eight codes are latched into the result
// registers, which a bus read of the board's channel addresses returns,
// zero-extended to the bus width (this design's choice). 'ready' is low
// from a conversion start until its results are latched.
//
// The converters and sample-and-holds are analog parts outside this module;
// conv_start / conv_done / adc_code is their digital interface.
module ad_board
  import mbc_pkg::*;
#(
  parameter logic [BOARD_BITS-1:0] SLOT = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  iobus_req_t            bus_req,
  output iobus_rsp_t            bus_rsp,
  output logic                  conv_start,
  input  logic                  conv_done,
  input  logic [CONV_W-1:0]     adc_code [CH_PER_BOARD],
  output logic                  ready,
  output logic                  ev_corr
);
  logic                  q_valid, q_wr, q_chan_acc, q_sample, q_update;
  logic [CHAN_BITS-1:0]  q_chan;
  logic [BUS_DATA_W-1:0] q_wdata;
  logic                  acorr, dcorr, cvote;
  logic [CONV_W-1:0]     result [CH_PER_BOARD];

  iobus_slave #(.SLOT(SLOT)) u_if (
    .clk, .rst_n, .bus_req, .bus_rsp,
    .q_valid, .q_wr, .q_chan, .q_wdata, .q_chan_acc, .q_sample, .q_update,
    .rd_hit(q_chan_acc && !q_wr),
    .rd_value(BUS_DATA_W'(result[q_chan])),
    .ev_addr_corr(acorr), .ev_data_corr(dcorr), .ev_ctl_vote(cvote));

  assign ev_corr    = acorr || dcorr;
  assign conv_start = q_sample;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready <= 1'b1;
      for (int i = 0; i < CH_PER_BOARD; i++) result[i] <= '0;
    end else begin
      if (conv_start) ready <= 1'b0;
      else if (conv_done) begin
        ready <= 1'b1;
        for (int i = 0; i < CH_PER_BOARD; i++) result[i] <= adc_code[i];
      end
    end
  end
endmodule
