// iobus_slave: bus front end shared by the I/O boards.
//
// In the cycle a request is on the bus it votes the three copies of the
// control lines (tmr_vote), corrects a single flipped bit in the address and
// in the write data (sec_decode) and registers the result, so that each
// board sees a clean, one-cycle-delayed request. Address decode follows the
// document's map: a regular address is board (6 bits) and channel (3 bits);
// each board also answers to its own "update" address and to the global
// sample-all, update-all and sample-and-update-all addresses (their
// placement in a tenth address bit is this design's choice, see mbc_pkg).
//
// Reads: in the cycle after the request the board puts the addressed value on
// rd_value and raises rd_hit; the slave adds the check bits and registers the
// pair onto the bus, READ_LAT = 2 cycles after the address. A board that does
// not answer drives zeros, which is a valid all-zero code word, so the read
// buses of all boards can be ORed on the backplane.
module iobus_slave
  import mbc_pkg::*;
#(
  parameter logic [BOARD_BITS-1:0] SLOT = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  iobus_req_t            bus_req,
  output iobus_rsp_t            bus_rsp,
  // decoded request, valid one cycle after it was on the bus
  output logic                  q_valid,     // bus cycle for this board
  output logic                  q_wr,
  output logic [CHAN_BITS-1:0]  q_chan,
  output logic [BUS_DATA_W-1:0] q_wdata,
  output logic                  q_chan_acc,  // regular channel address of this board
  output logic                  q_sample,    // own update, sample-all or both
  output logic                  q_update,    // own update, update-all or both
  // read answer from the board, in the cycle after the request
  input  logic                  rd_hit,
  input  logic [BUS_DATA_W-1:0] rd_value,
  // error events
  output logic                  ev_addr_corr,
  output logic                  ev_data_corr,
  output logic                  ev_ctl_vote
);
  logic                  cyc, wr, dis_c, dis_w;
  logic [BUS_ADDR_W-1:0] addr;
  logic [BUS_DATA_W-1:0] wdata;
  logic                  acorr, dcorr;

  tmr_vote #(.W(1)) u_vcyc (.a(bus_req.cyc[0]), .b(bus_req.cyc[1]), .c(bus_req.cyc[2]),
                            .y(cyc), .disagree(dis_c));
  tmr_vote #(.W(1)) u_vwr  (.a(bus_req.wr[0]), .b(bus_req.wr[1]), .c(bus_req.wr[2]),
                            .y(wr), .disagree(dis_w));

  sec_decode #(.K(BUS_ADDR_W), .R(ADDR_CHK_W)) u_adec (
    .data_in(bus_req.addr), .check_in(bus_req.achk), .data_out(addr), .corrected(acorr));
  sec_decode #(.K(BUS_DATA_W), .R(DATA_CHK_W)) u_ddec (
    .data_in(bus_req.wdata), .check_in(bus_req.wchk), .data_out(wdata), .corrected(dcorr));

  logic chan_hit, own_upd, any_sample, any_update;
  assign chan_hit   = !addr[BUS_ADDR_W-1] && addr[CHAN_BITS +: BOARD_BITS] == SLOT;
  assign own_upd    = addr == (UPD_BASE | BUS_ADDR_W'(SLOT));
  assign any_sample = own_upd || addr == ADDR_SAMPLE_ALL || addr == ADDR_BOTH_ALL;
  assign any_update = own_upd || addr == ADDR_UPDATE_ALL || addr == ADDR_BOTH_ALL;

  logic [DATA_CHK_W-1:0] rchk;
  sec_encode #(.K(BUS_DATA_W), .R(DATA_CHK_W)) u_renc (.data(rd_value), .check(rchk));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid      <= 1'b0;
      q_wr         <= 1'b0;
      q_chan       <= '0;
      q_wdata      <= '0;
      q_chan_acc   <= 1'b0;
      q_sample     <= 1'b0;
      q_update     <= 1'b0;
      ev_addr_corr <= 1'b0;
      ev_data_corr <= 1'b0;
      ev_ctl_vote  <= 1'b0;
      bus_rsp      <= '0;
    end else begin
      q_valid      <= cyc && (chan_hit || any_sample || any_update);
      q_wr         <= wr;
      q_chan       <= addr[CHAN_BITS-1:0];
      q_wdata      <= wdata;
      q_chan_acc   <= cyc && chan_hit;
      q_sample     <= cyc && wr && any_sample;
      q_update     <= cyc && wr && any_update;
      ev_addr_corr <= cyc && acorr;
      ev_data_corr <= cyc && wr && dcorr;
      ev_ctl_vote  <= dis_c || dis_w;
      bus_rsp      <= '0;
      if (rd_hit) begin
        bus_rsp.rdata <= rd_value;
        bus_rsp.rchk  <= rchk;
      end
    end
  end

endmodule
