// cbc: channel bus controller. It turns the voted stream of 32-bit words from
// the voter into block transfers on the fault-tolerant I/O bus, one bus word
// per clock (4.0 MW/s at the 4.0 MHz bus clock it shares with the voter).
//
// Word stream format (this design's own; the document only says that control
// actions are translated into bus operations): a header word
//   [31:30] op (01 block write, 10 block read), [29:20] count-1, [9:0] address
// is followed, for a block write, by count data words whose low 16 bits are
// written to count consecutive bus addresses. A block read reads count
// consecutive addresses and returns each 16-bit result, zero-extended to 32
// bits, on rd_valid/rd_data towards the inbound FIFOs.
//
// Every bus cycle drives triplicated control lines (cyc, wr) and Hamming check
// bits for the address and write data, formed combinationally in front of the
// bus register. Read data come back READ_LAT cycles after their address, are
// captured in a register and corrected in the next cycle, so coding adds
// latency but no bus cycles: reads and writes issue back to back. Reads are
// only issued while the return buffer (RB_DEPTH words) has room for every
// read in flight, so a slow inbound side throttles the bus instead of losing
// data.
//
// Interface: cmd_* valid-ready from the voter, rd_* valid-ready to the inbound
// synchronizer, bus_req/bus_rsp the I/O bus. ev_* are one-cycle pulses.
// Synchronous active-low reset.
module cbc
  import mbc_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // voted command stream
  input  logic                 cmd_valid,
  input  logic [WORD_W-1:0]    cmd_data,
  output logic                 cmd_ready,
  // read data towards the processors
  output logic                 rd_valid,
  output logic [WORD_W-1:0]    rd_data,
  input  logic                 rd_ready,
  // I/O bus
  output iobus_req_t           bus_req,
  input  iobus_rsp_t           bus_rsp,
  // events
  output logic                 ev_wr_op,     // block write started
  output logic                 ev_rd_op,     // block read started
  output logic                 ev_rd_corr,   // a read word was corrected
  output logic                 busy
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_e;

  localparam int unsigned OW = $clog2(RB_DEPTH + 1);

  state_e                 state;
  logic [BUS_ADDR_W-1:0]  addr;
  logic [CNT_W:0]         remaining;
  logic [READ_LAT:0]      rpipe;
  logic [OW-1:0]          outstanding;
  iobus_rsp_t             rsp_q;
  logic                   rsp_v;

  // return buffer
  logic [OW-1:0]          rb_count;
  logic                   rb_full, rb_be, rb_push;
  logic [BUS_DATA_W-1:0]  rb_wdata, rb_rdata;
  logic                   corr;

  // header decode
  busop_e hdr_op;
  assign hdr_op = busop_e'(cmd_data[31:30]);

  logic issue_rd, take_wr;
  assign issue_rd  = (state == S_READ) && (32'(outstanding) + 32'(rb_count) < RB_DEPTH);
  assign take_wr   = (state == S_WRITE) && cmd_valid;
  assign cmd_ready = (state == S_IDLE) || (state == S_WRITE);
  assign busy      = (state != S_IDLE) || (outstanding != '0);

  assign ev_wr_op  = (state == S_IDLE) && cmd_valid && hdr_op == OP_WRITE;
  assign ev_rd_op  = (state == S_IDLE) && cmd_valid && hdr_op == OP_READ;

  // check bits in front of the bus register
  logic [ADDR_CHK_W-1:0] achk_n;
  logic [DATA_CHK_W-1:0] wchk_n;
  sec_encode #(.K(BUS_ADDR_W), .R(ADDR_CHK_W)) u_aenc (.data(addr), .check(achk_n));
  sec_encode #(.K(BUS_DATA_W), .R(DATA_CHK_W)) u_denc (.data(cmd_data[BUS_DATA_W-1:0]), .check(wchk_n));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      addr        <= '0;
      remaining   <= '0;
      bus_req     <= '0;
      rpipe       <= '0;
      outstanding <= '0;
      rsp_q       <= '0;
      rsp_v       <= 1'b0;
    end else begin
      bus_req.cyc <= '0;
      bus_req.wr  <= '0;
      rpipe       <= {rpipe[READ_LAT-1:0], 1'b0};

      case (state)
        S_IDLE: if (cmd_valid) begin
          addr      <= cmd_data[BUS_ADDR_W-1:0];
          remaining <= {1'b0, cmd_data[29:20]} + 1'b1;
          if (hdr_op == OP_WRITE)     state <= S_WRITE;
          else if (hdr_op == OP_READ) state <= S_READ;
        end
        S_WRITE: if (take_wr) begin
          bus_req.cyc   <= 3'b111;
          bus_req.wr    <= 3'b111;
          bus_req.addr  <= addr;
          bus_req.achk  <= achk_n;
          bus_req.wdata <= cmd_data[BUS_DATA_W-1:0];
          bus_req.wchk  <= wchk_n;
          addr          <= addr + 1'b1;
          remaining     <= remaining - 1'b1;
          if (remaining == 1) state <= S_IDLE;
        end
        S_READ: if (issue_rd) begin
          bus_req.cyc   <= 3'b111;
          bus_req.wr    <= 3'b000;
          bus_req.addr  <= addr;
          bus_req.achk  <= achk_n;
          bus_req.wdata <= '0;
          bus_req.wchk  <= '0;
          rpipe[0]      <= 1'b1;
          addr          <= addr + 1'b1;
          remaining     <= remaining - 1'b1;
          if (remaining == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // capture read data, correct it in the following cycle
      rsp_v <= rpipe[READ_LAT];
      if (rpipe[READ_LAT]) rsp_q <= bus_rsp;

      case ({issue_rd, rb_push})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase
    end
  end

  sec_decode #(.K(BUS_DATA_W), .R(DATA_CHK_W)) u_ddec (
    .data_in(rsp_q.rdata), .check_in(rsp_q.rchk), .data_out(rb_wdata), .corrected(corr));

  assign rb_push    = rsp_v;
  assign ev_rd_corr = rsp_v && corr;

  port_fifo #(.W(BUS_DATA_W), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n,
    .wr_en(rb_push), .wr_data(rb_wdata), .full(rb_full),
    .rd_en(rd_ready), .rd_data(rb_rdata), .bf(rd_valid), .be(rb_be), .count(rb_count));

  assign rd_data = {{(WORD_W-BUS_DATA_W){1'b0}}, rb_rdata};

  // credit accounting guarantees the return buffer never overflows
  assert property (@(posedge clk) disable iff (!rst_n) rb_push |-> !rb_full);
endmodule
