// mbc_top: the fault-tolerant magnetic bearing controller outside the four
// DSP modules.
//
// Each processor module (T1..T4, ports 0..3) writes its bus-operation words
// into its own outbound FIFO and reads sensor words from its own inbound FIFO.
// The voter takes a bitwise majority vote of T1..T3 (T4 is the hot spare),
// keeps all four in lockstep and re-configures on failures; the voted stream
// goes to the channel bus controller (cbc), which runs block writes and block
// reads on the I/O bus. Read data return through the inbound synchronizer,
// which loads all inbound FIFOs at the same time. The bus carries Hamming
// check bits on address and data and triplicated control lines; the boards
// on it are NUM_AD A/D boards in slots 0.. and NUM_DA D/A boards in the
// following slots, so that the feedback boards form contiguous address and
// update-address ranges as the document recommends. Everything runs on the
// one 4.0 MHz bus clock, as the document has the voter and bus controller do.
//
// The default population fills the ten-slot backplane the document describes
// (80 channels); the even split into five A/D and five D/A boards is this
// design's choice, since any mix fits. The system the document reports was
// built with one board of each kind: NUM_AD = NUM_DA = 1 gives that.
//
// The analog converters, the processors themselves, the serial ports and the
// JTAG link are outside this module: their digital connections are ports.
module mbc_top
  import mbc_pkg::*;
#(
  parameter int unsigned OFIFO_DEPTH = 8,
  parameter int unsigned IFIFO_DEPTH = 8,
  parameter int unsigned RB_DEPTH    = 8,
  parameter int unsigned NUM_AD      = 5,
  parameter int unsigned NUM_DA      = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor outbound communication ports
  input  logic [NPROC-1:0]     p_out_valid,
  input  logic [WORD_W-1:0]    p_out_data [NPROC],
  output logic [NPROC-1:0]     p_out_ready,
  // processor inbound communication ports
  output logic [NPROC-1:0]     p_in_valid,
  output logic [WORD_W-1:0]    p_in_data [NPROC],
  input  logic [NPROC-1:0]     p_in_read,
  // A/D converters
  output logic [NUM_AD-1:0]    ad_conv_start,
  input  logic [NUM_AD-1:0]    ad_conv_done,
  input  logic [CONV_W-1:0]    ad_code [NUM_AD][CH_PER_BOARD],
  output logic [NUM_AD-1:0]    ad_ready,
  // D/A converters
  output logic [CONV_W-1:0]    da_code [NUM_DA][CH_PER_BOARD],
  output logic [NUM_DA-1:0]    da_load,
  // status
  output vmode_e               mode,
  output logic [NPROC-1:0]     vote_mask,
  output logic [NPROC-1:0]     failed,
  output logic                 spare_noted,
  output mbc_events_t          ev
);
  // The backplane has NSLOTS (10) slots.
  if (NUM_AD + NUM_DA > NSLOTS || NUM_AD == 0 || NUM_DA == 0) begin : g_bad_population
    $error("mbc_top: need 1..NSLOTS boards with at least one A/D and one D/A board");
  end

  // ------------------------------------------------------------ FIFOs
  logic [NPROC-1:0]  of_full, of_bf, of_be, if_full, if_bf, if_be;
  logic [WORD_W-1:0] of_data [NPROC];
  logic              strobe, in_load;
  logic [WORD_W-1:0] in_word;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    logic [$clog2(OFIFO_DEPTH+1)-1:0] ocnt;
    logic [$clog2(IFIFO_DEPTH+1)-1:0] icnt;

    port_fifo #(.W(WORD_W), .DEPTH(OFIFO_DEPTH)) u_ofifo (
      .clk, .rst_n,
      .wr_en(p_out_valid[p]), .wr_data(p_out_data[p]), .full(of_full[p]),
      .rd_en(strobe), .rd_data(of_data[p]), .bf(of_bf[p]), .be(of_be[p]), .count(ocnt));

    port_fifo #(.W(WORD_W), .DEPTH(IFIFO_DEPTH)) u_ififo (
      .clk, .rst_n,
      .wr_en(in_load), .wr_data(in_word), .full(if_full[p]),
      .rd_en(p_in_read[p]), .rd_data(p_in_data[p]), .bf(if_bf[p]), .be(if_be[p]), .count(icnt));
  end

  assign p_out_ready = ~of_full;
  assign p_in_valid  = if_bf;

  // ------------------------------------------------------------ voter
  logic              v_valid, v_ready;
  logic [WORD_W-1:0] v_data;
  logic [NPROC-1:0]  sync_mask;

  voter u_voter (
    .clk, .rst_n,
    .bf(of_bf), .data(of_data), .strobe,
    .be(if_be),
    .out_valid(v_valid), .out_data(v_data), .out_ready(v_ready),
    .mode, .vote_mask, .sync_mask, .failed, .spare_noted,
    .ev_masked(ev.masked), .ev_reconf_data(ev.reconf_data), .ev_reconf_lost(ev.reconf_lost),
    .ev_simplex(ev.simplex), .ev_timeout(ev.timeout));

  assign ev.strobe = strobe;

  // ------------------------------------------------------------ bus controller
  logic              r_valid, r_ready, cbc_busy;
  logic [WORD_W-1:0] r_data;
  iobus_req_t        bp_req;
  iobus_rsp_t        bp_rsp;

  cbc #(.RB_DEPTH(RB_DEPTH)) u_cbc (
    .clk, .rst_n,
    .cmd_valid(v_valid), .cmd_data(v_data), .cmd_ready(v_ready),
    .rd_valid(r_valid), .rd_data(r_data), .rd_ready(r_ready),
    .bus_req(bp_req), .bus_rsp(bp_rsp),
    .ev_wr_op(ev.wr_op), .ev_rd_op(ev.rd_op), .ev_rd_corr(ev.rd_corr), .busy(cbc_busy));

  // ------------------------------------------------------------ inbound side
  inbound_sync u_insync (
    .clk, .rst_n,
    .in_valid(r_valid), .in_data(r_data), .in_ready(r_ready),
    .be(if_be), .sync_mask,
    .load(in_load), .load_data(in_word), .waiting(ev.in_wait));

  assign ev.in_load = in_load;

  // ------------------------------------------------------------ I/O boards
  localparam int unsigned NB = NUM_AD + NUM_DA;
  iobus_rsp_t        b_rsp [NB];
  logic [NB-1:0]     b_corr;

  for (genvar a = 0; a < NUM_AD; a++) begin : g_ad
    ad_board #(.SLOT(BOARD_BITS'(a))) u_ad (
      .clk, .rst_n, .bus_req(bp_req), .bus_rsp(b_rsp[a]),
      .conv_start(ad_conv_start[a]), .conv_done(ad_conv_done[a]),
      .adc_code(ad_code[a]), .ready(ad_ready[a]), .ev_corr(b_corr[a]));
  end

  for (genvar d = 0; d < NUM_DA; d++) begin : g_da
    da_board #(.SLOT(BOARD_BITS'(NUM_AD + d))) u_da (
      .clk, .rst_n, .bus_req(bp_req), .bus_rsp(b_rsp[NUM_AD + d]),
      .dac_code(da_code[d]), .dac_load(da_load[d]), .ev_corr(b_corr[NUM_AD + d]));
  end

  // wired-OR read bus of the backplane
  always_comb begin
    bp_rsp = '0;
    for (int i = 0; i < NB; i++) bp_rsp = bp_rsp | b_rsp[i];
  end

  assign ev.board_corr = |b_corr;
endmodule
