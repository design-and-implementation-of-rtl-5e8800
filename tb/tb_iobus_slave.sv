// tb_iobus_slave: drives random bus cycles at a slave in slot 5 -- its own
// channels, other boards' channels, its own and other update addresses and
// the three global update addresses, reads and writes -- with one bit of the
// address, the write data or their check bits flipped in some cycles and one
// copy of a control line corrupted in others. Checks the decoded request one
// cycle later against an independent decode, and the read answer (with check
// bits) two cycles after the address.
module tb_iobus_slave;
  import mbc_pkg::*;
  import sec_ref_pkg::*;

  localparam logic [BOARD_BITS-1:0] SLOT = 6'd5;

  logic clk = 0, rst_n = 0;
  iobus_req_t bus_req;
  iobus_rsp_t bus_rsp;
  logic q_valid, q_wr, q_chan_acc, q_sample, q_update, rd_hit;
  logic [CHAN_BITS-1:0] q_chan;
  logic [BUS_DATA_W-1:0] q_wdata, rd_value;
  logic ev_addr_corr, ev_data_corr, ev_ctl_vote;

  iobus_slave #(.SLOT(SLOT)) dut (.*);

  always #5 clk = ~clk;

  // board side: answers reads of its channels with a channel-dependent value
  assign rd_hit   = q_chan_acc && !q_wr;
  assign rd_value = 16'hC000 | 16'(q_chan) * 16'h0111;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  typedef struct {
    bit cyc, wr;
    logic [BUS_ADDR_W-1:0] addr;
    logic [BUS_DATA_W-1:0] wdata;
    bit damaged_a, damaged_d;
  } req_t;
  req_t hist [$];
  int n_acorr, n_dcorr, n_upd, n_samp, n_rd;

  function automatic logic [BUS_ADDR_W-1:0] pick_addr();
    case ($urandom_range(0, 6))
      0, 1: return {1'b0, SLOT, 3'($urandom)};
      2:    return {1'b0, 6'($urandom), 3'($urandom)};
      3:    return UPD_BASE | BUS_ADDR_W'(SLOT);
      4:    return UPD_BASE | BUS_ADDR_W'($urandom_range(0, 63));
      5:    return ADDR_SAMPLE_ALL + BUS_ADDR_W'($urandom_range(0, 2));
      default: return BUS_ADDR_W'($urandom);
    endcase
  endfunction

  always @(posedge clk) begin
    if (!rst_n) bus_req <= '0;
    else begin
      automatic req_t r;
      automatic iobus_req_t b;
      r.cyc = ($urandom_range(0, 3) != 0);
      r.wr = $urandom_range(0, 1);
      r.addr = pick_addr();
      r.wdata = 16'($urandom);
      r.damaged_a = 0; r.damaged_d = 0;
      b.cyc = {3{r.cyc}};
      b.wr = {3{r.wr}};
      b.addr = r.addr;
      b.achk = ADDR_CHK_W'(sec_chk(32'(r.addr), BUS_ADDR_W, ADDR_CHK_W));
      b.wdata = r.wdata;
      b.wchk = DATA_CHK_W'(sec_chk(32'(r.wdata), BUS_DATA_W, DATA_CHK_W));
      case ($urandom_range(0, 7))
        0: begin automatic int k = $urandom_range(0, BUS_ADDR_W + ADDR_CHK_W - 1);
             if (k < BUS_ADDR_W) b.addr[k] = ~b.addr[k]; else b.achk[k-BUS_ADDR_W] = ~b.achk[k-BUS_ADDR_W];
             r.damaged_a = 1; end
        1: begin automatic int k = $urandom_range(0, BUS_DATA_W + DATA_CHK_W - 1);
             if (k < BUS_DATA_W) b.wdata[k] = ~b.wdata[k]; else b.wchk[k-BUS_DATA_W] = ~b.wchk[k-BUS_DATA_W];
             r.damaged_d = 1; end
        2: begin automatic int k = $urandom_range(0, 2); b.cyc[k] = ~b.cyc[k]; end
        3: begin automatic int k = $urandom_range(0, 2); b.wr[k] = ~b.wr[k]; end
        default: ;
      endcase
      bus_req <= b;
      hist.push_back(r);
    end
  end

  always @(negedge clk) if (rst_n && hist.size() >= 3) begin
    automatic req_t p = hist[hist.size() - 2];   // decoded now
    automatic req_t pp = hist[hist.size() - 3];  // answered now
    automatic bit own_ch = p.cyc && !p.addr[9] && p.addr[8:3] == SLOT;
    automatic bit own_up = p.addr == (10'h200 | 10'(SLOT));
    automatic bit samp = p.cyc && p.wr && (own_up || p.addr == 10'h3FD || p.addr == 10'h3FF);
    automatic bit upd  = p.cyc && p.wr && (own_up || p.addr == 10'h3FE || p.addr == 10'h3FF);
    automatic bit rd_pp = pp.cyc && !pp.wr && !pp.addr[9] && pp.addr[8:3] == SLOT;
    check(q_chan_acc == own_ch, "channel decode");
    check(q_sample == samp, "sample decode");
    check(q_update == upd, "update decode");
    check(ev_addr_corr == (p.cyc && p.damaged_a), "address correction flagged");
    check(ev_data_corr == (p.cyc && p.wr && p.damaged_d), "data correction flagged");
    if (own_ch) begin
      check(q_wr == p.wr && q_chan == p.addr[2:0], "decoded channel and direction");
      if (p.wr) check(q_wdata == p.wdata, "corrected write data");
    end
    if (samp) n_samp++;
    if (upd) n_upd++;
    if (p.damaged_a && p.cyc) n_acorr++;
    if (p.damaged_d && p.cyc && p.wr) n_dcorr++;
    if (rd_pp) begin
      automatic logic [15:0] v = 16'hC000 | 16'(pp.addr[2:0]) * 16'h0111;
      n_rd++;
      check(bus_rsp.rdata == v, "read data");
      check(bus_rsp.rchk == DATA_CHK_W'(sec_chk(32'(v), BUS_DATA_W, DATA_CHK_W)), "read check bits");
    end else begin
      check(bus_rsp == '0, "idle read bus");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    $display("reads=%0d samples=%0d updates=%0d acorr=%0d dcorr=%0d", n_rd, n_samp, n_upd, n_acorr, n_dcorr);
    check(n_rd > 50 && n_samp > 50 && n_upd > 50 && n_acorr > 50 && n_dcorr > 50, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
