// tb_cbc: the bus controller against a behavioural I/O bus: a 1024-word
// register file that answers reads READ_LAT cycles after the address with
// check bits from an independent reference, and sometimes flips one bit of
// the read data on the "backplane". Checks:
//  * block writes put every word at the right consecutive address, with
//    triplicated control lines and correct address and data check bits;
//  * block reads return the stored words in order, corrected;
//  * with a steady command stream and a free return path a block of N words
//    occupies exactly N consecutive bus cycles (one word per clock);
//  * a stalled return path throttles the reads without losing words.
module tb_cbc;
  import mbc_pkg::*;
  import sec_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rd_valid, rd_ready;
  logic [WORD_W-1:0] cmd_data, rd_data;
  iobus_req_t bus_req;
  iobus_rsp_t bus_rsp;
  logic ev_wr_op, ev_rd_op, ev_rd_corr, busy;

  cbc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [BUS_DATA_W-1:0] mem [1024];
  logic [BUS_DATA_W-1:0] exp_rd [$];
  int n_bus_cycles, n_corr, n_flips, n_rd_words;
  int first_cyc, last_cyc, cyc_no;

  // behavioural bus: read pipeline of READ_LAT stages
  iobus_rsp_t pipe [READ_LAT];
  bit         flip_next;
  always @(posedge clk) begin
    cyc_no++;
    if (!rst_n) begin
      for (int i = 0; i < READ_LAT; i++) pipe[i] <= '0;
    end else begin
      automatic iobus_rsp_t r = '0;
      if (bus_req.cyc != 0) begin
        check(bus_req.cyc == 3'b111, "control lines triplicated (cyc)");
        check(bus_req.wr == 3'b111 || bus_req.wr == 3'b000, "control lines triplicated (wr)");
        check(bus_req.achk == ADDR_CHK_W'(sec_chk(32'(bus_req.addr), BUS_ADDR_W, ADDR_CHK_W)),
              "address check bits");
        if (n_bus_cycles == 0) first_cyc = cyc_no;
        last_cyc = cyc_no;
        n_bus_cycles++;
        if (bus_req.wr[0]) begin
          check(bus_req.wchk == DATA_CHK_W'(sec_chk(32'(bus_req.wdata), BUS_DATA_W, DATA_CHK_W)),
                "write data check bits");
          mem[bus_req.addr] = bus_req.wdata;
        end else begin
          r.rdata = mem[bus_req.addr];
          r.rchk  = DATA_CHK_W'(sec_chk(32'(r.rdata), BUS_DATA_W, DATA_CHK_W));
          if ($urandom_range(0, 9) == 0) begin
            automatic int fb = $urandom_range(0, BUS_DATA_W - 1);
            r.rdata[fb] = ~r.rdata[fb];
            n_flips++;
          end
        end
      end
      pipe[0] <= r;
      for (int i = 1; i < READ_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end
  assign bus_rsp = pipe[READ_LAT-1];

  always @(posedge clk) if (rst_n) begin
    if (ev_rd_corr) n_corr++;
    if (rd_valid && rd_ready) begin
      check(exp_rd.size() != 0, "unexpected read word");
      if (exp_rd.size() != 0) begin
        automatic logic [BUS_DATA_W-1:0] e = exp_rd.pop_front();
        check(rd_data == WORD_W'(e), $sformatf("read word %0d", n_rd_words));
      end
      n_rd_words++;
    end
  end

  // Offer one word from the falling edge on; it is taken at the first rising
  // edge that sees cmd_ready.
  task automatic send(input logic [WORD_W-1:0] w);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd_data  = w;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 1'b0;
  endtask

  task automatic block_write(input int addr, input int n, input int seed);
    send(mk_header(OP_WRITE, n, BUS_ADDR_W'(addr)));
    for (int i = 0; i < n; i++) send(WORD_W'((seed * 7919 + i * 104729) & 16'hFFFF) | 32'hABCD_0000);
    repeat (3) @(posedge clk);
  endtask

  task automatic block_read(input int addr, input int n);
    for (int i = 0; i < n; i++) exp_rd.push_back(mem[BUS_ADDR_W'(addr + i)]);
    send(mk_header(OP_READ, n, BUS_ADDR_W'(addr)));
  endtask

  task automatic drain();
    int g = 0;
    while ((exp_rd.size() != 0 || busy) && g < 5000) begin @(posedge clk); g++; end
    check(exp_rd.size() == 0, "all read words returned");
  endtask

  initial begin
    cmd_valid = 0; cmd_data = '0; rd_ready = 1;
    n_bus_cycles = 0; n_corr = 0; n_flips = 0; n_rd_words = 0; cyc_no = 0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // throughput of a block write: 16 words in 16 consecutive bus cycles
    n_bus_cycles = 0;
    block_write(16, 16, 1);
    repeat (4) @(posedge clk);
    check(n_bus_cycles == 16, "16 bus writes");
    check(last_cyc - first_cyc == 15, $sformatf("block write back to back (%0d)", last_cyc - first_cyc));
    for (int i = 0; i < 16; i++)
      check(mem[16 + i] == 16'((1 * 7919 + i * 104729) & 16'hFFFF), "written word");

    // throughput of a block read
    n_bus_cycles = 0;
    block_read(16, 16);
    drain();
    check(n_bus_cycles == 16, "16 bus reads");
    check(last_cyc - first_cyc == 15, $sformatf("block read back to back (%0d)", last_cyc - first_cyc));

    // random traffic, with a stalling return path
    for (int t = 0; t < 60; t++) begin
      automatic int a = $urandom_range(0, 1000);
      automatic int n = $urandom_range(1, 20);
      if ($urandom_range(0, 1) == 0) block_write(a, n, t);
      else begin
        fork
          begin
            for (int k = 0; k < 40; k++) begin
              rd_ready <= ($urandom_range(0, 3) == 0);
              @(posedge clk);
            end
            rd_ready <= 1'b1;
          end
          block_read(a, n);
        join
        drain();
      end
    end
    // update-space address wraps cleanly through the global update addresses
    block_write(ADDR_SAMPLE_ALL, 3, 99);
    repeat (4) @(posedge clk);
    check(mem[ADDR_BOTH_ALL] == 16'((99 * 7919 + 2 * 104729) & 16'hFFFF), "write to top address");

    $display("read words=%0d flips=%0d corrected=%0d", n_rd_words, n_flips, n_corr);
    check(n_corr == n_flips && n_flips > 0, "every flipped read bit corrected");
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
