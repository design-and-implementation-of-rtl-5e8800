// tb_mbc_top: end-to-end run of the whole controller, with fault injection,
// populated like the system the document reports: one A/D board (slot 0) and
// one D/A board (slot 1). The full ten-slot backplane, the default population,
// is run fault-free by its own testbench.
//
// Four behavioural processors run the feedback control cycle of the design:
// on every periodic tick (50 us = 200 bus clocks, common to all four, each
// starting with its own small interrupt latency) they send
//   1. a block write to the A/D board's update address (sample all inputs)
//      and a block write of eight actuator values to the D/A board's buffers,
//   2. after a one-shot delay covering the conversion time, a block write to
//      the D/A board's update address and a block read of the eight A/D
//      channels,
// then take the eight sensor words from their inbound FIFOs and compute the
// next actuator values from them. A model of the converters samples a
// known signal on every conversion start.
//
// Checked end to end: the sensor words every live processor receives, the
// D/A outputs after every update, four bus operations and 18 bus words per
// control cycle, conversions finished before their results are read, and the
// I/O of a control cycle finishing within the sampling period.
// Fault scenarios: (A) a single bad word from T2 (masked), two bad words from
// T1 (spare swapped in), a stuck write-data line and a stuck read-data line
// on the backplane (corrected), the global update addresses, and T3 lost
// (simplex on T2); (B) T2 lost in normal mode (spare swapped in after 8 us)
// and a single bad word from the spare afterwards (masked).
// Every mechanism is counted and must have happened at least once.
module tb_mbc_top;
  import mbc_pkg::*;

  localparam int PERIOD  = 200;   // 50 us at 4 MHz
  localparam int ONESHOT = 60;    // processor's one-shot interval
  localparam int CONV    = 20;    // converter time, 5 us
  localparam int AD_SLOT = 0, DA_SLOT = 1;

  logic clk = 0, rst_n = 0;
  logic [NPROC-1:0]  p_out_valid, p_out_ready, p_in_valid, p_in_read;
  logic [WORD_W-1:0] p_out_data [NPROC];
  logic [WORD_W-1:0] p_in_data [NPROC];
  logic [0:0]        ad_conv_start, ad_conv_done, ad_ready, da_load;
  logic [CONV_W-1:0] ad_code [1][CH_PER_BOARD];
  logic [CONV_W-1:0] da_code [1][CH_PER_BOARD];
  vmode_e            mode;
  logic [NPROC-1:0]  vote_mask, failed;
  logic              spare_noted;
  mbc_events_t       ev;

  mbc_top #(.NUM_AD(1), .NUM_DA(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------------ signal model
  function automatic logic [CONV_W-1:0] sensor(input int k, input int ch);
    return CONV_W'(k * 37 + ch * 101 + 5);
  endfunction
  function automatic logic [CONV_W-1:0] law(input logic [CONV_W-1:0] s, input int ch);
    return CONV_W'(s * 3 + ch);       // the "control law" of the feedback task
  endfunction
  function automatic logic [CONV_W-1:0] dac_expect(input int k, input int ch);
    return (k == 0) ? CONV_W'(16'h100 + ch) : law(sensor(k - 1, ch), ch);
  endfunction

  // ------------------------------------------------------------ converters
  int n_conv, conv_left;
  always @(posedge clk) begin
    ad_conv_done <= 1'b0;
    if (!rst_n) begin
      n_conv = 0; conv_left = 0;
    end else if (ad_conv_start[0]) begin
      conv_left = CONV;
    end else if (conv_left > 0) begin
      conv_left--;
      if (conv_left == 0) begin
        ad_conv_done <= 1'b1;
        for (int c = 0; c < CH_PER_BOARD; c++) ad_code[0][c] <= sensor(n_conv, c);
        n_conv++;
      end
    end
  end

  // ------------------------------------------------------------ processors
  logic [WORD_W-1:0] outq [NPROC][$];
  int  phase [NPROC];               // 0 wait tick, 1 part 1, 2 one-shot, 3 part 2, 4 read
  int  start_at [NPROC], rx [NPROC], kcyc [NPROC], wcount [NPROC];
  logic [CONV_W-1:0] dac_next [NPROC][CH_PER_BOARD];
  bit  dead [NPROC];
  int  die_cycle [NPROC];
  int  bad_cycle [NPROC], bad_word [NPROC], bad_n [NPROC];
  int  tick, now, cycles_done, global_cycle;
  int  glob_cycle_mode;             // cycle using the global update addresses

  function automatic logic [BUS_ADDR_W-1:0] sample_addr(input int k);
    return (k == glob_cycle_mode) ? ADDR_SAMPLE_ALL : (UPD_BASE | BUS_ADDR_W'(AD_SLOT));
  endfunction
  function automatic logic [BUS_ADDR_W-1:0] update_addr(input int k);
    return (k == glob_cycle_mode) ? ADDR_UPDATE_ALL : (UPD_BASE | BUS_ADDR_W'(DA_SLOT));
  endfunction

  task automatic emit(input int i, input logic [WORD_W-1:0] w);
    if (kcyc[i] == bad_cycle[i] && wcount[i] >= bad_word[i] && wcount[i] < bad_word[i] + bad_n[i])
      w = w ^ 32'h0000_0400;
    outq[i].push_back(w);
    wcount[i]++;
  endtask

  always @(negedge clk) begin
    if (!rst_n) begin
      p_out_valid = '0; p_in_read = '0;
    end else begin
      now++;
      if (now % PERIOD == 0) begin
        tick = now;
        for (int i = 0; i < NPROC; i++)
          if (phase[i] == 0 && !dead[i]) start_at[i] = now + $urandom_range(0, 3);
      end
      for (int i = 0; i < NPROC; i++) begin
        p_out_valid[i] = 1'b0;
        p_in_read[i]   = 1'b0;
        if (!dead[i] && kcyc[i] == die_cycle[i]) begin
          dead[i] = 1;
          outq[i].delete();
        end
        if (dead[i]) continue;
        case (phase[i])
          0: if (start_at[i] == now) begin
               wcount[i] = 0;
               emit(i, mk_header(OP_WRITE, 1, sample_addr(kcyc[i])));
               emit(i, 32'h0);
               emit(i, mk_header(OP_WRITE, CH_PER_BOARD, {1'b0, 6'(DA_SLOT), 3'd0}));
               for (int c = 0; c < CH_PER_BOARD; c++) emit(i, WORD_W'(dac_next[i][c]));
               phase[i] = 1;
             end
          1: if (outq[i].size() == 0) phase[i] = 2;
          2: if (now >= start_at[i] + ONESHOT) begin
               emit(i, mk_header(OP_WRITE, 1, update_addr(kcyc[i])));
               emit(i, 32'h0);
               emit(i, mk_header(OP_READ, CH_PER_BOARD, {1'b0, 6'(AD_SLOT), 3'd0}));
               rx[i] = 0;
               phase[i] = 3;
             end
          3: if (outq[i].size() == 0) phase[i] = 4;
          default: ;
        endcase
        // comm port DMA: one word when the port is ready, at its own pace
        if (outq[i].size() != 0 && p_out_ready[i] && $urandom_range(0, 99) < 70) begin
          p_out_valid[i] = 1'b1;
          p_out_data[i]  = outq[i].pop_front();
        end
        if (phase[i] >= 3 && rx[i] < CH_PER_BOARD && p_in_valid[i] && $urandom_range(0, 99) < 60) begin
          p_in_read[i] = 1'b1;
          check(p_in_data[i] == WORD_W'(sensor(kcyc[i], rx[i])),
                $sformatf("T%0d cycle %0d sensor %0d", i + 1, kcyc[i], rx[i]));
          dac_next[i][rx[i]] = law(CONV_W'(p_in_data[i]), rx[i]);
          rx[i]++;
          if (rx[i] == CH_PER_BOARD) begin
            check(now - start_at[i] < PERIOD,
                  $sformatf("T%0d cycle %0d I/O within the period (%0d)", i + 1, kcyc[i], now - start_at[i]));
            kcyc[i]++;
            phase[i] = 0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ observers
  int n_strobe, n_masked, n_rdata, n_rlost, n_simplex, n_timeout, n_in_load, n_in_wait;
  int n_wr_op, n_rd_op, n_rd_corr, n_board_corr, n_dac_load, n_conv_start, n_bus_words;
  int n_glob_sample, n_glob_update, n_dac_cycle, n_cyc_ops, n_cyc_words;

  always @(posedge clk) if (rst_n) begin
    if (ev.strobe) n_strobe++;
    if (ev.masked) n_masked++;
    if (ev.reconf_data) n_rdata++;
    if (ev.reconf_lost) n_rlost++;
    if (ev.simplex) n_simplex++;
    if (ev.timeout) n_timeout++;
    if (ev.in_load) n_in_load++;
    if (ev.in_wait) n_in_wait++;
    if (ev.wr_op) begin n_wr_op++; n_cyc_ops++; end
    if (ev.rd_op) begin n_rd_op++; n_cyc_ops++; end
    if (ev.rd_corr) n_rd_corr++;
    if (ev.board_corr) n_board_corr++;
    if (ad_conv_start[0]) n_conv_start++;
    if (dut.bp_req.cyc != 0) begin
      n_bus_words++;
      n_cyc_words++;
      if (dut.bp_req.addr == ADDR_SAMPLE_ALL) n_glob_sample++;
      if (dut.bp_req.addr == ADDR_UPDATE_ALL) n_glob_update++;
      if (dut.bp_req.wr == 3'b000)
        check(ad_ready[0], "conversion finished before its results are read");
    end
    if (da_load[0]) n_dac_load++;
    // four bus operations and 18 bus words in every sampling period
    if (now % PERIOD == 0 && now > PERIOD) begin
      check(n_cyc_ops == 4, $sformatf("bus operations per period (%0d)", n_cyc_ops));
      check(n_cyc_words == 2 * (1 + CH_PER_BOARD), $sformatf("bus words per period (%0d)", n_cyc_words));
      n_cyc_ops = 0;
      n_cyc_words = 0;
    end
  end

  // D/A outputs appear one cycle after the load pulse
  always @(negedge clk) if (rst_n && da_load[0]) begin
    for (int c = 0; c < CH_PER_BOARD; c++)
      check(da_code[0][c] == dac_expect(n_dac_cycle, c),
            $sformatf("D/A cycle %0d channel %0d", n_dac_cycle, c));
    n_dac_cycle++;
  end
  // ------------------------------------------------------------ scenarios
  task automatic start_scenario();
    rst_n = 0;
    now = 0; tick = 0; n_dac_cycle = 0; n_cyc_ops = 0; n_cyc_words = 0;
    for (int i = 0; i < NPROC; i++) begin
      outq[i].delete();
      phase[i] = 0; start_at[i] = -1; rx[i] = 0; kcyc[i] = 0; wcount[i] = 0;
      dead[i] = 0; die_cycle[i] = -1; bad_cycle[i] = -1; bad_word[i] = 0; bad_n[i] = 0;
      for (int c = 0; c < CH_PER_BOARD; c++) dac_next[i][c] = CONV_W'(16'h100 + c);
      p_out_data[i] = '0;
    end
    glob_cycle_mode = -1;
    repeat (4) @(posedge clk);
    rst_n = 1;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n * PERIOD) @(posedge clk);
  endtask

  initial begin
    for (int c = 0; c < CH_PER_BOARD; c++) ad_code[0][c] = '0;
    n_strobe = 0; n_masked = 0; n_rdata = 0; n_rlost = 0; n_simplex = 0; n_timeout = 0;
    n_in_load = 0; n_in_wait = 0; n_wr_op = 0; n_rd_op = 0; n_rd_corr = 0; n_board_corr = 0;
    n_dac_load = 0; n_conv_start = 0; n_bus_words = 0; n_glob_sample = 0; n_glob_update = 0;

    // ---- scenario A
    start_scenario();
    bad_cycle[1] = 1; bad_word[1] = 5; bad_n[1] = 1;    // T2: one bad D/A word
    bad_cycle[0] = 2; bad_word[0] = 4; bad_n[0] = 2;    // T1: two in a row
    glob_cycle_mode = 4;                                // global update addresses
    die_cycle[2] = 7;                                   // T3 gets lost
    wait_cycles(4);
    check(mode == MODE_RECONFIG && vote_mask == 4'b1110, "A: T4 replaced T1");
    // stuck backplane lines during cycle 3: one write-data line, then one read-data line
    wait (now % PERIOD == 2);
    force dut.bp_req.wdata[6] = 1'b1;
    repeat (40) @(posedge clk);
    release dut.bp_req.wdata[6];
    wait (now % PERIOD == 70);
    force dut.bp_rsp.rdata[0] = 1'b0;
    repeat (60) @(posedge clk);
    release dut.bp_rsp.rdata[0];
    wait_cycles(6);
    check(mode == MODE_FAILED && vote_mask == 4'b0010, "A: simplex on T2 after T3 lost");
    check(n_dac_cycle >= 9, $sformatf("A: control cycles completed (%0d)", n_dac_cycle));

    // ---- scenario B
    start_scenario();
    die_cycle[1] = 2;                                   // T2 lost in normal mode
    bad_cycle[3] = 4; bad_word[3] = 6; bad_n[3] = 1;    // spare, now voting: one bad word
    wait_cycles(6);
    check(mode == MODE_RECONFIG && vote_mask == 4'b1101 && failed == 4'b0010,
          "B: T4 replaced the lost T2");
    check(n_dac_cycle >= 5, $sformatf("B: control cycles completed (%0d)", n_dac_cycle));

    $display("strobe=%0d masked=%0d reconf_data=%0d reconf_lost=%0d simplex=%0d timeout=%0d",
             n_strobe, n_masked, n_rdata, n_rlost, n_simplex, n_timeout);
    $display("in_load=%0d in_wait=%0d wr_op=%0d rd_op=%0d rd_corr=%0d board_corr=%0d",
             n_in_load, n_in_wait, n_wr_op, n_rd_op, n_rd_corr, n_board_corr);
    $display("conv=%0d dac_load=%0d bus_words=%0d sample_all=%0d update_all=%0d",
             n_conv_start, n_dac_load, n_bus_words, n_glob_sample, n_glob_update);
    check(n_strobe > 0,      "mechanism: lockstep vote");
    check(n_masked > 0,      "mechanism: bad word masked");
    check(n_rdata == 1,      "mechanism: re-configuration on bad data");
    check(n_rlost == 1,      "mechanism: re-configuration on lost processor");
    check(n_simplex == 1,    "mechanism: simplex mode");
    check(n_timeout == 2,    "mechanism: 8 us watchdog");
    check(n_in_load > 0,     "mechanism: parallel inbound load");
    check(n_in_wait > 0,     "mechanism: inbound wait for a slow processor");
    check(n_wr_op > 0,       "mechanism: block write");
    check(n_rd_op > 0,       "mechanism: block read");
    check(n_rd_corr > 0,     "mechanism: read data corrected");
    check(n_board_corr > 0,  "mechanism: write data corrected on a board");
    check(n_conv_start > 0,  "mechanism: simultaneous sampling");
    check(n_dac_load > 0,    "mechanism: simultaneous D/A update");
    check(n_glob_sample > 0 && n_glob_update > 0, "mechanism: global update addresses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
