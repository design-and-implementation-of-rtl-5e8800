// tb_mbc_backplane: the controller at its default sizes, a full backplane --
// five A/D boards (slots 0-4) and five D/A boards (slots 5-9), 80 I/O
// channels -- running the feedback control cycle with the four bus
// operations of the design:
//   1. one block write to the five contiguous A/D update addresses,
//   2. one block write of 40 actuator values to the D/A channels,
//   3. one block write to the five contiguous D/A update addresses,
//   4. one block read of the 40 A/D channels.
// In one cycle the first and third operations are replaced by a single write
// to the sample-all-and-update-all address, issued after the actuator values,
// which samples every input and updates every output at the same instant; the
// read of that cycle waits for the conversion.
// The processors' interrupts are up to three clocks apart and their port DMA
// moves one word per clock. At the start of cycle LOST_CYCLE processor T3
// stops dead; the voter must declare it lost after 8 us, swap in the spare
// and still let that cycle's I/O finish within the period.
// A block write to the update addresses reaches the boards one bus cycle
// apart, so the five boards of a kind are sampled (or updated) within five
// clocks (1.25 us) of each other; the global address reaches them all on
// the same clock. Checks every sensor word, every D/A output after every
// update, the spread of the sample and update instants in both cases, and
// reports how long the I/O of a control cycle takes against the 50 us
// (200 clock) period.
module tb_mbc_backplane;
  import mbc_pkg::*;

  localparam int PERIOD  = 200;
  localparam int ONESHOT = 30;       // sample to read, regular cycles
  localparam int ONESHOT_BOTH = 90;  // start to read when the global address samples
  localparam int CONV    = 20;
  localparam int NA = 5, ND = 5;
  localparam int NCH_A = NA * CH_PER_BOARD, NCH_D = ND * CH_PER_BOARD;
  localparam int BOTH_CYCLE = 2;
  localparam int LOST_CYCLE = 3, LOST_PROC = 2;

  logic clk = 0, rst_n = 0;
  logic [NPROC-1:0]  p_out_valid, p_out_ready, p_in_valid, p_in_read;
  logic [WORD_W-1:0] p_out_data [NPROC];
  logic [WORD_W-1:0] p_in_data [NPROC];
  logic [NA-1:0]     ad_conv_start, ad_conv_done, ad_ready;
  logic [ND-1:0]     da_load;
  logic [CONV_W-1:0] ad_code [NA][CH_PER_BOARD];
  logic [CONV_W-1:0] da_code [ND][CH_PER_BOARD];
  vmode_e            mode;
  logic [NPROC-1:0]  vote_mask, failed;
  logic              spare_noted;
  mbc_events_t       ev;

  mbc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [CONV_W-1:0] sensor(input int k, input int ch);
    return CONV_W'(k * 53 + ch * 97 + 11);
  endfunction
  function automatic logic [CONV_W-1:0] law(input logic [CONV_W-1:0] s, input int ch);
    return CONV_W'(s * 5 + ch);
  endfunction
  function automatic logic [CONV_W-1:0] dac_expect(input int k, input int ch);
    return (k == 0) ? CONV_W'(ch) : law(sensor(k - 1, ch), ch);
  endfunction

  // converters: one model per A/D board
  int n_conv [NA], conv_left [NA];
  int first_start, first_load;
  always @(posedge clk) begin
    ad_conv_done <= '0;
    if (rst_n) begin
      if (ad_conv_start != '0) begin
        if (ad_conv_start[0]) first_start = now;
        if (n_conv[0] == BOTH_CYCLE && ad_conv_start[0])
          check(ad_conv_start == '1, "global address starts all A/D boards on one edge");
        check(now - first_start < NA, "A/D sample instants within one block write");
      end
      for (int b = 0; b < NA; b++) begin
        if (ad_conv_start[b]) conv_left[b] = CONV;
        else if (conv_left[b] > 0) begin
          conv_left[b]--;
          if (conv_left[b] == 0) begin
            ad_conv_done[b] <= 1'b1;
            for (int c = 0; c < CH_PER_BOARD; c++)
              ad_code[b][c] <= sensor(n_conv[b], b * CH_PER_BOARD + c);
            n_conv[b]++;
          end
        end
      end
    end
  end

  // processors
  logic [WORD_W-1:0] outq [NPROC][$];
  int phase [NPROC], start_at [NPROC], rx [NPROC], kcyc [NPROC];
  logic [CONV_W-1:0] dac_next [NPROC][NCH_D];
  int now, worst;

  always @(negedge clk) begin
    if (!rst_n) begin
      p_out_valid = '0; p_in_read = '0;
    end else begin
      now++;
      if (now % PERIOD == 0)
        for (int i = 0; i < NPROC; i++)
          if (phase[i] == 0) start_at[i] = now + $urandom_range(0, 3);
      for (int i = 0; i < NPROC; i++) begin
        p_out_valid[i] = 1'b0;
        p_in_read[i]   = 1'b0;
        if (i == LOST_PROC && kcyc[i] == LOST_CYCLE) continue;   // gone
        case (phase[i])
          0: if (start_at[i] == now) begin
               if (kcyc[i] != BOTH_CYCLE) begin
                 outq[i].push_back(mk_header(OP_WRITE, NA, UPD_BASE));
                 for (int b = 0; b < NA; b++) outq[i].push_back('0);
               end
               outq[i].push_back(mk_header(OP_WRITE, NCH_D, BUS_ADDR_W'(NA * CH_PER_BOARD)));
               for (int c = 0; c < NCH_D; c++) outq[i].push_back(WORD_W'(dac_next[i][c]));
               if (kcyc[i] == BOTH_CYCLE) begin
                 outq[i].push_back(mk_header(OP_WRITE, 1, ADDR_BOTH_ALL));
                 outq[i].push_back('0);
               end
               phase[i] = 1;
             end
          1: if (now >= start_at[i] + ((kcyc[i] == BOTH_CYCLE) ? ONESHOT_BOTH : ONESHOT)) begin
               if (kcyc[i] != BOTH_CYCLE) begin
                 outq[i].push_back(mk_header(OP_WRITE, ND, UPD_BASE | BUS_ADDR_W'(NA)));
                 for (int b = 0; b < ND; b++) outq[i].push_back('0);
               end
               outq[i].push_back(mk_header(OP_READ, NCH_A, BUS_ADDR_W'(0)));
               rx[i] = 0;
               phase[i] = 2;
             end
          default: ;
        endcase
        if (outq[i].size() != 0 && p_out_ready[i]) begin
          p_out_valid[i] = 1'b1;
          p_out_data[i]  = outq[i].pop_front();
        end
        if (phase[i] == 2 && p_in_valid[i]) begin
          p_in_read[i] = 1'b1;
          check(p_in_data[i] == WORD_W'(sensor(kcyc[i], rx[i])),
                $sformatf("T%0d cycle %0d sensor %0d", i + 1, kcyc[i], rx[i]));
          dac_next[i][rx[i]] = law(CONV_W'(p_in_data[i]), rx[i]);
          rx[i]++;
          if (rx[i] == NCH_A) begin
            if (now - start_at[i] > worst) worst = now - start_at[i];
            if (i == 0)
              $display("cycle %0d: I/O took %0d clocks%0s", kcyc[i], now - start_at[i],
                       (kcyc[i] == BOTH_CYCLE) ? string'(" (global sample/update address)") : string'(""));
            check(now - start_at[i] < PERIOD,
                  $sformatf("cycle %0d I/O within the period (%0d clocks)", kcyc[i], now - start_at[i]));
            kcyc[i]++;
            phase[i] = 0;
          end
        end
      end
    end
  end

  int n_timeout, n_reconf_lost;
  always @(posedge clk) if (rst_n) begin
    if (ev.timeout) n_timeout++;
    if (ev.reconf_lost) n_reconf_lost++;
  end

  // D/A outputs: every board's outputs after each of its updates
  int n_load [ND];
  always @(negedge clk) if (rst_n && da_load != '0) begin
    if (da_load[0]) first_load = now;
    if (n_load[0] == BOTH_CYCLE && da_load[0])
      check(da_load == '1, "global address updates all D/A boards on one edge");
    check(now - first_load <= ND, "D/A update instants within one block write");
    for (int b = 0; b < ND; b++)
      if (da_load[b]) begin
        for (int c = 0; c < CH_PER_BOARD; c++)
          check(da_code[b][c] == dac_expect(n_load[b], b * CH_PER_BOARD + c),
                $sformatf("D/A cycle %0d board %0d channel %0d", n_load[b], b, c));
        n_load[b]++;
      end
  end

  initial begin
    now = 0; worst = 0; first_start = 0; first_load = 0;
    n_timeout = 0; n_reconf_lost = 0;
    for (int b = 0; b < ND; b++) n_load[b] = 0;
    for (int b = 0; b < NA; b++) begin
      n_conv[b] = 0; conv_left[b] = 0;
      for (int c = 0; c < CH_PER_BOARD; c++) ad_code[b][c] = '0;
    end
    for (int i = 0; i < NPROC; i++) begin
      phase[i] = 0; start_at[i] = -1; rx[i] = 0; kcyc[i] = 0; p_out_data[i] = '0;
      for (int c = 0; c < NCH_D; c++) dac_next[i][c] = CONV_W'(c);
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (6 * PERIOD + PERIOD / 2) @(posedge clk);
    $display("control cycles=%0d D/A updates=%0d worst cycle I/O=%0d clocks of %0d",
             kcyc[0], n_load[ND-1], worst, PERIOD);
    check(kcyc[0] >= 5 && n_load[0] >= 5 && n_load[ND-1] == n_load[0],
          "control cycles completed");
    check(mode == MODE_RECONFIG && failed == 4'b0100 && vote_mask == 4'b1011,
          "lost T3 replaced by the spare");
    check(n_timeout == 1 && n_reconf_lost == 1, "exactly one timeout, no false alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
