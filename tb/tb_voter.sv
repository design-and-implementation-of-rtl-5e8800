// tb_voter: four behavioural processors feed the voter through word queues
// that stand in for the outbound FIFOs. Every processor produces the same
// word stream at its own random pace; the testbench injects bad words and
// stops processors, and checks:
//  * every word the voter hands on equals the reference stream, in order;
//  * a single bad word is masked without a mode change;
//  * two consecutive bad words from a voter swap in the spare (RECONFIG);
//  * bad data in RECONFIG is masked and changes nothing;
//  * a stopped processor is declared lost after exactly TIMEOUT (32 cycles,
//    8 us at 4 MHz) of flag disagreement, which swaps in the spare in NORMAL
//    and selects simplex on the lowest working processor in RECONFIG;
//  * a lost spare is only noted, and a voter failing after that forces
//    simplex.
module tb_voter;
  import mbc_pkg::*;

  localparam int TO = TIMEOUT_CYCLES;

  logic clk = 0, rst_n = 0;
  logic [NPROC-1:0] bf, be, vote_mask, sync_mask, failed;
  logic [WORD_W-1:0] data [NPROC];
  logic strobe, out_valid, out_ready, spare_noted;
  logic [WORD_W-1:0] out_data;
  logic ev_masked, ev_reconf_data, ev_reconf_lost, ev_simplex, ev_timeout;
  vmode_e mode;

  voter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------------------------------------------------- processors
  logic [WORD_W-1:0] q [NPROC][$];
  int  produced [NPROC];
  int  die_at [NPROC];              // stops producing at this word, -1 never
  int  bad1 [NPROC], bad2 [NPROC];  // word indices sent corrupted
  int  n_out;                       // words handed on by the voter
  int  n_masked, n_rdata, n_rlost, n_simplex, n_timeout;
  int  disagree_run;

  function automatic logic [WORD_W-1:0] ref_word(input int k);
    return WORD_W'(k) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  task automatic reset_all();
    rst_n = 0;
    for (int i = 0; i < NPROC; i++) begin
      q[i].delete();
      produced[i] = 0; die_at[i] = -1; bad1[i] = -1; bad2[i] = -1;
    end
    n_out = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      bf <= '0;
      out_ready <= 1'b0;
      disagree_run = 0;
    end else begin
      // watchdog reference: consecutive cycles in which the tracked
      // processors' "buffer full" flags are not all equal
      begin
        automatic bit seen1 = 0, seen0 = 0;
        for (int i = 0; i < NPROC; i++)
          if (sync_mask[i]) begin
            if (bf[i]) seen1 = 1; else seen0 = 1;
          end
        if (seen1 && seen0 && mode != MODE_FAILED) disagree_run++;
        else disagree_run = 0;
      end
      if (ev_timeout) begin
        n_timeout++;
        check(disagree_run == TO, $sformatf("timeout after %0d cycles", disagree_run));
        disagree_run = 0;
      end
      check(disagree_run <= TO, "disagreement outlived the timeout");
      if (ev_masked) n_masked++;
      if (ev_reconf_data) n_rdata++;
      if (ev_reconf_lost) n_rlost++;
      if (ev_simplex) n_simplex++;

      // output handshake
      if (out_valid && out_ready) begin
        check(out_data == ref_word(n_out), $sformatf("output word %0d", n_out));
        n_out++;
      end
      // lockstep pop of every non-empty FIFO
      if (strobe)
        for (int i = 0; i < NPROC; i++)
          if (q[i].size() != 0) void'(q[i].pop_front());
      // production
      for (int i = 0; i < NPROC; i++) begin
        if (q[i].size() < 4 && (die_at[i] < 0 || produced[i] < die_at[i]) &&
            $urandom_range(0, 99) < 45) begin
          automatic logic [WORD_W-1:0] w = ref_word(produced[i]);
          if (produced[i] == bad1[i] || produced[i] == bad2[i]) w = w ^ (32'h1 << (i * 5));
          q[i].push_back(w);
          produced[i]++;
        end
      end
      for (int i = 0; i < NPROC; i++) begin
        bf[i]   <= (q[i].size() != 0);
        data[i] <= (q[i].size() != 0) ? q[i][0] : '0;
      end
      out_ready <= ($urandom_range(0, 99) < 75);
    end
  end

  task automatic run_until(input int words);
    int guard = 0;
    while (n_out < words && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    check(n_out >= words, $sformatf("reached word %0d", words));
  endtask

  initial begin
    be = '1;
    n_masked = 0; n_rdata = 0; n_rlost = 0; n_simplex = 0; n_timeout = 0;
    for (int i = 0; i < NPROC; i++) data[i] = '0;

    // ---- sequence 1: mask, reconfigure on data, mask in RECONFIG, simplex
    reset_all();
    bad1[1] = 10;                      // single bad word from T2
    bad1[0] = 30; bad2[0] = 31;        // T1 sends two bad words in a row
    bad1[3] = 50; bad2[3] = 51;        // the spare, now voting, sends two
    die_at[2] = 80;                    // T3 gets lost
    run_until(25);
    check(mode == MODE_NORMAL && n_masked == 1, "single bad word masked");
    run_until(40);
    check(mode == MODE_RECONFIG, "reconfigured after two bad words");
    check(vote_mask == 4'b1110 && failed == 4'b0001, "T1 replaced by T4");
    check(n_rdata == 1, "one data re-configuration");
    run_until(70);
    check(mode == MODE_RECONFIG && vote_mask == 4'b1110, "bad data masked in RECONFIG");
    run_until(200);
    check(mode == MODE_FAILED, "simplex after a lost processor in RECONFIG");
    check(vote_mask == 4'b0010, "simplex on T2, the lowest working processor");
    check(failed == 4'b0101, "T1 and T3 failed");
    check(n_simplex == 1 && n_timeout == 1, "one timeout, one simplex switch");

    // ---- sequence 2: lost spare is only noted, then a voter failure
    reset_all();
    die_at[3] = 20;
    bad1[0] = 40; bad2[0] = 41;
    run_until(35);
    check(mode == MODE_NORMAL && spare_noted, "lost spare noted, no action");
    check(sync_mask == 4'b0111, "lost spare no longer waited for");
    run_until(120);
    check(mode == MODE_FAILED && vote_mask == 4'b0010, "no spare left: simplex on T2");

    // ---- sequence 3: spare bad data noted, lost voter swapped out
    reset_all();
    bad1[3] = 5; bad2[3] = 6;
    die_at[1] = 15;
    bad1[0] = 40;
    run_until(12);
    check(mode == MODE_NORMAL && spare_noted && failed == 0, "spare bad data only noted");
    run_until(30);
    check(mode == MODE_RECONFIG && vote_mask == 4'b1101 && failed == 4'b0010,
          "lost T2 replaced by T4");
    check(n_rlost == 1, "one re-configuration for a lost processor");
    run_until(120);
    check(mode == MODE_RECONFIG, "single bad word in RECONFIG masked");

    $display("events: masked=%0d reconf_data=%0d reconf_lost=%0d simplex=%0d timeout=%0d",
             n_masked, n_rdata, n_rlost, n_simplex, n_timeout);
    check(n_masked >= 3 && n_rdata == 1 && n_rlost == 1 && n_simplex == 2 && n_timeout == 3,
          "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
