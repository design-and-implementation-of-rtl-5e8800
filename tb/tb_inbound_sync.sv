// tb_inbound_sync: random sensor words arrive from the bus side; four
// behavioural processors drain their inbound FIFOs (modelled as queues) at
// random paces, one of them often slow. Checks that a word is loaded only
// when every tracked FIFO is empty, that all four receive every word in the
// same cycle and in order, that a masked-out (failed) processor is not waited
// for, and that the holding register stalls the source while it waits.
module tb_inbound_sync;
  import mbc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, load, waiting;
  logic [WORD_W-1:0] in_data, load_data;
  logic [NPROC-1:0] be, sync_mask;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] q [NPROC][$];
  int n_sent, n_loaded, n_wait;

  inbound_sync dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [WORD_W-1:0] ref_word(input int k);
    return WORD_W'(k) * 32'h0101_0107 + 32'h77;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 0; in_data <= '0; be <= '1;
      n_sent = 0; n_loaded = 0; n_wait = 0;
    end else begin
      if (waiting) n_wait++;
      if (load) begin
        for (int i = 0; i < NPROC; i++)
          if (sync_mask[i]) check(be[i], "load only into empty FIFOs");
        check(load_data == ref_word(n_loaded), $sformatf("word %0d", n_loaded));
        for (int i = 0; i < NPROC; i++) q[i].push_back(load_data);
        n_loaded++;
      end
      if (in_valid && in_ready) n_sent++;
      // processors read; processor 2 is slow
      for (int i = 0; i < NPROC; i++)
        if (q[i].size() != 0 && $urandom_range(0, 99) < (i == 2 ? 15 : 60))
          void'(q[i].pop_front());
      for (int i = 0; i < NPROC; i++) be[i] <= (q[i].size() == 0);
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom_range(0, 99) < 70);
        in_data  <= ref_word(n_sent);
      end
    end
  end

  int n_prev;
  initial begin
    sync_mask = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    check(n_loaded > 100, "words flowed");
    check(n_wait > 100, "waited for the slow processor");
    // processor 3 removed: it never reads again, must not block
    sync_mask = 4'b0111;
    @(posedge clk);
    q[3].delete();
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      q[3].push_back('0);   // keep its FIFO non-empty
    end
    n_prev = n_loaded;
    repeat (500) @(posedge clk);
    check(n_loaded > n_prev + 20, "failed processor not waited for");
    $display("loaded=%0d waits=%0d", n_loaded, n_wait);
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
