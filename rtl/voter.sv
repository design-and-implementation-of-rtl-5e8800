// voter: fault-masking and re-configuring voter between the four processor
// modules (T1..T4, indices 0..3) and the channel bus controller.
//
// Every processor runs the same program and writes the same stream of
// 32-bit bus-operation words into its own outbound FIFO. When the "buffer
// full" flag (bf, a word is waiting) of every processor the voter is tracking
// is up, and the output register is free, the voter latches the bitwise
// majority of the three voting processors' head words into its output
// register and pops the head of all four FIFOs at once with 'strobe' -- the
// hot spare too, so that it stays in step. The vote is combinational; the
// only added delay is the output register.
//
// Failure detection (from the document):
//  * bad data: a processor whose word differs from the voted word on two
//    consecutive votes has failed; a single bad word is only masked;
//  * lost processor: a processor whose FIFO control flags (outbound bf and
//    inbound be) disagree with the others for TIMEOUT_CYCLES (8 us) has failed.
// Modes (the three states of the document's state machine):
//  * NORMAL: T1,T2,T3 vote, T4 is the hot standby. A failed voter is removed
//    and T4 takes its place (-> RECONFIG). A failure of T4 is only recorded.
//  * RECONFIG: the spare and the two remaining processors vote. Bad data is
//    masked and causes no further change; a lost processor switches the voter
//    to simplex, selecting the working processor with the lowest number.
//  * FAILED (simplex): the selected processor's words pass unvoted.
//
// Choices of this design where the document is silent: "disagree" is judged
// against the majority of the three voting processors; a spare found lost is
// no longer waited for and cannot be swapped in (a voter failing afterwards
// sends the voter to simplex); two voters failing in the same cycle also send
// it to simplex; the spare's earlier bad-data record does not stop it from
// replacing a voter (the document says no action is taken until it votes).
//
// Interface: out_valid/out_data/out_ready is a valid-ready handshake to the
// bus controller (out_valid is the original voter's "BF Out"). strobe is high for the
// cycle in which the FIFOs are popped. sync_mask tells the inbound
// synchronizer which processors to wait for. ev_* are one-cycle event pulses
// for status and test. Synchronous active-low reset into NORMAL.
module voter
  import mbc_pkg::*;
#(
  parameter int unsigned W       = WORD_W,
  parameter int unsigned TIMEOUT = TIMEOUT_CYCLES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // outbound FIFOs
  input  logic [NPROC-1:0]     bf,
  input  logic [W-1:0]         data [NPROC],
  output logic                 strobe,
  // inbound FIFO status (for the lost-processor watchdog)
  input  logic [NPROC-1:0]     be,
  // to the bus controller
  output logic                 out_valid,
  output logic [W-1:0]         out_data,
  input  logic                 out_ready,
  // status
  output vmode_e               mode,
  output logic [NPROC-1:0]     vote_mask,   // processors whose data is used
  output logic [NPROC-1:0]     sync_mask,   // processors kept in lockstep
  output logic [NPROC-1:0]     failed,      // removed processors
  output logic                 spare_noted, // T4 misbehaved while on standby
  // one-cycle events
  output logic                 ev_masked,   // a bad word was outvoted
  output logic                 ev_reconf_data,
  output logic                 ev_reconf_lost,
  output logic                 ev_simplex,
  output logic                 ev_timeout
);
  localparam int unsigned SPARE = NPROC - 1;
  localparam int unsigned TW    = $clog2(TIMEOUT + 1);

  logic [NPROC-1:0] spare_bit;
  assign spare_bit = NPROC'(1) << SPARE;

  logic             spare_lost;
  logic [TW-1:0]    timer;
  logic [1:0]       bad_run [NPROC];   // consecutive bad words, saturating

  // ---------------------------------------------------------------- tracking
  always_comb begin
    if (mode == MODE_NORMAL && !spare_lost) sync_mask = vote_mask | spare_bit;
    else                                    sync_mask = vote_mask;
  end

  logic all_ready;
  assign all_ready = ((bf | ~sync_mask) == '1);
  assign strobe    = all_ready && (!out_valid || out_ready);

  // At least two of the (three) voting inputs are one.
  function automatic logic maj_of(input logic [NPROC-1:0] v);
    return $countones(v) >= 2;
  endfunction

  // Majority of bit b over the words selected by mask.
  function automatic logic maj_col(input logic [W-1:0] d [NPROC], input int b,
                                   input logic [NPROC-1:0] mask);
    logic [NPROC-1:0] col;
    for (int i = 0; i < NPROC; i++) col[i] = d[i][b];
    return maj_of(col & mask);
  endfunction

  // -------------------------------------------------------------- data vote
  logic [W-1:0] voted;
  always_comb begin
    voted = '0;
    if (mode == MODE_FAILED) begin
      for (int i = 0; i < NPROC; i++)
        if (vote_mask[i]) voted = data[i];
    end else begin
      for (int b = 0; b < W; b++) voted[b] = maj_col(data, b, vote_mask);
    end
  end

  logic [NPROC-1:0] mismatch, dfault;
  always_comb begin
    for (int i = 0; i < NPROC; i++) begin
      mismatch[i] = strobe && sync_mask[i] && (data[i] != voted);
      dfault[i]   = mismatch[i] && (bad_run[i] != 2'd0);
    end
  end

  // ------------------------------------------------- control-flag watchdog
  logic [1:0]       ctl [NPROC];
  logic [1:0]       ctl_maj;
  logic [NPROC-1:0] odd, lost;
  always_comb begin
    for (int i = 0; i < NPROC; i++) ctl[i] = {bf[i], be[i]};
    ctl_maj = {maj_of(bf & vote_mask), maj_of(be & vote_mask)};
    for (int i = 0; i < NPROC; i++)
      odd[i] = (mode != MODE_FAILED) && sync_mask[i] && (ctl[i] != ctl_maj);
  end

  assign ev_timeout = (odd != '0) && (timer == TW'(TIMEOUT - 1));
  assign lost       = ev_timeout ? odd : '0;

  // Lowest-numbered set bit of a mask (one-hot), or zero.
  function automatic logic [NPROC-1:0] lowest(input logic [NPROC-1:0] m);
    return m & (~m + 1'b1);
  endfunction

  // ------------------------------------------------------- mode machine
  logic [NPROC-1:0] vfail;
  assign vfail = (dfault | lost) & vote_mask;

  always_comb begin
    ev_reconf_data = 1'b0;
    ev_reconf_lost = 1'b0;
    ev_simplex     = 1'b0;
    ev_masked      = 1'b0;
    if (mode == MODE_NORMAL) begin
      if (vfail != '0) begin
        if ($countones(vfail) == 1 && !spare_lost && !lost[SPARE]) begin
          ev_reconf_data = (dfault & vote_mask) != '0;
          ev_reconf_lost = (lost & vote_mask) != '0;
        end else begin
          ev_simplex = 1'b1;
        end
      end
      ev_masked = ((mismatch & vote_mask) != '0) && (vfail == '0);
    end else if (mode == MODE_RECONFIG) begin
      ev_simplex = (lost & vote_mask) != '0;
      ev_masked  = ((mismatch & vote_mask) != '0) && !ev_simplex;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode        <= MODE_NORMAL;
      vote_mask   <= ~spare_bit;
      failed      <= '0;
      spare_noted <= 1'b0;
      spare_lost  <= 1'b0;
      timer       <= '0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      for (int i = 0; i < NPROC; i++) bad_run[i] <= '0;
    end else begin
      // output register
      if (strobe) begin
        out_valid <= 1'b1;
        out_data  <= voted;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end

      // consecutive bad-word counters
      if (strobe)
        for (int i = 0; i < NPROC; i++)
          bad_run[i] <= mismatch[i] ? ((bad_run[i] == 2'd2) ? 2'd2 : bad_run[i] + 2'd1)
                                    : 2'd0;

      // watchdog timer: runs while any tracked processor is out of step
      if (odd == '0 || ev_timeout || ev_reconf_data || ev_simplex) timer <= '0;
      else                                                         timer <= timer + 1'b1;

      case (mode)
        MODE_NORMAL: begin
          if (dfault[SPARE] || lost[SPARE]) spare_noted <= 1'b1;
          if (lost[SPARE])                  spare_lost  <= 1'b1;
          if (ev_reconf_data || ev_reconf_lost) begin
            mode      <= MODE_RECONFIG;
            vote_mask <= (vote_mask & ~vfail) | spare_bit;
            failed    <= failed | vfail;
            for (int i = 0; i < NPROC; i++) bad_run[i] <= '0;
          end else if (ev_simplex) begin
            mode      <= MODE_FAILED;
            failed    <= failed | vfail | (lost & spare_bit);
            vote_mask <= ((vote_mask & ~vfail) != '0) ? lowest(vote_mask & ~vfail)
                                                      : lowest(vote_mask);
          end
        end
        MODE_RECONFIG: begin
          if (ev_simplex) begin
            mode      <= MODE_FAILED;
            failed    <= failed | (lost & vote_mask);
            vote_mask <= ((vote_mask & ~lost) != '0) ? lowest(vote_mask & ~lost)
                                                     : lowest(vote_mask);
          end
        end
        default: ;
      endcase
    end
  end

  // A pop must never be issued while a tracked FIFO is empty.
  assert property (@(posedge clk) disable iff (!rst_n) strobe |-> ((bf & sync_mask) == sync_mask));
  // The output register only changes when it is free or being read.
  assert property (@(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> $stable(out_data));
endmodule
