// tb_ad_board: an A/D board in slot 2 with a behavioural model of its eight
// sample-and-holds and converters (each input is a different ramp; a
// conversion takes CONV cycles and returns the values held at its start).
// Checks that the board's own update address, the global sample-all and the
// sample-and-update-all address start all eight channels together, that
// other boards' and output-only update addresses do not, that 'ready' covers
// the conversion, and that bus reads of the eight channels return the
// simultaneously sampled values with correct check bits, also when one bus
// bit is flipped.
module tb_ad_board;
  import mbc_pkg::*;
  import sec_ref_pkg::*;

  localparam logic [BOARD_BITS-1:0] SLOT = 6'd2;
  localparam int CONV = 20;

  logic clk = 0, rst_n = 0;
  iobus_req_t bus_req;
  iobus_rsp_t bus_rsp;
  logic conv_start, conv_done, ready, ev_corr;
  logic [CONV_W-1:0] adc_code [CH_PER_BOARD];

  ad_board #(.SLOT(SLOT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- analog side: input ch is 100*ch + 3*time, sampled on conv_start
  int tcount = 0, busy_left = 0, n_starts = 0;
  logic [CONV_W-1:0] held [CH_PER_BOARD];
  logic [CONV_W-1:0] expect_res [CH_PER_BOARD];
  function automatic logic [CONV_W-1:0] analog(input int ch, input int t);
    return CONV_W'(100 * ch + 3 * t + 1000);
  endfunction
  always @(posedge clk) begin
    tcount++;
    conv_done <= 1'b0;
    if (rst_n && conv_start) begin
      n_starts++;
      for (int i = 0; i < CH_PER_BOARD; i++) held[i] = analog(i, tcount);
      busy_left = CONV;
    end else if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) begin
        conv_done <= 1'b1;
        for (int i = 0; i < CH_PER_BOARD; i++) adc_code[i] <= held[i];
      end
    end
  end

  // ---- bus master
  task automatic bus_cycle(input bit wr, input logic [BUS_ADDR_W-1:0] a,
                           input logic [BUS_DATA_W-1:0] d, input int flip);
    iobus_req_t b;
    b.cyc = 3'b111; b.wr = {3{wr}};
    b.addr = a; b.achk = ADDR_CHK_W'(sec_chk(32'(a), BUS_ADDR_W, ADDR_CHK_W));
    b.wdata = d; b.wchk = DATA_CHK_W'(sec_chk(32'(d), BUS_DATA_W, DATA_CHK_W));
    if (flip >= 0) b.addr[flip] = ~b.addr[flip];
    @(negedge clk);
    bus_req = b;
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic bus_read(input logic [BUS_ADDR_W-1:0] a, input int flip,
                          output logic [BUS_DATA_W-1:0] v);
    bus_cycle(1'b0, a, '0, flip);
    @(negedge clk);
    check(bus_rsp.rchk == DATA_CHK_W'(sec_chk(32'(bus_rsp.rdata), BUS_DATA_W, DATA_CHK_W)),
          "read check bits");
    v = bus_rsp.rdata;
  endtask

  task automatic sample_and_check(input logic [BUS_ADDR_W-1:0] a, input bit should_start);
    int s0 = n_starts;
    logic [BUS_DATA_W-1:0] v;
    bus_cycle(1'b1, a, 16'h0, -1);
    @(negedge clk);
    check((n_starts == s0 + 1) == should_start, $sformatf("start on address %h", a));
    if (should_start) begin
      check(!ready, "ready low during conversion");
      for (int i = 0; i < CH_PER_BOARD; i++) expect_res[i] = held[i];
      repeat (CONV + 2) @(negedge clk);
      check(ready, "ready after conversion");
    end
    for (int i = 0; i < CH_PER_BOARD; i++) begin
      bus_read({1'b0, SLOT, 3'(i)}, (i == 3) ? 4 : -1, v);
      check(v == BUS_DATA_W'(expect_res[i]), $sformatf("channel %0d result", i));
    end
    // all eight hold values from the same instant
    for (int i = 1; i < CH_PER_BOARD; i++)
      check(expect_res[i] - expect_res[0] == CONV_W'(100 * i), "simultaneous sampling");
  endtask

  initial begin
    bus_req = '0;
    for (int i = 0; i < CH_PER_BOARD; i++) begin adc_code[i] = '0; expect_res[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    sample_and_check(UPD_BASE | 10'(SLOT), 1);
    sample_and_check(ADDR_SAMPLE_ALL, 1);
    sample_and_check(ADDR_UPDATE_ALL, 0);
    sample_and_check(UPD_BASE | 10'(SLOT + 1), 0);
    sample_and_check(ADDR_BOTH_ALL, 1);
    sample_and_check({1'b0, SLOT, 3'd1}, 0);
    check(n_starts == 3, "three conversions");
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
