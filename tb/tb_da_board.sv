// tb_da_board: a D/A board in slot 3. Channel writes must fill the temporary
// buffers without touching the converter inputs; a write to the board's own
// update address, update-all or sample-and-update-all must move all eight at
// once (dac_load), while sample-all and other boards' update addresses must
// not. Some writes carry a flipped address or data bit, which the board must
// correct. Writes to another board's channels must be ignored.
module tb_da_board;
  import mbc_pkg::*;
  import sec_ref_pkg::*;

  localparam logic [BOARD_BITS-1:0] SLOT = 6'd3;

  logic clk = 0, rst_n = 0;
  iobus_req_t bus_req;
  iobus_rsp_t bus_rsp;
  logic [CONV_W-1:0] dac_code [CH_PER_BOARD];
  logic dac_load, ev_corr;

  da_board #(.SLOT(SLOT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_loads = 0, n_corr = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dac_load) n_loads++;
    if (ev_corr) n_corr++;
  end

  task automatic bus_write(input logic [BUS_ADDR_W-1:0] a, input logic [BUS_DATA_W-1:0] d,
                           input int flip);
    iobus_req_t b;
    b.cyc = 3'b111; b.wr = 3'b111;
    b.addr = a; b.achk = ADDR_CHK_W'(sec_chk(32'(a), BUS_ADDR_W, ADDR_CHK_W));
    b.wdata = d; b.wchk = DATA_CHK_W'(sec_chk(32'(d), BUS_DATA_W, DATA_CHK_W));
    if (flip >= 100) b.wdata[flip - 100] = ~b.wdata[flip - 100];
    else if (flip >= 0) b.addr[flip] = ~b.addr[flip];
    @(negedge clk);
    bus_req = b;
    @(negedge clk);
    bus_req = '0;
  endtask

  logic [CONV_W-1:0] shown [CH_PER_BOARD];
  logic [CONV_W-1:0] buffered [CH_PER_BOARD];

  task automatic round(input logic [BUS_ADDR_W-1:0] upd, input bit moves, input int r);
    int l0;
    for (int i = 0; i < CH_PER_BOARD; i++) begin
      buffered[i] = CONV_W'($urandom);
      bus_write({1'b0, SLOT, 3'(i)}, 16'(buffered[i]) | 16'hC000,
                (i == 2) ? 5 : (i == 5) ? 107 : -1);
      // a write to another board's channel must not land here
      bus_write({1'b0, SLOT + 6'd1, 3'(i)}, 16'h1234, -1);
    end
    repeat (2) @(negedge clk);
    for (int i = 0; i < CH_PER_BOARD; i++)
      check(dac_code[i] == shown[i], "outputs unchanged before update");
    l0 = n_loads;
    bus_write(upd, 16'h0, -1);
    repeat (2) @(negedge clk);
    check((n_loads == l0 + 1) == moves, $sformatf("load pulse round %0d", r));
    if (moves) for (int i = 0; i < CH_PER_BOARD; i++) shown[i] = buffered[i];
    for (int i = 0; i < CH_PER_BOARD; i++)
      check(dac_code[i] == shown[i], $sformatf("channel %0d after update round %0d", i, r));
  endtask

  initial begin
    bus_req = '0;
    for (int i = 0; i < CH_PER_BOARD; i++) shown[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    round(UPD_BASE | 10'(SLOT), 1, 0);
    round(ADDR_SAMPLE_ALL, 0, 1);
    round(ADDR_UPDATE_ALL, 1, 2);
    round(UPD_BASE | 10'(SLOT - 1), 0, 3);
    round(ADDR_BOTH_ALL, 1, 4);
    check(n_loads == 3, "three updates");
    check(n_corr == 10, $sformatf("corrected bus bits (%0d)", n_corr));
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
