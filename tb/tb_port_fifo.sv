// tb_port_fifo: random pushes and pops against a queue reference model;
// checks head data, the buffer-full (word available) and buffer-empty flags,
// the full flag, the count, and that pushes into a full FIFO are dropped.
module tb_port_fifo;
  localparam int W = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, bf, be;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  port_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // compare visible state with the model
      check(bf == (model.size() != 0), "bf");
      check(be == (model.size() == 0), "be");
      check(full == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      // phases: fill-biased, drain-biased, mixed
      wr_en   = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 80 : 25));
      rd_en   = ($urandom_range(0, 99) < ((cyc / 500) % 2 == 0 ? 25 : 80));
      wr_data = $urandom;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model updated on the clock edge with the values applied
  always @(posedge clk) if (rst_n) begin
    automatic bit do_rd = rd_en && model.size() != 0;
    automatic bit do_wr = wr_en && model.size() != DEPTH;
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(wr_data);
  end
endmodule
