// port_fifo: word FIFO between one processor's communication port and the
// voter. Four are used on the outbound side (OFIFO 1-4: processor -> voter)
// and four on the inbound side (IP1-IP4: bus -> processor).
//
// The voter watches the status flags rather than the read data: on the
// outbound side "buffer full" (bf) says that at least one complete word is
// waiting, on the inbound side "buffer empty" (be) says that the processor has
// taken every word loaded so far. Depth and the push/pop handshake are this
// design's choice; the document names the FIFOs and their flags only.
//
// Interface: push with wr_en when !full; pop with rd_en when bf. The head word
// is always visible on rd_data (first-word fall-through). A push into a full
// FIFO or a pop from an empty one is ignored. One clock, synchronous
// active-low reset.
module port_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         bf,        // buffer full: a word is available
  output logic         be,        // buffer empty
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rptr, wptr;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && (count != DEPTH[$bits(count)-1:0]);
  assign do_rd = rd_en && (count != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  assign rd_data = mem[rptr];
  assign full    = (count == DEPTH[$bits(count)-1:0]);
  assign bf      = (count != '0);
  assign be      = (count == '0);
endmodule
