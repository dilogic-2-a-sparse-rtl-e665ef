// bitmap_fifo: the BIT-MAP memory, DEPTH words x W bits, used as a FIFO.
//
// Each word is the hit pattern of 16 channels of one event (bit i set when
// channel 16*k+i was above threshold); an event leaves 1 to 4 words, one per
// group of 16 channels. The front-end writes a word after every 16th sample;
// the back-end reads them out in order during pattern readout.
//
// del drops the oldest event unread: the read pointer jumps by del_nw words
// (the words per event), or to the write pointer if fewer are held. ptr_rst
// clears both pointers. A write to a full memory is dropped. The FIFO
// organisation, the one-cycle delete and the drop-on-full rule are this
// design's own choices; the chip description gives the size and content.
//
// Timing: rdata shows the oldest word combinationally; rd pops it on the clock
// edge. rst_n is the asynchronous back-end reset.
module bitmap_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 16,
  localparam int unsigned PTRW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ptr_rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  input  logic         del,
  input  logic [2:0]   del_nw,
  output logic         empty,
  output logic         full
);

  logic [W-1:0]  mem [DEPTH];
  logic [PTRW:0] wptr, rptr, count, skip;
  logic          do_wr;

  assign count = wptr - rptr;
  assign empty = (count == '0);
  assign full  = (count == (PTRW+1)'(DEPTH));
  assign rdata = mem[rptr[PTRW-1:0]];
  assign do_wr = wr && !full;
  assign skip  = ((PTRW+1)'(del_nw) < count) ? (PTRW+1)'(del_nw) : count;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[PTRW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (ptr_rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (del)             rptr <= rptr + skip;
      else if (rd && !empty) rptr <= rptr + 1'b1;
    end
  end

endmodule
