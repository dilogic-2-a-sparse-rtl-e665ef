// data_fifo: the analog data FIFO and its controller.
//
// DEPTH words of one fifo_entry_t each: the 18-bit word (a channel's
// {address, amplitude} or an end-event word) plus the end-event tag. Written by
// the front-end, read by the back-end; both sides may act in the same cycle.
//
// Flags (active low, as on the chip's pins):
//   empty_n        low when the FIFO holds nothing;
//   noadata_n      low when it holds no analog word, only end-event words
//                  (or nothing at all);
//   almost_full_n  low once the write pointer has come within the preset of
//                  the read pointer, i.e. when the free space is <= preset.
// The 9-bit preset is loaded with preset_ld and defaults to 67 after rst_n.
//
// Event delete: a pulse on del_start drops the oldest event: one word per
// clock is discarded, up to and including its end-event word (del_busy is
// high meanwhile; it waits if the FIFO runs empty mid-event). ptr_rst clears
// both pointers, which empties the FIFO. A write to a full FIFO is dropped.
// The end-event tag, the word-per-clock delete and the drop-on-full rule are
// this design's own choices.
//
// Timing: rdata shows the oldest word combinationally; rd pops it on the
// clock edge. rst_n is the asynchronous back-end reset (Rst_N).
module data_fifo
  import dilogic_pkg::*;
#(
  parameter int unsigned DEPTH      = 512,
  parameter int unsigned AF_DEFAULT = 67,
  localparam int unsigned PTRW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ptr_rst,
  input  logic          wr,
  input  fifo_entry_t   wdata,
  input  logic          rd,
  output fifo_entry_t   rdata,
  input  logic          preset_ld,
  input  logic [PTRW-1:0] preset_val,
  input  logic          del_start,
  output logic          del_busy,
  output logic          empty_n,
  output logic          noadata_n,
  output logic          almost_full_n,
  output logic          full
);

  fifo_entry_t     mem [DEPTH];
  logic [PTRW:0]   wptr, rptr;
  logic [PTRW:0]   count;
  logic [PTRW:0]   acount;     // analog (non end-event) words held
  logic [PTRW-1:0] preset;
  logic            empty, do_wr, do_rd;

  assign count = wptr - rptr;
  assign empty = (count == '0);
  assign full  = (count == (PTRW+1)'(DEPTH));
  assign rdata = mem[rptr[PTRW-1:0]];

  assign do_wr = wr && !full;
  assign do_rd = (rd || del_busy) && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[PTRW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      acount   <= '0;
      preset   <= PTRW'(AF_DEFAULT);
      del_busy <= 1'b0;
    end else if (ptr_rst) begin
      wptr     <= '0;
      rptr     <= '0;
      acount   <= '0;
      del_busy <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      acount <= acount + (PTRW+1)'(do_wr && !wdata.ee) - (PTRW+1)'(do_rd && !rdata.ee);
      if (preset_ld) preset <= preset_val;
      if (del_start) del_busy <= 1'b1;
      else if (del_busy && do_rd && rdata.ee) del_busy <= 1'b0;
    end
  end

  assign empty_n       = !empty;
  assign noadata_n     = (acount != '0);
  assign almost_full_n = !(((PTRW+1)'(DEPTH) - count) <= (PTRW+1)'(preset));

endmodule
