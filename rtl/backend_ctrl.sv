// backend_ctrl: the 4-bit function-code controller and the back-end state
// machine that runs the I/O bus and the daisy chain.
//
// The external processor sets the function code, selects the first chip of a
// chain by pulling its EnIn_N low, and gives StrIn_N cycles (low, then high).
// Per function code:
//   1010 analog readout   each StrIn_N cycle puts the oldest data FIFO word on
//                         the bus, from the falling to the rising edge, and
//                         pops it at the rising edge. Mack_N is low while the
//                         end-event word is on the bus; after it the chip is
//                         done and pulls EnOut_N low, enabling the next chip.
//   1000 pattern readout  likewise with the bit-map words of one event
//                         (nrofgx+1 words, on D15-D00).
//   1110 config write     64 StrIn_N cycles; at each rising edge the bus word is
//                         written for channel 0, 1, ... 63, then EnOut_N low.
//   1111 config read      64 StrIn_N cycles; channel k's values are driven from
//                         the falling to the rising edge, then EnOut_N low.
//   1001 / 1011 delete    at the rising edge the oldest event is dropped from
//                         the bit-map / data FIFO.
//   0001 preset load      at the rising edge D08-D00 goes to the almost-full
//                         preset register.
//   1100 reset pointers   at the rising edge both FIFOs are emptied.
//   1101 or 0xxx          at the rising edge the state machine returns to its
//                         start state: EnOut_N high, bus and Mack_N released.
//   0000                  also selects front-end test mode (test_mode out).
// A chip that is done stays done, passing the enable on, until a chain reset.
//
// Configuration words carry the threshold on D07-D00 and the pedestal on
// D15-D08 (this design's choice; the description does not give the layout).
// The delete, preset and pointer-reset codes act on every chip at once, without
// EnIn_N (also this design's choice). If a chip selected for readout holds no
// event it passes the enable at the first StrIn_N falling edge without driving
// the bus.
//
// Timing: StrIn_N is sampled by clk, so it must be synchronous to clk and each
// of its phases must last at least two clocks. Bus data appear one clock after
// the falling edge is seen and are released one clock after the rising edge.
// rst_n is the asynchronous back-end reset (Rst_N).
module backend_ctrl
  import dilogic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        fcode,
  input  logic              strin_n,
  input  logic              enin_n,
  input  logic [DW-1:0]     bus_in,
  input  logic [1:0]        nrofgx,
  output logic              enout_n,
  output logic [DW-1:0]     bus_out,
  output logic              bus_oe,
  output logic              mack_n,
  output logic              mack_oe,
  output logic              test_mode,
  // data FIFO
  input  fifo_entry_t       d_head,
  input  logic              d_empty_n,
  output logic              d_rd,
  output logic              d_del,
  output logic              preset_ld,
  output logic [8:0]        preset_val,
  output logic              ptr_rst,
  // bit-map FIFO
  input  logic [GRP-1:0]    b_head,
  input  logic              b_empty,
  output logic              b_rd,
  output logic              b_del,
  output logic [2:0]        b_del_nw,
  // threshold / pedestal memories
  output logic              cfg_we,
  output logic [CHW-1:0]    cfg_addr,
  output logic [PW-1:0]     cfg_wth,
  output logic [PW-1:0]     cfg_wped,
  input  logic [PW-1:0]     cfg_rth,
  input  logic [PW-1:0]     cfg_rped
);

  typedef enum logic [1:0] {BE_START, BE_ACTIVE, BE_DONE} be_state_e;

  be_state_e       state;
  logic            str_q;      // StrIn_N one clock ago
  logic            fall, rise;
  logic            chain_mode, chain_rst, sel;
  logic [CHW-1:0]  cnt;        // config channel / pattern word of the event
  logic            have;       // a word is on the bus
  logic            out_ee;     // it is an end-event word
  logic            mid;        // analog event partly read
  logic [DW-1:0]   out_word;
  logic [2:0]      nw;

  assign fall = str_q && !strin_n;
  assign rise = !str_q && strin_n;
  assign nw   = 3'(nrofgx) + 3'd1;

  always_comb begin
    chain_mode = 1'b0;
    unique case (fcode)
      FC_PAT_RD, FC_ANA_RD, FC_CFG_WR, FC_CFG_RD: chain_mode = 1'b1;
      default:                                    chain_mode = 1'b0;
    endcase
  end

  assign chain_rst = (fcode == FC_RST_CHAIN) || !fcode[3];
  assign sel = (state == BE_ACTIVE) || (state == BE_START && !enin_n && chain_mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= BE_START;
      str_q    <= 1'b1;
      cnt      <= '0;
      have     <= 1'b0;
      out_ee   <= 1'b0;
      mid      <= 1'b0;
      out_word <= '0;
    end else begin
      str_q <= strin_n;
      if (rise && chain_rst) begin
        state <= BE_START;
        cnt   <= '0;
        have  <= 1'b0;
        mid   <= 1'b0;
      end else begin
        if (state == BE_START && sel) state <= BE_ACTIVE;
        if (sel) begin
          unique case (fcode)
            FC_ANA_RD: begin
              if (fall) begin
                if (d_empty_n) begin
                  out_word <= d_head.word;
                  out_ee   <= d_head.ee;
                  have     <= 1'b1;
                end else if (!mid) begin
                  state <= BE_DONE;
                end
              end else if (rise && have) begin
                have <= 1'b0;
                mid  <= !out_ee;
                if (out_ee) state <= BE_DONE;
              end
            end
            FC_PAT_RD: begin
              if (fall) begin
                if (!b_empty) begin
                  out_word <= DW'(b_head);
                  out_ee   <= 1'b0;
                  have     <= 1'b1;
                end else if (cnt == '0) begin
                  state <= BE_DONE;
                end
              end else if (rise && have) begin
                have <= 1'b0;
                if (cnt == CHW'(nw - 3'd1)) begin
                  cnt   <= '0;
                  state <= BE_DONE;
                end else begin
                  cnt <= cnt + 1'b1;
                end
              end
            end
            FC_CFG_WR: begin
              if (rise) begin
                cnt <= cnt + 1'b1;
                if (cnt == '1) state <= BE_DONE;
              end
            end
            FC_CFG_RD: begin
              if (fall) begin
                out_word <= DW'({cfg_rped, cfg_rth});
                out_ee   <= 1'b0;
                have     <= 1'b1;
              end else if (rise && have) begin
                have <= 1'b0;
                cnt  <= cnt + 1'b1;
                if (cnt == '1) state <= BE_DONE;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  // strobed side effects
  assign d_rd       = sel && fcode == FC_ANA_RD && rise && have;
  assign b_rd       = sel && fcode == FC_PAT_RD && rise && have;
  assign cfg_we     = sel && fcode == FC_CFG_WR && rise;
  assign cfg_addr   = cnt;
  assign cfg_wth    = bus_in[PW-1:0];
  assign cfg_wped   = bus_in[2*PW-1:PW];
  assign preset_ld  = rise && fcode == FC_PRESET;
  assign preset_val = bus_in[8:0];
  assign d_del      = rise && fcode == FC_ANA_DEL;
  assign b_del      = rise && fcode == FC_PAT_DEL;
  assign b_del_nw   = nw;
  assign ptr_rst    = rise && fcode == FC_RST_PTR;
  assign test_mode  = (fcode == FC_TEST);

  // pins
  assign enout_n = (state != BE_DONE);
  assign bus_out = out_word;
  assign bus_oe  = have;
  assign mack_n  = !(have && out_ee);
  assign mack_oe = (state != BE_START);

  // a FIFO is never popped when empty
  assert property (@(posedge clk) disable iff (!rst_n) d_rd |-> d_empty_n);
  assert property (@(posedge clk) disable iff (!rst_n) b_rd |-> !b_empty);

endmodule
