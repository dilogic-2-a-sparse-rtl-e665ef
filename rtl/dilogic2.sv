// dilogic2: one DILOGIC-2 sparse-data-scan readout processor.
//
// The chip takes the digitised samples of up to 64 front-end channels (four
// 16-channel groups multiplexed on one ADC), removes the channels at or below
// their threshold, subtracts each kept channel's pedestal, and buffers the
// result for readout over an 18-bit bus shared by a daisy chain of chips.
//
//   frontend      per trigger: reads 16/32/48/64 samples, one per clock, then
//                 writes the end-event word (hits, event number) on one more
//                 clock; in test mode the samples come from the bus.
//   sparse_scan   (inside frontend) comparator and subtractor.
//   config_mem    per-channel threshold and pedestal memories, 64 x 8 each.
//   data_fifo     512-word analog data FIFO with the Empty_N, NoAData_N and
//                 AlmostFull_N flags and the almost-full preset.
//   bitmap_fifo   64 x 16 bit-map memory of hit patterns.
//   backend_ctrl  function-code controller, daisy chain, bus and strobes.
// Front-end and back-end run at the same time on separate memory ports.
//
// Pins follow the chip's, with two departures of this design: the tri-state
// bus is split into d_in, d_out and d_oe (and Mack_N into mack_n and mack_oe),
// and the Clk pin is the single free-running clock of the whole chip, with
// StrIn_N sampled synchronously. Mack_N is also pulled low for the clock in
// which the front-end writes an end-event word.
module dilogic2
  import dilogic_pkg::*;
(
  input  logic            clk,
  input  logic            clr_n,          // front-end clear (Clr_N)
  input  logic            rst_n,          // back-end reset (Rst_N)
  // front-end
  input  logic            trg,
  input  logic [1:0]      nrofgx,
  input  logic            subcmp,
  input  logic [AW-1:0]   ampl,
  input  logic [CHW-1:0]  chaddr,
  // back-end
  input  logic [3:0]      fcode,
  input  logic            strin_n,
  input  logic            enin_n,
  output logic            enout_n,
  input  logic [DW-1:0]   d_in,
  output logic [DW-1:0]   d_out,
  output logic            d_oe,
  output logic            mack_n,
  output logic            mack_oe,
  // flags
  output logic            empty_n,
  output logic            noadata_n,
  output logic            almost_full_n
);

  // front-end <-> memories
  logic [CHW-1:0] fe_addr;
  logic [PW-1:0]  fe_th, fe_ped;
  logic           dwr, bwr, fe_mack_n, fe_busy, test_mode;
  fifo_entry_t    dwr_data, d_head;
  logic [GRP-1:0] bwr_data, b_head;
  // back-end <-> memories
  logic           d_rd, d_del, d_del_busy, d_full, preset_ld, ptr_rst;
  logic [8:0]     preset_val;
  logic           b_rd, b_del, b_empty, b_full;
  logic [2:0]     b_del_nw;
  logic           cfg_we;
  logic [CHW-1:0] cfg_addr;
  logic [PW-1:0]  cfg_wth, cfg_wped, cfg_rth, cfg_rped;
  logic           be_mack_n, be_mack_oe;

  frontend u_fe (
    .clk, .clr_n, .trg, .nrofgx, .subcmp, .test_mode, .ampl, .chaddr,
    .bus_in   (d_in),
    .th_addr  (fe_addr),
    .th       (fe_th),
    .ped      (fe_ped),
    .dwr, .dwr_data, .bwr, .bwr_data,
    .mack_n   (fe_mack_n),
    .busy     (fe_busy)
  );

  config_mem #(.NCH(NCH), .PW(PW)) u_cfg (
    .clk,
    .we      (cfg_we),
    .waddr   (cfg_addr),
    .wth     (cfg_wth),
    .wped    (cfg_wped),
    .fe_addr (fe_addr),
    .fe_th   (fe_th),
    .fe_ped  (fe_ped),
    .be_addr (cfg_addr),
    .be_th   (cfg_rth),
    .be_ped  (cfg_rped)
  );

  data_fifo #(.DEPTH(DFIFO_DEPTH), .AF_DEFAULT(AF_PRESET_DEFAULT)) u_dfifo (
    .clk, .rst_n, .ptr_rst,
    .wr         (dwr),
    .wdata      (dwr_data),
    .rd         (d_rd),
    .rdata      (d_head),
    .preset_ld,
    .preset_val,
    .del_start  (d_del),
    .del_busy   (d_del_busy),
    .empty_n,
    .noadata_n,
    .almost_full_n,
    .full       (d_full)
  );

  bitmap_fifo #(.DEPTH(BMAP_DEPTH), .W(GRP)) u_bmap (
    .clk, .rst_n, .ptr_rst,
    .wr     (bwr),
    .wdata  (bwr_data),
    .rd     (b_rd),
    .rdata  (b_head),
    .del    (b_del),
    .del_nw (b_del_nw),
    .empty  (b_empty),
    .full   (b_full)
  );

  backend_ctrl u_be (
    .clk, .rst_n, .fcode, .strin_n, .enin_n,
    .bus_in    (d_in),
    .nrofgx,
    .enout_n,
    .bus_out   (d_out),
    .bus_oe    (d_oe),
    .mack_n    (be_mack_n),
    .mack_oe   (be_mack_oe),
    .test_mode,
    .d_head,
    .d_empty_n (empty_n),
    .d_rd, .d_del, .preset_ld, .preset_val, .ptr_rst,
    .b_head, .b_empty, .b_rd, .b_del, .b_del_nw,
    .cfg_we, .cfg_addr, .cfg_wth, .cfg_wped, .cfg_rth, .cfg_rped
  );

  assign mack_n  = fe_mack_n && be_mack_n;
  assign mack_oe = be_mack_oe || !fe_mack_n;

endmodule
