// dilogic_pkg: sizes, function codes and word formats shared by the DILOGIC-2
// sparse-data-scan readout processor.
//
// Sizes that follow the chip description: 64 channels in groups of 16, 12-bit
// amplitudes, 8-bit pedestal and threshold fields, an 18-bit I/O bus, a
// 512-word analog data FIFO, a 64 x 16-bit bit-map memory, a 7-bit hit counter,
// an 11-bit event counter and an almost-full preset that defaults to 67.
// The one-bit end-event tag kept beside each data FIFO word is this design's
// own choice: it lets the FIFO find event boundaries for readout and delete.
package dilogic_pkg;

  localparam int unsigned NCH      = 64;  // channels per chip
  localparam int unsigned GRP      = 16;  // channels per group / pattern word
  localparam int unsigned CHW      = 6;   // channel address width
  localparam int unsigned AW       = 12;  // amplitude width
  localparam int unsigned PW       = 8;   // pedestal / threshold width
  localparam int unsigned DW       = 18;  // I/O bus and data FIFO word width
  localparam int unsigned HITW     = 7;   // hit counter width (end-event D06-D00)
  localparam int unsigned EVW      = 11;  // event counter width (end-event D17-D07)
  localparam int unsigned DFIFO_DEPTH = 512;
  localparam int unsigned BMAP_DEPTH  = 64;
  localparam int unsigned AF_PRESET_DEFAULT = 67;

  // 4-bit function code; 0010..0111 are no-operation codes.
  typedef enum logic [3:0] {
    FC_TEST      = 4'b0000,  // front-end test mode
    FC_PRESET    = 4'b0001,  // load almost-full preset
    FC_PAT_RD    = 4'b1000,  // pattern readout
    FC_PAT_DEL   = 4'b1001,  // pattern delete
    FC_ANA_RD    = 4'b1010,  // analog readout
    FC_ANA_DEL   = 4'b1011,  // analog delete
    FC_RST_PTR   = 4'b1100,  // reset FIFO pointers
    FC_RST_CHAIN = 4'b1101,  // reset daisy chain
    FC_CFG_WR    = 4'b1110,  // configuration write
    FC_CFG_RD    = 4'b1111   // configuration read
  } fcode_e;

  // Analog data word: channel address on D17-D12, amplitude on D11-D00.
  typedef struct packed {
    logic [CHW-1:0] chaddr;
    logic [AW-1:0]  ampl;
  } data_word_t;

  // End-event word: event number on D17-D07, hit count on D06-D00.
  typedef struct packed {
    logic [EVW-1:0]  evnum;
    logic [HITW-1:0] nhits;
  } ee_word_t;

  // One data FIFO entry: the 18-bit bus word plus its end-event tag.
  typedef struct packed {
    logic          ee;
    logic [DW-1:0] word;
  } fifo_entry_t;

endpackage
