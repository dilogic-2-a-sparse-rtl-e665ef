// tb_chain_stream: a long run of the intended operating mode. Four chips
// (256 channels) share one bus in a daisy chain, at the chip's full sizes,
// with a 10 MHz clock. For each event size in turn (16, 32, 48, 64 channels)
// a trigger process sends events with random amplitudes back to back,
// holding off whenever any chip's AlmostFull_N is low or the bit-map is full
// of outstanding events. At the same time a readout process reads each
// complete event through the chain, pattern words first and then the analog
// data, and compares every bus word with a model of each chip. Each size runs
// until NEV x (size / 16) events have been read in all, then the chips are
// drained.
// The run also checks that the almost-full hold-off was exercised and that no
// two chips ever drove the bus together.
module tb_chain_stream;
  import dilogic_pkg::*;

  localparam int NCHIP = 4;
  localparam int NEV   = 20;   // events read per event size

  logic clk = 0, clr_n, rst_n, trg, subcmp, strin_n, enin_n;
  logic [1:0]  nrofgx;
  logic [3:0]  fcode;
  logic [11:0] ampl   [NCHIP];
  logic [5:0]  chaddr [NCHIP];
  logic [17:0] d_out  [NCHIP];
  logic        d_oe [NCHIP], mack_n [NCHIP], mack_oe [NCHIP], enout_n [NCHIP];
  logic        empty_n [NCHIP], noadata_n [NCHIP], almost_full_n [NCHIP];
  logic        en_in [NCHIP];
  logic [17:0] host_d, bus;
  logic        bus_mack_n, any_af;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    assign en_in[c] = (c == 0) ? enin_n : enout_n[c-1];
    dilogic2 u_chip (
      .clk, .clr_n, .rst_n, .trg, .nrofgx, .subcmp,
      .ampl (ampl[c]), .chaddr (chaddr[c]),
      .fcode, .strin_n, .enin_n (en_in[c]), .enout_n (enout_n[c]),
      .d_in (bus), .d_out (d_out[c]), .d_oe (d_oe[c]),
      .mack_n (mack_n[c]), .mack_oe (mack_oe[c]),
      .empty_n (empty_n[c]), .noadata_n (noadata_n[c]), .almost_full_n (almost_full_n[c])
    );
  end

  always_comb begin
    bus = host_d;
    bus_mack_n = 1'b1;
    any_af = 1'b0;
    for (int c = 0; c < NCHIP; c++) begin
      if (d_oe[c]) bus = d_out[c];
      if (mack_oe[c] && !mack_n[c]) bus_mack_n = 1'b0;
      if (!almost_full_n[c]) any_af = 1'b1;
    end
  end

  always #50 clk = ~clk;   // 10 MHz

  int checks = 0, failures = 0;
  int n_conflict = 0, n_holdoff = 0;
  always @(posedge clk) begin
    automatic int drivers = 0;
    for (int c = 0; c < NCHIP; c++) drivers += int'(d_oe[c]);
    if (drivers > 1 && rst_n) n_conflict++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [7:0]  th   [NCHIP][64];
  logic [7:0]  ped  [NCHIP][64];
  logic [18:0] mdq  [NCHIP][$];
  logic [15:0] mbq  [NCHIP][$];
  int          mev  [NCHIP];
  int          ev_written = 0, ev_read = 0;
  bit          done = 0;

  logic [17:0] seen_word;
  logic        seen_oe, seen_mack;
  task automatic strobe(input logic [17:0] d = '0);
    @(negedge clk); strin_n = 0; host_d = d;
    repeat (2) @(negedge clk);
    seen_word = bus; seen_oe = 1'b0;
    for (int c = 0; c < NCHIP; c++) seen_oe |= d_oe[c];
    seen_mack = bus_mack_n;
    strin_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic chain_reset();
    fcode = FC_RST_CHAIN; strobe();
  endtask

  // trigger process: one 64-channel event on all chips
  task automatic send_event();
    int hits [NCHIP];
    int a;
    logic [15:0] pw [NCHIP];
    for (int c = 0; c < NCHIP; c++) begin hits[c] = 0; pw[c] = '0; end
    @(negedge clk); trg = 1;
    @(negedge clk); trg = 0;
    for (int i = 0; i < 16 * (int'(nrofgx) + 1); i++) begin
      for (int c = 0; c < NCHIP; c++) begin
        // mostly pedestal noise, some hits
        a = ($urandom_range(0, 1) == 0) ? $urandom_range(0, 4095)
                                        : ped[c][i] + $urandom_range(0, 20) - 10;
        if (a < 0) a = 0;
        ampl[c] = 12'(a); chaddr[c] = 6'(i);
        if (a > th[c][i]) begin
          mdq[c].push_back({1'b0, 6'(i), 12'((a >= ped[c][i]) ? a - ped[c][i] : 0)});
          hits[c]++;
          pw[c][i % 16] = 1'b1;
        end
        if (i % 16 == 15) begin mbq[c].push_back(pw[c]); pw[c] = '0; end
      end
      @(negedge clk);
    end
    for (int c = 0; c < NCHIP; c++) begin
      mdq[c].push_back({1'b1, 11'(mev[c]), 7'(hits[c])});
      mev[c]++;
    end
    @(negedge clk);
    ev_written++;
  endtask

  task automatic read_event();
    logic [18:0] e;
    fcode = FC_PAT_RD; enin_n = 0;
    for (int c = 0; c < NCHIP; c++)
      for (int w = 0; w <= int'(nrofgx); w++) begin
        strobe();
        check("pattern bus driven", seen_oe, 1);
        check($sformatf("pattern word chip %0d", c), seen_word, 18'(mbq[c].pop_front()));
      end
    check("last EnOut_N after pattern", enout_n[NCHIP-1], 0);
    chain_reset();
    fcode = FC_ANA_RD;
    for (int c = 0; c < NCHIP; c++) begin
      do begin
        e = mdq[c].pop_front();
        strobe();
        check($sformatf("analog word chip %0d", c), seen_word, e[17:0]);
        // Mack_N is also pulsed by front-end end-event writes, so only the
        // end-event words on the bus are checked for it
        if (e[18]) check("Mack_N marks end-event", seen_mack, 0);
      end while (!e[18]);
      check("EnOut_N after end-event", enout_n[c], 0);
    end
    chain_reset();
    ev_read++;
  endtask

  initial begin
    for (int c = 0; c < NCHIP; c++) begin mev[c] = 0; ampl[c] = 0; chaddr[c] = 0; end
    clr_n = 0; rst_n = 0; trg = 0; subcmp = 1; strin_n = 1; enin_n = 1;
    nrofgx = 2'b11; fcode = FC_RST_CHAIN; host_d = '0;
    repeat (3) @(negedge clk);
    clr_n = 1; rst_n = 1;
    // thresholds at pedestal + 3 sigma, with sigma about 4 counts
    for (int c = 0; c < NCHIP; c++)
      for (int i = 0; i < 64; i++) begin
        ped[c][i] = 8'($urandom_range(20, 200));
        th[c][i]  = 8'(ped[c][i] + 12);
      end
    fcode = FC_CFG_WR; enin_n = 0;
    for (int c = 0; c < NCHIP; c++)
      for (int i = 0; i < 64; i++) strobe({2'b0, ped[c][i], th[c][i]});
    check("chain configured", enout_n[NCHIP-1], 0);
    chain_reset();
    // the preset decides how far ahead the trigger process may run
    fcode = FC_PRESET; strobe(18'd67);
    // 16, 32, 48 and 64 channels per chip in turn; each size is drained
    // before the next, since the words per pattern event follow NrofGx
    for (int ng = 0; ng < 4; ng++) begin
      nrofgx = 2'(ng);
      done = 0;
      fork
        begin : triggers
          while (!done) begin
            // the bit-map holds 64/(NrofGx+1) events and has no flag,
            // so the host also limits the events outstanding
            if (any_af || ev_written - ev_read >= 64 / (ng + 1)) begin
              if (any_af) n_holdoff++;
              @(negedge clk);
            end else send_event();
          end
        end
        begin : readout
          while (ev_read < NEV * (ng + 1) || ev_read < ev_written) begin
            if (ev_read < ev_written) read_event();
            else @(negedge clk);
            if (ev_read >= NEV * (ng + 1)) done = 1;
          end
          done = 1;
        end
      join
      while (ev_read < ev_written) read_event();
      for (int c = 0; c < NCHIP; c++) check("drained", empty_n[c], 0);
    end
    check("no bus conflicts", n_conflict, 0);
    check("almost-full hold-off exercised", n_holdoff > 0, 1);
    $display("events written %0d, read %0d, hold-off clocks %0d", ev_written, ev_read, n_holdoff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
