// tb_dilogic2: end-to-end test of two DILOGIC-2 chips in a daisy chain on one
// 18-bit bus, at the chip's own sizes (64 channels, 512-word data FIFO, 64-word
// bit-map memory).
//
// The testbench acts as the ADC and as the readout processor. It loads
// thresholds and pedestals into both chips through the chain, reads them back,
// sends 64-channel events with random amplitudes, reads the pattern words and
// the analog data of each event through the chain, deletes an event, runs an
// empty event, a bypass (SubCmp low) event and a test-mode event, loads the
// almost-full preset until the flag falls, and resets the FIFO pointers.
// Every bus word is compared with a model of each chip kept by the
// testbench; the end-event word must be written 65 clocks after the trigger.
// Each mechanism is counted, and one that never happened counts as a failure.
module tb_dilogic2;
  import dilogic_pkg::*;

  localparam int NCHIP = 2;

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
  logic        bus_mack_n;

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

  // the shared bus: a driving chip wins, otherwise the host drives it
  always_comb begin
    bus = host_d;
    bus_mack_n = 1'b1;
    for (int c = 0; c < NCHIP; c++) begin
      if (d_oe[c]) bus = d_out[c];
      if (mack_oe[c] && !mack_n[c]) bus_mack_n = 1'b0;
    end
  end

  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_conflict = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (d_oe[0] && d_oe[1] && rst_n) n_conflict++;
  end

  // mechanism counters
  typedef enum int {M_CFG_WR, M_CFG_RD, M_PAT_RD, M_ANA_RD, M_PAT_DEL, M_ANA_DEL,
                    M_PRESET, M_ALMOST_FULL, M_PTR_RST, M_CHAIN_RST, M_HANDOVER,
                    M_TEST_MODE, M_BYPASS, M_NOADATA, M_OVERLAP, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"config write", "config read", "pattern readout",
    "analog readout", "pattern delete", "analog delete", "preset load", "almost full",
    "pointer reset", "chain reset", "enable handover", "test mode", "SubCmp bypass",
    "no analog data", "front-end during readout"};

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------------------------------------------------------- models
  logic [7:0]  th   [NCHIP][64];
  logic [7:0]  ped  [NCHIP][64];
  logic [18:0] mdq  [NCHIP][$];     // expected data FIFO contents
  logic [15:0] mbq  [NCHIP][$];     // expected bit-map contents
  int          mev  [NCHIP];        // next event number

  // ------------------------------------------------------------ bus cycles
  logic [17:0] seen_word;
  logic        seen_oe, seen_mack;
  task automatic strobe(input logic [17:0] d = '0);
    @(negedge clk); strin_n = 0; host_d = d;
    repeat (3) @(negedge clk);
    seen_word = bus; seen_oe = d_oe[0] || d_oe[1]; seen_mack = bus_mack_n;
    strin_n = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic chain_reset();
    fcode = FC_RST_CHAIN; strobe();
    for (int c = 0; c < NCHIP; c++) check("EnOut_N high after chain reset", enout_n[c], 1);
    mech[M_CHAIN_RST]++;
  endtask

  // ----------------------------------------------------------- front-end
  // one event on both chips; mode 0: random, 1: all below threshold on chip 1,
  // 2: test mode (same bus sample to both chips)
  task automatic send_event(input int mode);
    int n = 16 * (int'(nrofgx) + 1);
    int hits [NCHIP];
    int a [NCHIP];
    logic [15:0] pw [NCHIP];
    int t0;
    for (int c = 0; c < NCHIP; c++) begin hits[c] = 0; pw[c] = '0; end
    @(negedge clk); trg = 1; t0 = cycle;
    @(negedge clk); trg = 0;
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < NCHIP; c++) begin
        if (mode == 2)      a[c] = (c == 0) ? $urandom_range(0, 4095) : a[0];
        else if (mode == 1 && c == 1) a[c] = $urandom_range(0, th[c][i]);
        else                a[c] = (i % 2) ? $urandom_range(0, 300) : $urandom_range(0, 4095);
        ampl[c] = 12'(a[c]); chaddr[c] = 6'(i);
        if (mode == 2) begin ampl[c] = 12'($urandom); chaddr[c] = 6'($urandom); end
        if (!subcmp || a[c] > th[c][i]) begin
          mdq[c].push_back({1'b0, 6'(i), subcmp ? 12'((a[c] >= ped[c][i]) ? a[c] - ped[c][i] : 0) : 12'(a[c])});
          hits[c]++;
          pw[c][i % 16] = 1'b1;
        end
        if (i % 16 == 15) begin mbq[c].push_back(pw[c]); pw[c] = '0; end
      end
      if (mode == 2) host_d = {6'(i), 12'(a[0])};
      @(negedge clk);
      // the front-end end-event clock: Mack_N low exactly 65 clocks after Trg
      if (i == n - 1) begin
        check("end-event clock", cycle - t0, n + 1);
        check("Mack_N low at end-event", bus_mack_n, 0);
      end
    end
    for (int c = 0; c < NCHIP; c++) begin
      mdq[c].push_back({1'b1, 11'(mev[c]), 7'(hits[c])});
      mev[c]++;
    end
    @(negedge clk);
  endtask

  // ------------------------------------------------------------ readout
  // read one event from every chip; checks words, Mack_N and the handover
  task automatic read_analog();
    logic [18:0] e;
    fcode = FC_ANA_RD; enin_n = 0;
    for (int c = 0; c < NCHIP; c++) begin
      check("chip enabled in turn", (c == 0) ? 0 : enout_n[c-1], 0);
      if (c > 0) mech[M_HANDOVER]++;
      do begin
        e = mdq[c].pop_front();
        strobe();
        check("analog bus driven", seen_oe, 1);
        check($sformatf("analog word chip %0d", c), seen_word, e[17:0]);
        check("Mack_N marks end-event", seen_mack, !e[18]);
      end while (!e[18]);
      check("EnOut_N low after end-event", enout_n[c], 0);
    end
    mech[M_ANA_RD]++;
    chain_reset();
  endtask

  task automatic read_pattern();
    int nw = int'(nrofgx) + 1;
    fcode = FC_PAT_RD; enin_n = 0;
    for (int c = 0; c < NCHIP; c++) begin
      for (int w = 0; w < nw; w++) begin
        check("EnOut_N high during pattern", enout_n[c], 1);
        strobe();
        check("pattern bus driven", seen_oe, 1);
        check($sformatf("pattern word chip %0d", c), seen_word, 18'(mbq[c].pop_front()));
      end
      check("EnOut_N low after pattern", enout_n[c], 0);
    end
    mech[M_PAT_RD]++;
    chain_reset();
  endtask

  task automatic delete_event();
    int nw = int'(nrofgx) + 1;
    logic [18:0] e;
    fcode = FC_PAT_DEL; strobe();
    fcode = FC_ANA_DEL; strobe();
    repeat (70) @(negedge clk);  // the data FIFO drops one word per clock
    for (int c = 0; c < NCHIP; c++) begin
      repeat (nw) void'(mbq[c].pop_front());
      do e = mdq[c].pop_front(); while (!e[18]);
    end
    mech[M_PAT_DEL]++;
    mech[M_ANA_DEL]++;
  endtask

  initial begin
    for (int c = 0; c < NCHIP; c++) begin mev[c] = 0; ampl[c] = 0; chaddr[c] = 0; end
    clr_n = 0; rst_n = 0; trg = 0; subcmp = 1; strin_n = 1; enin_n = 1;
    nrofgx = 2'b11; fcode = FC_RST_CHAIN; host_d = '0;
    repeat (3) @(negedge clk);
    clr_n = 1; rst_n = 1;
    for (int c = 0; c < NCHIP; c++) begin
      check("Empty_N low after reset", empty_n[c], 0);
      check("AlmostFull_N high after reset", almost_full_n[c], 1);
    end

    // configuration write of both chips through the chain: 2 x 64 strobes
    for (int c = 0; c < NCHIP; c++)
      for (int i = 0; i < 64; i++) begin
        ped[c][i] = 8'($urandom_range(10, 150));
        th[c][i]  = 8'(ped[c][i] + $urandom_range(3, 90));
      end
    fcode = FC_CFG_WR; enin_n = 0;
    for (int c = 0; c < NCHIP; c++) begin
      for (int i = 0; i < 64; i++) strobe({2'b0, ped[c][i], th[c][i]});
      check("EnOut_N after 64 config words", enout_n[c], 0);
    end
    mech[M_CFG_WR]++;
    chain_reset();

    // configuration read back
    fcode = FC_CFG_RD;
    for (int c = 0; c < NCHIP; c++) begin
      for (int i = 0; i < 64; i++) begin
        strobe();
        check($sformatf("config read chip %0d ch %0d", c, i), seen_word, {2'b0, ped[c][i], th[c][i]});
      end
      if (c > 0) mech[M_HANDOVER]++;
    end
    check("last EnOut_N low after config read", enout_n[NCHIP-1], 0);
    mech[M_CFG_RD]++;
    chain_reset();

    // three events, then pattern and analog readout of the first
    repeat (3) send_event(0);
    for (int c = 0; c < NCHIP; c++) check("Empty_N high with events", empty_n[c], 1);
    read_pattern();
    read_analog();
    // delete the second event, read the third
    delete_event();
    read_pattern();
    read_analog();
    for (int c = 0; c < NCHIP; c++) check("Empty_N low when all read", empty_n[c], 0);

    // empty event on chip 1: only its end-event word is held
    send_event(1);
    check("NoAData_N low on chip 1", noadata_n[1], 0);
    check("Empty_N high on chip 1", empty_n[1], 1);
    check("NoAData_N high on chip 0", noadata_n[0], 1);
    if (!noadata_n[1] && empty_n[1]) mech[M_NOADATA]++;
    read_pattern();
    read_analog();

    // a new event arrives while the previous one is read out
    send_event(0);
    fork
      read_analog();
      begin repeat (10) @(negedge clk); send_event(0); mech[M_OVERLAP]++; end
    join
    read_pattern();
    read_pattern();
    read_analog();

    // SubCmp low: all 64 channels, raw amplitudes
    subcmp = 0;
    send_event(0);
    mech[M_BYPASS]++;
    subcmp = 1;
    read_pattern();
    read_analog();

    // test mode: samples through the bus, 32 channels
    nrofgx = 2'b01;
    fcode = FC_TEST;
    send_event(2);
    mech[M_TEST_MODE]++;
    read_pattern();
    read_analog();
    nrofgx = 2'b11;

    // almost-full preset: flag falls once the free space is within the preset
    fcode = FC_PRESET; strobe(18'd440);
    mech[M_PRESET]++;
    send_event(0);
    for (int c = 0; c < NCHIP; c++)
      check("AlmostFull_N after one event", almost_full_n[c], !(512 - mdq[c].size() <= 440));
    repeat (2) send_event(0);
    check("AlmostFull_N low on chip 0",
          almost_full_n[0], !(512 - mdq[0].size() <= 440));
    check("AlmostFull_N low on chip 1",
          almost_full_n[1], !(512 - mdq[1].size() <= 440));
    if (!almost_full_n[0] || !almost_full_n[1]) mech[M_ALMOST_FULL]++;
    // reset the FIFO pointers: memories cleared
    fcode = FC_RST_PTR; strobe();
    mech[M_PTR_RST]++;
    for (int c = 0; c < NCHIP; c++) begin
      mdq[c].delete(); mbq[c].delete();
      check("Empty_N low after pointer reset", empty_n[c], 0);
      check("AlmostFull_N high after pointer reset", almost_full_n[c], 1);
    end
    send_event(0);
    read_pattern();
    read_analog();

    check("bus conflicts", n_conflict, 0);
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s happened %0d times", mech_name[m], mech[m]);
      check($sformatf("mechanism %s happened", mech_name[m]), mech[m] > 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
