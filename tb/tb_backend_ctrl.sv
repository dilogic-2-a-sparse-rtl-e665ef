// tb_backend_ctrl: the back-end state machine against queue models of the two
// FIFOs and an array model of the threshold / pedestal memories.
// StrIn_N cycles of three clocks low and three high are given for each
// function code; the testbench checks the memory writes of configuration
// write, the bus words of configuration read, analog readout (with Mack_N on
// the end-event word) and pattern readout, the moment EnOut_N falls, the
// chain reset, a chip that is not enabled staying off the bus, an empty chip
// passing the enable on, and the single-clock pulses of the delete, preset
// and pointer-reset codes.
module tb_backend_ctrl;
  import dilogic_pkg::*;

  logic clk = 0, rst_n, strin_n, enin_n;
  logic [3:0]  fcode;
  logic [17:0] bus_in, bus_out;
  logic [1:0]  nrofgx;
  logic enout_n, bus_oe, mack_n, mack_oe, test_mode;
  fifo_entry_t d_head;
  logic d_empty_n, d_rd, d_del, preset_ld, ptr_rst;
  logic [8:0] preset_val;
  logic [15:0] b_head;
  logic b_empty, b_rd, b_del;
  logic [2:0] b_del_nw;
  logic cfg_we;
  logic [5:0] cfg_addr;
  logic [7:0] cfg_wth, cfg_wped, cfg_rth, cfg_rped;

  backend_ctrl dut (.*);

  always #5 clk = ~clk;

  // models
  logic [18:0] dq [$];
  logic [15:0] bq [$];
  logic [7:0]  m_th [64], m_ped [64];
  int n_drd = 0, n_brd = 0, n_ddel = 0, n_bdel = 0, n_pre = 0, n_ptr = 0, n_we = 0;
  logic [8:0] last_pre;

  // queue heads are copied into the FIFO outputs after every queue change
  function automatic void refresh();
    d_head    = (dq.size() != 0) ? fifo_entry_t'(dq[0]) : '0;
    d_empty_n = (dq.size() != 0);
    b_head    = (bq.size() != 0) ? bq[0] : '0;
    b_empty   = (bq.size() == 0);
  endfunction
  assign cfg_rth   = m_th[cfg_addr];
  assign cfg_rped  = m_ped[cfg_addr];

  always @(posedge clk) begin
    if (d_rd) begin n_drd++; void'(dq.pop_front()); end
    if (b_rd) begin n_brd++; void'(bq.pop_front()); end
    if (d_del) n_ddel++;
    if (b_del) n_bdel++;
    if (preset_ld) begin n_pre++; last_pre = preset_val; end
    if (ptr_rst) n_ptr++;
    if (cfg_we) begin n_we++; m_th[cfg_addr] = cfg_wth; m_ped[cfg_addr] = cfg_wped; end
    refresh();
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one StrIn_N cycle; bus state sampled late in the low phase
  logic [17:0] seen_word;
  logic        seen_oe, seen_mack;
  task automatic strobe(input logic [17:0] d = '0);
    @(negedge clk); strin_n = 0; bus_in = d;
    repeat (3) @(negedge clk);
    seen_word = bus_out; seen_oe = bus_oe; seen_mack = mack_n;
    strin_n = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic chain_reset();
    fcode = FC_RST_CHAIN; strobe();
    check("enout_n after chain reset", enout_n, 1);
    check("mack_oe after chain reset", mack_oe, 0);
  endtask

  logic [7:0] wt [64], wp [64];
  initial begin
    refresh();
    rst_n = 0; strin_n = 1; enin_n = 1; fcode = FC_RST_CHAIN; bus_in = 0; nrofgx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check("enout_n after reset", enout_n, 1);

    // configuration write
    fcode = FC_CFG_WR; enin_n = 0;
    for (int i = 0; i < 64; i++) begin
      wt[i] = 8'($urandom); wp[i] = 8'($urandom);
      check("enout_n during config write", enout_n, 1);
      strobe({2'b0, wp[i], wt[i]});
    end
    check("enout_n after 64 config writes", enout_n, 0);
    check("config writes", n_we, 64);
    for (int i = 0; i < 64; i++) begin
      check("written threshold", m_th[i], wt[i]);
      check("written pedestal", m_ped[i], wp[i]);
    end
    strobe(18'h3FFFF);   // done chip ignores further strobes
    check("config writes after done", n_we, 64);
    chain_reset();

    // configuration read
    fcode = FC_CFG_RD;
    for (int i = 0; i < 64; i++) begin
      strobe();
      check("config read oe", seen_oe, 1);
      check("config read word", seen_word, {2'b0, wp[i], wt[i]});
      check("config read bus released", bus_oe, 0);
    end
    check("enout_n after config read", enout_n, 0);
    chain_reset();

    // analog readout of two events
    dq.delete();
    dq.push_back({1'b0, 18'h0A123}); dq.push_back({1'b0, 18'h1F456});
    dq.push_back({1'b1, 18'h00402});
    dq.push_back({1'b0, 18'h3C001}); dq.push_back({1'b1, 18'h00C81});
    fcode = FC_ANA_RD;
    enin_n = 1;
    strobe();
    check("disabled chip stays off the bus", seen_oe, 0);
    check("disabled chip pops nothing", n_drd, 0);
    enin_n = 0;
    strobe(); check("analog word 0", seen_word, 18'h0A123); check("mack high on data", seen_mack, 1);
    check("enout_n mid event", enout_n, 1);
    strobe(); check("analog word 1", seen_word, 18'h1F456);
    strobe(); check("end-event word", seen_word, 18'h00402); check("mack low on end-event", seen_mack, 0);
    check("enout_n after end-event", enout_n, 0);
    check("mack high after end-event", mack_n, 1);
    check("words popped", n_drd, 3);
    chain_reset();
    fcode = FC_ANA_RD;
    strobe(); check("analog word of 2nd event", seen_word, 18'h3C001);
    strobe(); check("2nd end-event word", seen_word, 18'h00C81); check("mack low", seen_mack, 0);
    check("enout_n after 2nd event", enout_n, 0);
    chain_reset();
    // empty chip passes the enable at the first strobe
    fcode = FC_ANA_RD;
    strobe();
    check("empty chip off the bus", seen_oe, 0);
    check("empty chip passes enable", enout_n, 0);
    chain_reset();

    // pattern readout, three words per event
    nrofgx = 2'b10;
    for (int i = 0; i < 6; i++) bq.push_back(16'(16'h1111 * (i + 1)));
    fcode = FC_PAT_RD;
    for (int i = 0; i < 3; i++) begin
      check("enout_n during pattern readout", enout_n, 1);
      strobe();
      check("pattern word", seen_word, 18'(16'h1111 * (i + 1)));
    end
    check("enout_n after pattern event", enout_n, 0);
    check("pattern words left", bq.size(), 3);
    chain_reset();

    // broadcast codes: one pulse per strobe, also with EnIn_N high
    enin_n = 1;
    fcode = FC_PAT_DEL; strobe(); check("pattern delete pulses", n_bdel, 1);
    check("pattern delete size", b_del_nw, 3);
    fcode = FC_ANA_DEL; strobe(); strobe(); check("analog delete pulses", n_ddel, 2);
    fcode = FC_PRESET;  strobe(18'h0012C); check("preset pulses", n_pre, 1);
    check("preset value", last_pre, 9'h12C);
    fcode = FC_RST_PTR; strobe(); check("pointer reset pulses", n_ptr, 1);
    fcode = FC_TEST; #1 check("test mode", test_mode, 1);
    fcode = 4'b0101; #1 check("no test mode on nop", test_mode, 0);
    check("nothing else popped", n_drd + n_brd, 5 + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
