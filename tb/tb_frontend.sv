// tb_frontend: runs events of 16, 32, 48 and 64 channels through the front-end
// sequencer with random amplitudes, thresholds and pedestals, with SubCmp on
// and off, and in test mode with the samples on the bus. Every data FIFO and
// bit-map write is captured and compared with the list the testbench computes
// itself; the end-event word must come 16*k+1 clocks after the trigger, with
// Mack_N low in that clock, and carry the hit count and the event number.
module tb_frontend;
  import dilogic_pkg::*;

  logic clk = 0, clr_n, trg, subcmp, test_mode;
  logic [1:0]  nrofgx;
  logic [11:0] ampl;
  logic [5:0]  chaddr, th_addr;
  logic [17:0] bus_in;
  logic [7:0]  th, ped;
  logic        dwr, bwr, mack_n, busy;
  fifo_entry_t dwr_data;
  logic [15:0] bwr_data;

  logic [7:0] th_mem [64], ped_mem [64];
  assign th  = th_mem[th_addr];
  assign ped = ped_mem[th_addr];

  frontend dut (.clk, .clr_n, .trg, .nrofgx, .subcmp, .test_mode, .ampl, .chaddr,
                .bus_in, .th_addr, .th, .ped, .dwr, .dwr_data, .bwr, .bwr_data,
                .mack_n, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic [18:0] got_d [$];
  int          got_d_cyc [$];
  logic [15:0] got_b [$];
  logic [18:0] exp_d [$];
  logic [15:0] exp_b [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dwr) begin got_d.push_back(dwr_data); got_d_cyc.push_back(cycle); end
    if (bwr) got_b.push_back(bwr_data);
    if (dwr && dwr_data.ee) begin
      checks++;
      if (mack_n) begin failures++; $display("FAIL mack_n high at end-event"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  // one event; chaddr runs 0..N-1 in order
  task automatic run_event(input int ng, input bit sc, input bit tm, input int evn);
    int n = 16 * (ng + 1);
    int hits = 0;
    int a, t0;
    logic [15:0] pw;
    got_d.delete(); got_d_cyc.delete(); got_b.delete(); exp_d.delete(); exp_b.delete();
    nrofgx = 2'(ng); subcmp = sc; test_mode = tm;
    @(negedge clk);
    trg = 1;
    @(posedge clk); t0 = cycle;
    @(negedge clk);
    trg = 0;
    pw = '0;
    for (int i = 0; i < n; i++) begin
      a = (i % 3 == 0) ? $urandom_range(0, 255) : $urandom_range(0, 4095);
      if (tm) begin bus_in = {6'(i), 12'(a)}; ampl = 12'($urandom); chaddr = 6'($urandom); end
      else    begin ampl = 12'(a); chaddr = 6'(i); bus_in = 18'($urandom); end
      if (!sc || a > th_mem[i]) begin
        exp_d.push_back({1'b0, 6'(i), sc ? 12'((a >= ped_mem[i]) ? a - ped_mem[i] : 0) : 12'(a)});
        hits++;
        pw[i % 16] = 1'b1;
      end
      if (i % 16 == 15) begin exp_b.push_back(pw); pw = '0; end
      @(negedge clk);
    end
    exp_d.push_back({1'b1, 11'(evn), 7'(hits)});
    repeat (3) @(negedge clk);
    check("data word count", got_d.size(), exp_d.size());
    for (int i = 0; i < exp_d.size() && i < got_d.size(); i++)
      check($sformatf("data word %0d", i), got_d[i], exp_d[i]);
    check("pattern word count", got_b.size(), exp_b.size());
    for (int i = 0; i < exp_b.size() && i < got_b.size(); i++)
      check($sformatf("pattern word %0d", i), got_b[i], exp_b[i]);
    if (got_d_cyc.size() > 0)
      check("end-event clock after trigger", got_d_cyc[got_d_cyc.size()-1] - t0, n + 1);
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      ped_mem[i] = 8'($urandom_range(20, 120));
      th_mem[i]  = 8'(ped_mem[i] + $urandom_range(0, 100));
    end
    clr_n = 0; trg = 0; subcmp = 1; test_mode = 0; nrofgx = 0;
    ampl = 0; chaddr = 0; bus_in = 0;
    repeat (2) @(negedge clk);
    clr_n = 1;
    run_event(0, 1, 0, 0);
    run_event(1, 1, 0, 1);
    run_event(2, 1, 0, 2);
    run_event(3, 1, 0, 3);
    run_event(3, 0, 0, 4);   // SubCmp off: every channel, raw
    run_event(1, 1, 1, 5);   // test mode: samples from the bus
    // Clr_N restarts the event numbering
    clr_n = 0; @(negedge clk); clr_n = 1;
    run_event(0, 1, 0, 0);
    check("busy after event", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
