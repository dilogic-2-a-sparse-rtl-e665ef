// tb_data_fifo: drives the analog data FIFO with random writes (data and
// end-event words), reads, event deletes, preset loads and pointer resets,
// and compares every cycle the head word and the Empty_N, NoAData_N,
// AlmostFull_N and full flags with a queue model kept by the testbench.
// It also fills the FIFO to the brim to check the almost-full threshold at
// the default preset of 67 and at a loaded preset, and that a full FIFO
// drops writes.
module tb_data_fifo;
  import dilogic_pkg::*;
  localparam int DEPTH = 512;

  logic clk = 0, rst_n, ptr_rst, wr, rd, preset_ld, del_start;
  logic del_busy, empty_n, noadata_n, almost_full_n, full;
  logic [8:0] preset_val;
  fifo_entry_t wdata, rdata;

  data_fifo dut (.clk, .rst_n, .ptr_rst, .wr, .wdata, .rd, .rdata, .preset_ld,
                 .preset_val, .del_start, .del_busy, .empty_n, .noadata_n,
                 .almost_full_n, .full);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [18:0] q [$];
  int  m_preset = 67;
  bit  m_del = 0;
  int  af_low_seen = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (size %0d)", what, got, exp, q.size());
    end
  endtask

  function automatic int acount();
    int n = 0;
    foreach (q[i]) if (!q[i][18]) n++;
    return n;
  endfunction

  task automatic check_outputs();
    check("empty_n", empty_n, q.size() != 0);
    check("noadata_n", noadata_n, acount() != 0);
    check("almost_full_n", almost_full_n, !((DEPTH - q.size()) <= m_preset));
    check("full", full, q.size() == DEPTH);
    check("del_busy", del_busy, m_del);
    if (q.size() != 0) check("head", rdata, q[0]);
    if (!almost_full_n) af_low_seen++;
  endtask

  // apply the chosen inputs for one clock and update the model
  task automatic step();
    logic [18:0] w = wdata;
    bit pop, was_full;
    @(posedge clk);
    was_full = (q.size() == DEPTH);
    if (ptr_rst) begin
      q.delete(); m_del = 0;
    end else begin
      pop = (rd || m_del) && q.size() != 0;
      if (pop) begin
        if (m_del && q[0][18]) m_del = 0;
        void'(q.pop_front());
      end
      if (wr && !was_full) q.push_back(w);
      if (preset_ld) m_preset = preset_val;
      if (del_start) m_del = 1;
    end
    @(negedge clk);
    wr = 0; rd = 0; ptr_rst = 0; preset_ld = 0; del_start = 0;
    check_outputs();
  endtask

  task automatic rand_word();
    wdata.ee   = ($urandom_range(0, 5) == 0);
    wdata.word = 18'($urandom);
  endtask

  initial begin
    rst_n = 0; wr = 0; rd = 0; ptr_rst = 0; preset_ld = 0; del_start = 0;
    preset_val = 0; wdata = '0;
    @(negedge clk); rst_n = 1;
    check_outputs();
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      wr = ($urandom_range(0, 2) != 0); rand_word();
      rd = ($urandom_range(0, 2) == 0);
      del_start = (!m_del && $urandom_range(0, 60) == 0);
      step();
    end
    // only end-event words: NoAData_N low while Empty_N high
    ptr_rst = 1; step();
    for (int n = 0; n < 3; n++) begin wr = 1; wdata = '{ee: 1'b1, word: 18'(n)}; step(); end
    check("noadata_n with only end-events", noadata_n, 0);
    check("empty_n with only end-events", empty_n, 1);
    // fill up at the default preset, then beyond full
    ptr_rst = 1; step();
    for (int n = 0; n < DEPTH + 5; n++) begin wr = 1; rand_word(); step(); end
    check("full after overfill", full, 1);
    // load a preset of 10 and drain: flag must rise when free space passes 10
    preset_ld = 1; preset_val = 9'd10; step();
    for (int n = 0; n < 20; n++) begin rd = 1; step(); end
    // delete events until empty
    wr = 1; wdata = '{ee: 1'b1, word: 18'h0}; step();
    while (acount() != q.size()) begin  // an end-event word is still held
      del_start = 1; step();
      while (m_del) step();
    end
    // reset returns the preset to 67
    rst_n = 0; #1; rst_n = 1; q.delete(); m_preset = 67; m_del = 0;
    @(negedge clk); check_outputs();
    check("almost-full ever low", af_low_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
