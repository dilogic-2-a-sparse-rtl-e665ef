// tb_bitmap_fifo: random writes, reads and event deletes of 1 to 4 words on
// the bit-map memory, compared every cycle with a queue model; also fills it
// beyond 64 words to check that a full memory drops writes, and checks the
// pointer reset.
module tb_bitmap_fifo;
  localparam int DEPTH = 64;

  logic clk = 0, rst_n, ptr_rst, wr, rd, del, empty, full;
  logic [15:0] wdata, rdata;
  logic [2:0]  del_nw;

  bitmap_fifo dut (.clk, .rst_n, .ptr_rst, .wr, .wdata, .rd, .rdata, .del, .del_nw,
                   .empty, .full);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] q [$];

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic step();
    logic [15:0] w = wdata;
    int skip;
    bit was_full;
    @(posedge clk);
    was_full = (q.size() == DEPTH);
    if (ptr_rst) q.delete();
    else begin
      if (del) begin
        skip = (del_nw < q.size()) ? del_nw : q.size();
        repeat (skip) void'(q.pop_front());
      end else if (rd && q.size() != 0) void'(q.pop_front());
      if (wr && !was_full) q.push_back(w);
    end
    @(negedge clk);
    wr = 0; rd = 0; del = 0; ptr_rst = 0;
    check("empty", empty, q.size() == 0);
    check("full", full, q.size() == DEPTH);
    if (q.size() != 0) check("head", rdata, q[0]);
  endtask

  initial begin
    rst_n = 0; wr = 0; rd = 0; del = 0; ptr_rst = 0; wdata = 0; del_nw = 1;
    @(negedge clk); rst_n = 1;
    check("empty after reset", empty, 1);
    for (int n = 0; n < 3000; n++) begin
      wr = ($urandom_range(0, 2) != 0); wdata = 16'($urandom);
      rd = ($urandom_range(0, 2) == 0);
      del = ($urandom_range(0, 20) == 0); del_nw = 3'($urandom_range(1, 4));
      step();
    end
    for (int n = 0; n < DEPTH + 4; n++) begin wr = 1; wdata = 16'($urandom); step(); end
    check("full after overfill", full, 1);
    del = 1; del_nw = 3'd4; step();
    check("delete of 4 words", 64 - 4, q.size());
    ptr_rst = 1; step();
    check("empty after pointer reset", empty, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
