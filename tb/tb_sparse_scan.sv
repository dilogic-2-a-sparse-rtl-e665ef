// tb_sparse_scan: exhaustive corners plus random vectors for the comparator /
// subtractor. The expected keep flag and stored value are computed with plain
// integer arithmetic from the rule: with SubCmp high keep when ampl > th and
// store max(ampl - ped, 0); with SubCmp low keep everything, raw.
module tb_sparse_scan;
  logic        subcmp;
  logic [11:0] ampl;
  logic [7:0]  th, ped;
  logic        keep;
  logic [11:0] value;
  int checks = 0, failures = 0;

  sparse_scan dut (.subcmp, .ampl, .th, .ped, .keep, .value);

  task automatic check_one(input logic s, input int a, input int t, input int p);
    int  exp_v;
    bit  exp_k;
    subcmp = s; ampl = 12'(a); th = 8'(t); ped = 8'(p);
    #1;
    if (s) begin
      exp_k = (a > t);
      exp_v = (a >= p) ? a - p : 0;
    end else begin
      exp_k = 1'b1;
      exp_v = a;
    end
    checks++;
    if (keep !== exp_k || int'(value) != exp_v) begin
      failures++;
      $display("FAIL s=%0d a=%0d th=%0d ped=%0d: keep=%0d value=%0d exp %0d/%0d",
               s, a, t, p, keep, value, exp_k, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners around the threshold
    check_one(1, 100, 100, 50);
    check_one(1, 101, 100, 50);
    check_one(1,  99, 100, 50);
    check_one(1, 4095, 255, 255);
    check_one(1, 0, 0, 0);
    check_one(1, 1, 0, 0);
    check_one(1, 30, 10, 40);   // threshold under pedestal: clamp to 0
    check_one(0, 5, 200, 100);
    check_one(0, 4095, 0, 255);
    for (int i = 0; i < 2000; i++)
      check_one(1'($urandom), $urandom_range(0, 4095), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
