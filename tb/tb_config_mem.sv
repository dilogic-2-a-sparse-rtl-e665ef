// tb_config_mem: writes random thresholds and pedestals to all 64 channels,
// then reads them back through both read ports in random order and compares
// them with a reference copy kept by the testbench.
module tb_config_mem;
  logic       clk = 0;
  logic       we;
  logic [5:0] waddr, fe_addr, be_addr;
  logic [7:0] wth, wped, fe_th, fe_ped, be_th, be_ped;
  logic [7:0] ref_th [64], ref_ped [64];
  int checks = 0, failures = 0;

  config_mem dut (.clk, .we, .waddr, .wth, .wped, .fe_addr, .fe_th, .fe_ped,
                  .be_addr, .be_th, .be_ped);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wth = 0; wped = 0; fe_addr = 0; be_addr = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ref_th[i]  = 8'($urandom);
      ref_ped[i] = 8'($urandom);
      we = 1; waddr = 6'(i); wth = ref_th[i]; wped = ref_ped[i];
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      fe_addr = 6'($urandom);
      be_addr = 6'($urandom);
      #1;
      check("fe_th",  fe_th,  ref_th[fe_addr]);
      check("fe_ped", fe_ped, ref_ped[fe_addr]);
      check("be_th",  be_th,  ref_th[be_addr]);
      check("be_ped", be_ped, ref_ped[be_addr]);
      @(negedge clk);
    end
    // overwrite one channel; the others must keep their values
    we = 1; waddr = 6'd17; wth = 8'hA5; wped = 8'h3C; ref_th[17] = 8'hA5; ref_ped[17] = 8'h3C;
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 64; i++) begin
      fe_addr = 6'(i); be_addr = 6'(63 - i);
      #1;
      check("fe_th",  fe_th,  ref_th[i]);
      check("be_ped", be_ped, ref_ped[63 - i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
