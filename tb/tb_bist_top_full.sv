// tb_bist_top_full: the engine and memory at their default sizes (1K one-bit
// words, 90-bit register file), untouched. The tester fills the 90-bit register
// with March G, the longest algorithm the register is sized for, runs it to
// test end and checks the cycle count, every memory operation, the pass
// verdict and, through the system port, the final all-zero background. It then
// reloads the register with March C- and runs again.
module tb_bist_top_full;
  import bist_pkg::*;
  import bist_tb_pkg::*;

  localparam int ADDR_W = 10, N = 1 << ADDR_W, DATA_W = 1, CNT_W = 16;

  logic clk = 0, rst_n = 0;
  logic ate_clear = 0, ate_shift_en = 0, ate_data_in = 0, bist_start = 0;
  logic sys_en = 0, sys_we = 0;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic [DATA_W-1:0] sys_wdata = '0;
  logic bist_busy, bist_done, bist_fail;
  logic [ADDR_W-1:0] bist_fail_addr;
  logic [CNT_W-1:0] bist_fail_cnt;
  logic [DATA_W-1:0] sys_rdata;
  int checks = 0, failures = 0;

  bist_top dut (.*);

  always #5 clk = ~clk;

  acc_t exp_q[$];
  int op_errs = 0;
  always @(posedge clk) if (rst_n && bist_busy && dut.mem_en) begin
    acc_t e;
    if (exp_q.size() == 0) op_errs++;
    else begin
      e = exp_q.pop_front();
      if (dut.mem_we != e.we || dut.mem_addr != ADDR_W'(e.addr) ||
          (e.we && dut.mem_wdata != {DATA_W{e.data}})) op_errs++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(string name, alg_t alg);
    bit bits[$];
    int cyc;
    encode(alg, bits);
    @(negedge clk); ate_clear = 1;
    @(negedge clk); ate_clear = 0;
    foreach (bits[i]) begin
      ate_shift_en = 1; ate_data_in = bits[i];
      @(negedge clk);
    end
    ate_shift_en = 0;
    check(int'(dut.len) == bits.size(), {name, ": loaded length"});
    accesses(alg, N, exp_q);
    op_errs = 0;
    @(negedge clk); bist_start = 1; @(negedge clk); bist_start = 0;
    cyc = 0;
    while (!bist_done) begin @(negedge clk); cyc++; end
    check(cyc == run_cycles(alg, N), $sformatf("%s: %0d cycles, expected %0d", name, cyc, run_cycles(alg, N)));
    check(op_errs == 0 && exp_q.size() == 0, {name, ": operation sequence"});
    check(!bist_fail && bist_fail_cnt == 0, {name, ": pass"});
    for (int a = 0; a < N; a += 37) begin
      @(negedge clk); sys_en = 1; sys_we = 0; sys_addr = ADDR_W'(a);
      @(negedge clk); sys_en = 0;
      check(sys_rdata == '0, {name, ": final background"});
    end
    $display("%s: %0d bits, %0d cycles", name, bits.size(), cyc);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run("March G", march_g());
    check(dut.len == 90, "March G fills the 90-bit register");
    run("March C-", march_c_minus());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
