// tb_bist_top_sizes: runs MATS+ on memories of 1K, 128K and 1M one-bit words
// (the small, mid and large end of the memory sizes the engine is meant for),
// each with a stuck-at-0 cell. One tester loads and starts all three engines
// together; each must reach test end after exactly 5*N + 5 cycles of MATS+
// (three header cycles, N*(1+2+2) operations, end check and flush) and report one failing read at its faulty address.
module tb_bist_top_sizes;
  import bist_tb_pkg::*;

  localparam int NS = 3;
  localparam int AW [NS] = '{10, 17, 20};
  localparam int FA [NS] = '{1000, 70001, 999999};

  logic clk = 0, rst_n = 0;
  logic ate_clear = 0, ate_shift_en = 0, ate_data_in = 0, bist_start = 0;
  logic [NS-1:0] done, fail, busy;
  int unsigned fail_addr [NS];
  int unsigned fail_cnt [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int A = AW[g];
    logic [A-1:0] fa;
    logic [15:0] fc;
    logic rd;
    bist_top #(.ROW_W(A / 2), .COL_W(A - A / 2), .FAULT_EN(1'b1), .FAULT_ADDR(FA[g]),
               .FAULT_BIT(0), .FAULT_VAL(1'b0)) dut (
      .clk, .rst_n, .ate_clear, .ate_shift_en, .ate_data_in, .bist_start,
      .bist_busy(busy[g]), .bist_done(done[g]), .bist_fail(fail[g]),
      .bist_fail_addr(fa), .bist_fail_cnt(fc),
      .sys_en(1'b0), .sys_we(1'b0), .sys_addr('0), .sys_wdata('0), .sys_rdata(rd)
    );
    assign fail_addr[g] = int'(fa);
    assign fail_cnt[g] = int'(fc);
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bits[$];
    int cyc;
    int done_at [NS];
    repeat (2) @(posedge clk);
    rst_n = 1;
    encode(mats_plus(), bits);
    @(negedge clk); ate_clear = 1;
    @(negedge clk); ate_clear = 0;
    foreach (bits[i]) begin ate_shift_en = 1; ate_data_in = bits[i]; @(negedge clk); end
    ate_shift_en = 0;
    @(negedge clk); bist_start = 1; @(negedge clk); bist_start = 0;
    foreach (done_at[s]) done_at[s] = -1;
    cyc = 0;
    while (done != '1 && cyc < 7000000) begin
      @(negedge clk); cyc++;
      for (int s = 0; s < NS; s++) if (done[s] && done_at[s] < 0) done_at[s] = cyc;
    end
    for (int s = 0; s < NS; s++) begin
      int exp_cyc;
      exp_cyc = run_cycles(mats_plus(), 1 << AW[s]);
      checks++;
      if (done_at[s] != exp_cyc) begin
        failures++; $display("FAIL %0d words: %0d cycles, expected %0d", 1 << AW[s], done_at[s], exp_cyc);
      end
      checks++;
      if (!fail[s] || fail_addr[s] != FA[s] || fail_cnt[s] != stuck_fails(mats_plus(), 1'b0)) begin
        failures++;
        $display("FAIL %0d words: fail=%0b addr=%0d cnt=%0d", 1 << AW[s], fail[s], fail_addr[s], fail_cnt[s]);
      end
      $display("MATS+ on %0d words: %0d cycles, failing address %0d", 1 << AW[s], done_at[s], fail_addr[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
