// tb_bist_top: end-to-end test of the engine with its memory, acting as the
// external tester. Two engines share the tester inputs: one with a fault-free
// memory at the default size, one whose memory has a stuck-at-1 cell.
//
// For each of MATS+, March C-, March B and March G the tester fills the memory
// through the system port, shifts the algorithm in serially, starts the engine
// and waits for test end. Checked: every memory operation on the array side of
// the multiplexer against the sequence worked out from the algorithm; the
// start-to-done cycle count; pass on the good memory; fail, first failing
// address and number of failing reads on the faulty one; that system requests
// made during the test do not reach the memory; and, through the system port
// afterwards, that the memory holds the algorithm's final background.
// Each mechanism (serial load, reload, ascending and descending elements,
// multi-operation elements, address stepping, delay hold, compared reads,
// fault detection, system access, blocked system request) is counted and must
// occur at least once.
module tb_bist_top;
  import bist_pkg::*;
  import bist_tb_pkg::*;

  localparam int ROW_W = 5, COL_W = 5, ADDR_W = ROW_W + COL_W, N = 1 << ADDR_W;
  localparam int DATA_W = 1, CNT_W = 16;
  localparam int FA = 357;

  logic clk = 0, rst_n = 0;
  logic ate_clear = 0, ate_shift_en = 0, ate_data_in = 0, bist_start = 0;
  logic sys_en = 0, sys_we = 0;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic [DATA_W-1:0] sys_wdata = '0;
  logic bist_busy, bist_done, bist_fail;
  logic [ADDR_W-1:0] bist_fail_addr;
  logic [CNT_W-1:0] bist_fail_cnt;
  logic [DATA_W-1:0] sys_rdata;
  logic f_busy, f_done, f_fail;
  logic [ADDR_W-1:0] f_fail_addr;
  logic [CNT_W-1:0] f_fail_cnt;
  logic [DATA_W-1:0] f_rdata;
  int checks = 0, failures = 0;

  bist_top dut (.*);

  bist_top #(.FAULT_EN(1'b1), .FAULT_ADDR(FA), .FAULT_BIT(0), .FAULT_VAL(1'b1)) dut_f (
    .clk, .rst_n, .ate_clear, .ate_shift_en, .ate_data_in, .bist_start,
    .bist_busy(f_busy), .bist_done(f_done), .bist_fail(f_fail),
    .bist_fail_addr(f_fail_addr), .bist_fail_cnt(f_fail_cnt),
    .sys_en, .sys_we, .sys_addr, .sys_wdata, .sys_rdata(f_rdata)
  );

  always #5 clk = ~clk;

  // mechanism counters
  int n_shift = 0, n_reload = 0, n_asc = 0, n_desc = 0, n_multi = 0, n_step = 0;
  int n_dly = 0, n_read = 0, n_detect = 0, n_sys = 0, n_blocked = 0;

  always @(posedge clk) if (rst_n) begin
    if (ate_shift_en) n_shift++;
    if (dut.ag_init && dut.ag_dir_up) n_asc++;
    if (dut.ag_init && !dut.ag_dir_up) n_desc++;
    if (dut.dec_state == ST_OP && !dut.u_dec.op.ee) n_multi++;
    if (dut.ag_step) n_step++;
    if (dut.dec_state == ST_DLY) n_dly++;
    if (dut.cmp_en) n_read++;
    if (dut_f.cmp_err) n_detect++;
    if (sys_en && !bist_busy) n_sys++;
    if (sys_en && bist_busy) n_blocked++;
  end

  // operation monitor on the array side of the multiplexer
  acc_t exp_q[$];
  int op_errs = 0;
  always @(posedge clk) if (rst_n && bist_busy && dut.mem_en) begin
    acc_t e;
    if (exp_q.size() == 0) begin
      op_errs++;
    end else begin
      e = exp_q.pop_front();
      if (dut.mem_we != e.we || dut.mem_addr != ADDR_W'(e.addr) ||
          (e.we && dut.mem_wdata != {DATA_W{e.data}})) begin
        if (op_errs < 5)
          $display("FAIL op: we=%0b a=%0d d=%0b, exp we=%0b a=%0d d=%0b",
                   dut.mem_we, dut.mem_addr, dut.mem_wdata, e.we, e.addr, e.data);
        op_errs++;
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sys_write(int a, logic [DATA_W-1:0] d);
    @(negedge clk); sys_en = 1; sys_we = 1; sys_addr = ADDR_W'(a); sys_wdata = d;
    @(negedge clk); sys_en = 0; sys_we = 0;
  endtask

  task automatic sys_read(int a, output logic [DATA_W-1:0] d, output logic [DATA_W-1:0] df);
    @(negedge clk); sys_en = 1; sys_we = 0; sys_addr = ADDR_W'(a);
    @(negedge clk); sys_en = 0; d = sys_rdata; df = f_rdata;
  endtask

  task automatic ate_load(alg_t alg);
    bit bits[$];
    encode(alg, bits);
    @(negedge clk); ate_clear = 1;
    @(negedge clk); ate_clear = 0;
    foreach (bits[i]) begin
      ate_shift_en = 1; ate_data_in = bits[i];
      @(negedge clk);
    end
    ate_shift_en = 0;
  endtask

  task automatic run(string name, alg_t alg);
    int cyc, exp_cyc, blk;
    logic [DATA_W-1:0] d, df;
    // system mode: scribble on the memory and read some of it back
    for (int i = 0; i < 8; i++) begin
      int a = $urandom_range(0, N - 1);
      logic [DATA_W-1:0] v = DATA_W'($urandom);
      sys_write(a, v);
      sys_read(a, d, df);
      check(d == v, {name, ": system write/read"});
    end
    ate_load(alg);
    n_reload++;
    check(int'(dut.len) == code_bits(alg), {name, ": loaded length is 3*(elements+operations)"});
    accesses(alg, N, exp_q);
    op_errs = 0;
    exp_cyc = run_cycles(alg, N);
    @(negedge clk); bist_start = 1; @(negedge clk); bist_start = 0;
    cyc = 0;
    blk = $urandom_range(1000, 2000);
    while (!bist_done && cyc < 500000) begin
      // a system write attempted mid-test must not land
      if (cyc == blk) begin sys_en = 1; sys_we = 1; sys_addr = ADDR_W'(7); sys_wdata = '1; end
      else begin sys_en = 0; sys_we = 0; end
      @(negedge clk);
      cyc++;
    end
    sys_en = 0; sys_we = 0;
    check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    check(op_errs == 0 && exp_q.size() == 0,
          $sformatf("%s: operation sequence (%0d wrong, %0d missing)", name, op_errs, exp_q.size()));
    check(!bist_fail && bist_fail_cnt == 0, {name, ": good memory passes"});
    check(f_done, {name, ": faulty engine done too"});
    check(f_fail && f_fail_addr == ADDR_W'(FA) && f_fail_cnt == CNT_W'(stuck_fails(alg, 1'b1)),
          $sformatf("%s: faulty memory: fail=%0b addr=%0d cnt=%0d, expected addr=%0d cnt=%0d",
                    name, f_fail, f_fail_addr, f_fail_cnt, FA, stuck_fails(alg, 1'b1)));
    // final background is 0 everywhere; the blocked write at 7 never landed
    sys_read(7, d, df);
    check(d == '0, {name, ": system write during test was blocked"});
    for (int i = 0; i < 16; i++) begin
      int a = $urandom_range(0, N - 1);
      sys_read(a, d, df);
      check(d == '0, {name, ": final background"});
    end
    $display("%s: %0d bits, %0d cycles, faulty memory: %0d failing reads",
             name, dut.len, cyc, f_fail_cnt);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run("MATS+", mats_plus());
    run("March C-", march_c_minus());
    run("March B", march_b());
    run("March G", march_g());
    check(n_shift > 0, "serial load happened");
    check(n_reload > 1, "algorithm reload happened");
    check(n_asc > 0, "ascending element happened");
    check(n_desc > 0, "descending element happened");
    check(n_multi > 0, "multi-operation element happened");
    check(n_step > 0, "address stepping happened");
    check(n_dly > 0, "delay hold happened");
    check(n_read > 0, "compared read happened");
    check(n_detect > 0, "fault detection happened");
    check(n_sys > 0, "system access happened");
    check(n_blocked > 0, "blocked system request happened");
    $display("counts: shift=%0d reload=%0d asc=%0d desc=%0d multi=%0d step=%0d dly=%0d read=%0d detect=%0d sys=%0d blocked=%0d",
             n_shift, n_reload, n_asc, n_desc, n_multi, n_step, n_dly, n_read, n_detect, n_sys, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
