// tb_instr_decoder: runs the decoder on MATS+, March C-, March B and March G
// coded as in the engine's register file, with a behavioural address counter of
// four words around it. Every memory operation it issues (read/write, data or
// expected value, address) is compared with the sequence worked out from the
// algorithm, and the start-to-done cycle count with 1 + N*k + d per element plus
// two. Error pulses on the comparator input check the fail log.
module tb_instr_decoder;
  import bist_pkg::*;
  import bist_tb_pkg::*;

  localparam int REG_BITS = 90;
  localparam int LEN_W = $clog2(REG_BITS + 1);
  localparam int ADDR_W = 2, N = 1 << ADDR_W, CNT_W = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [REG_BITS-1:0] code = '0;
  logic [LEN_W-1:0] len = '0;
  logic ag_init, ag_dir_up, ag_step, ag_at_end;
  logic busy, mem_en, mem_we, mem_data, cmp_en, cmp_exp;
  logic err = 0;
  logic [ADDR_W-1:0] err_addr = '0;
  logic done, fail;
  logic [ADDR_W-1:0] fail_addr;
  logic [CNT_W-1:0] fail_cnt;
  dec_state_e state;
  int checks = 0, failures = 0;

  instr_decoder #(.REG_BITS(REG_BITS), .ADDR_W(ADDR_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  // behavioural address generator
  int a = 0;
  bit up = 1;
  assign ag_at_end = up ? (a == N - 1) : (a == 0);
  always @(posedge clk) begin
    if (ag_init) begin up <= ag_dir_up; a <= ag_dir_up ? 0 : N - 1; end
    else if (ag_step) a <= up ? a + 1 : a - 1;
  end

  // operation monitor
  acc_t exp_q[$];
  int op_errs = 0;
  always @(posedge clk) if (rst_n && mem_en) begin
    acc_t e;
    if (exp_q.size() == 0) begin
      op_errs++; $display("FAIL unexpected operation");
    end else begin
      e = exp_q.pop_front();
      if (mem_we != e.we || a != e.addr || (e.we ? mem_data : cmp_exp) != e.data ||
          cmp_en != !e.we) begin
        op_errs++;
        $display("FAIL op: we=%0b a=%0d d=%0b cmp=%0b/%0b, exp we=%0b a=%0d d=%0b",
                 mem_we, a, mem_data, cmp_en, cmp_exp, e.we, e.addr, e.data);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(alg_t alg);
    bit bits[$];
    encode(alg, bits);
    code = '0;
    foreach (bits[i]) code[bits.size() - 1 - i] = bits[i];
    len = LEN_W'(bits.size());
  endtask

  // Run one algorithm; err_at lists cycles after start to pulse err.
  task automatic run(string name, alg_t alg, int err_at[$]);
    int cyc, exp_cyc, e0;
    logic [ADDR_W-1:0] first_addr;
    load(alg);
    accesses(alg, N, exp_q);
    op_errs = 0;
    exp_cyc = run_cycles(alg, N);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    first_addr = '0;
    e0 = 0;
    while (!done && cyc < 100000) begin
      if (e0 < err_at.size() && err_at[e0] == cyc) begin
        err = 1; err_addr = ADDR_W'($urandom);
        if (e0 == 0) first_addr = err_addr;
        e0++;
      end else err = 0;
      @(negedge clk); err = 0;
      cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL %s cycles %0d exp %0d", name, cyc, exp_cyc); end
    checks++;
    if (op_errs != 0 || exp_q.size() != 0) begin
      failures++; $display("FAIL %s op sequence errs=%0d left=%0d", name, op_errs, exp_q.size());
    end
    checks++;
    if (fail != (err_at.size() != 0) || fail_cnt != err_at.size() ||
        (fail && fail_addr != first_addr)) begin
      failures++;
      $display("FAIL %s fail=%0b cnt=%0d addr=%0d exp cnt=%0d addr=%0d", name, fail, fail_cnt,
               fail_addr, err_at.size(), first_addr);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL %s busy at done", name); end
    $display("%s: %0d bits, %0d cycles", name, len, cyc);
  endtask

  initial begin
    alg_t t;
    int none[$];
    int e1[$];
    int e2[$];
    e1 = {3, 10, 11, 40};
    e2 = {50};
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (busy || done || mem_en) begin failures++; $display("FAIL reset state"); end
    run("MATS+", mats_plus(), none);
    checks++;
    if (len != 24) begin failures++; $display("FAIL MATS+ length"); end
    run("March C-", march_c_minus(), e1);
    run("March B", march_b(), none);
    run("March G", march_g(), e2);
    // delays of every size
    t = mats_plus();
    t[0].dly = 1; t[1].dly = 2; t[2].dly = 3;
    run("MATS+ with delays", t, none);
    // the engine returns the memory to the system while idle
    repeat (3) @(negedge clk);
    checks++;
    if (busy || mem_en || !done) begin failures++; $display("FAIL after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
