// tb_addr_gen: checks the address generator against a reference counter.
// Presets in both directions, steps through a whole element and checks every
// address, the row/column split and the last-address flag, then applies
// random init/step traffic.
module tb_addr_gen;
  localparam int ROW_W = 3, COL_W = 2, N = 1 << (ROW_W + COL_W);

  logic clk = 0, rst_n = 0;
  logic init = 0, dir_up = 0, step = 0;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic at_end;
  int checks = 0, failures = 0;

  addr_gen #(.ROW_W(ROW_W), .COL_W(COL_W)) dut (.*);

  always #5 clk = ~clk;

  int ref_addr;
  bit ref_up;

  task automatic check_now(string what);
    checks++;
    if ({row, col} != ref_addr[ROW_W+COL_W-1:0] ||
        at_end != (ref_up ? ref_addr == N - 1 : ref_addr == 0)) begin
      failures++;
      $display("FAIL %s: addr=%0d exp=%0d at_end=%0b", what, {row, col}, ref_addr, at_end);
    end
  endtask

  task automatic cyc(bit i, bit d, bit s);
    init = i; dir_up = d; step = s;
    @(posedge clk); #1;
    if (i) begin ref_up = d; ref_addr = d ? 0 : N - 1; end
    else if (s) ref_addr = ref_up ? (ref_addr + 1) % N : (ref_addr + N - 1) % N;
    init = 0; step = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 1; d >= 0; d--) begin
      int ends;
      ends = 0;
      cyc(1, d[0], 0);
      check_now("init");
      for (int k = 0; k < N; k++) begin
        if (at_end) ends++;
        if (k < N - 1) begin cyc(0, 0, 1); check_now("step"); end
      end
      checks++;
      if (ends != 1 || !at_end) begin failures++; $display("FAIL at_end count %0d", ends); end
    end
    // row is the upper part of the address
    cyc(1, 1, 0);
    repeat (COL_W == 0 ? 1 : (1 << COL_W) + 1) cyc(0, 0, 1);
    checks++;
    if (row != 1 || col != 1) begin failures++; $display("FAIL row/col split"); end
    ref_addr = {row, col};
    for (int k = 0; k < 500; k++) begin
      cyc($urandom_range(0, 9) == 0, $urandom_range(0, 1), $urandom_range(0, 1));
      check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
