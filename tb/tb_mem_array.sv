// tb_mem_array: random writes and reads against a reference array, checking the
// one-cycle read latency and that rdata holds between reads; a second instance
// with a stuck-at-1 cell must return 1 in that bit only at that address.
module tb_mem_array;
  localparam int ROW_W = 3, COL_W = 3, DATA_W = 8, N = 1 << (ROW_W + COL_W);
  localparam int FA = 13, FB = 5;

  logic clk = 0;
  logic en = 0, we = 0;
  logic [ROW_W-1:0] row = '0;
  logic [COL_W-1:0] col = '0;
  logic [DATA_W-1:0] wdata = '0, rdata, rdata_f;
  int checks = 0, failures = 0;

  mem_array #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) dut (.*);
  mem_array #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W),
              .FAULT_EN(1'b1), .FAULT_ADDR(FA), .FAULT_BIT(FB), .FAULT_VAL(1'b1))
    dut_f (.clk, .en, .we, .row, .col, .wdata, .rdata(rdata_f));

  always #5 clk = ~clk;

  logic [DATA_W-1:0] ref_mem [N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] last, last_f;
    bit have_read;
    // fill
    for (int a = 0; a < N; a++) begin
      en = 1; we = 1; {row, col} = a; wdata = DATA_W'($urandom);
      ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    last = '0; last_f = '0; have_read = 0;
    for (int k = 0; k < 2000; k++) begin
      int a = $urandom_range(0, N - 1);
      en = $urandom_range(0, 3) != 0; we = $urandom_range(0, 1);
      {row, col} = a; wdata = DATA_W'($urandom);
      @(posedge clk); #1;
      if (en && we) ref_mem[a] = wdata;
      if (en && !we) begin
        last = ref_mem[a];
        last_f = ref_mem[a];
        if (a == FA) last_f[FB] = 1'b1;
        have_read = 1;
      end
      if (have_read) begin
        checks++;
        if (rdata != last || rdata_f != last_f) begin
          failures++;
          $display("FAIL k=%0d a=%0d rdata=%h exp=%h faulty=%h exp=%h", k, a, rdata, last, rdata_f, last_f);
        end
      end
    end
    // stuck cell: write 0 to it and read it back
    en = 1; we = 1; {row, col} = FA; wdata = '0; @(posedge clk); #1;
    we = 0; @(posedge clk); #1; en = 0;
    checks++;
    if (rdata != '0 || rdata_f != DATA_W'(1) << FB) begin
      failures++; $display("FAIL stuck cell %h %h", rdata, rdata_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
