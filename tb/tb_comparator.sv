// tb_comparator: issues random reads with expected values, returns read data
// one cycle later (correct, or with a random bit flipped) and checks that err
// and err_addr flag exactly the mismatching reads, in the following cycle.
module tb_comparator;
  localparam int DATA_W = 4, ADDR_W = 6;

  logic clk = 0, rst_n = 0;
  logic cmp_en = 0, exp_bit = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] rdata = '0;
  logic err;
  logic [ADDR_W-1:0] err_addr;
  int checks = 0, failures = 0, n_err = 0;

  comparator #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit p_en, p_exp, p_bad;
    logic [ADDR_W-1:0] p_addr;
    p_en = 0; p_exp = 0; p_bad = 0; p_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      // the request sampled at this edge becomes the pending one
      @(posedge clk);
      p_en = cmp_en; p_exp = exp_bit; p_addr = addr;
      p_bad = $urandom_range(0, 3) == 0;
      #1;
      // a new request is already on the inputs while the old one is compared
      cmp_en = $urandom_range(0, 2) != 0;
      exp_bit = $urandom_range(0, 1);
      addr = ADDR_W'($urandom);
      if (p_en) begin
        rdata = {DATA_W{p_exp}};
        if (p_bad) rdata[$urandom_range(0, DATA_W - 1)] ^= 1'b1;
      end else begin
        rdata = DATA_W'($urandom);  // not a BIST read: must be ignored
      end
      #1;
      checks++;
      if (err != (p_en && p_bad) || (err && err_addr != p_addr)) begin
        failures++;
        $display("FAIL k=%0d err=%0b exp=%0b addr=%0d/%0d", k, err, p_en && p_bad, err_addr, p_addr);
      end
      if (err) n_err++;
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL no errors seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
