// tb_microcode_reg: shifts bit streams into the register file and checks the
// contents (first bit at index len-1, last at 0), the length count, its
// saturation at the register size, and clear.
module tb_microcode_reg;
  localparam int REG_BITS = 24;
  localparam int LEN_W = $clog2(REG_BITS + 1);

  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0, data_in = 0;
  logic [REG_BITS-1:0] code;
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0;

  microcode_reg #(.REG_BITS(REG_BITS)) dut (.*);

  always #5 clk = ~clk;

  bit sent[$];

  task automatic shift(bit b);
    shift_en = 1; data_in = b;
    @(posedge clk); #1;
    shift_en = 0;
    sent.push_back(b);
  endtask

  task automatic check(string what);
    int n = sent.size() > REG_BITS ? REG_BITS : sent.size();
    checks++;
    if (len != n) begin failures++; $display("FAIL %s len=%0d exp=%0d", what, len, n); end
    for (int i = 0; i < n; i++) begin
      checks++;
      // bit sent i-th from the end sits at index i
      if (code[i] != sent[sent.size() - 1 - i]) begin
        failures++; $display("FAIL %s bit %0d", what, i);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check("reset");
    // MATS+ as printed: 100101 100000111 000010101
    begin
      string s = "100101100000111000010101";
      for (int i = 0; i < s.len(); i++) shift(s[i] == "1");
    end
    check("mats+");
    checks++;
    if (code != 24'b100101100000111000010101) begin failures++; $display("FAIL mats+ image"); end
    // idle cycles keep contents
    repeat (3) @(posedge clk); #1;
    check("hold");
    clear = 1; @(posedge clk); #1; clear = 0; sent.delete();
    check("clear");
    for (int i = 0; i < 10; i++) shift($urandom_range(0, 1));
    check("short");
    for (int i = 0; i < 30; i++) shift($urandom_range(0, 1));
    check("saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
