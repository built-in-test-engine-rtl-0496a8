// tb_mem_mux: drives random system and BIST requests and checks that the
// memory side follows the selected one.
module tb_mem_mux;
  localparam int ADDR_W = 8, DATA_W = 4;

  logic bist_sel, sys_en, sys_we, bist_en, bist_we;
  logic [ADDR_W-1:0] sys_addr, bist_addr, mem_addr;
  logic [DATA_W-1:0] sys_wdata, bist_wdata, mem_wdata;
  logic mem_en, mem_we;
  int checks = 0, failures = 0;

  mem_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      bist_sel = $urandom_range(0, 1);
      sys_en = $urandom_range(0, 1); sys_we = $urandom_range(0, 1);
      bist_en = $urandom_range(0, 1); bist_we = $urandom_range(0, 1);
      sys_addr = ADDR_W'($urandom); bist_addr = ADDR_W'($urandom);
      sys_wdata = DATA_W'($urandom); bist_wdata = DATA_W'($urandom);
      #1;
      checks++;
      if (bist_sel ? {mem_en, mem_we, mem_addr, mem_wdata} != {bist_en, bist_we, bist_addr, bist_wdata}
                   : {mem_en, mem_we, mem_addr, mem_wdata} != {sys_en, sys_we, sys_addr, sys_wdata}) begin
        failures++;
        $display("FAIL sel=%0b", bist_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
