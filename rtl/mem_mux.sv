// mem_mux: hands the memory array to either the system or the BIST engine.
//
// With bist_sel low the system port drives the memory's enable, write enable,
// address and write data; with bist_sel high the engine's address generator,
// data and read/write control do. Purely combinational. Read data needs no
// multiplexer: the memory output goes both to the system and to the comparator.
module mem_mux #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 1
) (
  input  logic              bist_sel,
  // system side
  input  logic              sys_en,
  input  logic              sys_we,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  // BIST side
  input  logic              bist_en,
  input  logic              bist_we,
  input  logic [ADDR_W-1:0] bist_addr,
  input  logic [DATA_W-1:0] bist_wdata,
  // to the memory array
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata
);

  always_comb begin
    if (bist_sel) begin
      mem_en    = bist_en;
      mem_we    = bist_we;
      mem_addr  = bist_addr;
      mem_wdata = bist_wdata;
    end else begin
      mem_en    = sys_en;
      mem_we    = sys_we;
      mem_addr  = sys_addr;
      mem_wdata = sys_wdata;
    end
  end

endmodule
