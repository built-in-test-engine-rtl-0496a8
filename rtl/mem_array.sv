// mem_array: the memory under test, a single-port synchronous RAM of
// 2**(ROW_W+COL_W) words of DATA_W bits, addressed by row and column lines.
//
// A cycle with en and we high writes wdata; a cycle with en high and we low
// reads, and rdata shows the word in the next cycle (rdata holds otherwise).
// The engine works on any memory of this interface; size and width are not
// fixed by the source and default to 1K one-bit cells here.
//
// For exercising the test engine the array can model one stuck-at fault:
// with FAULT_EN set, bit FAULT_BIT of the word at FAULT_ADDR always reads
// FAULT_VAL. The fault is off by default, so the array is a plain RAM.
module mem_array #(
  parameter int unsigned ROW_W      = 5,
  parameter int unsigned COL_W      = 5,
  parameter int unsigned DATA_W     = 1,
  parameter bit          FAULT_EN   = 1'b0,
  parameter int unsigned FAULT_ADDR = 0,
  parameter int unsigned FAULT_BIT  = 0,
  parameter bit          FAULT_VAL  = 1'b0
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ROW_W-1:0]  row,
  input  logic [COL_W-1:0]  col,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned ADDR_W = ROW_W + COL_W;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] rword;

  assign addr = {row, col};

  // Word as the cells return it, with the optional stuck-at cell applied.
  always_comb begin
    rword = mem[addr];
    if (FAULT_EN && addr == ADDR_W'(FAULT_ADDR)) rword[FAULT_BIT] = FAULT_VAL;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= rword;
    end
  end

endmodule
