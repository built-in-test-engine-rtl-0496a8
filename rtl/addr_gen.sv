// addr_gen: address generator of the BIST engine.
//
// An up/down counter over all ROW_W + COL_W address bits. init presets it to the
// first address of an element (0 when ascending, the highest address when
// descending) and latches the direction; step moves to the next address in that
// direction. at_end is high while the counter holds the last address of the
// element, so the decoder knows when the element has visited every cell. The
// descending order is the exact reverse of the ascending one, as March tests
// require. The counter is split into row (upper bits) and column (lower bits)
// address lines; the split and the plain binary order are this design's choices.
//
// Timing: registered outputs, init and step take effect at the next clock edge;
// init wins over step.
module addr_gen #(
  parameter int unsigned ROW_W = 5,
  parameter int unsigned COL_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,    // preset to the first address of dir_up
  input  logic             dir_up,  // direction used by init
  input  logic             step,    // advance one address
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col,
  output logic             at_end   // current address is the element's last
);

  localparam int unsigned ADDR_W = ROW_W + COL_W;

  logic [ADDR_W-1:0] addr;
  logic              up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      up   <= 1'b1;
    end else if (init) begin
      up   <= dir_up;
      addr <= dir_up ? '0 : '1;
    end else if (step) begin
      addr <= up ? addr + 1'b1 : addr - 1'b1;
    end
  end

  assign {row, col} = addr;
  assign at_end     = up ? (addr == '1) : (addr == '0);

endmodule
