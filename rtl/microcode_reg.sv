// microcode_reg: the engine's register file, a serial shift register that the
// external tester fills with one microcoded March algorithm.
//
// Each cycle with shift_en high shifts data_in in at bit 0 and moves the older
// bits up, so after L bits the first bit sent sits at index L-1 and the last at
// index 0. A counter (len) tracks how many bits are valid, saturating at
// REG_BITS; the instruction decoder starts reading at index len-1. clear empties
// the register so a new algorithm can be loaded after the previous one ran.
// A serial shift register for the algorithm follows the source architecture;
// the length counter and the clear input are this design's own way of telling
// the decoder where the algorithm ends.
//
// Timing: one bit per clock, code and len are registered outputs.
module microcode_reg #(
  parameter int unsigned REG_BITS = bist_pkg::DEFAULT_REG_BITS,
  parameter int unsigned LEN_W    = $clog2(REG_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,     // empty the register (len = 0)
  input  logic                shift_en,  // shift data_in in this cycle
  input  logic                data_in,   // serial microcode from the tester
  output logic [REG_BITS-1:0] code,      // register contents
  output logic [LEN_W-1:0]    len        // number of valid bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
      len  <= '0;
    end else if (clear) begin
      code <= '0;
      len  <= '0;
    end else if (shift_en) begin
      code <= {code[REG_BITS-2:0], data_in};
      if (len != LEN_W'(REG_BITS)) len <= len + 1'b1;
    end
  end

endmodule
