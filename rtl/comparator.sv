// comparator: checks every BIST read against its expected value.
//
// When the decoder issues a read it raises cmp_en with the expected cell value
// (the data bit of r0 or r1) and the address. These are registered for one
// cycle, matching the one-cycle read latency of the memory array, and then
// compared with the read data word, every bit of which should equal the expected
// value. A mismatch raises err (the "Error Out" line to the decoder) together
// with err_addr, the address that failed. err is combinational from the
// registered request and the memory output, so it is valid in the cycle after
// the read was issued.
module comparator #(
  parameter int unsigned DATA_W = 1,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_en,    // a read is issued this cycle
  input  logic              exp_bit,   // expected value of every data bit
  input  logic [ADDR_W-1:0] addr,      // address of the read
  input  logic [DATA_W-1:0] rdata,     // memory read data, one cycle later
  output logic              err,       // mismatch on the previous read
  output logic [ADDR_W-1:0] err_addr   // its address
);

  logic              pend;
  logic              pend_exp;
  logic [ADDR_W-1:0] pend_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      pend_exp  <= 1'b0;
      pend_addr <= '0;
    end else begin
      pend <= cmp_en;
      if (cmp_en) begin
        pend_exp  <= exp_bit;
        pend_addr <= addr;
      end
    end
  end

  assign err      = pend && (rdata != {DATA_W{pend_exp}});
  assign err_addr = pend_addr;

endmodule
