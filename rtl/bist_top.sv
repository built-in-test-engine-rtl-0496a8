// bist_top: microcode-driven built-in test engine together with the memory it
// tests.
//
// The tester shifts a March algorithm, coded as 3-bit header and operation
// fields, serially into the register file (ate_clear, ate_shift_en,
// ate_data_in). A one-cycle bist_start then lets the instruction decoder run it
// at the memory's clock: it steps the address generator, drives read, write and
// data through the multiplexer, and collects mismatches found by the comparator.
// bist_done marks test end; bist_fail, bist_fail_addr (first failing address)
// and bist_fail_cnt are the pass/fail report. While the engine is idle or done
// the system port (sys_*) owns the memory; sys_rdata is the memory output at
// all times, read data appearing one cycle after the read.
//
// The block structure and connections follow the source architecture. Memory
// size and word width are parameters; the stuck-at FAULT_* parameters of the
// memory model are off by default and exist only to exercise the engine.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned REG_BITS   = DEFAULT_REG_BITS,
  parameter int unsigned ROW_W      = 5,
  parameter int unsigned COL_W      = 5,
  parameter int unsigned DATA_W     = 1,
  parameter int unsigned CNT_W      = 16,
  parameter bit          FAULT_EN   = 1'b0,
  parameter int unsigned FAULT_ADDR = 0,
  parameter int unsigned FAULT_BIT  = 0,
  parameter bit          FAULT_VAL  = 1'b0,
  localparam int unsigned ADDR_W    = ROW_W + COL_W,
  localparam int unsigned LEN_W     = $clog2(REG_BITS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // tester: algorithm load and run
  input  logic              ate_clear,
  input  logic              ate_shift_en,
  input  logic              ate_data_in,
  input  logic              bist_start,
  // BIST Out
  output logic              bist_busy,
  output logic              bist_done,
  output logic              bist_fail,
  output logic [ADDR_W-1:0] bist_fail_addr,
  output logic [CNT_W-1:0]  bist_fail_cnt,
  // system port
  input  logic              sys_en,
  input  logic              sys_we,
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata
);

  logic [REG_BITS-1:0] code;
  logic [LEN_W-1:0]    len;

  logic ag_init, ag_dir_up, ag_step, ag_at_end;
  logic [ROW_W-1:0] ag_row;
  logic [COL_W-1:0] ag_col;
  logic [ADDR_W-1:0] bist_addr;

  logic dec_mem_en, dec_mem_we, dec_mem_data;
  logic cmp_en, cmp_exp, cmp_err;
  logic [ADDR_W-1:0] cmp_err_addr;
  dec_state_e dec_state;

  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  assign bist_addr = {ag_row, ag_col};

  microcode_reg #(.REG_BITS(REG_BITS), .LEN_W(LEN_W)) u_reg (
    .clk, .rst_n,
    .clear    (ate_clear),
    .shift_en (ate_shift_en),
    .data_in  (ate_data_in),
    .code, .len
  );

  instr_decoder #(
    .REG_BITS(REG_BITS), .LEN_W(LEN_W), .ADDR_W(ADDR_W), .CNT_W(CNT_W)
  ) u_dec (
    .clk, .rst_n,
    .start     (bist_start),
    .code, .len,
    .ag_init, .ag_dir_up, .ag_step, .ag_at_end,
    .busy      (bist_busy),
    .mem_en    (dec_mem_en),
    .mem_we    (dec_mem_we),
    .mem_data  (dec_mem_data),
    .cmp_en, .cmp_exp,
    .err       (cmp_err),
    .err_addr  (cmp_err_addr),
    .done      (bist_done),
    .fail      (bist_fail),
    .fail_addr (bist_fail_addr),
    .fail_cnt  (bist_fail_cnt),
    .state     (dec_state)
  );

  addr_gen #(.ROW_W(ROW_W), .COL_W(COL_W)) u_agen (
    .clk, .rst_n,
    .init   (ag_init),
    .dir_up (ag_dir_up),
    .step   (ag_step),
    .row    (ag_row),
    .col    (ag_col),
    .at_end (ag_at_end)
  );

  mem_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mux (
    .bist_sel   (bist_busy),
    .sys_en, .sys_we, .sys_addr, .sys_wdata,
    .bist_en    (dec_mem_en),
    .bist_we    (dec_mem_we),
    .bist_addr  (bist_addr),
    .bist_wdata ({DATA_W{dec_mem_data}}),
    .mem_en, .mem_we, .mem_addr, .mem_wdata
  );

  mem_array #(
    .ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W),
    .FAULT_EN(FAULT_EN), .FAULT_ADDR(FAULT_ADDR),
    .FAULT_BIT(FAULT_BIT), .FAULT_VAL(FAULT_VAL)
  ) u_mem (
    .clk,
    .en    (mem_en),
    .we    (mem_we),
    .row   (mem_addr[ADDR_W-1:COL_W]),
    .col   (mem_addr[COL_W-1:0]),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  comparator #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_cmp (
    .clk, .rst_n,
    .cmp_en,
    .exp_bit  (cmp_exp),
    .addr     (bist_addr),
    .rdata    (mem_rdata),
    .err      (cmp_err),
    .err_addr (cmp_err_addr)
  );

  assign sys_rdata = mem_rdata;

endmodule
