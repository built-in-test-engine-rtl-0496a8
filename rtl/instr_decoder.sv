// instr_decoder: the engine's instruction decoder, a finite state machine with
// an instruction counter that runs one microcoded March algorithm at speed.
//
// The counter rem holds how many microcode bits are still unread; the next field
// is code[rem-1 -: 3], so the algorithm is read from the register's top end
// down. For each element the FSM spends one cycle (ST_HDR) taking the header:
// it latches the delay, presets the address generator to the first address in
// the element's order and remembers where the element's operations start. In
// ST_OP it issues one memory operation per clock: w0/w1 write an all-zero or
// all-one word, r0/r1 read and hand the expected value to the comparator. After
// an operation with EE = 1 it either steps to the next address and rewinds to
// the element's first operation, or, at the last address, moves past the
// element. A non-zero delay then holds the memory idle for that many cycles
// (ST_DLY). When fewer than three bits remain the algorithm is over: one more
// cycle (ST_FLUSH) lets the last read be compared, then ST_DONE signals test end.
//
// Error Out from the comparator is logged whenever it arrives: fail is sticky,
// fail_cnt counts failing reads (saturating) and fail_addr keeps the first
// failing address. All of it is cleared by start.
//
// Interface: start (one cycle, from ST_IDLE or ST_DONE) begins a run; busy is
// high from the cycle after start until done, and selects the BIST side of the
// memory multiplexer. mem_en/mem_we/mem_data are the operation for the current
// cycle; cmp_en/cmp_exp go to the comparator alongside it.
//
// Timing: an element of k operations over N addresses with delay d takes
// 1 + N*k + d cycles; after the last element two more cycles pass (end-of-code
// header check and flush) before done rises.
//
// The FSM, the instruction counter, the header/operation fields and the delay
// meaning follow the source; the state set, the rewind scheme, the handling of
// a truncated algorithm (the last operation ends its element) and the fail
// logging registers are this design's choices.
module instr_decoder
  import bist_pkg::*;
#(
  parameter int unsigned REG_BITS = DEFAULT_REG_BITS,
  parameter int unsigned LEN_W    = $clog2(REG_BITS + 1),
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned CNT_W    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [REG_BITS-1:0] code,      // register file contents
  input  logic [LEN_W-1:0]    len,       // valid bits in the register file
  // address generator
  output logic                ag_init,
  output logic                ag_dir_up,
  output logic                ag_step,
  input  logic                ag_at_end,
  // memory control (BIST side of the multiplexer)
  output logic                busy,
  output logic                mem_en,
  output logic                mem_we,
  output logic                mem_data,  // value written (replicated over the word)
  // comparator
  output logic                cmp_en,
  output logic                cmp_exp,
  input  logic                err,
  input  logic [ADDR_W-1:0]   err_addr,
  // status to the tester (BIST Out)
  output logic                done,
  output logic                fail,
  output logic [ADDR_W-1:0]   fail_addr,
  output logic [CNT_W-1:0]    fail_cnt,
  output dec_state_e          state
);

  logic [LEN_W-1:0] rem;         // unread microcode bits
  logic [LEN_W-1:0] elem_ops;    // rem at the element's first operation
  logic [1:0]       dly_cnt;     // delay of the current element / hold counter

  // Current 3-bit field: the bits at rem-1, rem-2, rem-3.
  logic [REG_BITS-1:0] shifted;
  logic [FIELD_W-1:0]  field;
  elem_hdr_t           hdr;
  op_field_t           op;
  logic                have_field;
  logic                last_op;

  assign have_field = rem >= LEN_W'(FIELD_W);
  assign shifted    = have_field ? (code >> (rem - LEN_W'(FIELD_W))) : '0;
  assign field      = shifted[FIELD_W-1:0];
  assign hdr        = elem_hdr_t'(field);
  assign op         = op_field_t'(field);
  // The element ends at EE, or where the algorithm runs out of fields.
  assign last_op    = op.ee || (rem < LEN_W'(2 * FIELD_W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      rem      <= '0;
      elem_ops <= '0;
      dly_cnt  <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            rem   <= len;
            state <= ST_HDR;
          end
        end
        ST_HDR: begin
          if (!have_field || rem < LEN_W'(2 * FIELD_W)) begin
            state <= ST_FLUSH;  // no (complete) element left
          end else begin
            dly_cnt  <= hdr.delay;
            rem      <= rem - LEN_W'(FIELD_W);
            elem_ops <= rem - LEN_W'(FIELD_W);
            state    <= ST_OP;
          end
        end
        ST_OP: begin
          if (!last_op) begin
            rem <= rem - LEN_W'(FIELD_W);
          end else if (!ag_at_end) begin
            rem <= elem_ops;
          end else begin
            rem   <= rem - LEN_W'(FIELD_W);
            state <= (dly_cnt != 2'd0) ? ST_DLY : ST_HDR;
          end
        end
        ST_DLY: begin
          dly_cnt <= dly_cnt - 2'd1;
          if (dly_cnt == 2'd1) state <= ST_HDR;
        end
        ST_FLUSH: state <= ST_DONE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  // Fail log, fed by the comparator's Error Out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail      <= 1'b0;
      fail_addr <= '0;
      fail_cnt  <= '0;
    end else if (start && (state == ST_IDLE || state == ST_DONE)) begin
      fail      <= 1'b0;
      fail_addr <= '0;
      fail_cnt  <= '0;
    end else if (err) begin
      fail <= 1'b1;
      if (!fail) fail_addr <= err_addr;
      if (fail_cnt != '1) fail_cnt <= fail_cnt + 1'b1;
    end
  end

  always_comb begin
    ag_init   = (state == ST_HDR) && have_field;
    ag_dir_up = hdr.ao;
    ag_step   = (state == ST_OP) && last_op && !ag_at_end;
    busy      = (state != ST_IDLE) && (state != ST_DONE);
    mem_en    = (state == ST_OP);
    mem_we    = (state == ST_OP) && op.rw[1];
    mem_data  = op.rw[0];
    cmp_en    = (state == ST_OP) && !op.rw[1];
    cmp_exp   = op.rw[0];
    done      = (state == ST_DONE);
  end

  // The memory is only driven while the engine owns it.
  a_mem_only_busy: assert property (@(posedge clk) disable iff (!rst_n) mem_en |-> busy);
  // A read to compare and a write never share a cycle.
  a_cmp_is_read: assert property (@(posedge clk) disable iff (!rst_n) cmp_en |-> !mem_we);

endmodule
