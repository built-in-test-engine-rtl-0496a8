// bist_pkg: microcode format and shared types of the memory BIST engine.
//
// The March algorithm is held as a string of 3-bit fields. Each March element
// starts with a header field {AO, D[1:0]}: AO = 1 walks the addresses upward,
// AO = 0 downward, and D gives 0..3 hold cycles after the element. The header is
// followed by one or more operation fields {RW[1:0], EE}: RW selects r0, r1, w0
// or w1, and EE = 1 marks the last operation of the element. The field layout and
// the operation codes follow the published microcode table; the bit order inside
// the register (first field at the most significant end) is this design's choice.
package bist_pkg;

  // Width of every microcode field, header or operation.
  localparam int unsigned FIELD_W = 3;

  // Register size: enough for the longest algorithm quoted for the engine
  // (March G, 90 bits).
  localparam int unsigned DEFAULT_REG_BITS = 90;

  // Operation codes: bit 1 = write, bit 0 = data value written or expected.
  typedef enum logic [1:0] {
    OP_R0 = 2'b00,
    OP_R1 = 2'b01,
    OP_W0 = 2'b10,
    OP_W1 = 2'b11
  } op_code_e;

  // Element header: address order and delay.
  typedef struct packed {
    logic       ao;     // 1 = ascending, 0 = descending
    logic [1:0] delay;  // hold cycles after the element
  } elem_hdr_t;

  // Operation field: read/write code and end-of-element flag.
  typedef struct packed {
    op_code_e rw;
    logic     ee;
  } op_field_t;

  // Instruction decoder states.
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for start, memory belongs to the system
    ST_HDR,    // read an element header, preset the address
    ST_OP,     // one memory operation per clock
    ST_DLY,    // hold cycles after an element (retention check)
    ST_FLUSH,  // let the last read reach the comparator
    ST_DONE    // test end
  } dec_state_e;

endpackage
