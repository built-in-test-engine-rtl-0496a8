// bist_tb_pkg: the tester side used by the engine testbenches.
//
// Holds the March algorithms as lists of elements (address order, delay and
// operations), encodes them into the engine's serial microcode (3-bit header
// {AO, D1, D0}, 3-bit operations {RW1, RW0, EE}, first field sent first), and
// works out, independently of the RTL, what the engine must do with them: the
// sequence of memory operations, the number of cycles from start to done, and
// the reads that fail on a memory with one stuck-at cell.
package bist_tb_pkg;

  localparam int MAX_OPS = 8;

  // Operation codes as published: r0 = 00, r1 = 01, w0 = 10, w1 = 11.
  localparam bit [1:0] R0 = 2'b00, R1 = 2'b01, W0 = 2'b10, W1 = 2'b11;

  typedef struct {
    bit                     up;     // address order: 1 ascending, 0 descending
    int                     dly;    // hold cycles after the element, 0..3
    int                     nops;
    bit [MAX_OPS-1:0][1:0]  ops;
  } elem_t;

  typedef elem_t alg_t[$];

  // One expected memory access.
  typedef struct {
    bit we;
    int addr;
    bit data;  // written value or expected read value
  } acc_t;

  function automatic elem_t el(bit up, int dly, int nops, bit [MAX_OPS-1:0][1:0] ops);
    elem_t e;
    e.up = up; e.dly = dly; e.nops = nops; e.ops = ops;
    return e;
  endfunction

  // Operations are listed first-to-last from index 0.
  function automatic alg_t mats_plus();
    alg_t a;
    a.push_back(el(1, 0, 1, {14'b0, W0}));
    a.push_back(el(1, 0, 2, {12'b0, W1, R0}));
    a.push_back(el(0, 0, 2, {12'b0, W0, R1}));
    return a;
  endfunction

  function automatic alg_t march_c_minus();
    alg_t a;
    a.push_back(el(1, 0, 1, {14'b0, W0}));
    a.push_back(el(1, 0, 2, {12'b0, W1, R0}));
    a.push_back(el(1, 0, 2, {12'b0, W0, R1}));
    a.push_back(el(0, 0, 2, {12'b0, W1, R0}));
    a.push_back(el(0, 0, 2, {12'b0, W0, R1}));
    a.push_back(el(1, 0, 1, {14'b0, R0}));
    return a;
  endfunction

  function automatic alg_t march_b();
    alg_t a;
    a.push_back(el(1, 0, 1, {14'b0, W0}));
    a.push_back(el(1, 0, 6, {4'b0, W1, R0, W0, R1, W1, R0}));
    a.push_back(el(1, 0, 3, {10'b0, W1, W0, R1}));
    a.push_back(el(0, 0, 4, {8'b0, W0, W1, W0, R1}));
    a.push_back(el(0, 0, 3, {10'b0, W0, W1, R0}));
    return a;
  endfunction

  // March G: March B, then two read/write elements each preceded by a delay.
  // The delay before an element is coded in the header of the element before it.
  function automatic alg_t march_g();
    alg_t a;
    a = march_b();
    a[4].dly = 3;
    a.push_back(el(1, 3, 3, {10'b0, R1, W1, R0}));
    a.push_back(el(1, 0, 3, {10'b0, R0, W0, R1}));
    return a;
  endfunction

  // Serial bit stream, first bit sent at index 0.
  function automatic void encode(alg_t a, ref bit bits[$]);
    bits.delete();
    foreach (a[i]) begin
      bits.push_back(a[i].up);
      bits.push_back(a[i].dly[1]);
      bits.push_back(a[i].dly[0]);
      for (int k = 0; k < a[i].nops; k++) begin
        bits.push_back(a[i].ops[k][1]);
        bits.push_back(a[i].ops[k][0]);
        bits.push_back(k == a[i].nops - 1);
      end
    end
  endfunction

  // 3 * (elements + operations)
  function automatic int code_bits(alg_t a);
    int n = 0;
    foreach (a[i]) n += 1 + a[i].nops;
    return 3 * n;
  endfunction

  // Cycles from the clock edge that accepts start to the edge that raises done.
  function automatic int run_cycles(alg_t a, int words);
    int c = 2;  // end-of-code check and flush
    foreach (a[i]) c += 1 + words * a[i].nops + a[i].dly;
    return c;
  endfunction

  // Every memory access of the algorithm, in order.
  function automatic void accesses(alg_t a, int words, ref acc_t q[$]);
    acc_t x;
    q.delete();
    foreach (a[i]) begin
      for (int j = 0; j < words; j++) begin
        int ad = a[i].up ? j : words - 1 - j;
        for (int k = 0; k < a[i].nops; k++) begin
          x.we = a[i].ops[k][1];
          x.data = a[i].ops[k][0];
          x.addr = ad;
          q.push_back(x);
        end
      end
    end
  endfunction

  // Reads that fail when one cell always returns stuck_val.
  function automatic int stuck_fails(alg_t a, bit stuck_val);
    int n = 0;
    foreach (a[i])
      for (int k = 0; k < a[i].nops; k++)
        if (!a[i].ops[k][1] && a[i].ops[k][0] != stuck_val) n++;
    return n;
  endfunction

  function automatic int num_delays(alg_t a);
    int n = 0;
    foreach (a[i]) if (a[i].dly != 0) n++;
    return n;
  endfunction

endpackage
