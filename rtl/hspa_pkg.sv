// hspa_pkg: constants, helper functions and FSM state types shared by the two
// sparse-by-dense polynomial multipliers over GF(2)[x]/(x^n+1).
//
// The helpers compute the derived sizes the document uses: the number of
// N_mem-bit segments of an n-bit polynomial, ceil(n/N_mem), and the number of
// PWP shifting stages k = ceil(log_v n). Indices of nonzero coefficients are
// 16 bits wide, as in the document. The state encodings are this design's own.
package hspa_pkg;

  // Width of one index P[i] of a nonzero coefficient of B.
  localparam int unsigned IDX_W = 16;

  // ceil(a / b)
  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Number of bits needed to hold the values 0 .. x-1 (at least 1).
  function automatic int unsigned bits_for(input int unsigned x);
    int unsigned r;
    r = 1;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  // k = ceil(log_v n): the smallest k with v^k >= n.
  function automatic int unsigned num_stages(input int unsigned n, input int unsigned v);
    int unsigned k;
    longint unsigned p;
    k = 0;
    p = 1;
    while (p < longint'(n)) begin
      p = p * v;
      k++;
    end
    return (k == 0) ? 1 : k;
  endfunction

  // v^e
  function automatic int unsigned ipow(input int unsigned v, input int unsigned e);
    int unsigned p;
    p = 1;
    for (int unsigned i = 0; i < e; i++) p = p * v;
    return p;
  endfunction

  // States of the Accelerator-I control unit.
  typedef enum logic [2:0] {
    A1_RESET  = 3'd0,
    A1_RD_IDX = 3'd1,
    A1_FULL   = 3'd2,
    A1_LAST   = 3'd3,
    A1_DRAIN  = 3'd4,
    A1_DONE   = 3'd5
  } acc1_state_e;

  // States of the Accelerator-II control unit.
  typedef enum logic [2:0] {
    A2_IDLE   = 3'd0,
    A2_RESET  = 3'd1,
    A2_LOAD   = 3'd2,
    A2_CALC   = 3'd3,
    A2_OUTPUT = 3'd4,
    A2_DONE   = 3'd5
  } acc2_state_e;

endpackage
