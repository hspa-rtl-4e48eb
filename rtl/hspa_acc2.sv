// hspa_acc2: Accelerator-II, the memory-less high-throughput sparse
// polynomial multiplier built on permutating-with-power (PWP).
//
// It computes W = B*D mod (x^n + 1) over GF(2) from D and the omega indices
// P[i] of the nonzero coefficients of B, using registers only. The column of
// rot(D) for P[i] is obtained from the one for P[i-1] by a circular shift of
// delta' = P[i] - P[i-1] mod n positions, built from shifts by powers of v:
// writing delta' in base v, digit eta_j says how many shifts by v^(k-1-j) to
// make, k = ceil(log_v n). Each digit gets a fixed v-1 cycles, so the
// computation takes omega*(v-1)*k cycles whatever the indices are. Every
// finished column is XORed into W.
//
// Parts: ls_component holds and shifts D', ao_component accumulates and
// outputs W, acc2_cu sequences them. Interface:
//   start            one-cycle pulse (the document's clr)
//   d_req / din      Load: while d_req = 1 the host presents one len_load-bit
//                    word of D per cycle, most significant word first (word
//                    c = coefficients (L-1-c)*len_load .. +len_load-1,
//                    L = ceil(n/len_load))
//   idx_addr / idx   index fetch: idx = P[a] one cycle after idx_addr = a
//   dout_valid/dout  Output: L words of W, most significant first; word c =
//                    W[n-(c+1)*len_load .. n-1-c*len_load], zero below W[0]
//   done             high from the end of Output until the next start
// n, omega, v = 4 and len_load = 128 are the document's hqc-128 values.
module hspa_acc2
  import hspa_pkg::*;
#(
  parameter int unsigned N        = 17669,
  parameter int unsigned OMEGA    = 75,
  parameter int unsigned V        = 4,
  parameter int unsigned LEN_LOAD = 128,
  localparam int unsigned K       = num_stages(N, V),
  localparam int unsigned CNTW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned IAW     = $clog2(OMEGA + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                d_req,
  input  logic [LEN_LOAD-1:0] din,
  output logic [IAW-1:0]      idx_addr,
  input  logic [IDX_W-1:0]    idx,
  output logic                dout_valid,
  output logic [LEN_LOAD-1:0] dout,
  output logic                done
);

  logic            clr, load, en, acc, csh_out;
  logic [CNTW-1:0] count;
  logic [N-1:0]    dq, dnext, wq;
  acc2_state_e     state;

  acc2_cu #(.N(N), .OMEGA(OMEGA), .V(V), .LEN_LOAD(LEN_LOAD)) u_cu (
    .clk, .rst_n, .start, .idx_addr, .idx,
    .clr, .load, .en, .count, .acc, .csh_out, .state, .done
  );

  ls_component #(.N(N), .V(V), .LEN_LOAD(LEN_LOAD)) u_ls (
    .clk, .rst_n, .clr, .load, .din, .en, .count, .dq, .dnext
  );

  ao_component #(.N(N), .LEN_LOAD(LEN_LOAD)) u_ao (
    .clk, .rst_n, .clr, .acc, .d(dnext), .csh_out, .dout, .wq
  );

  assign d_req      = load;
  assign dout_valid = csh_out;

  // outside the Load and Calculate phases the LS register never moves, the
  // output word is always the top of the AO register, and the Output phase
  // shifts the whole product out, leaving the AO register empty
  a_ls_still: assert property (@(posedge clk) disable iff (!rst_n) (state == A2_OUTPUT || state == A2_DONE) |-> (dnext == dq));
  a_dout_top: assert property (@(posedge clk) disable iff (!rst_n) dout == wq[N-1 -: LEN_LOAD]);
  a_ao_empty: assert property (@(posedge clk) disable iff (!rst_n) (state == A2_DONE) |-> !(|wq));

endmodule
