// ls_component: Load and Shift (LS) component of Accelerator-II (the PWP
// accelerator).
//
// An n-bit register holds D', the current column of rot(D). Two multiplexer
// levels sit in front of every bit, as in the document. The first picks the
// bit of D' circularly shifted downwards by v^(k-1), .., v^1 or v^0 positions,
// chosen by 'count' (stage j shifts by v^(k-1-j)); k = ceil(log_v n). The
// second picks between shifting and loading. Shifting D' down by p positions
// multiplies it by x^p mod (x^n + 1), turning column c of rot(D) into column
// c + p.
//
// Loading: with load = 1 the register moves up by len_load bits and din
// enters at the bottom, so after ceil(n/len_load) cycles the word sent first
// sits at the top. The host sends D most significant word first; bits of the
// first word that fall above n are dropped. Shifting: with en = 1 (the
// document's index_cnt) and load = 0, D' is shifted once by the distance
// 'count' selects; with en = 0 it holds. dnext is the value D' takes at the
// next edge, so the accumulator can add a column in the cycle that finishes
// it. Every shift distance is a constant, so each is plain wiring.
module ls_component
  import hspa_pkg::*;
#(
  parameter int unsigned N        = 17669,
  parameter int unsigned V        = 4,
  parameter int unsigned LEN_LOAD = 128,
  localparam int unsigned K       = num_stages(N, V),
  localparam int unsigned CNTW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                load,
  input  logic [LEN_LOAD-1:0] din,
  input  logic                en,
  input  logic [CNTW-1:0]     count,
  output logic [N-1:0]        dq,
  output logic [N-1:0]        dnext
);

  logic [N-1:0] d_q;
  logic [K-1:0][N-1:0] rot;   // D' rotated by each stage's distance
  logic [N-1:0] shifted;

  for (genvar j = 0; j < K; j++) begin : g_stage
    localparam int unsigned P = ipow(V, K - 1 - j);
    assign rot[j] = {d_q[N-1-P:0], d_q[N-1 -: P]};
  end

  always_comb begin
    shifted = rot[count];
    if (load)
      dnext = (N > LEN_LOAD) ? N'({d_q, din}) : N'(din);
    else if (en)
      dnext = shifted;
    else
      dnext = d_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   d_q <= N'(0);
    else if (clr) d_q <= N'(0);
    else          d_q <= dnext;
  end

  assign dq = d_q;

endmodule
