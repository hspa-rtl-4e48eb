// acc2_cu: control unit of Accelerator-II (the PWP accelerator).
//
// A finite state machine walks through Reset, Load, Calculate, Output and
// Done. In Calculate it runs Algorithm 4: for each nonzero index P[i] it forms
// delta' = P[i] - P[i-1] mod n (P[-1] taken as 0) and moves the LS
// component's column on by delta' positions in k stages, stage j shifting by
// v^(k-1-j) as many times as the j-th base-v digit eta_j of delta' says. Every
// stage lasts v-1 cycles whatever eta_j is: the LS component shifts in the
// first eta_j of them (en, the document's index_cnt) and idles in the rest,
// so Calculate takes omega*(v-1)*k cycles for any indices (constant time).
// In the last cycle of an index's window the accumulator adds the finished
// column (acc). v is a power of two, so the digits are bit fields of delta'.
//
// Interface: 'start' (the document's clr) begins from Idle or Done. Load
// lasts ceil(n/len_load) cycles with d_req = load = 1; the host supplies one
// word of D per cycle on the accelerator's din. Indices are fetched through
// idx_addr/idx: idx must carry P[a] one cycle after idx_addr = a, as a
// synchronous memory or a FIFO-fed register would provide. Output lasts
// ceil(n/len_load) cycles with csh_out = 1. done stays high until the next
// start. The states, their durations and the constant-time stage scheme
// follow the document; the Idle state, the index port and the acc strobe are
// this design's.
module acc2_cu
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
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [IAW-1:0]   idx_addr,
  input  logic [IDX_W-1:0] idx,
  output logic             clr,
  output logic             load,
  output logic             en,
  output logic [CNTW-1:0]  count,
  output logic             acc,
  output logic             csh_out,
  output acc2_state_e      state,
  output logic             done
);

  localparam int unsigned L    = ceil_div(N, LEN_LOAD);
  localparam int unsigned LW   = $clog2(L + 1);
  localparam int unsigned LV   = $clog2(V);
  localparam int unsigned DW   = K * LV;
  localparam int unsigned CW   = (V > 2) ? $clog2(V - 1) : 1;

  initial begin
    assert ((1 << LV) == V && V >= 2) else $error("v must be a power of two");
  end

  acc2_state_e      state_q;
  logic [LW-1:0]    lcnt_q;        // Load / Output cycle counter
  logic [IAW-1:0]   i_q;           // index number
  logic [CNTW-1:0]  j_q;           // stage
  logic [CW-1:0]    c_q;           // cycle within the stage
  logic [IDX_W-1:0] prev_q;        // P[i-1]
  logic [DW-1:0]    delta_q;       // delta' of the current index
  logic [DW-1:0]    delta_now;
  logic [IDX_W:0]   diff;
  logic [LV-1:0]    eta;
  logic             win_first, win_last;
  logic             done_q;

  assign win_first = (state_q == A2_CALC) && (j_q == '0) && (c_q == '0);
  assign win_last  = (state_q == A2_CALC) && (j_q == CNTW'(K - 1)) && (c_q == CW'(V - 2));

  always_comb begin
    // delta' = P[i] - P[i-1] mod n, taken from the index input at the first
    // cycle of the window and held afterwards
    diff = {1'b0, idx} - {1'b0, prev_q};
    if (idx < prev_q) diff = diff + (IDX_W+1)'(N);
    delta_now = win_first ? DW'(diff) : delta_q;
    eta       = delta_now[(DW - LV) - 32'(j_q) * LV +: LV];
  end

  always_comb begin
    clr      = (state_q == A2_RESET);
    load     = (state_q == A2_LOAD);
    en       = (state_q == A2_CALC) && (32'(c_q) < 32'(eta));
    count    = j_q;
    acc      = win_last;
    csh_out  = (state_q == A2_OUTPUT);
    state    = state_q;
    done     = done_q;
    idx_addr = (state_q == A2_CALC) ? i_q + 1'b1 : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= A2_IDLE;
      lcnt_q  <= '0;
      i_q     <= '0;
      j_q     <= '0;
      c_q     <= '0;
      prev_q  <= '0;
      delta_q <= '0;
      done_q  <= 1'b0;
    end else begin
      unique case (state_q)
        A2_IDLE, A2_DONE: begin
          if (start) begin
            done_q  <= 1'b0;
            state_q <= A2_RESET;
          end
        end
        A2_RESET: begin
          lcnt_q  <= '0;
          i_q     <= '0;
          j_q     <= '0;
          c_q     <= '0;
          prev_q  <= '0;
          state_q <= A2_LOAD;
        end
        A2_LOAD: begin
          if (lcnt_q == LW'(L - 1)) begin
            lcnt_q  <= '0;
            state_q <= A2_CALC;
          end else begin
            lcnt_q <= lcnt_q + 1'b1;
          end
        end
        A2_CALC: begin
          if (win_first) begin
            delta_q <= delta_now;
            prev_q  <= idx;
          end
          if (c_q == CW'(V - 2)) begin
            c_q <= '0;
            if (j_q == CNTW'(K - 1)) begin
              j_q <= '0;
              if (i_q == IAW'(OMEGA - 1)) state_q <= A2_OUTPUT;
              else                        i_q <= i_q + 1'b1;
            end else begin
              j_q <= j_q + 1'b1;
            end
          end else begin
            c_q <= c_q + 1'b1;
          end
        end
        A2_OUTPUT: begin
          if (lcnt_q == LW'(L - 1)) begin
            lcnt_q  <= '0;
            done_q  <= 1'b1;
            state_q <= A2_DONE;
          end else begin
            lcnt_q <= lcnt_q + 1'b1;
          end
        end
        default: state_q <= A2_IDLE;
      endcase
    end
  end

endmodule
