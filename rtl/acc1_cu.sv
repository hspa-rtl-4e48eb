// acc1_cu: control unit of Accelerator-I (the PSA accelerator).
//
// A finite state machine runs Algorithm 3 round by round. Each round handles
// t indices P[i]: in Rd_idx it reads them from RAM_P (N_mem/16 indices per
// word, ceil(t/(N_mem/16)) cycles) and hands one to each CE core; in Full it
// issues the S+1 read slots (S = ceil(n/N_mem)) that make every core stream
// its column of rot(D) into the accumulation component. After floor(omega/t)
// full rounds, the Last round state does the same with the remaining
// omega mod t indices and raises clr_i for the cores left without one.
// The state names, the number of cycles per state and the clr_i use follow
// the document. Two things are this design's own: rounds run back to back,
// the last segments of one round draining through the pipeline during the
// next round's Rd_idx; and after the last round a Drain state of four cycles
// waits for the final segments to reach RAM_W before Done.
//
// Interface: a one-cycle 'start' (the document's clr) starts a multiplication
// from Done/idle. done stays high from the end of the multiplication to the
// next start; busy is high in between. Latency from start to done:
// 1 + R*(RDC + S + 1) + 4 cycles with R = ceil(omega/t) rounds and
// RDC = t/(N_mem/16) index-read cycles per round, constant for given sizes.
module acc1_cu
  import hspa_pkg::*;
#(
  parameter int unsigned N     = 17669,
  parameter int unsigned OMEGA = 75,
  parameter int unsigned T     = 8,
  parameter int unsigned NMEM  = 128,
  localparam int unsigned S     = ceil_div(N, NMEM),
  localparam int unsigned SLW   = $clog2(S + 2),
  localparam int unsigned IPW   = NMEM / IDX_W,
  localparam int unsigned RDC   = T / IPW,
  localparam int unsigned R     = ceil_div(OMEGA, T),
  localparam int unsigned Z     = OMEGA - T * (R - 1),
  localparam int unsigned PD    = R * RDC,
  localparam int unsigned PAW   = (PD > 1) ? $clog2(PD) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  // RAM_P read port
  output logic                    p_re,
  output logic [PAW-1:0]          p_raddr,
  input  logic [NMEM-1:0]         p_rdata,
  // to the CE component
  output logic                    slot_valid,
  output logic [SLW-1:0]          slot,
  output logic [T-1:0][IDX_W-1:0] idx,
  output logic [T-1:0]            clr_i,
  output logic                    round_first,
  // status
  output acc1_state_e             state,
  output logic                    busy,
  output logic                    done
);

  localparam int unsigned RW  = $clog2(R + 1);
  localparam int unsigned RCW = (RDC > 1) ? $clog2(RDC) : 1;
  localparam int unsigned DRAIN_CYC = 4;

  initial begin
    assert (NMEM % IDX_W == 0 && T % IPW == 0)
      else $error("t must be a multiple of the indices per RAM_P word");
  end

  acc1_state_e          state_q;
  logic [RW-1:0]        round_q;
  logic [RCW-1:0]       rc_q;       // index word within the round
  logic [SLW-1:0]       slot_q;
  logic [2:0]           drain_q;
  logic                 done_q;
  logic                 pv_q;       // RAM_P data valid this cycle
  logic [RCW-1:0]       pw_q;       // which word of the round it is
  logic [T-1:0][IDX_W-1:0] idx_hold;

  wire last_round = (round_q == RW'(R - 1));

  // RAM_P reads
  always_comb begin
    p_re    = (state_q == A1_RD_IDX);
    p_raddr = PAW'(round_q * RDC + rc_q);
  end

  // core j takes index j mod IPW of word j / IPW; the final word arrives
  // in slot 0 and is passed straight through
  always_comb begin
    for (int j = 0; j < T; j++) begin
      if (pv_q && pw_q == RCW'(j / IPW))
        idx[j] = p_rdata[(j % IPW) * IDX_W +: IDX_W];
      else
        idx[j] = idx_hold[j];
      if (clr_i[j]) idx[j] = '0;
    end
  end

  always_comb begin
    for (int j = 0; j < T; j++)
      clr_i[j] = !(round_q * T + j < OMEGA);
    slot_valid  = (state_q == A1_FULL) || (state_q == A1_LAST);
    slot        = slot_q;
    round_first = (round_q == '0);
    state       = state_q;
    busy        = !(state_q == A1_DONE);
    done        = done_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= A1_DONE;
      round_q  <= '0;
      rc_q     <= '0;
      slot_q   <= '0;
      drain_q  <= '0;
      done_q   <= 1'b0;
      pv_q     <= 1'b0;
      pw_q     <= '0;
      idx_hold <= '0;
    end else begin
      pv_q <= p_re;
      pw_q <= rc_q;
      if (pv_q)
        for (int j = 0; j < T; j++)
          if (pw_q == RCW'(j / IPW)) idx_hold[j] <= p_rdata[(j % IPW) * IDX_W +: IDX_W];
      unique case (state_q)
        A1_RESET: begin
          round_q <= '0;
          rc_q    <= '0;
          slot_q  <= '0;
          state_q <= A1_RD_IDX;
        end
        A1_RD_IDX: begin
          if (rc_q == RCW'(RDC - 1)) begin
            rc_q    <= '0;
            slot_q  <= '0;
            state_q <= (last_round && Z != T) ? A1_LAST : A1_FULL;
          end else begin
            rc_q <= rc_q + 1'b1;
          end
        end
        A1_FULL, A1_LAST: begin
          if (slot_q == SLW'(S)) begin
            slot_q <= '0;
            if (last_round) begin
              drain_q <= '0;
              state_q <= A1_DRAIN;
            end else begin
              round_q <= round_q + 1'b1;
              state_q <= A1_RD_IDX;
            end
          end else begin
            slot_q <= slot_q + 1'b1;
          end
        end
        A1_DRAIN: begin
          drain_q <= drain_q + 1'b1;
          if (drain_q == 3'(DRAIN_CYC - 1)) begin
            done_q  <= 1'b1;
            state_q <= A1_DONE;
          end
        end
        A1_DONE: begin
          if (start) begin
            done_q  <= 1'b0;
            state_q <= A1_RESET;
          end
        end
        default: state_q <= A1_DONE;
      endcase
    end
  end

endmodule
