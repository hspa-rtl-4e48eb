// column_former: Column Former of one Column Executor (CE) core.
//
// It turns the words read from the core's copy of D into the column of rot(D)
// chosen by the index, cut into S = ceil(n/N_mem) segments of N_mem bits. Each
// arriving word contributes its valid bits [in_lo, in_hi) (the sub-control cell
// says which); they are appended above the bits already held in a 3*N_mem-bit
// buffer, and a full segment is taken off the bottom while the rest waits for
// the next segment, as the document describes.
//
// Timing: segment s is emitted when word s+2 of the column arrives (slot
// s+2), and the last segment one cycle after slot S. The two-word lag is the
// worst case over all start offsets, allowing for the short last word of D, so
// every core emits segment s in the same cycle whatever its index: the t
// cores stay in lockstep for the point-wise adder. Outputs are registered:
// seg_valid/seg_idx/seg_data/seg_first appear one cycle after the word that
// completes them. A core whose 'active' input (the inverse of clr_i) is low
// when its column starts emits zero segments but keeps the same timing.
// seg_first marks the segments of the first round (round_first sampled with
// the first word). The fixed lag and buffer size are this design's choices.
module column_former
  import hspa_pkg::*;
#(
  parameter int unsigned N    = 17669,
  parameter int unsigned NMEM = 128,
  localparam int unsigned S    = ceil_div(N, NMEM),
  localparam int unsigned AW   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned SLW  = $clog2(S + 2),
  localparam int unsigned BW   = $clog2(NMEM + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic [SLW-1:0]  in_slot,
  input  logic [BW-1:0]   in_lo,
  input  logic [BW-1:0]   in_hi,
  input  logic [NMEM-1:0] in_data,
  input  logic            active,
  input  logic            round_first,
  output logic            seg_valid,
  output logic [AW-1:0]   seg_idx,
  output logic            seg_first,
  output logic [NMEM-1:0] seg_data
);

  localparam int unsigned BUFW = 3 * NMEM;
  localparam int unsigned CW   = $clog2(BUFW + 1);

  logic [BUFW-1:0] buf_q, merged;
  logic [CW-1:0]   cnt_q, mcnt;
  logic [NMEM-1:0] word_bits;
  logic            pend_last;
  logic            act_q, first_q;
  logic            emit;
  logic [AW-1:0]   emit_idx;
  logic [NMEM-1:0] emit_data;

  always_comb begin
    // valid bits of the arriving word, moved down to bit 0
    word_bits = (in_data >> in_lo) & ~({NMEM{1'b1}} << (in_hi - in_lo));
    if (in_hi - in_lo == BW'(NMEM)) word_bits = in_data;
    if (in_first) begin
      merged = BUFW'(word_bits);
      mcnt   = CW'(in_hi - in_lo);
    end else begin
      merged = buf_q | (BUFW'(word_bits) << cnt_q);
      mcnt   = cnt_q + CW'(in_hi - in_lo);
    end
    emit      = 1'b0;
    emit_idx  = '0;
    emit_data = merged[NMEM-1:0];
    if (in_valid && in_slot >= SLW'(2)) begin
      emit     = 1'b1;
      emit_idx = AW'(in_slot - SLW'(2));
    end else if (!in_valid && pend_last) begin
      emit      = 1'b1;
      emit_idx  = AW'(S - 1);
      emit_data = buf_q[NMEM-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      pend_last <= 1'b0;
      act_q     <= 1'b0;
      first_q   <= 1'b0;
      seg_valid <= 1'b0;
      seg_idx   <= '0;
      seg_first <= 1'b0;
      seg_data  <= '0;
    end else begin
      if (in_valid) begin
        if (in_first) begin
          act_q   <= active;
          first_q <= round_first;
        end
        if (emit) begin
          buf_q <= merged >> NMEM;
          cnt_q <= mcnt - CW'(NMEM);
        end else begin
          buf_q <= merged;
          cnt_q <= mcnt;
        end
        pend_last <= (in_slot == SLW'(S));
      end else if (pend_last) begin
        pend_last <= 1'b0;
        buf_q     <= '0;
        cnt_q     <= '0;
      end
      seg_valid <= emit;
      seg_idx   <= emit_idx;
      seg_first <= (in_valid && in_first) ? round_first : first_q;
      seg_data  <= (((in_valid && in_first) ? active : act_q) && emit) ? emit_data : '0;
    end
  end

endmodule
