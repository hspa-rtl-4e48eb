// ce_subctrl: sub-control cell of one Column Executor (CE) core.
//
// Column P[i] of the circulant matrix rot(D) is D rotated downwards by P[i]
// positions, so it is the coefficient stream d[q], d[q+1], .., d[n-1], d[0],
// .., d[q-1] with q = (n - P[i]) mod n. From the index this cell works out the
// memory word q / N_mem and the bit offset q mod N_mem of the first
// coefficient, and then steps through the core's copy of D, one word per read
// slot, wrapping from the last word (which holds only n mod N_mem coefficients)
// back to word 0. A column takes S+1 reads, S = ceil(n/N_mem): the first word
// is visited again at the end for the bits below the offset.
//
// Interface and timing: the control unit issues slots 0..S (slot_valid, slot);
// idx is sampled in slot 0. The read request (rd_en, rd_addr) goes out in the
// same cycle, combinationally. The tag describing the word read (t_valid,
// t_first, t_slot and the valid bit range [t_lo, t_hi)) is registered so that
// it lines up with the memory's data one cycle later. Deriving the start from
// P[i] follows the document; the word layout and the tag are this design's.
module ce_subctrl
  import hspa_pkg::*;
#(
  parameter int unsigned N    = 17669,
  parameter int unsigned NMEM = 128,
  localparam int unsigned S    = ceil_div(N, NMEM),
  localparam int unsigned AW   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned SLW  = $clog2(S + 2),
  localparam int unsigned BW   = $clog2(NMEM + 1),
  localparam int unsigned LAST = N - (S - 1) * NMEM
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot_valid,
  input  logic [SLW-1:0]   slot,
  input  logic [IDX_W-1:0] idx,
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  output logic             t_valid,
  output logic             t_first,
  output logic [SLW-1:0]   t_slot,
  output logic [BW-1:0]    t_lo,
  output logic [BW-1:0]    t_hi
);

  localparam int unsigned OW = $clog2(NMEM);

  logic [IDX_W:0]  q;          // start coefficient of the column
  logic [AW-1:0]   a0;         // word holding it
  logic [OW-1:0]   off0;       // its position in that word
  logic [AW-1:0]   cur_addr;   // next address for slots 1..S
  logic [OW-1:0]   off_q;      // offset kept for the last slot
  logic [BW-1:0]   lo, hi;

  initial begin
    assert ((1 << OW) == NMEM) else $error("NMEM must be a power of two");
    assert (N < (1 << IDX_W)) else $error("N must fit in an index");
  end

  always_comb begin
    q    = (idx == '0) ? '0 : (IDX_W+1)'(N) - (IDX_W+1)'(idx);
    a0   = AW'(q >> OW);
    off0 = OW'(q);
  end

  always_comb begin
    rd_en   = slot_valid;
    rd_addr = (slot == '0) ? a0 : cur_addr;
    // valid bits of this word: from the start offset in slot 0, below the
    // start offset when the first word comes round again in slot S, and only
    // LAST bits in the short final word of D
    lo = (slot == '0) ? BW'(off0) : '0;
    if (slot == SLW'(S))
      hi = BW'(off_q);
    else if (rd_addr == AW'(S - 1))
      hi = BW'(LAST);
    else
      hi = BW'(NMEM);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_addr <= '0;
      off_q    <= '0;
      t_valid  <= 1'b0;
      t_first  <= 1'b0;
      t_slot   <= '0;
      t_lo     <= '0;
      t_hi     <= '0;
    end else begin
      t_valid <= slot_valid;
      if (slot_valid) begin
        cur_addr <= (rd_addr == AW'(S - 1)) ? '0 : rd_addr + 1'b1;
        if (slot == '0) off_q <= off0;
        t_first <= (slot == '0);
        t_slot  <= slot;
        t_lo    <= lo;
        t_hi    <= hi;
      end
    end
  end

endmodule
