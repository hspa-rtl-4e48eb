// ce_core: one Column Executor (CE) core of Accelerator-I.
//
// Given one index P[i] of a nonzero coefficient of the sparse operand B, the
// core produces column P[i] of rot(D), the dense operand D rotated downwards by
// P[i] positions, as S = ceil(n/N_mem) segments of N_mem bits. As in the
// document it holds three parts: a sub-control cell (ce_subctrl) that turns
// the index into a start address and offset, its own copy of D in a memory
// (sdp_ram, S words), and a column former (column_former) that assembles the
// segments from the words read.
//
// Interface: D is written through d_we/d_waddr/d_wdata (word a holds
// coefficients a*N_mem .. a*N_mem+N_mem-1). The control unit issues read slots
// 0..S with slot_valid/slot and presents idx, active (clr_i inverted) and
// round_first in slot 0. Timing: the memory answers one cycle after a slot
// and the column former registers its output, so segment s is on seg_* two
// cycles after slot s+2, and the last segment three cycles after slot S. A
// column therefore takes S+1 read slots.
module ce_core
  import hspa_pkg::*;
#(
  parameter int unsigned N    = 17669,
  parameter int unsigned NMEM = 128,
  localparam int unsigned S    = ceil_div(N, NMEM),
  localparam int unsigned AW   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned SLW  = $clog2(S + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_we,
  input  logic [AW-1:0]    d_waddr,
  input  logic [NMEM-1:0]  d_wdata,
  input  logic             slot_valid,
  input  logic [SLW-1:0]   slot,
  input  logic [IDX_W-1:0] idx,
  input  logic             active,
  input  logic             round_first,
  output logic             seg_valid,
  output logic [AW-1:0]   seg_idx,
  output logic             seg_first,
  output logic [NMEM-1:0]  seg_data
);

  localparam int unsigned BW = $clog2(NMEM + 1);

  logic            rd_en;
  logic [AW-1:0]   rd_addr;
  logic [NMEM-1:0] rd_data;
  logic            t_valid, t_first;
  logic [SLW-1:0]  t_slot;
  logic [BW-1:0]   t_lo, t_hi;
  logic            active_q, round_first_q;

  ce_subctrl #(.N(N), .NMEM(NMEM)) u_subctrl (
    .clk, .rst_n, .slot_valid, .slot, .idx,
    .rd_en, .rd_addr, .t_valid, .t_first, .t_slot, .t_lo, .t_hi
  );

  sdp_ram #(.WIDTH(NMEM), .DEPTH(S)) u_ram_d (
    .clk, .we(d_we), .waddr(d_waddr), .wdata(d_wdata),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  // clr_i and the first-round flag travel with slot 0 to the column former
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q      <= 1'b0;
      round_first_q <= 1'b0;
    end else if (slot_valid && slot == '0) begin
      active_q      <= active;
      round_first_q <= round_first;
    end
  end

  column_former #(.N(N), .NMEM(NMEM)) u_former (
    .clk, .rst_n,
    .in_valid(t_valid), .in_first(t_first), .in_slot(t_slot),
    .in_lo(t_lo), .in_hi(t_hi), .in_data(rd_data),
    .active(active_q), .round_first(round_first_q),
    .seg_valid, .seg_idx, .seg_first, .seg_data
  );

endmodule
