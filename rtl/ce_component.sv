// ce_component: the Column Executor (CE) component of Accelerator-I.
//
// t CE cores work in parallel, one per index of the current round, so the t
// columns D_shift[0..t-1] of rot(D) that Algorithm 3 adds in one round are
// produced together, segment by segment. All cores receive the same read
// slots and emit segment s in the same cycle; each holds its own copy of D,
// written together through one shared write port. clr_i[j] deactivates core j
// (its segments are zero), which the control unit uses in the last round when
// only omega mod t indices remain.
//
// Interface: idx is the t indices packed, core j in idx[j]; seg_data holds the
// t segments packed the same way. seg_valid/seg_idx/seg_first are core 0's,
// identical in every core. Timing as ce_core. The number of cores T = 8 and
// the word size N_mem = 128 are the document's implementation values.
module ce_component
  import hspa_pkg::*;
#(
  parameter int unsigned T    = 8,
  parameter int unsigned N    = 17669,
  parameter int unsigned NMEM = 128,
  localparam int unsigned S    = ceil_div(N, NMEM),
  localparam int unsigned AW   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned SLW  = $clog2(S + 2)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      d_we,
  input  logic [AW-1:0]             d_waddr,
  input  logic [NMEM-1:0]           d_wdata,
  input  logic                      slot_valid,
  input  logic [SLW-1:0]            slot,
  input  logic [T-1:0][IDX_W-1:0]   idx,
  input  logic [T-1:0]              clr_i,
  input  logic                      round_first,
  output logic                      seg_valid,
  output logic [AW-1:0]             seg_idx,
  output logic                      seg_first,
  output logic [T-1:0][NMEM-1:0]    seg_data
);

  logic [T-1:0]         valid_j, first_j;
  logic [T-1:0][AW-1:0] idx_j;

  for (genvar j = 0; j < T; j++) begin : g_core
    ce_core #(.N(N), .NMEM(NMEM)) u_core (
      .clk, .rst_n, .d_we, .d_waddr, .d_wdata,
      .slot_valid, .slot, .idx(idx[j]), .active(!clr_i[j]), .round_first,
      .seg_valid(valid_j[j]), .seg_idx(idx_j[j]), .seg_first(first_j[j]),
      .seg_data(seg_data[j])
    );
  end

  assign seg_valid = valid_j[0];
  assign seg_idx   = idx_j[0];
  assign seg_first = first_j[0];

  // the cores share their timing: every core signals the same segment
  property p_lockstep;
    @(posedge clk) disable iff (!rst_n) (valid_j == {T{valid_j[0]}}) && (first_j == {T{first_j[0]}}) &&
                   (idx_j == {T{idx_j[0]}});
  endproperty
  a_lockstep: assert property (p_lockstep);

endmodule
