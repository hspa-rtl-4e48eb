// hspa_acc1: Accelerator-I, the memory-based high-throughput sparse
// polynomial multiplier built on parallel segment-based accumulation (PSA).
//
// It computes W = B*D mod (x^n + 1) over GF(2), where B has omega nonzero
// coefficients given by their indices P[i]. W is the sum of the omega columns
// of the circulant matrix rot(D) picked by the P[i]. Each round, t Column
// Executor cores each form one such column, N_mem bits per cycle, from their
// own copy of D; the accumulation component adds the t segments s and the
// stored W segment s and writes the result back to RAM_W. ceil(omega/t)
// rounds of S+2 cycles (S = ceil(n/N_mem)) complete the product, in a time
// that depends only on n, omega and t.
//
// Interface:
//   d_we/d_waddr/d_wdata  load D: word a = coefficients a*N_mem .. +N_mem-1
//                         (the last word holds n mod N_mem of them)
//   p_we/p_waddr/p_wdata  load the indices into RAM_P, N_mem/16 per word,
//                         P[i] in word i/(N_mem/16), bits 16*(i mod ..)
//   start                 one-cycle pulse (the document's 'clr'); D and P
//                         must be loaded before it
//   done, busy            status; done stays high until the next start
//   w_re/w_raddr/w_rdata  read W from RAM_W after done, one word per cycle,
//                         data one cycle after w_re, same layout as D
// The structure (CE component, accumulation component, control unit), t = 8
// and N_mem = 128 follow the document; the host ports are this design's.
module hspa_acc1
  import hspa_pkg::*;
#(
  parameter int unsigned N     = 17669,
  parameter int unsigned OMEGA = 75,
  parameter int unsigned T     = 8,
  parameter int unsigned NMEM  = 128,
  localparam int unsigned S     = ceil_div(N, NMEM),
  localparam int unsigned AW    = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned SLW   = $clog2(S + 2),
  localparam int unsigned IPW   = NMEM / IDX_W,
  localparam int unsigned RDC   = T / IPW,
  localparam int unsigned R     = ceil_div(OMEGA, T),
  localparam int unsigned PD    = R * RDC,
  localparam int unsigned PAW   = (PD > 1) ? $clog2(PD) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_we,
  input  logic [AW-1:0]    d_waddr,
  input  logic [NMEM-1:0]  d_wdata,
  input  logic             p_we,
  input  logic [PAW-1:0]   p_waddr,
  input  logic [NMEM-1:0]  p_wdata,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             w_re,
  input  logic [AW-1:0]    w_raddr,
  output logic [NMEM-1:0]  w_rdata
);

  logic                    p_re;
  logic [PAW-1:0]          p_raddr;
  logic [NMEM-1:0]         p_rdata;
  logic                    slot_valid, round_first;
  logic [SLW-1:0]          slot;
  logic [T-1:0][IDX_W-1:0] idx;
  logic [T-1:0]            clr_i;
  logic                    seg_valid, seg_first, acc_busy;
  acc1_state_e             state;
  logic [AW-1:0]           seg_idx;
  logic [T-1:0][NMEM-1:0]  seg_data;

  sdp_ram #(.WIDTH(NMEM), .DEPTH(PD)) u_ram_p (
    .clk, .we(p_we), .waddr(p_waddr), .wdata(p_wdata),
    .re(p_re), .raddr(p_raddr), .rdata(p_rdata)
  );

  acc1_cu #(.N(N), .OMEGA(OMEGA), .T(T), .NMEM(NMEM)) u_cu (
    .clk, .rst_n, .start,
    .p_re, .p_raddr, .p_rdata,
    .slot_valid, .slot, .idx, .clr_i, .round_first,
    .state, .busy, .done
  );

  ce_component #(.T(T), .N(N), .NMEM(NMEM)) u_ce (
    .clk, .rst_n, .d_we, .d_waddr, .d_wdata,
    .slot_valid, .slot, .idx, .clr_i, .round_first,
    .seg_valid, .seg_idx, .seg_first, .seg_data
  );

  accumulation_component #(.T(T), .N(N), .NMEM(NMEM)) u_acc (
    .clk, .rst_n, .seg_valid, .seg_idx, .seg_first, .seg_data,
    .out_re(w_re && !busy), .out_addr(w_raddr), .out_data(w_rdata),
    .busy(acc_busy)
  );

  // the drain state lasts long enough for the last write-back to land, so the
  // product is complete whenever the controller reports done
  a_drained: assert property (@(posedge clk) disable iff (!rst_n) (state == A1_DONE) |-> !acc_busy);

endmodule
