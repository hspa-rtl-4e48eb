// hspa_top: the two high-throughput sparse polynomial multipliers (HSPA)
// side by side. Both compute W = B*D mod (x^n + 1) over GF(2) for a dense D
// and a sparse B given by the omega indices of its nonzero coefficients;
// they are alternatives for different resource budgets and share nothing
// but the clock and reset:
//   a1_*  Accelerator-I (hspa_acc1), memory based, t parallel column
//         executors, ceil(omega/t) rounds of ceil(n/N_mem)+2 cycles (plus
//         five cycles of start-up and drain: 1,415 at the defaults)
//   a2_*  Accelerator-II (hspa_acc2), registers only, circular shifts by
//         powers of v, omega*(v-1)*ceil(log_v n) cycles of computation
// The ports of each are those of its module, renamed with its prefix. The
// defaults are the document's hqc-128 set (n = 17,669, omega = 75) with
// t = 8, N_mem = len_load = 128 and v = 4.
module hspa_top
  import hspa_pkg::*;
#(
  parameter int unsigned N        = 17669,
  parameter int unsigned OMEGA    = 75,
  parameter int unsigned T        = 8,
  parameter int unsigned NMEM     = 128,
  parameter int unsigned V        = 4,
  parameter int unsigned LEN_LOAD = 128,
  localparam int unsigned S       = ceil_div(N, NMEM),
  localparam int unsigned AW      = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned RDC     = T / (NMEM / IDX_W),
  localparam int unsigned PD      = ceil_div(OMEGA, T) * RDC,
  localparam int unsigned PAW     = (PD > 1) ? $clog2(PD) : 1,
  localparam int unsigned IAW     = $clog2(OMEGA + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // Accelerator-I
  input  logic                a1_d_we,
  input  logic [AW-1:0]       a1_d_waddr,
  input  logic [NMEM-1:0]     a1_d_wdata,
  input  logic                a1_p_we,
  input  logic [PAW-1:0]      a1_p_waddr,
  input  logic [NMEM-1:0]     a1_p_wdata,
  input  logic                a1_start,
  output logic                a1_busy,
  output logic                a1_done,
  input  logic                a1_w_re,
  input  logic [AW-1:0]       a1_w_raddr,
  output logic [NMEM-1:0]     a1_w_rdata,
  // Accelerator-II
  input  logic                a2_start,
  output logic                a2_d_req,
  input  logic [LEN_LOAD-1:0] a2_din,
  output logic [IAW-1:0]      a2_idx_addr,
  input  logic [IDX_W-1:0]    a2_idx,
  output logic                a2_dout_valid,
  output logic [LEN_LOAD-1:0] a2_dout,
  output logic                a2_done
);

  hspa_acc1 #(.N(N), .OMEGA(OMEGA), .T(T), .NMEM(NMEM)) u_acc1 (
    .clk, .rst_n,
    .d_we(a1_d_we), .d_waddr(a1_d_waddr), .d_wdata(a1_d_wdata),
    .p_we(a1_p_we), .p_waddr(a1_p_waddr), .p_wdata(a1_p_wdata),
    .start(a1_start), .busy(a1_busy), .done(a1_done),
    .w_re(a1_w_re), .w_raddr(a1_w_raddr), .w_rdata(a1_w_rdata)
  );

  hspa_acc2 #(.N(N), .OMEGA(OMEGA), .V(V), .LEN_LOAD(LEN_LOAD)) u_acc2 (
    .clk, .rst_n,
    .start(a2_start), .d_req(a2_d_req), .din(a2_din),
    .idx_addr(a2_idx_addr), .idx(a2_idx),
    .dout_valid(a2_dout_valid), .dout(a2_dout), .done(a2_done)
  );

endmodule
