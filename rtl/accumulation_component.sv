// accumulation_component: the Accumulation Component of Accelerator-I.
//
// It keeps the product W in RAM_W, S = ceil(n/N_mem) words of N_mem bits, and
// adds into it, segment by segment, the t columns of rot(D) that each round of
// Algorithm 3 produces: W[s] <- W[s] + D_shift[0][s] + .. + D_shift[t-1][s].
// The point-wise adder is an XOR tree. When the last round has been added,
// RAM_W holds W and the host reads it out N_mem bits at a time, with no
// parallel-to-serial conversion.
//
// Pipeline (this design's choice): in the cycle a segment arrives
// (seg_valid, seg_idx = s), the t segments are registered and RAM_W word s is
// read; in the next cycle the point-wise adder sums the t segments and the
// stored word, and the sum is written back. In the first round (seg_first) the stored word is taken as
// zero, so RAM_W needs no clearing between multiplications. The host read
// port out_re/out_addr/out_data (data one cycle after out_re) must be used
// only while no segments arrive; RAM_W's single read port is shared.
module accumulation_component
  import hspa_pkg::*;
#(
  parameter int unsigned T    = 8,
  parameter int unsigned N    = 17669,
  parameter int unsigned NMEM = 128,
  localparam int unsigned S    = ceil_div(N, NMEM),
  localparam int unsigned AW   = (S > 1) ? $clog2(S) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   seg_valid,
  input  logic [AW-1:0]          seg_idx,
  input  logic                   seg_first,
  input  logic [T-1:0][NMEM-1:0] seg_data,
  input  logic                   out_re,
  input  logic [AW-1:0]          out_addr,
  output logic [NMEM-1:0]        out_data,
  output logic                   busy
);

  logic [T-1:0][NMEM-1:0] seg_q;
  logic [NMEM-1:0] w_old, w_new, ram_q;
  logic            st2_valid, st2_first;
  logic [AW-1:0]   st2_idx;

  // stage 1: register the t segments while RAM_W is read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st2_valid <= 1'b0;
      st2_first <= 1'b0;
      st2_idx   <= '0;
      seg_q     <= '0;
    end else begin
      st2_valid <= seg_valid;
      st2_first <= seg_first;
      st2_idx   <= seg_idx;
      if (seg_valid) seg_q <= seg_data;
    end
  end

  // stage 2: add the stored W segment and write back
  assign w_old = st2_first ? '0 : ram_q;

  pointwise_adder #(.T(T), .NMEM(NMEM)) u_adder (
    .seg(seg_q), .w_in(w_old), .w_out(w_new)
  );

  sdp_ram #(.WIDTH(NMEM), .DEPTH(S)) u_ram_w (
    .clk,
    .we(st2_valid), .waddr(st2_idx), .wdata(w_new),
    .re(seg_valid || out_re), .raddr(seg_valid ? seg_idx : out_addr),
    .rdata(ram_q)
  );

  assign out_data = ram_q;
  assign busy     = seg_valid || st2_valid;

  a_no_host_read_clash: assert property (@(posedge clk) disable iff (!rst_n) !(seg_valid && out_re));

endmodule
