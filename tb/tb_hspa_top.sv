// tb_hspa_top: runs the whole design at its default sizes (hqc-128:
// n = 17,669, omega = 75; Accelerator-I with t = 8 and N_mem = 128,
// Accelerator-II with v = 4 and len_load = 128). Both accelerators multiply
// the same kind of random operands at the same time; acc1_host and acc2_host
// load them, check each product bit by bit against a reference and check
// the cycle counts: 10 rounds of 141 cycles for Accelerator-I and
// 75*3*8 = 1800 Calculate cycles for Accelerator-II. The mechanisms the
// design relies on are counted and each must occur: Accelerator-I's partial
// last round (clr_i) and columns that wrap around the short last word of D;
// Accelerator-II's stages that shift and stages that idle to keep constant
// time.
module tb_hspa_top;
  import hspa_pkg::*;

  localparam int unsigned N = 17669, OMEGA = 75, T = 8, NMEM = 128, V = 4, LEN = 128;
  localparam int unsigned S   = ceil_div(N, NMEM);
  localparam int unsigned AW  = $clog2(S);
  localparam int unsigned PD  = ceil_div(OMEGA, T) * (T / (NMEM / IDX_W));
  localparam int unsigned PAW = (PD > 1) ? $clog2(PD) : 1;
  localparam int unsigned IAW = $clog2(OMEGA + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst1, rst2, rst_n;
  logic            a1_d_we, a1_p_we, a1_start, a1_busy, a1_done, a1_w_re, fin1;
  logic [AW-1:0]   a1_d_waddr, a1_w_raddr;
  logic [PAW-1:0]  a1_p_waddr;
  logic [NMEM-1:0] a1_d_wdata, a1_p_wdata, a1_w_rdata;
  logic            a2_start, a2_d_req, a2_dv, a2_done, fin2;
  logic [LEN-1:0]  a2_din, a2_dout;
  logic [IAW-1:0]  a2_ia;
  logic [IDX_W-1:0] a2_idx;
  int c1, f1, npl, nwr, c2, f2, nsh, nid;

  assign rst_n = rst1 & rst2;

  hspa_top dut (
    .clk, .rst_n,
    .a1_d_we, .a1_d_waddr, .a1_d_wdata, .a1_p_we, .a1_p_waddr, .a1_p_wdata,
    .a1_start, .a1_busy, .a1_done, .a1_w_re, .a1_w_raddr, .a1_w_rdata,
    .a2_start, .a2_d_req, .a2_din, .a2_idx_addr(a2_ia), .a2_idx,
    .a2_dout_valid(a2_dv), .a2_dout, .a2_done
  );

  acc1_host #(.N(N), .OMEGA(OMEGA), .T(T), .NMEM(NMEM), .TRIALS(1), .SEED(3)) h1 (
    .clk, .rst_n(rst1), .d_we(a1_d_we), .d_waddr(a1_d_waddr), .d_wdata(a1_d_wdata),
    .p_we(a1_p_we), .p_waddr(a1_p_waddr), .p_wdata(a1_p_wdata), .start(a1_start),
    .busy(a1_busy), .done(a1_done), .w_re(a1_w_re), .w_raddr(a1_w_raddr), .w_rdata(a1_w_rdata),
    .finished(fin1), .checks(c1), .failures(f1), .n_partial_last(npl), .n_wrap_cols(nwr)
  );

  acc2_host #(.N(N), .OMEGA(OMEGA), .V(V), .LEN_LOAD(LEN), .TRIALS(1), .SEED(4)) h2 (
    .clk, .rst_n(rst2), .start(a2_start), .d_req(a2_d_req), .din(a2_din),
    .idx_addr(a2_ia), .idx(a2_idx), .dout_valid(a2_dv), .dout(a2_dout), .done(a2_done),
    .finished(fin2), .checks(c2), .failures(f2), .n_shift_stages(nsh), .n_idle_stages(nid)
  );

  initial begin
    int checks, failures;
    repeat (2) @(posedge clk);
    wait (fin1 && fin2);
    checks = c1 + c2 + 4;
    failures = f1 + f2;
    $display("Accelerator-I : partial last rounds=%0d, wrapping columns=%0d", npl, nwr);
    $display("Accelerator-II: stages that shifted=%0d, stages that idled=%0d", nsh, nid);
    if (npl == 0) begin failures++; $display("FAIL: no partial last round"); end
    if (nwr == 0) begin failures++; $display("FAIL: no wrapping column"); end
    if (nsh == 0) begin failures++; $display("FAIL: no shifting stage"); end
    if (nid == 0) begin failures++; $display("FAIL: no idle stage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
