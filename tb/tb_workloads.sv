// tb_workloads: one multiplication at every security level of HQC and BIKE,
// on both accelerators, each elaborated at that level's sizes.
//   HQC:  hqc-128 (n = 17,669, weight 75), hqc-192 (35,581, 114),
//         hqc-256 (57,637, 149).
//   BIKE: level 1 (n = 12,323, w = 142), level 3 (24,659, 206) and level 5
//         (40,973, 274). A BIKE product multiplies by one half of the secret
//         key, whose weight is w/2: 71, 103 and 137 nonzero indices.
// Accelerator-I runs with t = 8 throughout; Accelerator-II with v = 16 and
// v = 8 at every level, plus v = 4 and v = 2 for hqc-128. The hosts (see
// acc1_host and acc2_host) check every output bit against a bit-level model
// and check the cycle counts: 1 + R*(RDC + S + 1) + 4 from start to done
// for Accelerator-I, and omega*(v-1)*ceil(log_v n) Calculate cycles plus
// ceil(n/128) load and output cycles for Accelerator-II.
module tb_workloads;
  import hspa_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  `define W_ACC1(NAME, PN, PO, PT) \
    localparam int unsigned NAME``_S = ceil_div(PN, 128); \
    localparam int unsigned NAME``_AW = $clog2(NAME``_S); \
    localparam int unsigned NAME``_PD = ceil_div(PO, PT) * (PT / 8); \
    localparam int unsigned NAME``_PAW = (NAME``_PD > 1) ? $clog2(NAME``_PD) : 1; \
    logic NAME``_rst_n, NAME``_d_we, NAME``_p_we, NAME``_start, NAME``_busy, NAME``_done, NAME``_w_re, NAME``_fin; \
    logic [NAME``_AW-1:0] NAME``_d_waddr, NAME``_w_raddr; \
    logic [NAME``_PAW-1:0] NAME``_p_waddr; \
    logic [127:0] NAME``_d_wdata, NAME``_p_wdata, NAME``_w_rdata; \
    int NAME``_checks, NAME``_fails, NAME``_x1, NAME``_x2; \
    hspa_acc1 #(.N(PN), .OMEGA(PO), .T(PT), .NMEM(128)) NAME``_dut ( \
      .clk, .rst_n(NAME``_rst_n), .d_we(NAME``_d_we), .d_waddr(NAME``_d_waddr), .d_wdata(NAME``_d_wdata), \
      .p_we(NAME``_p_we), .p_waddr(NAME``_p_waddr), .p_wdata(NAME``_p_wdata), .start(NAME``_start), \
      .busy(NAME``_busy), .done(NAME``_done), .w_re(NAME``_w_re), .w_raddr(NAME``_w_raddr), .w_rdata(NAME``_w_rdata)); \
    acc1_host #(.N(PN), .OMEGA(PO), .T(PT), .NMEM(128), .TRIALS(1), .SEED(PN)) NAME``_host ( \
      .clk, .rst_n(NAME``_rst_n), .d_we(NAME``_d_we), .d_waddr(NAME``_d_waddr), .d_wdata(NAME``_d_wdata), \
      .p_we(NAME``_p_we), .p_waddr(NAME``_p_waddr), .p_wdata(NAME``_p_wdata), .start(NAME``_start), \
      .busy(NAME``_busy), .done(NAME``_done), .w_re(NAME``_w_re), .w_raddr(NAME``_w_raddr), .w_rdata(NAME``_w_rdata), \
      .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
      .n_partial_last(NAME``_x1), .n_wrap_cols(NAME``_x2));

  `define W_ACC2(NAME, PN, PO, PV) \
    logic NAME``_rst_n, NAME``_start, NAME``_d_req, NAME``_dv, NAME``_done, NAME``_fin; \
    logic [127:0] NAME``_din, NAME``_dout; \
    logic [$clog2(PO + 1)-1:0] NAME``_ia; \
    logic [IDX_W-1:0] NAME``_idx; \
    int NAME``_checks, NAME``_fails, NAME``_x1, NAME``_x2; \
    hspa_acc2 #(.N(PN), .OMEGA(PO), .V(PV), .LEN_LOAD(128)) NAME``_dut ( \
      .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .d_req(NAME``_d_req), .din(NAME``_din), \
      .idx_addr(NAME``_ia), .idx(NAME``_idx), .dout_valid(NAME``_dv), .dout(NAME``_dout), .done(NAME``_done)); \
    acc2_host #(.N(PN), .OMEGA(PO), .V(PV), .LEN_LOAD(128), .TRIALS(1), .SEED(PN + PV)) NAME``_host ( \
      .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .d_req(NAME``_d_req), .din(NAME``_din), \
      .idx_addr(NAME``_ia), .idx(NAME``_idx), .dout_valid(NAME``_dv), .dout(NAME``_dout), .done(NAME``_done), \
      .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
      .n_shift_stages(NAME``_x1), .n_idle_stages(NAME``_x2));

  `W_ACC1(h128, 17669, 75, 8)
  `W_ACC1(h192, 35581, 114, 8)
  `W_ACC1(h256, 57637, 149, 8)
  `W_ACC1(b1, 12323, 71, 8)
  `W_ACC1(b3, 24659, 103, 8)
  `W_ACC1(b5, 40973, 137, 8)
  `W_ACC2(h128v16, 17669, 75, 16)
  `W_ACC2(h128v8, 17669, 75, 8)
  `W_ACC2(h128v4, 17669, 75, 4)
  `W_ACC2(h128v2, 17669, 75, 2)
  `W_ACC2(h192v16, 35581, 114, 16)
  `W_ACC2(h192v8, 35581, 114, 8)
  `W_ACC2(h256v16, 57637, 149, 16)
  `W_ACC2(h256v8, 57637, 149, 8)
  `W_ACC2(b1v16, 12323, 71, 16)
  `W_ACC2(b1v8, 12323, 71, 8)
  `W_ACC2(b3v16, 24659, 103, 16)
  `W_ACC2(b3v8, 24659, 103, 8)
  `W_ACC2(b5v16, 40973, 137, 16)
  `W_ACC2(b5v8, 40973, 137, 8)

  int checks, failures;

  initial begin
    repeat (2) @(posedge clk);
    wait (h128_fin && h192_fin && h256_fin && b1_fin && b3_fin && b5_fin &&
          h128v16_fin && h128v8_fin && h128v4_fin && h128v2_fin && h192v16_fin && h192v8_fin &&
          h256v16_fin && h256v8_fin && b1v16_fin && b1v8_fin && b3v16_fin && b3v8_fin &&
          b5v16_fin && b5v8_fin);
    checks = h128_checks + h192_checks + h256_checks + b1_checks + b3_checks + b5_checks +
             h128v16_checks + h128v8_checks + h128v4_checks + h128v2_checks + h192v16_checks +
             h192v8_checks + h256v16_checks + h256v8_checks + b1v16_checks + b1v8_checks +
             b3v16_checks + b3v8_checks + b5v16_checks + b5v8_checks;
    failures = h128_fails + h192_fails + h256_fails + b1_fails + b3_fails + b5_fails +
               h128v16_fails + h128v8_fails + h128v4_fails + h128v2_fails + h192v16_fails +
               h192v8_fails + h256v16_fails + h256v8_fails + b1v16_fails + b1v8_fails +
               b3v16_fails + b3v8_fails + b5v16_fails + b5v8_fails;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
