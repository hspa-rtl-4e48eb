// tb_hspa_acc1: end-to-end test of Accelerator-I at three reduced sizes:
// t = 4 with two RAM_P words per round and a partial last round; t = 2 with
// omega a multiple of t (no last round); and t = 8 with N_mem = 128 and one
// RAM_P word per round, as in the full-size design. Products and cycle
// counts are checked by acc1_host.
module tb_hspa_acc1;
  import hspa_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  `define ACC1_INST(NAME, PN, PO, PT, PM, PTR, PSD) \
    localparam int unsigned NAME``_S = ceil_div(PN, PM); \
    localparam int unsigned NAME``_AW = (NAME``_S > 1) ? $clog2(NAME``_S) : 1; \
    localparam int unsigned NAME``_PD = ceil_div(PO, PT) * (PT / (PM / IDX_W)); \
    localparam int unsigned NAME``_PAW = (NAME``_PD > 1) ? $clog2(NAME``_PD) : 1; \
    logic NAME``_rst_n, NAME``_d_we, NAME``_p_we, NAME``_start, NAME``_busy, NAME``_done, NAME``_w_re, NAME``_fin; \
    logic [NAME``_AW-1:0] NAME``_d_waddr, NAME``_w_raddr; \
    logic [NAME``_PAW-1:0] NAME``_p_waddr; \
    logic [PM-1:0] NAME``_d_wdata, NAME``_p_wdata, NAME``_w_rdata; \
    int NAME``_checks, NAME``_fails, NAME``_npl, NAME``_nwr; \
    hspa_acc1 #(.N(PN), .OMEGA(PO), .T(PT), .NMEM(PM)) NAME``_dut ( \
      .clk, .rst_n(NAME``_rst_n), .d_we(NAME``_d_we), .d_waddr(NAME``_d_waddr), .d_wdata(NAME``_d_wdata), \
      .p_we(NAME``_p_we), .p_waddr(NAME``_p_waddr), .p_wdata(NAME``_p_wdata), .start(NAME``_start), \
      .busy(NAME``_busy), .done(NAME``_done), .w_re(NAME``_w_re), .w_raddr(NAME``_w_raddr), .w_rdata(NAME``_w_rdata)); \
    acc1_host #(.N(PN), .OMEGA(PO), .T(PT), .NMEM(PM), .TRIALS(PTR), .SEED(PSD)) NAME``_host ( \
      .clk, .rst_n(NAME``_rst_n), .d_we(NAME``_d_we), .d_waddr(NAME``_d_waddr), .d_wdata(NAME``_d_wdata), \
      .p_we(NAME``_p_we), .p_waddr(NAME``_p_waddr), .p_wdata(NAME``_p_wdata), .start(NAME``_start), \
      .busy(NAME``_busy), .done(NAME``_done), .w_re(NAME``_w_re), .w_raddr(NAME``_w_raddr), .w_rdata(NAME``_w_rdata), \
      .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
      .n_partial_last(NAME``_npl), .n_wrap_cols(NAME``_nwr));

  `ACC1_INST(c1, 101, 11, 4, 32, 4, 11)
  `ACC1_INST(c2, 67, 6, 2, 32, 3, 22)
  `ACC1_INST(c3, 521, 19, 8, 128, 3, 33)

  int checks, failures;

  initial begin
    checks = 0; failures = 0;
    repeat (2) @(posedge clk);
    wait (c1_fin && c2_fin && c3_fin);
    checks   = c1_checks + c2_checks + c3_checks;
    failures = c1_fails + c2_fails + c3_fails;
    $display("partial last rounds=%0d, wrapping columns=%0d", c1_npl + c3_npl, c1_nwr + c2_nwr + c3_nwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1_checks + c2_checks + c3_checks,
             c1_fails + c2_fails + c3_fails + 1);
    $finish;
  end
endmodule
