// tb_hspa_acc2: end-to-end test of Accelerator-II at reduced n for the four
// chunk sizes the document evaluates, v = 2, 4, 8 and 16, with a word size
// that does not divide n. acc2_host checks each product and the lengths of
// the Load, Calculate and Output phases.
module tb_hspa_acc2;
  import hspa_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  `define ACC2_INST(NAME, PN, PO, PV, PL, PTR, PSD) \
    logic NAME``_rst_n, NAME``_start, NAME``_d_req, NAME``_dv, NAME``_done, NAME``_fin; \
    logic [PL-1:0] NAME``_din, NAME``_dout; \
    logic [$clog2(PO + 1)-1:0] NAME``_ia; \
    logic [IDX_W-1:0] NAME``_idx; \
    int NAME``_checks, NAME``_fails, NAME``_nsh, NAME``_nid; \
    hspa_acc2 #(.N(PN), .OMEGA(PO), .V(PV), .LEN_LOAD(PL)) NAME``_dut ( \
      .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .d_req(NAME``_d_req), .din(NAME``_din), \
      .idx_addr(NAME``_ia), .idx(NAME``_idx), .dout_valid(NAME``_dv), .dout(NAME``_dout), .done(NAME``_done)); \
    acc2_host #(.N(PN), .OMEGA(PO), .V(PV), .LEN_LOAD(PL), .TRIALS(PTR), .SEED(PSD)) NAME``_host ( \
      .clk, .rst_n(NAME``_rst_n), .start(NAME``_start), .d_req(NAME``_d_req), .din(NAME``_din), \
      .idx_addr(NAME``_ia), .idx(NAME``_idx), .dout_valid(NAME``_dv), .dout(NAME``_dout), .done(NAME``_done), \
      .finished(NAME``_fin), .checks(NAME``_checks), .failures(NAME``_fails), \
      .n_shift_stages(NAME``_nsh), .n_idle_stages(NAME``_nid));

  `ACC2_INST(v2, 101, 9, 2, 32, 3, 5)
  `ACC2_INST(v4, 211, 12, 4, 32, 3, 6)
  `ACC2_INST(v8, 523, 14, 8, 128, 3, 7)
  `ACC2_INST(v16, 1031, 10, 16, 128, 2, 8)

  initial begin
    repeat (2) @(posedge clk);
    wait (v2_fin && v4_fin && v8_fin && v16_fin);
    $display("stages that shifted=%0d, stages that idled=%0d",
             v2_nsh + v4_nsh + v8_nsh + v16_nsh, v2_nid + v4_nid + v8_nid + v16_nid);
    $display("TB_RESULT checks=%0d failures=%0d",
             v2_checks + v4_checks + v8_checks + v16_checks, v2_fails + v4_fails + v8_fails + v16_fails);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             v2_checks + v4_checks + v8_checks + v16_checks, v2_fails + v4_fails + v8_fails + v16_fails + 1);
    $finish;
  end
endmodule
