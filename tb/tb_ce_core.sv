// tb_ce_core: tests one Column Executor core. D is loaded with random bits,
// then for every index P in 0..n-1 the core is driven through the read slots
// 0..S of one column (back to back, as the control unit does, with one idle
// cycle between columns for the index read) and each emitted segment is
// compared with the same bits of D rotated downwards by P. The segment
// numbering and the cycle on which each segment appears (two cycles after
// slot s+2; the last three cycles after slot S) are checked, and a core
// with active = 0 must emit zeros. Sizes: n = 521 with N_mem = 128 (short
// last word of 9 bits) and n = 67 with N_mem = 32.
module tb_ce_core;
  import hspa_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  `define CORE_TEST(NAME, PN, PM) \
    localparam int unsigned NAME``_S = ceil_div(PN, PM); \
    localparam int unsigned NAME``_AW = (NAME``_S > 1) ? $clog2(NAME``_S) : 1; \
    localparam int unsigned NAME``_SLW = $clog2(NAME``_S + 2); \
    logic NAME``_rst_n, NAME``_d_we, NAME``_sv, NAME``_act, NAME``_rf, NAME``_ov, NAME``_of, NAME``_fin; \
    logic [NAME``_AW-1:0] NAME``_d_waddr, NAME``_oidx; \
    logic [PM-1:0] NAME``_d_wdata, NAME``_odata; \
    logic [NAME``_SLW-1:0] NAME``_slot; \
    logic [IDX_W-1:0] NAME``_idx; \
    ce_core #(.N(PN), .NMEM(PM)) NAME``_dut (.clk, .rst_n(NAME``_rst_n), .d_we(NAME``_d_we), \
      .d_waddr(NAME``_d_waddr), .d_wdata(NAME``_d_wdata), .slot_valid(NAME``_sv), .slot(NAME``_slot), \
      .idx(NAME``_idx), .active(NAME``_act), .round_first(NAME``_rf), .seg_valid(NAME``_ov), \
      .seg_idx(NAME``_oidx), .seg_first(NAME``_of), .seg_data(NAME``_odata)); \
    initial begin : NAME``_drv \
      logic [PN-1:0] d, col; \
      int unsigned cyc, exp_s, nseg; \
      NAME``_fin = 0; NAME``_rst_n = 0; NAME``_d_we = 0; NAME``_sv = 0; NAME``_act = 1; NAME``_rf = 0; \
      NAME``_slot = '0; NAME``_idx = '0; NAME``_d_waddr = '0; NAME``_d_wdata = '0; \
      for (int m = 0; m < int'(PN); m++) d[m] = 1'($urandom()); \
      repeat (2) @(posedge clk); NAME``_rst_n <= 1; \
      for (int a = 0; a < int'(NAME``_S); a++) begin \
        logic [PM-1:0] wd; \
        for (int b = 0; b < int'(PM); b++) wd[b] = (a*PM+b < int'(PN)) ? d[a*PM+b] : 1'b1; \
        NAME``_d_we <= 1; NAME``_d_waddr <= NAME``_AW'(a); NAME``_d_wdata <= wd; \
        @(posedge clk); \
      end \
      NAME``_d_we <= 0; \
      for (int p = 0; p <= int'(PN); p++) begin \
        int unsigned pp; \
        pp = (p == int'(PN)) ? 5 : p; \
        for (int m = 0; m < int'(PN); m++) col[(m + pp) % PN] = d[m]; \
        if (p == int'(PN)) col = '0; \
        @(posedge clk); \
        for (int c = 0; c <= int'(NAME``_S); c++) begin \
          NAME``_sv <= 1; NAME``_slot <= NAME``_SLW'(c); NAME``_idx <= IDX_W'(pp); \
          NAME``_act <= (p != int'(PN)); NAME``_rf <= (p % 2 == 0); \
          @(posedge clk); \
        end \
        NAME``_sv <= 0; \
      end \
      repeat (5) @(posedge clk); \
      NAME``_fin = 1; \
    end

  // reference is taken from the driver; the monitor below checks every segment
  `CORE_TEST(a, 521, 128)
  `CORE_TEST(b, 67, 32)

  // segment checker: a segment emitted at cycle t belongs to the column whose
  // slot 0 was issued S+... cycles earlier, so the driver's expectation is
  // recomputed here from a shadow record of issued columns
  `define CORE_CHECK(NAME, PN, PM) \
    initial begin : NAME``_chk \
      int unsigned colp [$]; \
      int unsigned colact [$]; \
      int unsigned t_slot0 [$]; \
      int unsigned now, expect_seg; \
      logic [PN-1:0] d3, ref_col; \
      now = 0; expect_seg = 0; \
      @(posedge NAME``_rst_n); \
      forever begin \
        @(posedge clk); #1; now++; \
        if (NAME``_sv && NAME``_slot == '0) begin \
          colp.push_back(32'(NAME``_idx)); colact.push_back(32'(NAME``_act)); t_slot0.push_back(now); \
        end \
        if (NAME``_ov) begin \
          int unsigned s, tt; \
          s = 32'(NAME``_oidx); \
          tt = (s == NAME``_S - 1) ? (NAME``_S + 3) : (s + 4); \
          for (int m = 0; m < int'(PN); m++) ref_col[(m + colp[0]) % PN] = NAME``_drv.d[m]; \
          if (colact[0] == 0) ref_col = '0; \
          checks++; \
          if (s != expect_seg) begin failures++; $display("%s: segment %0d, expected %0d", `"NAME`", s, expect_seg); end \
          checks++; \
          if (now - t_slot0[0] != tt) begin failures++; $display("%s: segment %0d at +%0d, expected +%0d", `"NAME`", s, now - t_slot0[0], tt); end \
          for (int b = 0; b < int'(PM); b++) begin \
            logic e; \
            e = (s*PM + b < PN) ? ref_col[s*PM + b] : 1'b0; \
            if (NAME``_odata[b] != e) begin \
              failures++; $display("%s: P=%0d segment %0d bit %0d wrong %h %h", `"NAME`", colp[0], s, b, NAME``_odata, ref_col[s*PM +: PM]); break; \
            end \
          end \
          checks++; \
          expect_seg = (s == NAME``_S - 1) ? 0 : expect_seg + 1; \
          if (s == NAME``_S - 1) begin void'(colp.pop_front()); void'(colact.pop_front()); void'(t_slot0.pop_front()); end \
        end \
      end \
    end

  `CORE_CHECK(a, 521, 128)
  `CORE_CHECK(b, 67, 32)

  initial begin
    repeat (2) @(posedge clk);
    wait (a_fin && b_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
