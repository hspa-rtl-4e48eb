// tb_ce_component: t = 3 CE cores, n = 67, N_mem = 32. D is written once
// through the shared port; then rounds are issued back to back as the
// control unit does (slots 0..S and one index-read cycle), each with three
// random indices and a random clr_i pattern. Every emitted segment of every
// core is compared with the matching bits of D rotated by that core's index,
// or with zero for a cleared core, and the segment numbers must run 0..S-1
// once per round.
module tb_ce_component;
  import hspa_pkg::*;
  localparam int unsigned T = 3, N = 67, NMEM = 32;
  localparam int unsigned S = ceil_div(N, NMEM), AW = $clog2(S), SLW = $clog2(S + 2);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, d_we, slot_valid, round_first, seg_valid, seg_first;
  logic [AW-1:0] d_waddr, seg_idx;
  logic [NMEM-1:0] d_wdata;
  logic [SLW-1:0] slot;
  logic [T-1:0][IDX_W-1:0] idx;
  logic [T-1:0] clr_i;
  logic [T-1:0][NMEM-1:0] seg_data;
  logic [N-1:0] d;
  int checks = 0, failures = 0, rounds_done = 0;
  logic [T-1:0][IDX_W-1:0] q_idx [$];
  logic [T-1:0] q_clr [$];

  ce_component #(.T(T), .N(N), .NMEM(NMEM)) dut (.clk, .rst_n, .d_we, .d_waddr, .d_wdata,
    .slot_valid, .slot, .idx, .clr_i, .round_first, .seg_valid, .seg_idx, .seg_first, .seg_data);

  localparam int ROUNDS = 60;

  initial begin
    rst_n = 0; d_we = 0; slot_valid = 0; slot = '0; idx = '0; clr_i = '0; round_first = 0;
    d_waddr = '0; d_wdata = '0;
    for (int m = 0; m < int'(N); m++) d[m] = 1'($urandom());
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < int'(S); a++) begin
      logic [NMEM-1:0] w;
      for (int b = 0; b < int'(NMEM); b++) w[b] = (a * NMEM + b < int'(N)) ? d[a * NMEM + b] : 1'b0;
      d_we <= 1; d_waddr <= AW'(a); d_wdata <= w;
      @(posedge clk);
    end
    d_we <= 0;
    for (int r = 0; r < ROUNDS; r++) begin
      logic [T-1:0][IDX_W-1:0] ix;
      logic [T-1:0] cl;
      for (int j = 0; j < int'(T); j++) ix[j] = IDX_W'($urandom() % N);
      cl = (r % 4 == 3) ? T'($urandom()) : '0;
      @(posedge clk);                        // index read cycle
      for (int c = 0; c <= int'(S); c++) begin
        slot_valid <= 1; slot <= SLW'(c); idx <= ix; clr_i <= cl; round_first <= (r == 0);
        if (c == 0) begin q_idx.push_back(ix); q_clr.push_back(cl); end
        @(posedge clk);
      end
      slot_valid <= 0;
    end
    repeat (8) @(posedge clk);
    if (rounds_done != ROUNDS) begin failures++; $display("FAIL %0d rounds seen", rounds_done); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  initial begin
    int unsigned expect_s;
    expect_s = 0;
    forever begin
      @(posedge clk);
      #1;
      if (seg_valid) begin
        checks++;
        if (seg_idx != AW'(expect_s)) begin
          failures++;
          $display("FAIL segment %0d, expected %0d", seg_idx, expect_s);
        end
        for (int j = 0; j < int'(T); j++) begin
          logic [N-1:0] col;
          logic [NMEM-1:0] e;
          for (int m = 0; m < int'(N); m++) col[(m + 32'(q_idx[0][j])) % N] = d[m];
          for (int b = 0; b < int'(NMEM); b++)
            e[b] = (!q_clr[0][j] && seg_idx * NMEM + b < N) ? col[seg_idx * NMEM + b] : 1'b0;
          checks++;
          if (seg_data[j] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL core %0d index %0d segment %0d", j, q_idx[0][j], seg_idx);
          end
        end
        if (expect_s == S - 1) begin
          expect_s = 0;
          void'(q_idx.pop_front());
          void'(q_clr.pop_front());
          rounds_done++;
        end else expect_s++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
