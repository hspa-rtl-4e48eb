// tb_column_former: feeds the column former the words of random columns of
// rot(D), n = 521 and N_mem = 128, exactly as the memory and sub-control cell
// would (word, valid bit range, slot), one column after another with one idle
// cycle between them. Checks each segment against D rotated downwards by P,
// its number, its cycle (registered at the end of the cycle that brings the
// word of slot s+2; the last segment one cycle after slot S), zeros when active = 0, and that
// seg_first follows round_first.
module tb_column_former;
  import hspa_pkg::*;
  localparam int unsigned N = 521, NMEM = 128;
  localparam int unsigned S = ceil_div(N, NMEM), AW = $clog2(S), SLW = $clog2(S + 2), BW = $clog2(NMEM + 1);
  localparam int unsigned LAST = N - (S - 1) * NMEM;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_first, active, round_first, seg_valid, seg_first;
  logic [SLW-1:0] in_slot;
  logic [BW-1:0] in_lo, in_hi;
  logic [NMEM-1:0] in_data, seg_data;
  logic [AW-1:0] seg_idx;
  logic [N-1:0] d;
  logic [S-1:0][NMEM-1:0] words;
  int checks = 0, failures = 0;

  column_former #(.N(N), .NMEM(NMEM)) dut (.clk, .rst_n, .in_valid, .in_first, .in_slot,
    .in_lo, .in_hi, .in_data, .active, .round_first, .seg_valid, .seg_idx, .seg_first, .seg_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_slot = '0; in_lo = '0; in_hi = '0; in_data = '0;
    active = 1; round_first = 0;
    for (int m = 0; m < int'(N); m++) d[m] = 1'($urandom());
    for (int a = 0; a < int'(S); a++)
      for (int b = 0; b < int'(NMEM); b++)
        words[a][b] = (a * NMEM + b < int'(N)) ? d[a * NMEM + b] : 1'($urandom());
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      int unsigned p, q, a0, off, seen;
      logic [N-1:0] col;
      bit act, rf;
      p = (k < 4) ? ((k == 0) ? 0 : (k == 1) ? N - 1 : (k == 2) ? N - LAST + 1 : 1) : $urandom() % N;
      act = (k % 5) != 3; rf = (k % 3) == 0;
      q = (N - p) % N; a0 = q / NMEM; off = q % NMEM;
      for (int m = 0; m < int'(N); m++) col[(m + p) % N] = d[m];
      seen = 0;
      for (int c = 0; c <= int'(S) + 2; c++) begin
        int unsigned a;
        a = (a0 + c) % S;
        in_valid <= (c <= int'(S));
        in_first <= (c == 0);
        in_slot  <= SLW'(c);
        in_data  <= words[a];
        in_lo    <= BW'((c == 0) ? off : 0);
        in_hi    <= BW'((c == int'(S)) ? off : (a == S - 1) ? LAST : NMEM);
        active <= act; round_first <= rf;
        @(posedge clk);
        #1;
        // the segment completed by slot c (c-2, or the last one after slot S)
        // is registered at the edge that ends the slot
        if (c >= 2 && c <= int'(S) + 1) begin
          int unsigned s;
          logic [NMEM-1:0] e;
          s = (c == int'(S) + 1) ? S - 1 : c - 2;
          for (int b = 0; b < int'(NMEM); b++) e[b] = (act && s * NMEM + b < N) ? col[s * NMEM + b] : 1'b0;
          check(seg_valid && seg_idx == AW'(s), $sformatf("P=%0d no segment %0d at slot %0d", p, s, c));
          check(seg_data == e, $sformatf("P=%0d segment %0d data", p, s));
          check(seg_first == rf, $sformatf("P=%0d seg_first", p));
          seen++;
        end else begin
          check(!seg_valid, $sformatf("P=%0d unexpected segment at slot %0d", p, c));
        end
      end
      check(seen == S, $sformatf("P=%0d saw %0d segments", p, seen));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
