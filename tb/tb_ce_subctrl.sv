// tb_ce_subctrl: for every index P of n = 521 (N_mem = 128, S = 5 words, the
// last holding 9 bits), drives the read slots 0..S and checks the read
// addresses, which must start at word (n - P) mod n / N_mem and step round
// the memory, and the tagged bit ranges: the first word from the start
// offset, the short last word 9 bits, the repeated first word only below
// the offset, n bits in total, and the tag one cycle after the request.
module tb_ce_subctrl;
  import hspa_pkg::*;
  localparam int unsigned N = 521, NMEM = 128;
  localparam int unsigned S = ceil_div(N, NMEM), AW = $clog2(S), SLW = $clog2(S + 2), BW = $clog2(NMEM + 1);
  localparam int unsigned LAST = N - (S - 1) * NMEM;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, slot_valid, rd_en, t_valid, t_first;
  logic [SLW-1:0] slot, t_slot;
  logic [IDX_W-1:0] idx;
  logic [AW-1:0] rd_addr;
  logic [BW-1:0] t_lo, t_hi;
  int checks = 0, failures = 0;

  ce_subctrl #(.N(N), .NMEM(NMEM)) dut (.clk, .rst_n, .slot_valid, .slot, .idx,
    .rd_en, .rd_addr, .t_valid, .t_first, .t_slot, .t_lo, .t_hi);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; slot_valid = 0; slot = '0; idx = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < int'(N); p++) begin
      int unsigned q, a0, off, total, ea, elo, ehi;
      q = (N - p) % N; a0 = q / NMEM; off = q % NMEM; total = 0;
      for (int c = 0; c <= int'(S); c++) begin
        slot_valid <= 1; slot <= SLW'(c); idx <= IDX_W'(p);
        #1;
        ea  = (a0 + c) % S;
        elo = (c == 0) ? off : 0;
        ehi = (c == int'(S)) ? off : (ea == S - 1) ? LAST : NMEM;
        check(rd_en && rd_addr == AW'(ea), $sformatf("P=%0d slot %0d address %0d, expected %0d", p, c, rd_addr, ea));
        @(posedge clk);
        #1;
        check(t_valid && t_slot == SLW'(c) && t_first == (c == 0) && t_lo == BW'(elo) && t_hi == BW'(ehi),
              $sformatf("P=%0d slot %0d tag lo=%0d hi=%0d, expected %0d %0d", p, c, t_lo, t_hi, elo, ehi));
        total += 32'(t_hi) - 32'(t_lo);
      end
      check(total == N, $sformatf("P=%0d column has %0d bits", p, total));
      slot_valid <= 0;
      @(posedge clk);
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
