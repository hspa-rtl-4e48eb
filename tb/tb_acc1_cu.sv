// tb_acc1_cu: Accelerator-I control unit with n = 100, N_mem = 32 (two
// indices per RAM_P word), t = 4 and omega = 10: three rounds, two index-read
// cycles each, the last round with two of four cores cleared. A RAM_P model
// with one cycle of latency answers the reads. Checked: the RAM_P addresses,
// the slot sequence 0..S of every round, the indices each core holds at
// slot 0, clr_i and round_first per round, the state names (Full, then Last
// round), the number of rounds and the latency from start to done. A second
// run checks that the unit restarts.
module tb_acc1_cu;
  import hspa_pkg::*;
  localparam int unsigned N = 100, OMEGA = 10, T = 4, NMEM = 32;
  localparam int unsigned S = ceil_div(N, NMEM), SLW = $clog2(S + 2), IPW = NMEM / IDX_W;
  localparam int unsigned RDC = T / IPW, R = ceil_div(OMEGA, T), PD = R * RDC, PAW = $clog2(PD);
  localparam int unsigned LAT = 1 + R * (RDC + S + 1) + 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, p_re, slot_valid, round_first, busy, done;
  logic [PAW-1:0] p_raddr;
  logic [NMEM-1:0] p_rdata;
  logic [SLW-1:0] slot;
  logic [T-1:0][IDX_W-1:0] idx;
  logic [T-1:0] clr_i;
  acc1_state_e state;
  int unsigned P [PD * IPW];
  int checks = 0, failures = 0;

  acc1_cu #(.N(N), .OMEGA(OMEGA), .T(T), .NMEM(NMEM)) dut (.clk, .rst_n, .start, .p_re, .p_raddr,
    .p_rdata, .slot_valid, .slot, .idx, .clr_i, .round_first, .state, .busy, .done);

  always_ff @(posedge clk)
    if (p_re)
      for (int b = 0; b < int'(IPW); b++) p_rdata[b * IDX_W +: IDX_W] <= IDX_W'(P[p_raddr * IPW + b]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      int unsigned cyc, round, rd_cnt, next_slot;
      for (int i = 0; i < int'(PD * IPW); i++) P[i] = 1 + ($urandom() % (N - 1));
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0; round = 0; rd_cnt = 0; next_slot = 0;
      #1;
      while (!done && cyc < LAT + 50) begin
        if (p_re) begin
          check(p_raddr == PAW'(round * RDC + rd_cnt), $sformatf("RAM_P address %0d", p_raddr));
          rd_cnt++;
        end
        if (slot_valid) begin
          check(slot == SLW'(next_slot), $sformatf("slot %0d, expected %0d", slot, next_slot));
          check(state == ((round == R - 1 && OMEGA % T != 0) ? A1_LAST : A1_FULL), "state name");
          if (next_slot == 0) begin
            check(rd_cnt == RDC, $sformatf("%0d index reads in round %0d", rd_cnt, round));
            check(round_first == (round == 0), "round_first");
            for (int j = 0; j < int'(T); j++) begin
              bit act;
              act = round * T + j < OMEGA;
              check(clr_i[j] == !act, $sformatf("clr_i[%0d] round %0d", j, round));
              if (act) check(idx[j] == IDX_W'(P[round * T + j]),
                             $sformatf("core %0d round %0d index %0d, expected %0d", j, round, idx[j], P[round * T + j]));
            end
          end
          if (next_slot == S) begin
            next_slot = 0; round++; rd_cnt = 0;
          end else next_slot++;
        end
        @(posedge clk);
        #1;
        cyc++;
      end
      check(done, "done");
      check(round == R, $sformatf("%0d rounds", round));
      check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
      check(!busy, "busy low when done");
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
