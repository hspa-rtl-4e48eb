// tb_acc2_cu: Accelerator-II control unit with n = 211, omega = 7, v = 4
// (k = 4) and len_load = 32. An index source with one cycle of latency
// answers idx_addr. Checked, cycle by cycle: one Reset cycle with clr, Load
// for ceil(n/len_load) cycles, then for every index a window of k stages of
// v-1 cycles in which 'count' is the stage and en is high in exactly the
// first eta_j cycles, eta_j being digit j (most significant first) of
// P[i] - P[i-1] mod n, acc high only in the window's last cycle; then
// Output for ceil(n/len_load) cycles with csh_out, and done.
module tb_acc2_cu;
  import hspa_pkg::*;
  localparam int unsigned N = 211, OMEGA = 7, V = 4, LEN = 32;
  localparam int unsigned K = num_stages(N, V), CNTW = $clog2(K), IAW = $clog2(OMEGA + 1);
  localparam int unsigned L = ceil_div(N, LEN), LV = $clog2(V);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, clr, load, en, acc, csh_out, done;
  logic [IAW-1:0] idx_addr;
  logic [IDX_W-1:0] idx;
  logic [CNTW-1:0] count;
  acc2_state_e state;
  int unsigned P [OMEGA + 1];
  int checks = 0, failures = 0;

  acc2_cu #(.N(N), .OMEGA(OMEGA), .V(V), .LEN_LOAD(LEN)) dut (.clk, .rst_n, .start, .idx_addr, .idx,
    .clr, .load, .en, .count, .acc, .csh_out, .state, .done);

  always_ff @(posedge clk) idx <= IDX_W'(P[idx_addr]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 0; start = 0;
    for (int i = 0; i <= int'(OMEGA); i++) P[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      int unsigned prev;
      for (int i = 0; i < int'(OMEGA); i++)
        P[i] = (run == 0 && i == 1) ? 0 : (run == 0 && i == 2) ? N - 1 : $urandom() % N;
      start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      check(clr && state == A2_RESET, "reset state");
      step();
      for (int c = 0; c < int'(L); c++) begin
        check(load && state == A2_LOAD && !en && !acc && !csh_out, $sformatf("load cycle %0d", c));
        step();
      end
      prev = 0;
      for (int i = 0; i < int'(OMEGA); i++) begin
        int unsigned delta;
        delta = (P[i] + N - prev) % N;
        prev = P[i];
        for (int j = 0; j < int'(K); j++) begin
          int unsigned eta;
          eta = (delta >> (LV * (K - 1 - j))) % V;
          for (int c = 0; c < int'(V) - 1; c++) begin
            check(state == A2_CALC && !load && !csh_out, "calculate state");
            check(count == CNTW'(j), $sformatf("count %0d, expected %0d", count, j));
            check(en == (c < int'(eta)), $sformatf("index %0d stage %0d cycle %0d en %0d, eta %0d", i, j, c, en, eta));
            check(acc == (j == int'(K) - 1 && c == int'(V) - 2), "acc strobe");
            step();
          end
        end
      end
      for (int c = 0; c < int'(L); c++) begin
        check(csh_out && state == A2_OUTPUT && !en && !done, $sformatf("output cycle %0d", c));
        step();
      end
      check(done && state == A2_DONE, "done");
      step();
      check(done, "done held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
