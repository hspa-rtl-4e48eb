// acc2_host: test host and checker for Accelerator-II (hspa_acc2), used by
// the testbenches that contain one. Per trial it draws a random D and omega
// distinct random indices (the first trial forces 0, 1, n-1 and a repeated
// pattern that needs the largest digit v-1), pulses start, feeds D most
// significant word first while d_req is high, answers idx_addr with P[a]
// one cycle later, collects the output words and compares W with a bit-level
// reference W = sum over i of D * x^P[i] mod (x^n + 1). It checks the phase
// lengths: Load and Output ceil(n/len_load) cycles each and Calculate
// omega*(v-1)*k cycles. It counts stages that shifted (digit > 0) and stages
// that had to idle to stay constant time (digit < v-1).
module acc2_host
  import hspa_pkg::*;
#(
  parameter int unsigned N        = 101,
  parameter int unsigned OMEGA    = 9,
  parameter int unsigned V        = 4,
  parameter int unsigned LEN_LOAD = 32,
  parameter int unsigned TRIALS   = 3,
  parameter int unsigned SEED     = 1,
  localparam int unsigned K       = num_stages(N, V),
  localparam int unsigned IAW     = $clog2(OMEGA + 1),
  localparam int unsigned L       = ceil_div(N, LEN_LOAD)
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                start,
  input  logic                d_req,
  output logic [LEN_LOAD-1:0] din,
  input  logic [IAW-1:0]      idx_addr,
  output logic [IDX_W-1:0]    idx,
  input  logic                dout_valid,
  input  logic [LEN_LOAD-1:0] dout,
  input  logic                done,
  output logic                finished,
  output int                  checks,
  output int                  failures,
  output int                  n_shift_stages,
  output int                  n_idle_stages
);

  localparam int unsigned CALC = OMEGA * (V - 1) * K;
  localparam int unsigned LV   = $clog2(V);

  logic [N-1:0] d_poly, w_ref, w_got;
  int unsigned  p [OMEGA + 1];
  int unsigned  word_c;

  function automatic logic [N-1:0] rot_down(input logic [N-1:0] x, input int unsigned s);
    logic [N-1:0] r;
    for (int m = 0; m < int'(N); m++) r[(m + s) % N] = x[m];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("acc2_host(N=%0d,V=%0d): FAIL %s", N, V, what);
    end
  endtask

  // index source with one cycle of latency
  always_ff @(posedge clk) idx <= (idx_addr < IAW'(OMEGA)) ? IDX_W'(p[idx_addr]) : '0;

  // D source: word c of the load is coefficients (L-1-c)*len_load ..
  always_comb begin
    din = '0;
    for (int b = 0; b < int'(LEN_LOAD); b++)
      if ((int'(L) - 1 - int'(word_c)) * int'(LEN_LOAD) + b < int'(N))
        din[b] = d_poly[(L - 1 - word_c) * LEN_LOAD + b];
  end

  initial begin
    int unsigned seed, cand, cyc, t_load, t_calc, t_out, prev, delta;
    logic [N-1:0] used;
    seed = SEED;
    checks = 0; failures = 0; n_shift_stages = 0; n_idle_stages = 0;
    finished = 0; rst_n = 0; start = 0; word_c = 0; d_poly = N'(0);
    for (int i = 0; i <= int'(OMEGA); i++) p[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int tr = 0; tr < int'(TRIALS); tr++) begin
      for (int m = 0; m < int'(N); m++) d_poly[m] = 1'($urandom(seed + 104729 * tr + m));
      used = N'(0);
      for (int i = 0; i < int'(OMEGA); i++) begin
        if (tr == 0 && i == 0)      cand = 0;
        else if (tr == 0 && i == 1) cand = N - 1;
        else if (tr == 0 && i == 2) cand = 1;
        else if (tr == 0 && i == 3) cand = 1 + (V ** K - 1) % N;
        else cand = $urandom() % N;
        while (used[cand]) cand = (cand + 1) % N;
        used[cand] = 1'b1;
        p[i] = cand;
      end
      w_ref = N'(0);
      prev = 0;
      for (int i = 0; i < int'(OMEGA); i++) begin
        w_ref ^= rot_down(d_poly, p[i]);
        delta = (p[i] + N - prev) % N;
        prev = p[i];
        for (int j = 0; j < int'(K); j++) begin
          int unsigned eta;
          eta = (delta >> (LV * (K - 1 - j))) % V;
          if (eta > 0) n_shift_stages++;
          if (eta < V - 1) n_idle_stages++;
        end
      end
      // run
      word_c = 0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0; t_load = 0; t_calc = 0; t_out = 0; w_got = N'(0);
      #1;
      check(done == 1'b0, "done cleared by start");
      while (!done && cyc < 4 * (CALC + 2 * L) + 100) begin
        bit was_req;
        was_req = d_req;
        if (d_req) t_load++;
        else if (dout_valid) begin
          for (int b = 0; b < int'(LEN_LOAD); b++) begin
            int pos;
            pos = int'(N) - (int'(t_out) + 1) * int'(LEN_LOAD) + b;
            if (pos >= 0) w_got[pos] = dout[b];
          end
          t_out++;
        end else if (t_load == L && t_out == 0) t_calc++;
        @(posedge clk);
        #1;
        if (was_req) word_c++;
        cyc++;
      end
      check(done === 1'b1, $sformatf("done reached (trial %0d)", tr));
      check(t_load == L, $sformatf("load %0d cycles, expected %0d", t_load, L));
      check(t_calc == CALC, $sformatf("calculate %0d cycles, expected %0d", t_calc, CALC));
      check(t_out == L, $sformatf("output %0d cycles, expected %0d", t_out, L));
      check(w_got == w_ref, $sformatf("product (trial %0d)", tr));
      @(posedge clk);
    end
    finished = 1;
  end

endmodule
