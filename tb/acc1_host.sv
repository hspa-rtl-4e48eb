// acc1_host: test host and checker for Accelerator-I (hspa_acc1), used by
// the testbenches that contain one. For each trial it draws a random dense
// D and omega distinct random indices (the first trial forces the corner
// indices 0, 1 and n-1), loads D and the indices through the write ports,
// pulses start, counts the cycles to done, reads W back and compares it with
// a reference computed here bit by bit: W = sum over i of D * x^P[i]
// mod (x^n + 1). It also checks the latency against
// 1 + R*(RDC + S + 1) + 4 and counts how often a run used a partial last
// round and how often a column wrapped across the short last word of D.
module acc1_host
  import hspa_pkg::*;
#(
  parameter int unsigned N      = 101,
  parameter int unsigned OMEGA  = 11,
  parameter int unsigned T      = 4,
  parameter int unsigned NMEM   = 32,
  parameter int unsigned TRIALS = 4,
  parameter int unsigned SEED   = 1,
  localparam int unsigned S     = ceil_div(N, NMEM),
  localparam int unsigned AW    = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned IPW   = NMEM / IDX_W,
  localparam int unsigned RDC   = T / IPW,
  localparam int unsigned R     = ceil_div(OMEGA, T),
  localparam int unsigned PD    = R * RDC,
  localparam int unsigned PAW   = (PD > 1) ? $clog2(PD) : 1
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            d_we,
  output logic [AW-1:0]   d_waddr,
  output logic [NMEM-1:0] d_wdata,
  output logic            p_we,
  output logic [PAW-1:0]  p_waddr,
  output logic [NMEM-1:0] p_wdata,
  output logic            start,
  input  logic            busy,
  input  logic            done,
  output logic            w_re,
  output logic [AW-1:0]   w_raddr,
  input  logic [NMEM-1:0] w_rdata,
  output logic            finished,
  output int              checks,
  output int              failures,
  output int              n_partial_last,
  output int              n_wrap_cols
);

  localparam int unsigned LAT = 1 + R * (RDC + S + 1) + 4;

  logic [N-1:0] d_poly, w_ref, w_got;
  int unsigned  p [OMEGA];
  logic [N-1:0] used;

  function automatic logic [N-1:0] rot_down(input logic [N-1:0] x, input int unsigned s);
    logic [N-1:0] r;
    for (int m = 0; m < int'(N); m++) r[(m + s) % N] = x[m];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("acc1_host(N=%0d): FAIL %s", N, what);
    end
  endtask

  initial begin
    int unsigned seed, cyc, cand;
    seed = SEED;
    checks = 0; failures = 0; n_partial_last = 0; n_wrap_cols = 0;
    finished = 0;
    rst_n = 0; d_we = 0; p_we = 0; start = 0; w_re = 0;
    d_waddr = '0; d_wdata = '0; p_waddr = '0; p_wdata = '0; w_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int tr = 0; tr < int'(TRIALS); tr++) begin
      // operands
      for (int m = 0; m < int'(N); m++) d_poly[m] = 1'($urandom(seed + 7919 * tr + m));
      used = N'(0);
      for (int i = 0; i < int'(OMEGA); i++) begin
        if (tr == 0 && i == 0)      cand = 0;
        else if (tr == 0 && i == 1) cand = N - 1;
        else if (tr == 0 && i == 2) cand = 1;
        else begin
          cand = $urandom() % N;
          while (used[cand]) cand = (cand + 1) % N;
        end
        used[cand] = 1'b1;
        p[i] = cand;
      end
      w_ref = N'(0);
      for (int i = 0; i < int'(OMEGA); i++) begin
        w_ref ^= rot_down(d_poly, p[i]);
        // the column starts at q = n - P[i]; it wraps across the short word
        // unless it starts in word 0 at offset 0
        if (((N - p[i]) % N) % NMEM != 0) n_wrap_cols++;
      end
      if (OMEGA % T != 0) n_partial_last++;
      // load D and P
      for (int a = 0; a < int'(S); a++) begin
        logic [NMEM-1:0] wd;
        for (int b = 0; b < int'(NMEM); b++)
          wd[b] = (a * NMEM + b < int'(N)) ? d_poly[a * NMEM + b] : 1'($urandom());
        d_we    <= 1'b1;
        d_waddr <= AW'(a);
        d_wdata <= wd;
        @(posedge clk);
      end
      d_we <= 1'b0;
      for (int a = 0; a < int'(PD); a++) begin
        logic [NMEM-1:0] wp;
        for (int b = 0; b < int'(IPW); b++)
          wp[b * IDX_W +: IDX_W] = (a * IPW + b < int'(OMEGA)) ? IDX_W'(p[a * IPW + b])
                                                                : IDX_W'($urandom());
        p_we    <= 1'b1;
        p_waddr <= PAW'(a);
        p_wdata <= wp;
        @(posedge clk);
      end
      p_we <= 1'b0;
      // run
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      cyc = 0;
      check(busy == 1'b1 && done == 1'b0, "busy after start");
      while (!done && cyc < LAT + 100) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      @(posedge clk);
      check(done === 1'b1, $sformatf("done reached (trial %0d)", tr));
      check(cyc == LAT, $sformatf("latency %0d, expected %0d", cyc, LAT));
      // read W
      w_got = N'(0);
      for (int a = 0; a < int'(S); a++) begin
        w_re    <= 1'b1;
        w_raddr <= AW'(a);
        @(posedge clk);
        w_re <= 1'b0;
        @(posedge clk);
        #1;
        for (int b = 0; b < int'(NMEM); b++)
          if (a * NMEM + b < int'(N)) w_got[a * NMEM + b] = w_rdata[b];
      end
      check(w_got == w_ref, $sformatf("product (trial %0d)", tr));
      for (int a = 0; a < int'(S); a++)
        for (int b = 0; b < int'(NMEM); b++)
          if (a * NMEM + b < int'(N) && w_got[a * NMEM + b] != w_ref[a * NMEM + b]) begin
            failures++;
            $display("  first wrong bit W[%0d]", a * NMEM + b);
            a = S; break;
          end
    end
    finished = 1;
  end

endmodule
