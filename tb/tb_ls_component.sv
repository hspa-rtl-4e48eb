// tb_ls_component: LS component with n = 211, v = 4 (k = 4 stages, shift
// distances 64, 16, 4, 1) and len_load = 32. Loads a random D, most
// significant word first, and checks the register holds D; then applies
// random shift commands (en, count) and checks every result against a
// circular downward shift by v^(k-1-count) computed bit by bit, checks that
// en = 0 holds the value, that dnext always equals the next value, and that
// clr empties the register.
module tb_ls_component;
  import hspa_pkg::*;
  localparam int unsigned N = 211, V = 4, LEN = 32;
  localparam int unsigned K = num_stages(N, V), CNTW = $clog2(K), L = ceil_div(N, LEN);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, clr, load, en;
  logic [LEN-1:0] din;
  logic [CNTW-1:0] count;
  logic [N-1:0] dq, dnext, model, d;
  int checks = 0, failures = 0;

  ls_component #(.N(N), .V(V), .LEN_LOAD(LEN)) dut (.clk, .rst_n, .clr, .load, .din, .en, .count, .dq, .dnext);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; clr = 0; load = 0; en = 0; din = '0; count = '0;
    for (int m = 0; m < int'(N); m++) d[m] = 1'($urandom());
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < int'(L); c++) begin
      logic [LEN-1:0] w;
      for (int b = 0; b < int'(LEN); b++)
        w[b] = ((L - 1 - c) * LEN + b < N) ? d[(L - 1 - c) * LEN + b] : 1'b1;
      load <= 1; din <= w;
      @(posedge clk);
    end
    load <= 0;
    #1;
    check(dq == d, "loaded value");
    model = d;
    for (int i = 0; i < 400; i++) begin
      int unsigned j, p;
      logic [N-1:0] nxt;
      j = $urandom() % K;
      p = V ** (K - 1 - j);
      en <= (i % 5) != 0; count <= CNTW'(j);
      #1;
      if (en) for (int m = 0; m < int'(N); m++) nxt[(m + p) % N] = model[m];
      else nxt = model;
      check(dnext == nxt, $sformatf("dnext step %0d", i));
      @(posedge clk);
      #1;
      model = nxt;
      check(dq == model, $sformatf("step %0d stage %0d en %0d", i, j, en));
    end
    en <= 0; clr <= 1;
    @(posedge clk);
    clr <= 0;
    #1;
    check(dq == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
