// tb_ao_component: AO component with n = 211 and len_load = 32. Clears W,
// accumulates random columns (with gaps where acc = 0) and checks W against
// their XOR after every cycle, then shifts W out with csh_out and checks that
// the ceil(n/len_load) output words are W from the most significant end,
// the last word padded with zeros below W[0].
module tb_ao_component;
  import hspa_pkg::*;
  localparam int unsigned N = 211, LEN = 32, L = ceil_div(N, LEN);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, clr, acc, csh_out;
  logic [N-1:0] d, wq, model;
  logic [LEN-1:0] dout;
  int checks = 0, failures = 0;

  ao_component #(.N(N), .LEN_LOAD(LEN)) dut (.clk, .rst_n, .clr, .acc, .d, .csh_out, .dout, .wq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 0; clr = 0; acc = 0; csh_out = 0; d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 3; run++) begin
      clr <= 1;
      @(posedge clk);
      clr <= 0;
      model = '0;
      for (int i = 0; i < 40; i++) begin
        logic [N-1:0] x;
        bit a;
        for (int m = 0; m < int'(N); m++) x[m] = 1'($urandom());
        a = (i % 3) != 1;
        d <= x; acc <= a;
        @(posedge clk);
        #1;
        if (a) model ^= x;
        check(wq == model, $sformatf("accumulate step %0d", i));
      end
      acc <= 0;
      for (int c = 0; c < int'(L); c++) begin
        logic [LEN-1:0] e;
        csh_out <= 1;
        #1;
        for (int b = 0; b < int'(LEN); b++) begin
          int pos;
          pos = int'(N) - (c + 1) * int'(LEN) + b;
          e[b] = (pos >= 0) ? model[pos] : 1'b0;
        end
        check(dout == e, $sformatf("output word %0d", c));
        @(posedge clk);
      end
      csh_out <= 0;
      @(posedge clk);
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
