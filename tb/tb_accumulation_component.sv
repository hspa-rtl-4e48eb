// tb_accumulation_component: t = 4, n = 100, N_mem = 32 (S = 4). Several
// rounds of random segments arrive, one segment per cycle as the CE
// component delivers them, with the first round marked seg_first (RAM_W is
// never cleared, so its initial contents are random). After each
// multiplication W is read back through the output port and compared with
// the XOR of all segments of all its rounds. Rounds follow each other with
// the same gaps the control unit leaves.
module tb_accumulation_component;
  import hspa_pkg::*;
  localparam int unsigned T = 4, N = 100, NMEM = 32;
  localparam int unsigned S = ceil_div(N, NMEM), AW = $clog2(S);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, seg_valid, seg_first, out_re, busy;
  logic [AW-1:0] seg_idx, out_addr;
  logic [T-1:0][NMEM-1:0] seg_data;
  logic [NMEM-1:0] out_data;
  logic [NMEM-1:0] model [S];
  int checks = 0, failures = 0;

  accumulation_component #(.T(T), .N(N), .NMEM(NMEM)) dut (.clk, .rst_n, .seg_valid, .seg_idx,
    .seg_first, .seg_data, .out_re, .out_addr, .out_data, .busy);

  initial begin
    rst_n = 0; seg_valid = 0; seg_first = 0; out_re = 0; seg_idx = '0; out_addr = '0; seg_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int mul = 0; mul < 6; mul++) begin
      int rounds;
      rounds = 1 + mul;
      for (int r = 0; r < rounds; r++) begin
        for (int s = 0; s < int'(S); s++) begin
          logic [T-1:0][NMEM-1:0] sd;
          for (int j = 0; j < int'(T); j++) sd[j] = $urandom();
          seg_valid <= 1; seg_idx <= AW'(s); seg_first <= (r == 0); seg_data <= sd;
          if (r == 0) model[s] = '0;
          for (int j = 0; j < int'(T); j++) model[s] ^= sd[j];
          @(posedge clk);
        end
        seg_valid <= 0;
        repeat (1 + (r % 3)) @(posedge clk);
      end
      repeat (3) @(posedge clk);
      for (int s = 0; s < int'(S); s++) begin
        out_re <= 1; out_addr <= AW'(s);
        @(posedge clk);
        out_re <= 0;
        #1;
        checks++;
        if (out_data !== model[s]) begin
          failures++;
          $display("FAIL multiplication %0d word %0d: %h expected %h", mul, s, out_data, model[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
