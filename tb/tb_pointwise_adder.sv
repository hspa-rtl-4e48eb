// tb_pointwise_adder: checks the XOR tree against a bit-by-bit sum in GF(2)
// of t = 8 random 128-bit segments and a random W segment, plus the corner
// cases of all-zero and all-one inputs.
module tb_pointwise_adder;
  localparam int unsigned T = 8, NMEM = 128;

  logic [T-1:0][NMEM-1:0] seg;
  logic [NMEM-1:0]        w_in, w_out, expect_w;
  int checks = 0, failures = 0;

  pointwise_adder #(.T(T), .NMEM(NMEM)) dut (.seg, .w_in, .w_out);

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int j = 0; j < int'(T); j++)
        for (int w = 0; w < int'(NMEM / 32); w++)
          seg[j][w * 32 +: 32] = (i == 0) ? '0 : (i == 1) ? '1 : $urandom();
      for (int w = 0; w < int'(NMEM / 32); w++) w_in[w * 32 +: 32] = (i == 1) ? '1 : $urandom();
      // reference: parity of the t+1 bits in every position
      for (int b = 0; b < int'(NMEM); b++) begin
        int ones;
        ones = int'(w_in[b]);
        for (int j = 0; j < int'(T); j++) ones += int'(seg[j][b]);
        expect_w[b] = ones[0];
      end
      #1;
      checks++;
      if (w_out !== expect_w) begin
        failures++;
        if (failures < 5) $display("FAIL vector %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
