// pointwise_adder: the Point-wise Adder of Accelerator-I's accumulation
// component. In GF(2) adding polynomials is a bitwise XOR, so the sum of the
// t column segments D_shift[0..t-1] and the stored W segment is an XOR tree
// with t+1 inputs of N_mem bits each, purely combinational, as the document
// describes. The balanced tree is built by the synthesis tool from the
// reduction below.
module pointwise_adder #(
  parameter int unsigned T    = 8,
  parameter int unsigned NMEM = 128
) (
  input  logic [T-1:0][NMEM-1:0] seg,
  input  logic [NMEM-1:0]        w_in,
  output logic [NMEM-1:0]        w_out
);

  always_comb begin
    w_out = w_in;
    for (int j = 0; j < T; j++) w_out ^= seg[j];
  end

endmodule
