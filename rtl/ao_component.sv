// ao_component: Accumulation and Output (AO) component of Accelerator-II.
//
// An n-bit register holds the product W. With acc = 1 every bit takes the
// XOR of itself and the matching bit of the column D' from the LS component
// (addition in GF(2)); with csh_out = 1 (output shifting) every bit takes the
// bit len_load positions below it, zeros entering at the bottom, and the top
// len_load bits, W[n-len_load .. n-1], are the output dout. After
// ceil(n/len_load) output cycles the whole of W has left, most significant
// word first; the final word is padded with zeros below W[0]. clr empties W
// before a multiplication. The structure follows the document; the separate
// acc strobe and the zero fill are this design's choices.
module ao_component #(
  parameter int unsigned N        = 17669,
  parameter int unsigned LEN_LOAD = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                acc,
  input  logic [N-1:0]        d,
  input  logic                csh_out,
  output logic [LEN_LOAD-1:0] dout,
  output logic [N-1:0]        wq
);

  logic [N-1:0] w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       w_q <= N'(0);
    else if (clr)     w_q <= N'(0);
    else if (csh_out) w_q <= w_q << LEN_LOAD;
    else if (acc)     w_q <= w_q ^ d;
  end

  // top len_load bits; zero-extended below when n < len_load
  assign dout = (N >= LEN_LOAD) ? LEN_LOAD'(w_q >> (N - LEN_LOAD))
                                : LEN_LOAD'({w_q, {LEN_LOAD{1'b0}}} >> N);
  assign wq   = w_q;

endmodule
