// GF(2^8) multiplier by logarithm tables. The product of two nonzero bytes x
// and y is E(L(x) + L(y)), where L is the logarithm to base 03 and E the
// antilogarithm (03^i). The 9-bit sum of the two logarithms lies in 0..508;
// a sum above 255 is brought back into range by subtracting 255, since
// 03^255 = 01. A sum of exactly 255 is looked up as is, E(255) = 01.
// L(0) does not exist, so a zero operand forces the product to zero.
// Three table reads (two of L, one of E) and one adder; combinational.
//
// The table look-up, the addition and the reduction by 255 follow the
// method's flow; the zero-operand rule is this design's addition.
module gf_mul_lut (
  input  logic [7:0] x_i,
  input  logic [7:0] y_i,
  output logic [7:0] p_o
);
  logic [7:0] lx, ly, e;
  logic [8:0] sum;
  logic [7:0] idx;

  sbox_rom #(.TABLE(aes_pkg::TBL_LOG)) u_lx (.addr_i(x_i), .data_o(lx));
  sbox_rom #(.TABLE(aes_pkg::TBL_LOG)) u_ly (.addr_i(y_i), .data_o(ly));

  always_comb begin
    sum = {1'b0, lx} + {1'b0, ly};
    if (sum > 9'd255) idx = 8'(sum - 9'd255);
    else              idx = sum[7:0];
  end

  sbox_rom #(.TABLE(aes_pkg::TBL_EXP)) u_e (.addr_i(idx), .data_o(e));

  assign p_o = (x_i == 8'h00 || y_i == 8'h00) ? 8'h00 : e;
endmodule
