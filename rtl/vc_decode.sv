// Two-share visual-cryptography decoder: the electronic counterpart of
// laying one printed share on the other.
//
// Stacking makes a sub-pixel black when it is black in either share (OR).
// A black pixel of the original, encoded with complementary patterns, shows
// both sub-pixels black; a white pixel, encoded with equal patterns, shows
// only one. The pixel is therefore recovered as the AND of its two stacked
// sub-pixels. bad_o flags pixels whose share patterns are not one black and
// one white sub-pixel, which a correctly formed share never contains.
//
// Same bit layout as vc_encode (1 = black; pixel i in bits 2i+1 and 2i).
// Combinational.
//
// The stacking rule is the standard one for this scheme; the decoder as a
// circuit and the malformed-share flag are this design's own.
module vc_decode #(
  parameter int unsigned N = 128
) (
  input  logic [2*N-1:0] share1_i,
  input  logic [2*N-1:0] share2_i,
  output logic [N-1:0]   pixel_o,
  output logic           bad_o
);
  logic [2*N-1:0] stacked;

  always_comb begin
    stacked = share1_i | share2_i;
    bad_o   = 1'b0;
    for (int i = 0; i < N; i++) begin
      pixel_o[i] = &stacked[2*i +: 2];
      if (^share1_i[2*i +: 2] == 1'b0 || ^share2_i[2*i +: 2] == 1'b0) bad_o = 1'b1;
    end
  end
endmodule
