// Two-share visual-cryptography encoder (Naor-Shamir style, 2 out of 2).
//
// Every pixel becomes two sub-pixels in each of two shares. Share 1 always
// gets one black and one white sub-pixel, in an order picked by a random
// bit: rnd = 0 gives (black, white), rnd = 1 gives (white, black). For a
// white pixel share 2 repeats share 1's pattern; for a black pixel it takes
// the complementary pattern. Each share alone is then a uniformly random
// pattern and tells nothing about the image; stacked, a white pixel shows
// one black sub-pixel and a black pixel shows two.
//
// Encoding: 1 = black, 0 = white. Pixel i maps to sub-pixels
// share[2i+1] (first) and share[2i] (second). Combinational; rnd_i must be
// fresh random bits for every image.
//
// The sharing rule is the method's; the pixel encoding, the bit layout and
// taking the random bits as an input are this design's choices.
module vc_encode #(
  parameter int unsigned N = 128   // pixels: one per bit of an AES block
) (
  input  logic [N-1:0]   pixel_i,
  input  logic [N-1:0]   rnd_i,
  output logic [2*N-1:0] share1_o,
  output logic [2*N-1:0] share2_o
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      share1_o[2*i +: 2] = rnd_i[i] ? 2'b01 : 2'b10;
      share2_o[2*i +: 2] = pixel_i[i] ? ~share1_o[2*i +: 2] : share1_o[2*i +: 2];
    end
  end
endmodule
