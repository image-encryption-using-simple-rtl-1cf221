// encryption: sum-of-products (SOP) pixel cipher.
//
// Every bit of the cipher pixel is formed from the same bit of the plain
// pixel P and of the key U as the sum of the two mixed minterms,
//   O[i] = P[i] & ~U[i]  |  ~P[i] & U[i],
// which is the exclusive OR of the two bits written as a sum of products.
// The same key is applied to every pixel of the image (the key is the
// 3-bit password set on the push buttons). With key 101 a red pixel (100)
// becomes blue (001), magenta (101) becomes black, yellow (110) becomes
// cyan and white becomes green.
//
// Interface: P plain pixel, U key, O cipher pixel. Purely combinational;
// the surrounding pipeline registers its input and output.
module encryption
  import sop_pkg::*;
(
  input  pixel_t P,  // plain pixel
  input  pixel_t U,  // key (user password)
  output pixel_t O   // cipher pixel
);

  always_comb begin
    for (int i = 0; i < PIXEL_W; i++)
      O[i] = (P[i] & ~U[i]) | (~P[i] & U[i]);
  end

endmodule
