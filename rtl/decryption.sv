// decryption: inverse of the SOP pixel cipher.
//
// The receiving side gets the cipher pixel C and the key U and recovers the
// plain pixel with the same sum of mixed minterms,
//   P[i] = C[i] & ~U[i]  |  ~C[i] & U[i].
// Since the cipher is its own inverse, D(E(P,U),U) = P for every pixel and
// key. The decryption stage is part of the overall encrypt/transfer/decrypt
// flow of the design; how the cipher pixels reach it is left open, so it is
// a stand-alone combinational block with its own ports.
//
// Interface: C cipher pixel, U key, P recovered plain pixel. Combinational.
module decryption
  import sop_pkg::*;
(
  input  pixel_t C,  // cipher pixel
  input  pixel_t U,  // key
  output pixel_t P   // recovered plain pixel
);

  always_comb begin
    for (int i = 0; i < PIXEL_W; i++)
      P[i] = (C[i] & ~U[i]) | (~C[i] & U[i]);
  end

endmodule
