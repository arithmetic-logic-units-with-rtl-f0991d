// residue_encoder: multi-residue encoder for one 32-bit word.
//
// Produces the check symbol {d mod 5, d mod 7, d mod 17, d mod 31} of the
// input word. Each lane adds up the constant weights 2^i mod m of the set
// bits of d (an array of small adders, at most 32 * 30 = 960) and then
// reduces that sum once modulo m. Purely combinational.
//
// The reference architecture only states what the encoder computes; the weighted-sum
// structure is this design's own choice.
module residue_encoder
  import mr_pkg::*;
(
  input  word_t    d,  // data word
  output residue_t r   // its residue vector, every field fully reduced
);

  lanes_t lanes;

  always_comb begin
    for (int unsigned i = 0; i < NMOD; i++) lanes[i] = word_mod(d, MODS[i]);
    r = from_lanes(lanes);
  end

endmodule
