// mul_checker: the four check registers of the protected multiplier and their
// comparator.
//
// A 32x32 multiplication writes its 64-bit product back in two cycles.
//   Cycle 1 (ld_hi): the high word is written with a predicted residue
//     p_hi = (p_c - lo mod m) * 2^-32; the checker stores p_hi (hi_pred) and
//     the encoding of the low word (lo_enc).
//   Cycle 2 (ld_lo): the low word is written with the predicted residue
//     p_lo = p_c - (hi mod m) * 2^32; the checker stores p_lo (lo_pred) and
//     the encoding of the high word (hi_enc).
// The comparator is permanently connected: ok is 1 when hi_pred == hi_enc
// and lo_pred == lo_enc, and is forced to 1 while mask is set (the two
// multiply cycles, when the registers are half updated). The registers keep
// their values until the next multiplication, so the comparison keeps
// being checked. Registers update at the rising edge; the asynchronous reset
// clears all four, which compare equal.
//
// Four registers, a permanent comparator and the masking during the two
// multiply cycles follow the reference architecture.
module mul_checker
  import mr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ld_hi,  // first multiply cycle
  input  logic     ld_lo,  // second multiply cycle
  input  logic     mask,   // ignore the comparison this cycle
  input  residue_t pred,   // predicted residue from the residue ALU
  input  residue_t enc,    // encoder output
  output logic     ok
);

  residue_t hi_pred, lo_enc, lo_pred, hi_enc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_pred <= '0;
      lo_enc  <= '0;
      lo_pred <= '0;
      hi_enc  <= '0;
    end else begin
      if (ld_hi) begin
        hi_pred <= pred;
        lo_enc  <= enc;
      end
      if (ld_lo) begin
        lo_pred <= pred;
        hi_enc  <= enc;
      end
    end
  end

  assign ok = mask || ((hi_pred == hi_enc) && (lo_pred == lo_enc));

endmodule
