// residue_alu: predicts the residue vector of a result from the operands'
// residue vectors, lane by lane (moduli 5, 7, 17, 31).
//
//   R_ADD   pc = pa + pb - c * 2^32        c: carry out of the 32-bit add
//   R_SUB   pc = pa - pb + c * 2^32        c: borrow of the 32-bit subtract
//   R_AND   pc = (pa + pb - aux) / 2       aux = (a ^ b) mod m
//   R_OR    pc = (pa + pb + aux) / 2       aux = (a ^ b) mod m
//   R_XOR   pc = pa + pb - 2 * aux         aux = (a & b) mod m
//   R_PASSB pc = pb                        move
//   R_MULHI pc = (pa * pb - aux) * 2^-32   aux = lo(c) mod m, gives p_hi(c)
//   R_MULLO pc = pp - aux * 2^32           aux = hi(c) mod m, pp = p_c, gives p_lo(c)
//   R_PASSX pc = px                        residue of a loaded codeword
//
// Everything is mod m; division by 2 is a multiplication by 2^-1 mod m.
// pprod = pa * pb is offered separately so the full product's residue can be
// held for the second multiply cycle. Purely combinational.
//
// The Boolean, addition, multiplication and hi/lo formulas follow the reference architecture;
// the carry/borrow terms that account for the 32-bit wrap-around, subtraction
// and the pass operations are this design's own completion.
module residue_alu
  import mr_pkg::*;
(
  input  res_op_e  op,
  input  residue_t pa,
  input  residue_t pb,
  input  residue_t aux,    // residue of the auxiliary value
  input  logic     cflag,  // carry (R_ADD) or borrow (R_SUB)
  input  residue_t pp,     // residue of the registered full product (R_MULLO)
  input  residue_t px,     // external residue (R_PASSX)
  output residue_t pc,     // predicted residue vector of the result
  output residue_t pprod   // pa * pb, residue of the full 64-bit product
);

  lanes_t la, lb, lx, lp, le, lc, lm;

  always_comb begin
    la = to_lanes(pa);
    lb = to_lanes(pb);
    lx = to_lanes(aux);
    lp = to_lanes(pp);
    le = to_lanes(px);
    for (int unsigned i = 0; i < NMOD; i++) begin
      logic [11:0] m;
      logic [11:0] s;
      m     = 12'(MODS[i]);
      s     = 12'(la[i]) + 12'(lb[i]);
      lm[i] = red(12'(la[i]) * 12'(lb[i]), MODS[i]);
      unique case (op)
        R_ADD:   lc[i] = red(s + (cflag ? m - 12'(K32[i]) : 12'd0), MODS[i]);
        R_SUB:   lc[i] = red(12'(la[i]) + m - 12'(lb[i]) + (cflag ? 12'(K32[i]) : 12'd0), MODS[i]);
        R_AND:   lc[i] = red(12'(red(s + m - 12'(lx[i]), MODS[i])) * 12'(INV2[i]), MODS[i]);
        R_OR:    lc[i] = red(12'(red(s + 12'(lx[i]), MODS[i])) * 12'(INV2[i]), MODS[i]);
        R_XOR:   lc[i] = red(s + 12'd2 * (m - 12'(lx[i])), MODS[i]);
        R_PASSB: lc[i] = lb[i];
        R_MULHI: lc[i] = red(12'(red(12'(lm[i]) + m - 12'(lx[i]), MODS[i])) * 12'(KINV32[i]), MODS[i]);
        R_MULLO: lc[i] = red(12'(lp[i]) + m - 12'(red(12'(lx[i]) * 12'(K32[i]), MODS[i])), MODS[i]);
        R_PASSX: lc[i] = le[i];
        default: lc[i] = '0;
      endcase
    end
    pc    = from_lanes(lc);
    pprod = from_lanes(lm);
  end

endmodule
