// encoder_checker: the single shared encoder of the multi-residue datapath,
// with its input multiplexer, the checker and the residue register.
//
// In each cycle the control unit selects which 32-bit word is encoded: the
// data ALU result, the auxiliary value of a Boolean operation, operand a,
// the low word of the live product, the high word of the registered product
// or a loaded word. The encoding (enc) is
//   * compared with a residue vector when chk_en is set: the predicted result
//     residue, or operand a's stored residue when chk_opa is set (chk_ok is 0
//     on a mismatch, 1 otherwise);
//   * captured in the residue register when aux_load is set, so that the
//     auxiliary residue of an and/or/xor is available two cycles later.
// The encoder and comparator are combinational; the residue register is
// updated at the rising clock edge and cleared by the asynchronous reset.
//
// One encoder shared in time, the residue register inside the checker and
// checking the result plus one operand follow the reference architecture; the exact
// multiplexer inputs are this design's own choice.
module encoder_checker
  import mr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  enc_sel_e sel,
  input  word_t    alu_y,     // data ALU result
  input  word_t    alu_aux,   // data ALU auxiliary value
  input  word_t    opa,       // operand a
  input  word_t    prod_lo,   // low word of the live product
  input  word_t    prodq_hi,  // high word of the registered product
  input  word_t    ld_data,   // loaded word
  input  logic     chk_en,
  input  logic     chk_opa,
  input  residue_t pred,      // predicted residue of the result
  input  residue_t opa_res,   // stored residue of operand a
  input  logic     aux_load,
  output residue_t enc,       // encoding of the selected word
  output residue_t aux_res,   // residue register
  output logic     chk_ok
);

  word_t    d;
  residue_t expected;

  always_comb begin
    unique case (sel)
      E_RESULT: d = alu_y;
      E_AUX:    d = alu_aux;
      E_OPA:    d = opa;
      E_PLO:    d = prod_lo;
      E_PHI:    d = prodq_hi;
      E_LOAD:   d = ld_data;
      default:  d = alu_y;
    endcase
  end

  residue_encoder u_enc (.d(d), .r(enc));

  assign expected = chk_opa ? opa_res : pred;
  assign chk_ok   = !chk_en || (enc == expected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        aux_res <= '0;
    else if (aux_load) aux_res <= enc;
  end

endmodule
