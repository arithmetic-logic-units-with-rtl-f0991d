// control_unit: sequencer of the multi-residue datapath.
//
// Instructions arrive with a valid/ready handshake and are accepted in a
// cycle where instr_valid and instr_ready are both 1. The first cycle of
// every instruction is driven straight from the instruction input; longer
// instructions are copied into an instruction register and finished from it
// while instr_ready is 0.
//
//   native (add, sub, cmp, mov, load, store)   1 cycle: the one encoder
//        encodes the result and the checker compares it with the residue
//        ALU's prediction (a store checks the outgoing operand instead).
//   non-native (and, or, xor)                   3 cycles:
//        1. encode the auxiliary value into the residue register,
//        2. encode operand a and check it against its stored residue,
//        3. predict the result residue from the residue register, encode the
//           result, check it, write back.
//   mul                                         2 cycles:
//        1. write the high product word with p_hi, encode the low word,
//        2. write the low product word with p_lo, encode the high word;
//        the check registers are loaded and their comparison is masked.
//
// The cycle counts and the order of the three non-native steps' purposes
// follow the reference architecture; the instruction set, the handshake, which operand is
// checked (operand a) and the encodings are this design's own choices.
module control_unit
  import mr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  input  logic   instr_valid,
  output logic   instr_ready,
  output ctrl_t  ctrl
);

  typedef enum logic [1:0] {
    S_FIRST  = 2'd0,  // first cycle of any instruction
    S_OPCHK  = 2'd1,  // non-native: operand check
    S_RESULT = 2'd2,  // non-native: result prediction, check, write back
    S_MULLO  = 2'd3   // multiply: low word
  } state_e;

  state_e state, state_nx;
  instr_t instr_q;
  instr_t cur;

  function automatic alu_op_e bool_alu(input op_e op);
    unique case (op)
      OP_AND:  return A_AND;
      OP_OR:   return A_OR;
      default: return A_XOR;
    endcase
  endfunction

  function automatic res_op_e bool_res(input op_e op);
    unique case (op)
      OP_AND:  return R_AND;
      OP_OR:   return R_OR;
      default: return R_XOR;
    endcase
  endfunction

  assign instr_ready = (state == S_FIRST);
  assign cur         = (state == S_FIRST) ? instr : instr_q;

  always_comb begin
    ctrl        = '0;
    ctrl.ra     = cur.ra;
    ctrl.rb     = cur.rb;
    ctrl.wa     = cur.rd;
    ctrl.alu_op = A_ADD;
    ctrl.res_op = R_ADD;
    ctrl.enc_sel = E_RESULT;
    ctrl.wb_sel = W_ALU;
    state_nx    = state;
    unique case (state)
      S_FIRST: if (instr_valid) begin
        unique case (instr.op)
          OP_ADD, OP_SUB, OP_CMP: begin
            ctrl.alu_op = (instr.op == OP_ADD) ? A_ADD : A_SUB;
            ctrl.res_op = (instr.op == OP_ADD) ? R_ADD : R_SUB;
            ctrl.chk_en = 1'b1;
            ctrl.we     = (instr.op != OP_CMP);
            ctrl.cmp_valid = (instr.op == OP_CMP);
          end
          OP_MOV: begin
            ctrl.alu_op = A_MOVB;
            ctrl.res_op = R_PASSB;
            ctrl.chk_en = 1'b1;
            ctrl.we     = 1'b1;
          end
          OP_AND, OP_OR, OP_XOR: begin
            ctrl.alu_op   = bool_alu(instr.op);
            ctrl.res_op   = bool_res(instr.op);
            ctrl.enc_sel  = E_AUX;
            ctrl.aux_load = 1'b1;
            state_nx      = S_OPCHK;
          end
          OP_MUL: begin
            ctrl.alu_op     = A_MULHI;
            ctrl.res_op     = R_MULHI;
            ctrl.enc_sel    = E_PLO;
            ctrl.aux_direct = 1'b1;
            ctrl.we         = 1'b1;
            ctrl.prod_load  = 1'b1;
            ctrl.mul_ld_hi  = 1'b1;
            ctrl.mul_mask   = 1'b1;
            state_nx        = S_MULLO;
          end
          OP_LOAD: begin
            ctrl.res_op  = R_PASSX;
            ctrl.enc_sel = E_LOAD;
            ctrl.wb_sel  = W_LOAD;
            ctrl.chk_en  = 1'b1;
            ctrl.we      = 1'b1;
          end
          OP_STORE: begin
            ctrl.enc_sel  = E_OPA;
            ctrl.chk_en   = 1'b1;
            ctrl.chk_opa  = 1'b1;
            ctrl.st_valid = 1'b1;
          end
          default: ;
        endcase
      end
      S_OPCHK: begin
        ctrl.alu_op  = bool_alu(cur.op);
        ctrl.res_op  = bool_res(cur.op);
        ctrl.enc_sel = E_OPA;
        ctrl.chk_en  = 1'b1;
        ctrl.chk_opa = 1'b1;
        state_nx     = S_RESULT;
      end
      S_RESULT: begin
        ctrl.alu_op  = bool_alu(cur.op);
        ctrl.res_op  = bool_res(cur.op);
        ctrl.enc_sel = E_RESULT;
        ctrl.chk_en  = 1'b1;
        ctrl.we      = 1'b1;
        state_nx     = S_FIRST;
      end
      S_MULLO: begin
        ctrl.alu_op     = A_MULHI;
        ctrl.res_op     = R_MULLO;
        ctrl.enc_sel    = E_PHI;
        ctrl.wb_sel     = W_PLO;
        ctrl.aux_direct = 1'b1;
        ctrl.wa         = cur.rd2;
        ctrl.we         = 1'b1;
        ctrl.mul_ld_lo  = 1'b1;
        ctrl.mul_mask   = 1'b1;
        state_nx        = S_FIRST;
      end
      default: state_nx = S_FIRST;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FIRST;
      instr_q <= '0;
    end else begin
      state <= state_nx;
      if (instr_valid && instr_ready) instr_q <= instr;
    end
  end

endmodule
