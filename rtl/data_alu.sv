// data_alu: the unprotected 32-bit data ALU of the multi-residue datapath.
//
// Computes add, subtract, and, or, xor, move (operand b) and the high word of
// the 32x32 -> 64-bit unsigned product. Besides the result it hands out the
// values the residue prediction needs: the carry out of an addition or the
// borrow of a subtraction (cflag), the auxiliary value of a Boolean operation
// (aux: a ^ b for and/or, a & b for xor) and the full 64-bit product.
// Purely combinational.
//
// The operations whose residue prediction the reference architecture gives
// (add, multiply, and, or, xor) are all here; subtraction, move and the carry
// and borrow outputs are this design's own completion.
module data_alu
  import mr_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,      // result
  output logic    cflag,  // carry out (add) or borrow (sub), else 0
  output word_t   aux,    // auxiliary value of a Boolean operation, else 0
  output dword_t  prod    // full product a * b
);

  logic [DATA_W:0] sum;
  logic [DATA_W:0] diff;

  always_comb begin
    sum   = {1'b0, a} + {1'b0, b};
    diff  = {1'b0, a} - {1'b0, b};
    prod  = dword_t'(a) * dword_t'(b);
    y     = '0;
    cflag = 1'b0;
    aux   = '0;
    unique case (op)
      A_ADD:   begin y = sum[DATA_W-1:0];  cflag = sum[DATA_W];  end
      A_SUB:   begin y = diff[DATA_W-1:0]; cflag = diff[DATA_W]; end
      A_AND:   begin y = a & b; aux = a ^ b; end
      A_OR:    begin y = a | b; aux = a ^ b; end
      A_XOR:   begin y = a ^ b; aux = a & b; end
      A_MOVB:  y = b;
      A_MULHI: y = prod[2*DATA_W-1:DATA_W];
      default: y = '0;
    endcase
  end

endmodule
