// tb_control_unit: issues every instruction kind to the control unit and
// checks, cycle by cycle, the handshake (1 cycle for native operations,
// 3 for and/or/xor, 2 for mul) and the control word of each step: which word
// is encoded, what is checked, what is written where, and when the
// multiplier check registers are loaded and masked.
module tb_control_unit;
  import mr_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  instr_t instr;
  logic   instr_valid = 1'b0;
  logic   instr_ready;
  ctrl_t  ctrl;
  int     checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (op=%s)", what, instr.op.name());
    end
  endtask

  // Issue one instruction and check each of its cycles; returns the cycle count.
  task automatic issue(input op_e op);
    int cyc;
    instr         = '0;
    instr.op      = op;
    instr.rd      = 5'($urandom() % 16);
    instr.rd2     = 5'((instr.rd + 1) % 16);
    instr.ra      = 5'($urandom() % 16);
    instr.rb      = 5'($urandom() % 16);
    instr.ld_data = $urandom();
    instr_valid   = 1'b1;
    #1;
    cyc = 1;
    expect_true("ready in first cycle", instr_ready);
    expect_true("operand addresses", ctrl.ra == instr.ra && ctrl.rb == instr.rb);
    unique case (op)
      OP_ADD, OP_SUB, OP_MOV: expect_true("native: check result, write rd",
        ctrl.enc_sel == E_RESULT && ctrl.chk_en && !ctrl.chk_opa && ctrl.we && ctrl.wa == instr.rd &&
        ctrl.res_op == (op == OP_ADD ? R_ADD : op == OP_SUB ? R_SUB : R_PASSB) && !ctrl.mul_mask);
      OP_CMP: expect_true("cmp: check, no write, flags",
        ctrl.enc_sel == E_RESULT && ctrl.chk_en && !ctrl.we && ctrl.cmp_valid && ctrl.alu_op == A_SUB);
      OP_LOAD: expect_true("load: check loaded word, write it",
        ctrl.enc_sel == E_LOAD && ctrl.chk_en && ctrl.we && ctrl.wb_sel == W_LOAD && ctrl.res_op == R_PASSX);
      OP_STORE: expect_true("store: check operand a",
        ctrl.enc_sel == E_OPA && ctrl.chk_en && ctrl.chk_opa && ctrl.st_valid && !ctrl.we);
      OP_AND, OP_OR, OP_XOR: expect_true("step 1: encode aux into residue register",
        ctrl.enc_sel == E_AUX && ctrl.aux_load && !ctrl.chk_en && !ctrl.we);
      OP_MUL: expect_true("mul 1: write hi, encode lo, load check regs, mask",
        ctrl.enc_sel == E_PLO && ctrl.res_op == R_MULHI && ctrl.aux_direct && ctrl.we &&
        ctrl.wa == instr.rd && ctrl.wb_sel == W_ALU && ctrl.alu_op == A_MULHI &&
        ctrl.prod_load && ctrl.mul_ld_hi && ctrl.mul_mask && !ctrl.chk_en);
      default: ;
    endcase
    @(negedge clk);
    // change the input: later cycles must work from the stored instruction
    instr_valid = 1'b0;
    instr.ra = instr.ra + 5'd3;
    instr.op = OP_ADD;
    #1;
    while (!instr_ready) begin
      cyc++;
      if (op == OP_MUL) begin
        expect_true("mul 2: write lo to rd2, encode hi, load check regs, mask",
          ctrl.enc_sel == E_PHI && ctrl.res_op == R_MULLO && ctrl.aux_direct && ctrl.we &&
          ctrl.wa == instr.rd2 && ctrl.wb_sel == W_PLO && ctrl.mul_ld_lo && ctrl.mul_mask);
      end else if (cyc == 2) begin
        expect_true("step 2: check operand a",
          ctrl.enc_sel == E_OPA && ctrl.chk_en && ctrl.chk_opa && !ctrl.we &&
          ctrl.ra == instr.ra - 5'd3);
      end else begin
        expect_true("step 3: predict, check and write result",
          ctrl.enc_sel == E_RESULT && ctrl.chk_en && !ctrl.chk_opa && ctrl.we &&
          ctrl.wa == instr.rd && ctrl.res_op == (op == OP_AND ? R_AND : op == OP_OR ? R_OR : R_XOR) &&
          ctrl.alu_op == (op == OP_AND ? A_AND : op == OP_OR ? A_OR : A_XOR));
      end
      @(negedge clk);
      #1;
    end
    expect_true("idle cycle does nothing", !ctrl.we && !ctrl.chk_en && !ctrl.mul_mask);
    expect_true($sformatf("cycle count %0d", cyc),
      cyc == ((op inside {OP_AND, OP_OR, OP_XOR}) ? 3 : (op == OP_MUL) ? 2 : 1));
    @(negedge clk);
  endtask

  initial begin
    instr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) issue(op_e'($urandom() % 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
