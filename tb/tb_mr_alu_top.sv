// tb_mr_alu_top: end-to-end test of the protected datapath at its default
// size (16 registers).
//
// Phase 1 runs a random instruction stream (add, sub, cmp, mov, and, or, xor,
// mul, load, store) against a reference model of the register file; after
// every write the destination is stored and its data word and residue vector
// are compared with the model. Every instruction's cycle count (1, 3 or 2)
// is checked and ok must stay 1.
// Phase 2 injects faults by flipping register or product bits, as a laser
// would, and checks that each is caught by the check meant for it:
//   * a single corrupted operand of an add      -> result check
//   * a corrupted loaded codeword               -> load check
//   * a corrupted register being stored        -> store check
//   * operands a+1 and b-1 of an and/or/xor     -> operand check (the result
//     check alone lets this weight-2 error through)
//   * a corrupted product register in a mul     -> multiplier check registers
// Each mechanism is counted; one that never happens counts as a failure.
module tb_mr_alu_top;
  import mr_pkg::*;

  localparam int unsigned NREGS = 16;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  instr_t   instr;
  logic     instr_valid = 1'b0;
  logic     instr_ready, st_valid, flag_z, flag_n, flag_c, ok, alarm;
  word_t    st_data;
  residue_t st_res;

  int checks = 0, failures = 0;
  longint unsigned model [NREGS];

  // mechanism counters
  int n_native = 0, n_bool = 0, n_mul = 0, n_carry = 0, n_borrow = 0, n_cmp = 0;
  int n_load = 0, n_store = 0, n_stall = 0;
  int n_det_result = 0, n_det_load = 0, n_det_store = 0, n_det_opchk = 0, n_det_mul = 0;

  mr_alu_top dut (.*);

  always #5 clk = ~clk;

  function automatic residue_t ref_res(input longint unsigned x);
    residue_t e;
    e.m5  = 3'(x % 5);
    e.m7  = 3'(x % 7);
    e.m17 = 5'(x % 17);
    e.m31 = 5'(x % 31);
    return e;
  endfunction

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Faults the exec task can inject while an instruction runs.
  typedef enum int {F_NONE, F_PROD} inj_e;

  // Run one instruction. bad[k] is set when ok was 0 in cycle k+1;
  // post_ok is ok in the idle cycle after it.
  logic [3:0] bad;
  logic       post_ok;
  int         cyc;
  word_t      st_d;
  residue_t   st_r;
  logic       st_seen;

  task automatic exec(input instr_t i, input inj_e inj = F_NONE);
    @(negedge clk);
    instr       = i;
    instr_valid = 1'b1;
    bad         = '0;
    #1;
    cyc     = 1;
    bad[0]  = !ok;
    st_seen = st_valid;
    st_d    = st_data;
    st_r    = st_res;
    expect_true("instruction accepted", instr_ready);
    @(negedge clk);
    instr_valid = 1'b0;
    if (inj == F_PROD) dut.prod_q[40] = !dut.prod_q[40];
    #1;
    while (!instr_ready) begin
      n_stall++;
      bad[cyc] = !ok;
      cyc++;
      @(negedge clk);
      #1;
    end
    post_ok = ok;
  endtask

  function automatic instr_t mk(input op_e op, input int rd, input int ra, input int rb, input int rd2 = 0);
    instr_t i = '0;
    i.op  = op;
    i.rd  = 5'(rd);
    i.ra  = 5'(ra);
    i.rb  = 5'(rb);
    i.rd2 = 5'(rd2);
    return i;
  endfunction

  task automatic load(input int rd, input longint unsigned v);
    instr_t i = mk(OP_LOAD, rd, 0, 0);
    i.ld_data = word_t'(v);
    i.ld_res  = ref_res(v & 64'hFFFF_FFFF);
    exec(i);
    model[rd] = v & 64'hFFFF_FFFF;
    n_load++;
    expect_true("load clean", bad == 0);
  endtask

  // Store register r and compare with the model.
  task automatic verify(input int r);
    exec(mk(OP_STORE, 0, r, 0));
    n_store++;
    expect_true($sformatf("store r%0d valid", r), st_seen);
    expect_true($sformatf("store r%0d data %h expected %h", r, st_d, model[r]), longint'(st_d) == model[r]);
    expect_true($sformatf("store r%0d residue", r), st_r == ref_res(model[r]));
    expect_true("store clean", bad == 0 && post_ok);
  endtask

  // One random clean instruction with reference results.
  task automatic random_op();
    op_e op;
    int rd, ra, rb, rd2;
    longint unsigned a, b, r, p;
    logic [31:0] rnd;
    rnd = $urandom();
    op  = op_e'(rnd[31:24] % 10);
    rd  = int'(rnd[7:0]) % NREGS;
    ra  = int'(rnd[15:8]) % NREGS;
    rb  = int'(rnd[23:16]) % NREGS;
    rd2 = (rd + 1 + int'(rnd[27:20]) % (NREGS - 1)) % NREGS;
    a   = model[ra];
    b   = model[rb];
    case (op)
      OP_LOAD:  begin load(rd, {$urandom(), $urandom()}); verify(rd); return; end
      OP_STORE: begin verify(ra); return; end
      OP_MUL: begin
        p = a * b;
        exec(mk(OP_MUL, rd, ra, rb, rd2));
        n_mul++;
        expect_true($sformatf("mul takes 2 cycles (%0d)", cyc), cyc == 2);
        expect_true("mul masked, no false alarm", bad == 0 && post_ok);
        model[rd]  = p >> 32;
        model[rd2] = p & 64'hFFFF_FFFF;
        verify(rd);
        verify(rd2);
        return;
      end
      default: ;
    endcase
    exec(mk(op, rd, ra, rb));
    expect_true("clean instruction passes its checks", bad == 0 && post_ok);
    case (op)
      OP_AND, OP_OR, OP_XOR: begin
        n_bool++;
        expect_true($sformatf("%s takes 3 cycles (%0d)", op.name(), cyc), cyc == 3);
      end
      default: begin
        n_native++;
        expect_true($sformatf("%s takes 1 cycle (%0d)", op.name(), cyc), cyc == 1);
      end
    endcase
    case (op)
      OP_ADD: begin r = a + b; if (r >> 32 != 0) n_carry++; end
      OP_SUB, OP_CMP: begin r = a - b; if (a < b) n_borrow++; end
      OP_AND: r = a & b;
      OP_OR:  r = a | b;
      OP_XOR: r = a ^ b;
      default: r = b;  // mov
    endcase
    r = r & 64'hFFFF_FFFF;
    if (op == OP_CMP) begin
      n_cmp++;
      expect_true("cmp flags", flag_z == (r == 0) && flag_n == r[31] && flag_c == (a >= b));
    end else begin
      model[rd] = r;
      verify(rd);
    end
  endtask

  initial begin
    instr_t i;
    instr = '0;
    for (int k = 0; k < NREGS; k++) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: clean random stream, operands with and without carries
    for (int k = 0; k < NREGS; k++) load(k, (k % 4 == 0) ? 64'hFFFF_FFF0 + k : {$urandom(), $urandom()});
    for (int k = 0; k < NREGS; k++) verify(k);
    for (int n = 0; n < 3000; n++) random_op();
    expect_true("no alarm in the clean run", !alarm);

    // phase 2: fault injection
    for (int n = 0; n < 20; n++) begin
      int ra, rb, rd, bit_i;
      ra = n % NREGS;
      rb = (n + 5) % NREGS;
      rd = (n + 9) % NREGS;
      bit_i = $urandom() % 32;

      // single corrupted operand of an add -> result check
      dut.u_data_regs.mem[rb][bit_i] = !dut.u_data_regs.mem[rb][bit_i];
      exec(mk(OP_ADD, rd, ra, rb));
      expect_true("corrupted add operand detected", bad[0]);
      if (bad[0]) n_det_result++;
      load(rb, model[rb]);
      load(rd, model[rd]);

      // corrupted loaded codeword -> load check
      i = mk(OP_LOAD, rd, 0, 0);
      i.ld_data = $urandom();
      i.ld_res  = ref_res(longint'(i.ld_data ^ (32'd1 << bit_i)));
      exec(i);
      expect_true("corrupted load detected", bad[0]);
      if (bad[0]) n_det_load++;
      load(rd, model[rd]);

      // corrupted register stored -> store check
      dut.u_data_regs.mem[ra][bit_i] = !dut.u_data_regs.mem[ra][bit_i];
      exec(mk(OP_STORE, 0, ra, 0));
      expect_true("corrupted store detected", bad[0]);
      if (bad[0]) n_det_store++;
      load(ra, model[ra]);

      // a + 1 and b - 1, one flipped bit each -> only the operand check sees it
      load(ra, {$urandom(), $urandom()} & 64'hFFFF_FFFE);  // even
      load(rb, {$urandom(), $urandom()} | 64'h1);          // odd
      dut.u_data_regs.mem[ra][0] = 1'b1;
      dut.u_data_regs.mem[rb][0] = 1'b0;
      exec(mk(op_e'(OP_AND + n % 3), rd, ra, rb));
      expect_true("and/or/xor: 3 cycles under fault", cyc == 3);
      expect_true("operand check catches the two-operand error", bad[1]);
      expect_true("result check alone lets it pass", !bad[2]);
      if (bad[1] && !bad[2]) n_det_opchk++;
      load(ra, model[ra]);
      load(rb, model[rb]);
      load(rd, 0);

      // corrupted product register in the second multiply cycle -> check registers
      exec(mk(OP_MUL, rd, ra, rb, (rd + 1) % NREGS), F_PROD);
      expect_true("mul cycles masked", bad == 0);
      expect_true("corrupted product detected after the multiply", !post_ok);
      if (!post_ok) n_det_mul++;
      // a clean multiplication clears the check-register mismatch
      exec(mk(OP_MUL, rd, ra, rb, (rd + 1) % NREGS));
      expect_true("clean multiply consistent again", post_ok);
      model[rd] = (model[ra] * model[rb]) >> 32;
      model[(rd + 1) % NREGS] = (model[ra] * model[rb]) & 64'hFFFF_FFFF;
      verify(rd);
      verify((rd + 1) % NREGS);
    end
    expect_true("alarm raised by the faults", alarm);

    $display("mechanisms: native=%0d and/or/xor=%0d mul=%0d stall-cycles=%0d carry=%0d borrow=%0d cmp=%0d load=%0d store=%0d",
             n_native, n_bool, n_mul, n_stall, n_carry, n_borrow, n_cmp, n_load, n_store);
    $display("detections: result=%0d load=%0d store=%0d operand=%0d mul=%0d",
             n_det_result, n_det_load, n_det_store, n_det_opchk, n_det_mul);
    expect_true("native ops ran", n_native > 0);
    expect_true("non-native ops ran", n_bool > 0);
    expect_true("multiplications ran", n_mul > 0);
    expect_true("stall cycles happened", n_stall > 0);
    expect_true("carry correction used", n_carry > 0);
    expect_true("borrow correction used", n_borrow > 0);
    expect_true("compares ran", n_cmp > 0);
    expect_true("result check detected", n_det_result > 0);
    expect_true("load check detected", n_det_load > 0);
    expect_true("store check detected", n_det_store > 0);
    expect_true("operand check detected", n_det_opchk > 0);
    expect_true("multiplier check detected", n_det_mul > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
