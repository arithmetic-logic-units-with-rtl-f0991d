// tb_alu_driver: drives one mr_alu_top of a given register count with a
// random instruction stream and checks it against a reference model.
//
// Used by tb_mr_alu_sizes to run the datapath at several register-file sizes
// side by side. Each instruction's cycle count (1 native, 3 and/or/xor,
// 2 mul) is checked, every written register is read back through the store
// port and compared (data word and residue vector), and ok must stay 1.
// A final injected bit flip in the highest register must be caught by a store.
// checks/failures count up; done rises when the stream is finished.
module tb_alu_driver
  import mr_pkg::*;
#(
  parameter int unsigned NREGS = 16,
  parameter int unsigned NOPS  = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);

  instr_t   instr;
  logic     instr_valid;
  logic     instr_ready, st_valid, flag_z, flag_n, flag_c, ok, alarm;
  word_t    st_data;
  residue_t st_res;
  longint unsigned model [NREGS];

  mr_alu_top #(.NREGS(NREGS)) dut (.*);

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
      $display("FAIL [%0d registers] %s", NREGS, what);
    end
  endtask

  int       cyc;
  logic     any_bad;
  word_t    st_d;
  residue_t st_r;

  task automatic exec(input instr_t i);
    @(negedge clk);
    instr       = i;
    instr_valid = 1'b1;
    #1;
    cyc     = 1;
    any_bad = !ok;
    st_d    = st_data;
    st_r    = st_res;
    @(negedge clk);
    instr_valid = 1'b0;
    #1;
    while (!instr_ready) begin
      cyc++;
      any_bad |= !ok;
      @(negedge clk);
      #1;
    end
    any_bad |= !ok;
  endtask

  task automatic verify(input int r);
    instr_t i = '0;
    i.op = OP_STORE;
    i.ra = 5'(r);
    exec(i);
    expect_true($sformatf("r%0d read back", r),
                longint'(st_d) == model[r] && st_r == ref_res(model[r]) && !any_bad);
  endtask

  initial begin
    instr_t i;
    logic [31:0] rnd;
    longint unsigned a, b;
    checks = 0;
    failures = 0;
    done = 1'b0;
    instr = '0;
    instr_valid = 1'b0;
    for (int k = 0; k < NREGS; k++) model[k] = 0;
    @(posedge rst_n);
    for (int k = 0; k < NREGS; k++) begin
      i = '0;
      i.op = OP_LOAD;
      i.rd = 5'(k);
      i.ld_data = $urandom();
      i.ld_res = ref_res(longint'(i.ld_data));
      exec(i);
      model[k] = longint'(i.ld_data);
      expect_true("load", !any_bad && cyc == 1);
    end
    for (int n = 0; n < NOPS; n++) begin
      rnd  = $urandom();
      i    = '0;
      i.rd = 5'(int'(rnd[7:0]) % NREGS);
      i.ra = 5'(int'(rnd[15:8]) % NREGS);
      i.rb = 5'(int'(rnd[23:16]) % NREGS);
      i.rd2 = 5'((int'(i.rd) + 1) % NREGS);
      a = model[i.ra];
      b = model[i.rb];
      unique case (int'(rnd[31:24]) % 7)
        0: i.op = OP_ADD;
        1: i.op = OP_SUB;
        2: i.op = OP_MOV;
        3: i.op = OP_AND;
        4: i.op = OP_OR;
        5: i.op = OP_XOR;
        default: i.op = OP_MUL;
      endcase
      exec(i);
      expect_true($sformatf("%s clean, %0d cycles", i.op.name(), cyc), !any_bad &&
                  cyc == ((i.op inside {OP_AND, OP_OR, OP_XOR}) ? 3 : (i.op == OP_MUL) ? 2 : 1));
      unique case (i.op)
        OP_ADD: model[i.rd] = (a + b) & 64'hFFFF_FFFF;
        OP_SUB: model[i.rd] = (a - b) & 64'hFFFF_FFFF;
        OP_MOV: model[i.rd] = b;
        OP_AND: model[i.rd] = a & b;
        OP_OR:  model[i.rd] = a | b;
        OP_XOR: model[i.rd] = a ^ b;
        default: begin
          model[i.rd]  = (a * b) >> 32;
          model[i.rd2] = (a * b) & 64'hFFFF_FFFF;
          verify(int'(i.rd2));
        end
      endcase
      verify(int'(i.rd));
    end
    // a flipped bit in the highest register is caught when it is stored
    dut.u_data_regs.mem[NREGS-1][7] = !dut.u_data_regs.mem[NREGS-1][7];
    i = '0;
    i.op = OP_STORE;
    i.ra = 5'(NREGS - 1);
    exec(i);
    expect_true("flipped bit in the last register detected", any_bad && alarm);
    done = 1'b1;
  end

endmodule
