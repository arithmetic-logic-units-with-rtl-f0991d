// tb_workload_mix: runs instruction streams with the class mix of four
// smart-card workloads (AES, OS boot, OS shell, ECC P-192) through the
// protected datapath, back to back, and measures the time cost of the
// single shared encoder.
//
// Class shares (in 1/100 %) for Arith, Branch, Cmp, Load/Store, Logic, Misc,
// Mov and Mul are those of the profiled workloads. Arith maps to add/sub,
// Logic to and/or/xor, Load/Store to load/store, Mov to mov, Cmp to cmp and
// Mul to mul; Branch and Misc do not use this datapath and leave it idle for
// one cycle. With 1 cycle per native instruction, 3 per and/or/xor and 2 per
// mul, a stream of N instructions must take exactly
//   N + 2 * N_logic + N_mul cycles,
// which is checked, together with every stored value against a reference
// model and ok staying 1 throughout.
module tb_workload_mix;
  import mr_pkg::*;

  localparam int unsigned NREGS = 16;
  localparam int N = 2000;  // instructions per workload

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  instr_t   instr;
  logic     instr_valid = 1'b0;
  logic     instr_ready, st_valid, flag_z, flag_n, flag_c, ok, alarm;
  word_t    st_data;
  residue_t st_res;
  int       checks = 0, failures = 0;
  longint unsigned model [NREGS];

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

  // Class order: Arith, Branch, Cmp, Load/Store, Logic, Misc, Mov, Mul.
  typedef int share_t [8];
  localparam share_t AES   = '{1762,   33,   22, 4072, 1953,    7, 2151,    0};
  localparam share_t BOOT  = '{2383, 2842, 1172, 2360,  357,  120,  742,   24};
  localparam share_t SHELL = '{1323, 2562, 1637, 2302,  693,   68, 1401,   13};
  localparam share_t ECC   = '{1746,  466,  222, 5473,   70,  146, 1548,  330};

  int cycles;
  always @(posedge clk) cycles <= cycles + 1;

  function automatic int pick(input share_t s);
    int tot = 0, r, acc = 0;
    foreach (s[k]) tot += s[k];
    r = $urandom() % tot;
    foreach (s[k]) begin
      acc += s[k];
      if (r < acc) return k;
    end
    return 0;
  endfunction

  // Present one instruction (or an idle cycle) and wait until it is accepted.
  task automatic issue(input instr_t i, input logic valid);
    instr       = i;
    instr_valid = valid;
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL ok dropped");
    end
    if (valid && i.op == OP_STORE) begin
      expect_true("stored word", st_valid && longint'(st_data) == model[i.ra] &&
                  st_res == ref_res(model[i.ra]));
    end
    @(negedge clk);
  endtask

  task automatic run(input string name, input share_t s);
    int n_logic = 0, n_mul = 0, n_idle = 0, start, used, expected;
    instr_t i;
    longint unsigned a, b;
    // wait for the previous stream to drain
    instr_valid = 1'b0;
    repeat (4) @(negedge clk);
    start = cycles;
    for (int n = 0; n < N; n++) begin
      int cls;
      logic [31:0] rnd;
      cls  = pick(s);
      i    = '0;
      rnd  = $urandom();
      i.rd = 5'(int'(rnd[7:0]) % NREGS);
      i.ra = 5'(int'(rnd[15:8]) % NREGS);
      i.rb = 5'(int'(rnd[23:16]) % NREGS);
      i.rd2 = 5'((i.rd + 1) % NREGS);
      a = model[i.ra];
      b = model[i.rb];
      case (cls)
        0: begin i.op = rnd[24] ? OP_ADD : OP_SUB;
                 model[i.rd] = ((i.op == OP_ADD) ? a + b : a - b) & 64'hFFFF_FFFF; end
        2: i.op = OP_CMP;
        3: if (rnd[25]) begin
             i.op = OP_LOAD;
             i.ld_data = $urandom();
             i.ld_res  = ref_res(longint'(i.ld_data));
             model[i.rd] = longint'(i.ld_data);
           end else i.op = OP_STORE;
        4: begin
             int sel;
             n_logic++;
             sel = int'(rnd[31:26]) % 3;
             unique case (sel)
               0: begin i.op = OP_AND; model[i.rd] = a & b; end
               1: begin i.op = OP_OR;  model[i.rd] = a | b; end
               default: begin i.op = OP_XOR; model[i.rd] = a ^ b; end
             endcase
           end
        6: begin i.op = OP_MOV; model[i.rd] = b; end
        7: begin
             n_mul++;
             i.op = OP_MUL;
             model[i.rd]  = (a * b) >> 32;
             model[i.rd2] = (a * b) & 64'hFFFF_FFFF;
           end
        default: n_idle++;  // branch / misc: datapath idle
      endcase
      issue(i, !(cls == 1 || cls == 5));
    end
    // the last instruction's trailing cycles
    instr_valid = 1'b0;
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    used     = cycles - start;
    expected = N + 2 * n_logic + n_mul;
    $display("%s: %0d instructions (%0d logic, %0d mul, %0d branch/misc) in %0d cycles, overhead %0.2f%% (logic only %0.2f%%)",
             name, N, n_logic, n_mul, n_idle, used, 100.0 * (used - N) / N, 200.0 * n_logic / N);
    expect_true($sformatf("%s cycle count %0d expected %0d", name, used, expected), used == expected);
    for (int r = 0; r < NREGS; r++) begin
      i = '0;
      i.op = OP_STORE;
      i.ra = 5'(r);
      issue(i, 1'b1);
    end
  endtask

  initial begin
    instr = '0;
    cycles = 0;
    for (int k = 0; k < NREGS; k++) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run("AES", AES);
    run("Boot", BOOT);
    run("Shell", SHELL);
    run("ECC", ECC);
    expect_true("no alarm", !alarm);
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
