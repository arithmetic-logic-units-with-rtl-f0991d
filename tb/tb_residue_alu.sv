// tb_residue_alu: drives the residue ALU with the residues of random data
// words (and the auxiliary values and carries the data path would supply) and
// checks every prediction against the residue of the true 32-bit result,
// computed with the % operator.
module tb_residue_alu;
  import mr_pkg::*;

  logic     clk = 1'b0;
  res_op_e  op;
  residue_t pa, pb, aux, pp, px, pc, pprod;
  logic     cflag;
  int       checks = 0, failures = 0;

  residue_alu dut (.op, .pa, .pb, .aux, .cflag, .pp, .px, .pc, .pprod);

  always #5 clk = ~clk;

  function automatic residue_t ref_res(input longint unsigned x);
    residue_t e;
    e.m5  = 3'(x % 5);
    e.m7  = 3'(x % 7);
    e.m17 = 5'(x % 17);
    e.m31 = 5'(x % 31);
    return e;
  endfunction

  task automatic expect_res(input string what, input residue_t got, input residue_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input word_t a, input word_t b);
    longint unsigned la, lb, c;
    la  = longint'(a);
    lb  = longint'(b);
    c   = la * lb;
    pa  = ref_res(la);
    pb  = ref_res(lb);
    pp  = ref_res(c);
    px  = ref_res(la ^ 64'h1234);
    op = R_ADD; cflag = ((la + lb) >> 32) != 0; aux = '0; @(posedge clk);
    expect_res("add", pc, ref_res((la + lb) & 64'hFFFF_FFFF));
    op = R_SUB; cflag = la < lb; @(posedge clk);
    expect_res("sub", pc, ref_res((la - lb) & 64'hFFFF_FFFF));
    cflag = 1'b0;
    op = R_AND; aux = ref_res(la ^ lb); @(posedge clk);
    expect_res("and", pc, ref_res(la & lb));
    op = R_OR; @(posedge clk);
    expect_res("or", pc, ref_res(la | lb));
    op = R_XOR; aux = ref_res(la & lb); @(posedge clk);
    expect_res("xor", pc, ref_res(la ^ lb));
    op = R_PASSB; @(posedge clk);
    expect_res("passb", pc, pb);
    op = R_PASSX; @(posedge clk);
    expect_res("passx", pc, px);
    op = R_MULHI; aux = ref_res(c & 64'hFFFF_FFFF); @(posedge clk);
    expect_res("mulhi", pc, ref_res(c >> 32));
    expect_res("pprod", pprod, ref_res(c));
    op = R_MULLO; aux = ref_res(c >> 32); @(posedge clk);
    expect_res("mullo", pc, ref_res(c & 64'hFFFF_FFFF));
  endtask

  initial begin
    run('0, '0);
    run('1, '1);
    run('1, 32'd1);
    run(32'd0, 32'd1);
    run(32'h8000_0000, 32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) run($urandom(), $urandom());
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
