// tb_data_alu: checks every data ALU operation, the carry/borrow output, the
// auxiliary value and the 64-bit product on corner and random operands.
module tb_data_alu;
  import mr_pkg::*;

  logic    clk = 1'b0;
  alu_op_e op;
  word_t   a, b, y, aux;
  logic    cflag;
  dword_t  prod;
  int      checks = 0, failures = 0;

  data_alu dut (.op, .a, .b, .y, .cflag, .aux, .prod);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h got %h expected %h", what, op.name(), a, b, got, exp);
    end
  endtask

  task automatic run(input word_t va, input word_t vb);
    longint unsigned la, lb;
    la = longint'(va);
    lb = longint'(vb);
    a = va;
    b = vb;
    op = A_ADD;  @(posedge clk);
    expect_eq("add", longint'(y), (la + lb) & 64'hFFFF_FFFF);
    expect_eq("carry", longint'(cflag), (la + lb) >> 32);
    op = A_SUB;  @(posedge clk);
    expect_eq("sub", longint'(y), (la - lb) & 64'hFFFF_FFFF);
    expect_eq("borrow", longint'(cflag), longint'(la < lb));
    op = A_AND;  @(posedge clk);
    expect_eq("and", longint'(y), la & lb);
    expect_eq("and aux", longint'(aux), la ^ lb);
    op = A_OR;   @(posedge clk);
    expect_eq("or", longint'(y), la | lb);
    expect_eq("or aux", longint'(aux), la ^ lb);
    op = A_XOR;  @(posedge clk);
    expect_eq("xor", longint'(y), la ^ lb);
    expect_eq("xor aux", longint'(aux), la & lb);
    op = A_MOVB; @(posedge clk);
    expect_eq("mov", longint'(y), lb);
    op = A_MULHI; @(posedge clk);
    expect_eq("prod", prod, la * lb);
    expect_eq("mulhi", longint'(y), (la * lb) >> 32);
  endtask

  initial begin
    run('0, '0);
    run('1, '1);
    run('1, 32'd1);
    run(32'd0, 32'd1);
    run(32'h8000_0000, 32'h8000_0000);
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
