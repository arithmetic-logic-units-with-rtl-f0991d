// tb_residue_encoder: checks the multi-residue encoder against the residues
// computed with the % operator, for corner words, every power of two and
// random words.
module tb_residue_encoder;
  import mr_pkg::*;

  logic     clk = 1'b0;
  word_t    d;
  residue_t r;
  int       checks = 0, failures = 0;

  residue_encoder dut (.d, .r);

  always #5 clk = ~clk;

  function automatic residue_t ref_res(input longint unsigned x);
    residue_t e;
    e.m5  = 3'(x % 5);
    e.m7  = 3'(x % 7);
    e.m17 = 5'(x % 17);
    e.m31 = 5'(x % 31);
    return e;
  endfunction

  task automatic check(input word_t w);
    d = w;
    @(posedge clk);
    checks++;
    if (r !== ref_res(longint'(w))) begin
      failures++;
      $display("FAIL d=%h r=%h expected %h", w, r, ref_res(longint'(w)));
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(32'h8000_0000);
    check(32'hAAAA_AAAA);
    check(32'h5555_5555);
    for (int i = 0; i < 32; i++) check(word_t'(1) << i);
    for (int i = 0; i < 3000; i++) check($urandom());
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
