// tb_mul_checker: runs the two-cycle load sequence of the multiplier check
// registers with consistent and with corrupted residues, and checks that the
// comparison is masked during the two cycles, passes after a consistent
// sequence, fails after an inconsistent one and keeps failing until the next
// consistent multiplication.
module tb_mul_checker;
  import mr_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     ld_hi, ld_lo, mask, ok;
  residue_t pred, enc;
  int       checks = 0, failures = 0;

  mul_checker dut (.*);

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

  // One multiplication: hi/lo residues, optionally one of the four corrupted.
  task automatic mul_seq(input word_t hi, input word_t lo, input int bad);
    residue_t rh, rl;
    rh = ref_res(longint'(hi));
    rl = ref_res(longint'(lo));
    @(negedge clk);
    ld_hi = 1; ld_lo = 0; mask = 1;
    pred = (bad == 1) ? rh ^ 16'h0100 : rh;   // predicted p_hi
    enc  = (bad == 2) ? rl ^ 16'h0004 : rl;   // encoded lo
    #1 expect_true("masked in first cycle", ok);
    @(negedge clk);
    ld_hi = 0; ld_lo = 1; mask = 1;
    pred = (bad == 3) ? rl ^ 16'h0020 : rl;   // predicted p_lo
    enc  = (bad == 4) ? rh ^ 16'h8000 : rh;   // encoded hi
    #1 expect_true("masked in second cycle", ok);
    @(negedge clk);
    ld_lo = 0; mask = 0;
    pred = $urandom(); enc = $urandom();
    #1 expect_true(bad == 0 ? "consistent product passes" : "corrupted product caught",
                   ok == (bad == 0));
    repeat (2) @(negedge clk);
    #1 expect_true("result held", ok == (bad == 0));
  endtask

  initial begin
    ld_hi = 0; ld_lo = 0; mask = 0; pred = '0; enc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 expect_true("reset registers compare equal", ok);
    for (int i = 0; i < 500; i++) mul_seq($urandom(), $urandom(), (i % 3 == 0) ? 1 + (i / 3) % 4 : 0);
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
