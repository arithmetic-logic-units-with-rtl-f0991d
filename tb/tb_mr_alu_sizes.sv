// tb_mr_alu_sizes: runs the protected datapath with 4, 8, 16 and 32
// registers side by side, each driven by tb_alu_driver with its own random
// stream and reference model, and adds up their checks.
module tb_mr_alu_sizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c4, f4, c8, f8, c16, f16, c32, f32;
  logic d4, d8, d16, d32;
  int   checks, failures;

  always #5 clk = ~clk;

  tb_alu_driver #(.NREGS(4))  u4  (.clk, .rst_n, .checks(c4),  .failures(f4),  .done(d4));
  tb_alu_driver #(.NREGS(8))  u8  (.clk, .rst_n, .checks(c8),  .failures(f8),  .done(d8));
  tb_alu_driver #(.NREGS(16)) u16 (.clk, .rst_n, .checks(c16), .failures(f16), .done(d16));
  tb_alu_driver #(.NREGS(32)) u32 (.clk, .rst_n, .checks(c32), .failures(f32), .done(d32));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d4 && d8 && d16 && d32);
    checks   = c4 + c8 + c16 + c32;
    failures = f4 + f8 + f16 + f32;
    $display("registers 4: %0d checks, 8: %0d, 16: %0d, 32: %0d", c4, c8, c16, c32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + c32, f4 + f8 + f16 + f32 + 1);
    $finish;
  end
endmodule
