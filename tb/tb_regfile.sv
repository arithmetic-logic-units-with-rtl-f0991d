// tb_regfile: checks reset to zero, random writes and reads on both read
// ports against a reference array, and that a cleared write enable writes
// nothing.
module tb_regfile;
  localparam int unsigned NREGS = 16;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned AW = $clog2(NREGS);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [AW-1:0]    ra_addr, rb_addr, wa;
  logic [WIDTH-1:0] ra_data, rb_data, wd;
  logic             we = 1'b0;
  logic [WIDTH-1:0] model [NREGS];
  int               checks = 0, failures = 0;

  regfile #(.NREGS(NREGS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_reads();
    checks++;
    if (ra_data !== model[ra_addr] || rb_data !== model[rb_addr]) begin
      failures++;
      $display("FAIL ra[%0d]=%h (exp %h) rb[%0d]=%h (exp %h)", ra_addr, ra_data,
               model[ra_addr], rb_addr, rb_data, model[rb_addr]);
    end
  endtask

  initial begin
    ra_addr = '0; rb_addr = '0; wa = '0; wd = '0;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREGS; i++) begin
      ra_addr = AW'(i); rb_addr = AW'(NREGS - 1 - i); #1; check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we      = ($urandom() % 4) != 0;
      wa      = AW'($urandom());
      wd      = $urandom();
      ra_addr = AW'($urandom());
      rb_addr = AW'($urandom());
      #1 check_reads();
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < NREGS; i++) begin
      ra_addr = AW'(i); rb_addr = AW'(i); #1; check_reads();
    end
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
