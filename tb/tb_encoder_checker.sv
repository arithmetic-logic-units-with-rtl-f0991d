// tb_encoder_checker: checks that the selected input is encoded, that the
// checker compares against the prediction or operand a's residue as chosen
// and flags mismatches, and that the residue register captures an encoding
// only when told to.
module tb_encoder_checker;
  import mr_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  enc_sel_e sel;
  word_t    alu_y, alu_aux, opa, prod_lo, prodq_hi, ld_data;
  logic     chk_en, chk_opa, aux_load, chk_ok;
  residue_t pred, opa_res, enc, aux_res, aux_model;
  int       checks = 0, failures = 0;

  encoder_checker dut (.*);

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
      $display("FAIL %s (sel=%s)", what, sel.name());
    end
  endtask

  initial begin
    word_t w;
    logic [31:0] rnd;
    residue_t good;
    sel = E_RESULT; chk_en = 0; chk_opa = 0; aux_load = 0;
    alu_y = '0; alu_aux = '0; opa = '0; prod_lo = '0; prodq_hi = '0; ld_data = '0;
    pred = '0; opa_res = '0;
    aux_model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 expect_true("residue register reset", aux_res == '0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      alu_y = $urandom(); alu_aux = $urandom(); opa = $urandom();
      prod_lo = $urandom(); prodq_hi = $urandom(); ld_data = $urandom();
      rnd = $urandom();
      sel = enc_sel_e'(rnd[27:25] % 6);
      unique case (sel)
        E_RESULT: w = alu_y;
        E_AUX:    w = alu_aux;
        E_OPA:    w = opa;
        E_PLO:    w = prod_lo;
        E_PHI:    w = prodq_hi;
        default:  w = ld_data;
      endcase
      good     = ref_res(longint'(w));
      chk_en   = rnd[20:19] != 0;
      chk_opa  = rnd[21];
      aux_load = rnd[22];
      // half of the time the compared residue is right, otherwise one lane is off
      pred    = rnd[23] ? good : good ^ 16'h0001;
      opa_res = rnd[24] ? good : good ^ 16'h0800;
      #1;
      expect_true("encoding", enc == good);
      expect_true("check", chk_ok == (!chk_en || ((chk_opa ? opa_res : pred) == good)));
      expect_true("residue register holds", aux_res == aux_model);
      @(posedge clk);
      if (aux_load) aux_model = good;
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
