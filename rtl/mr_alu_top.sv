// mr_alu_top: fault-attack protected 32-bit datapath based on a multi-residue
// code with the moduli {5, 7, 17, 31}.
//
// Every register holds a 32-bit data word and a 16-bit residue vector. Each
// operation is done twice: once on the data words in the data ALU and once on
// the residue vectors in the residue ALU. A single shared encoder re-encodes
// the data result and the checker compares it with the predicted residues;
// ok drops to 0 in any cycle where a check fails and alarm stays set from
// then on until reset.
//
//   add, sub, cmp, mov, load, store   1 cycle, result (or stored operand) checked
//   and, or, xor                      3 cycles: the auxiliary value is encoded
//                                     first, operand a is checked second, the
//                                     result is predicted and checked third
//   mul                               2 cycles: high word written first, low
//                                     word second, checked by four check
//                                     registers (mul_checker)
//
// Interface: instructions (instr_t) with a valid/ready handshake; a store
// puts the codeword of ra on st_data/st_res with st_valid for one cycle; a
// compare updates flag_z/flag_n/flag_c (ARM convention, carry = no borrow).
// Register file writes, the residue register, the product registers and the
// flags update at the rising edge of clk; rst_n is asynchronous, active low.
//
// Structure, moduli, the time-shared encoder and the multiplier checking
// follow the reference architecture; the instruction set, handshake, flags, register count
// and the load/store port are this design's own choices.
module mr_alu_top
  import mr_pkg::*;
#(
  parameter int unsigned NREGS = 16  // registers (4 .. 32)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  instr_t   instr,
  input  logic     instr_valid,
  output logic     instr_ready,
  output logic     st_valid,
  output word_t    st_data,
  output residue_t st_res,
  output logic     flag_z,
  output logic     flag_n,
  output logic     flag_c,
  output logic     ok,
  output logic     alarm
);

  localparam int unsigned AW = $clog2(NREGS);

  ctrl_t    ctrl;
  word_t    opa, opb, alu_y, alu_aux, wdata;
  dword_t   prod, prod_q;
  logic     cflag;
  residue_t pa, pb, pc, pprod, pp_q, enc, aux_res, raux;
  logic     chk_ok, mul_ok;

  control_unit u_ctrl (
    .clk, .rst_n, .instr, .instr_valid, .instr_ready, .ctrl
  );

  regfile #(.NREGS(NREGS), .WIDTH(DATA_W)) u_data_regs (
    .clk, .rst_n,
    .ra_addr(ctrl.ra[AW-1:0]), .ra_data(opa),
    .rb_addr(ctrl.rb[AW-1:0]), .rb_data(opb),
    .we(ctrl.we), .wa(ctrl.wa[AW-1:0]), .wd(wdata)
  );

  regfile #(.NREGS(NREGS), .WIDTH(RES_W)) u_res_regs (
    .clk, .rst_n,
    .ra_addr(ctrl.ra[AW-1:0]), .ra_data(pa),
    .rb_addr(ctrl.rb[AW-1:0]), .rb_data(pb),
    .we(ctrl.we), .wa(ctrl.wa[AW-1:0]), .wd(pc)
  );

  data_alu u_dalu (
    .op(ctrl.alu_op), .a(opa), .b(opb),
    .y(alu_y), .cflag, .aux(alu_aux), .prod
  );

  assign raux = ctrl.aux_direct ? enc : aux_res;

  residue_alu u_ralu (
    .op(ctrl.res_op), .pa, .pb, .aux(raux), .cflag,
    .pp(pp_q), .px(instr.ld_res), .pc, .pprod
  );

  encoder_checker u_encchk (
    .clk, .rst_n,
    .sel(ctrl.enc_sel),
    .alu_y, .alu_aux, .opa,
    .prod_lo(prod[DATA_W-1:0]),
    .prodq_hi(prod_q[2*DATA_W-1:DATA_W]),
    .ld_data(instr.ld_data),
    .chk_en(ctrl.chk_en), .chk_opa(ctrl.chk_opa),
    .pred(pc), .opa_res(pa),
    .aux_load(ctrl.aux_load),
    .enc, .aux_res, .chk_ok
  );

  mul_checker u_mulchk (
    .clk, .rst_n,
    .ld_hi(ctrl.mul_ld_hi), .ld_lo(ctrl.mul_ld_lo), .mask(ctrl.mul_mask),
    .pred(pc), .enc, .ok(mul_ok)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      W_PLO:   wdata = prod_q[DATA_W-1:0];
      W_LOAD:  wdata = instr.ld_data;
      default: wdata = alu_y;
    endcase
  end

  assign ok       = chk_ok && mul_ok;
  assign st_valid = ctrl.st_valid;
  assign st_data  = opa;
  assign st_res   = pa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      pp_q   <= '0;
      flag_z <= 1'b0;
      flag_n <= 1'b0;
      flag_c <= 1'b0;
      alarm  <= 1'b0;
    end else begin
      if (ctrl.prod_load) begin
        prod_q <= prod;
        pp_q   <= pprod;
      end
      if (ctrl.cmp_valid) begin
        flag_z <= (alu_y == '0);
        flag_n <= alu_y[DATA_W-1];
        flag_c <= !cflag;
      end
      if (!ok) alarm <= 1'b1;
    end
  end

  // Register indices of an accepted instruction must exist; the two
  // destinations of a multiplication must differ.
  a_reg_idx : assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid && instr_ready |->
      (32'(instr.rd) < NREGS) && (32'(instr.ra) < NREGS) && (32'(instr.rb) < NREGS));
  a_mul_dst : assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid && instr_ready && instr.op == OP_MUL |->
      (32'(instr.rd2) < NREGS) && (instr.rd != instr.rd2));

endmodule
