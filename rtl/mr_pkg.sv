// mr_pkg: shared types, constants and residue arithmetic for the
// multi-residue code protected datapath.
//
// Every 32-bit data word d travels with a 16-bit check symbol, the residue
// vector {d mod 5, d mod 7, d mod 17, d mod 31}. The moduli and the 16-bit
// redundancy are those of the reference architecture; the order of the four fields inside
// the 16-bit vector is this design's own choice (mod 31 in the top bits,
// mod 5 in the bottom bits). Each field always holds a fully reduced value
// in 0 .. m-1, so a word is a valid codeword exactly when its encoded
// residue vector equals the stored one bit for bit.
//
// The residue arithmetic works lane by lane: a residue vector is widened to
// four 5-bit lanes (lanes_t), each lane is processed with its own modulus,
// and the result is packed back. The constants 2^32 mod m, 2^-32 mod m and
// 2^-1 mod m are computed by constant functions from the moduli.
package mr_pkg;

  localparam int unsigned DATA_W = 32;   // data word width
  localparam int unsigned RES_W  = 16;   // residue vector width
  localparam int unsigned NMOD   = 4;    // number of moduli
  localparam int unsigned LANE_W = 5;    // widest residue field
  localparam int unsigned REG_IDX_W = 5; // register index field, up to 32 registers

  typedef logic [DATA_W-1:0]   word_t;
  typedef logic [2*DATA_W-1:0] dword_t;

  // Residue vector, 3+3+5+5 = 16 bits.
  typedef struct packed {
    logic [4:0] m31;
    logic [4:0] m17;
    logic [2:0] m7;
    logic [2:0] m5;
  } residue_t;

  typedef logic [LANE_W-1:0] lane_t;
  typedef lane_t [NMOD-1:0]  lanes_t;  // lane 0: mod 5, 1: mod 7, 2: mod 17, 3: mod 31

  localparam int unsigned MODS [NMOD] = '{5, 7, 17, 31};

  // 2^e mod m, computed by repeated doubling.
  function automatic int unsigned pow2_mod(input int unsigned e, input int unsigned m);
    int unsigned v = 1 % m;
    for (int unsigned i = 0; i < e; i++) v = (2 * v) % m;
    return v;
  endfunction

  // Multiplicative inverse of k modulo m (m odd, gcd(k, m) = 1), by search.
  function automatic int unsigned inv_mod(input int unsigned k, input int unsigned m);
    int unsigned r = 0;
    for (int unsigned x = 1; x < m; x++) if ((k * x) % m == 1) r = x;
    return r;
  endfunction

  localparam int unsigned K32 [NMOD] = '{pow2_mod(32, 5), pow2_mod(32, 7),
                                         pow2_mod(32, 17), pow2_mod(32, 31)};
  localparam int unsigned KINV32 [NMOD] = '{inv_mod(K32[0], 5), inv_mod(K32[1], 7),
                                            inv_mod(K32[2], 17), inv_mod(K32[3], 31)};
  localparam int unsigned INV2 [NMOD] = '{inv_mod(2, 5), inv_mod(2, 7),
                                          inv_mod(2, 17), inv_mod(2, 31)};

  function automatic lanes_t to_lanes(input residue_t r);
    lanes_t l;
    l[0] = lane_t'(r.m5);
    l[1] = lane_t'(r.m7);
    l[2] = lane_t'(r.m17);
    l[3] = lane_t'(r.m31);
    return l;
  endfunction

  function automatic residue_t from_lanes(input lanes_t l);
    residue_t r;
    r.m5  = l[0][2:0];
    r.m7  = l[1][2:0];
    r.m17 = l[2][4:0];
    r.m31 = l[3][4:0];
    return r;
  endfunction

  // Reduce a small non-negative value modulo m (m <= 31).
  function automatic lane_t red(input logic [11:0] x, input int unsigned m);
    return lane_t'(x % 12'(m));
  endfunction

  // Residue of a 32-bit word modulo m: sum of the bit weights 2^i mod m of
  // the set bits (at most 32 * 30 = 960), then one small reduction.
  function automatic lane_t word_mod(input word_t d, input int unsigned m);
    logic [11:0] acc = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      if (d[i]) acc = acc + 12'(pow2_mod(i, m));
    return red(acc, m);
  endfunction

  // Operations of the datapath, as issued to the control unit.
  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,  // rd = ra + rb           native, 1 cycle
    OP_SUB   = 4'd1,  // rd = ra - rb           native, 1 cycle
    OP_CMP   = 4'd2,  // flags of ra - rb       native, 1 cycle, no write
    OP_MOV   = 4'd3,  // rd = rb                native, 1 cycle
    OP_AND   = 4'd4,  // rd = ra & rb           non-native, 3 cycles
    OP_OR    = 4'd5,  // rd = ra | rb           non-native, 3 cycles
    OP_XOR   = 4'd6,  // rd = ra ^ rb           non-native, 3 cycles
    OP_MUL   = 4'd7,  // {rd, rd2} = ra * rb    2 cycles (rd: high word, rd2: low word)
    OP_LOAD  = 4'd8,  // rd = load codeword     native, 1 cycle
    OP_STORE = 4'd9   // store codeword of ra   native, 1 cycle
  } op_e;

  // One instruction. ld_data/ld_res carry the codeword a load brings in.
  typedef struct packed {
    op_e                  op;
    logic [REG_IDX_W-1:0] rd;
    logic [REG_IDX_W-1:0] rd2;
    logic [REG_IDX_W-1:0] ra;
    logic [REG_IDX_W-1:0] rb;
    word_t                ld_data;
    residue_t             ld_res;
  } instr_t;

  // Operation of the data ALU.
  typedef enum logic [2:0] {
    A_ADD = 3'd0,
    A_SUB = 3'd1,
    A_AND = 3'd2,
    A_OR  = 3'd3,
    A_XOR = 3'd4,
    A_MOVB = 3'd5,
    A_MULHI = 3'd6   // high word of the product
  } alu_op_e;

  // Operation of the residue ALU.
  typedef enum logic [3:0] {
    R_ADD   = 4'd0,  // pa + pb - c*2^32
    R_SUB   = 4'd1,  // pa - pb + b*2^32
    R_AND   = 4'd2,  // (pa + pb - aux) / 2
    R_OR    = 4'd3,  // (pa + pb + aux) / 2
    R_XOR   = 4'd4,  // pa + pb - 2*aux
    R_PASSB = 4'd5,  // pb
    R_MULHI = 4'd6,  // (pa*pb - aux) * 2^-32
    R_MULLO = 4'd7,  // pp - aux * 2^32   (pp: residue of the full product)
    R_PASSX = 4'd8   // external residue (load)
  } res_op_e;

  // Source selected at the shared encoder's input.
  typedef enum logic [2:0] {
    E_RESULT = 3'd0,  // data ALU result
    E_AUX    = 3'd1,  // auxiliary value of a Boolean operation
    E_OPA    = 3'd2,  // operand a
    E_PLO    = 3'd3,  // low word of the product
    E_PHI    = 3'd4,  // high word of the registered product
    E_LOAD   = 3'd5   // data word of a load
  } enc_sel_e;

  // Source of the data word written back to the register file.
  typedef enum logic [1:0] {
    W_ALU  = 2'd0,  // data ALU result (high product word in the first multiply cycle)
    W_PLO  = 2'd1,  // low word of the registered product
    W_LOAD = 2'd2   // data word of a load
  } wb_sel_e;

  // Control word the control unit issues for the current cycle.
  typedef struct packed {
    alu_op_e              alu_op;
    res_op_e              res_op;
    enc_sel_e             enc_sel;
    wb_sel_e              wb_sel;
    logic [REG_IDX_W-1:0] ra;
    logic [REG_IDX_W-1:0] rb;
    logic [REG_IDX_W-1:0] wa;
    logic                 we;         // write data word and residue vector
    logic                 chk_en;     // compare encoder output with a residue vector
    logic                 chk_opa;    // ... with operand a's residue instead of the prediction
    logic                 aux_load;   // capture encoder output in the residue register
    logic                 aux_direct; // residue ALU takes its aux input straight from the encoder
    logic                 prod_load;  // capture product and product residue (first multiply cycle)
    logic                 mul_ld_hi;  // check registers: predicted hi residue, encoded lo residue
    logic                 mul_ld_lo;  // check registers: predicted lo residue, encoded hi residue
    logic                 mul_mask;   // ignore the check-register comparison this cycle
    logic                 st_valid;   // store: codeword of ra is on the store port
    logic                 cmp_valid;  // compare: update the flags
  } ctrl_t;

endpackage
