// regfile: flip-flop based register file, two read ports, one write port.
//
// The datapath uses two of them side by side: one with 32-bit entries for the
// data words and one with 16-bit entries for their residue vectors; both are
// addressed and written together. Reads are combinational; a write takes
// effect at the rising clock edge. The asynchronous active-low reset clears
// every entry to zero, and zero data with zero residues is a valid codeword.
//
// A plain flip-flop array follows the reference architecture; the default
// register count of 16 and the reset are this design's own choices.
module regfile #(
  parameter int unsigned NREGS = 16,  // number of registers (4 .. 32 evaluated)
  parameter int unsigned WIDTH = 32,  // bits per entry
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra_addr,
  output logic [WIDTH-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] mem [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NREGS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[wa] <= wd;
    end
  end

  assign ra_data = mem[ra_addr];
  assign rb_data = mem[rb_addr];

  initial assert (NREGS >= 2);

endmodule
