// input_buffer: PE-level buffer of vector elements.
//
// Holds DEPTH vector elements, each a two's-complement mantissa and a signed
// exponent, written one per cycle by the host. It has NR combinational read
// ports so that one dense region can read all of its row inputs at once, and
// one more port (index g) used for the gather searches of the sparse mode.
// Buffering the vector (and, through the gather port, the search keys) follows
// the accelerator's description; depth and port count are this design's.
module input_buffer #(
  parameter int DEPTH = macam_pkg::VBUF_DEPTH,
  parameter int NR    = macam_pkg::SUB_DIM,
  parameter int XW    = macam_pkg::XW,
  parameter int EXP_W = macam_pkg::EXP_W,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [XW-1:0]           wmant,
  input  logic signed [EXP_W-1:0] wexp,
  input  logic [AW-1:0]           rbase,       // block read: rbase + i, i < NR
  output logic [XW-1:0]           rmant [NR],
  output logic signed [EXP_W-1:0] rexp  [NR],
  input  logic [AW-1:0]           gaddr,       // gather port
  output logic [XW-1:0]           gmant,
  output logic signed [EXP_W-1:0] gexp
);

  logic [XW-1:0]           mant [DEPTH];
  logic signed [EXP_W-1:0] ex   [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        mant[i] <= '0;
        ex[i]   <= '0;
      end
    end else if (we) begin
      mant[waddr] <= wmant;
      ex[waddr]   <= wexp;
    end
  end

  always_comb begin
    for (int i = 0; i < NR; i++) begin
      logic [AW-1:0] a;
      a = rbase + AW'(i);
      rmant[i] = mant[a];
      rexp[i]  = ex[a];
    end
    gmant = mant[gaddr];
    gexp  = ex[gaddr];
  end

endmodule
