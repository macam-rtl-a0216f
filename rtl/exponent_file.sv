// exponent_file: exponents of the stored matrix data and the exponent adders.
//
// A dense region is stored pre-aligned per bit-line: every column has one
// exponent (dexp[pos][col]). In the sparse region every stored entry keeps its
// own exponent (sexp[array][row], array = the CAM region the entry belongs to).
// The adders form, for the sparse entries of one array, the product exponents
// ssum[r] = sexp[rd_arr][r] + vexp[r], and for the columns of one dense region
// the result exponents dsum[c] = dexp[rd_pos][c] + voff. Writes are synchronous,
// reads and sums combinational. Exponents are signed and unbiased, a choice of
// this design; storing matrix and vector exponents and adding them follows the
// accelerator's description.
module exponent_file #(
  parameter int NUM_SUB    = macam_pkg::NUM_SUB,
  parameter int SUB_DIM    = macam_pkg::SUB_DIM,
  parameter int NUM_ARRAYS = macam_pkg::NUM_ARRAYS,
  parameter int EXP_W      = macam_pkg::EXP_W,
  localparam int PW = $clog2(NUM_SUB),
  localparam int AW = $clog2(NUM_ARRAYS),
  localparam int RW = $clog2(SUB_DIM)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we_d,
  input  logic [PW-1:0]           w_pos,
  input  logic                    we_s,
  input  logic [AW-1:0]           w_arr,
  input  logic [RW-1:0]           w_idx,
  input  logic signed [EXP_W-1:0] w_exp,
  input  logic [PW-1:0]           rd_pos,
  input  logic [AW-1:0]           rd_arr,
  input  logic signed [EXP_W-1:0] vexp [SUB_DIM],
  input  logic signed [EXP_W-1:0] voff,
  output logic signed [EXP_W-1:0] ssum [SUB_DIM],
  output logic signed [EXP_W-1:0] dsum [SUB_DIM]
);

  logic signed [EXP_W-1:0] dexp [NUM_SUB][SUB_DIM];
  logic signed [EXP_W-1:0] sexp [NUM_ARRAYS][SUB_DIM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_SUB; p++)
        for (int i = 0; i < SUB_DIM; i++) dexp[p][i] <= '0;
      for (int a = 0; a < NUM_ARRAYS; a++)
        for (int i = 0; i < SUB_DIM; i++) sexp[a][i] <= '0;
    end else begin
      if (we_d) dexp[w_pos][w_idx] <= w_exp;
      if (we_s) sexp[w_arr][w_idx] <= w_exp;
    end
  end

  always_comb begin
    for (int i = 0; i < SUB_DIM; i++) begin
      ssum[i] = sexp[rd_arr][i] + vexp[i];
      dsum[i] = dexp[rd_pos][i] + voff;
    end
  end

endmodule
