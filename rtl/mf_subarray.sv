// mf_subarray: behavioural model of one 64x64 region of the ReRAM
// multifunctional crossbar (an analog part; this is an ideal digital model of
// it, not synthesizable circuitry of the real device).
//
// Each cell is a single-level ReRAM device: 1 = low resistance, 0 = high.
//  * MAC mode: row_in drives the match lines of the rows; every bit-line (column)
//    sums the current of the rows whose input is 1 and whose cell is 1. The
//    model gives that sum as an exact count, col_cnt[c] = sum_r row_in[r]&mem[r][c].
//  * CAM mode: two adjacent devices of a row form one CAM cell. Bit k of a stored
//    index is programmed as (mem[2k], mem[2k+1]) = (b, ~b). The key drives the
//    data lines; a row mismatches when a low-resistance device sits on the line
//    that the key activates, i.e. key[k]=1 meets mem[2k+1]=1 or key[k]=0 meets
//    mem[2k]=1. A pair (0,0) therefore matches either key bit.
// Both results are produced combinationally every cycle; the region's mode only
// decides which one the surrounding logic uses. Programming is synchronous, one
// cell or one whole row per cycle. Reset clears all cells (a model convenience:
// the real array keeps its state).
module mf_subarray #(
  parameter int SUB_DIM = macam_pkg::SUB_DIM,
  localparam int AW = $clog2(SUB_DIM),
  localparam int CW = $clog2(SUB_DIM + 1),
  localparam int KW = SUB_DIM / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // programming
  input  logic                we_cell,
  input  logic                we_row,
  input  logic [AW-1:0]       w_row,
  input  logic [AW-1:0]       w_col,
  input  logic                w_bit,
  input  logic [SUB_DIM-1:0]  w_rowdata,
  // CAM mode
  input  logic [KW-1:0]       key,
  output logic [SUB_DIM-1:0]  match,
  // MAC mode
  input  logic [SUB_DIM-1:0]  row_in,
  output logic [CW-1:0]       col_cnt [SUB_DIM]
);

  // The cells are kept twice, by row (for the match lines) and by column (for
  // the bit-lines); both copies are written together.
  logic [SUB_DIM-1:0] mem_r [SUB_DIM];   // mem_r[row][col]
  logic [SUB_DIM-1:0] mem_c [SUB_DIM];   // mem_c[col][row]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < SUB_DIM; r++) begin
        mem_r[r] <= '0;
        mem_c[r] <= '0;
      end
    end else if (we_row) begin
      mem_r[w_row] <= w_rowdata;
      for (int c = 0; c < SUB_DIM; c++) mem_c[c][w_row] <= w_rowdata[c];
    end else if (we_cell) begin
      mem_r[w_row][w_col] <= w_bit;
      mem_c[w_col][w_row] <= w_bit;
    end
  end

  // CAM search: the key activates, per CAM cell, the device that must be off
  // for a match; a row matches when none of its activated devices is on.
  logic [SUB_DIM-1:0] line;

  always_comb begin
    for (int k = 0; k < KW; k++) begin
      line[2*k]   = ~key[k];
      line[2*k+1] =  key[k];
    end
    for (int r = 0; r < SUB_DIM; r++) match[r] = ~|(mem_r[r] & line);
  end

  // MAC: column sums over the active rows.
  always_comb begin
    for (int c = 0; c < SUB_DIM; c++) col_cnt[c] = CW'($countones(mem_c[c] & row_in));
  end

endmodule
