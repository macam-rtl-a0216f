// delay_register: per-array register file with one entry per crossbar row.
//
// Entries are grouped by region (NUM_SUB x SUB_DIM). For a region used as a MAC
// array an entry holds the delay of that row's bit-serial input; for a region
// used as a CAM array the delays are not needed, and the entry at the first
// stored index of each matrix row holds that row's count of non-zeros (the
// row counts of the MCSR format). One entry or a whole region can be written
// per cycle; two regions can be read at once, combinationally. Reusing the
// delay registers for row counts follows the accelerator's description; the
// entry width is this design's.
module delay_register #(
  parameter int NUM_SUB = macam_pkg::NUM_SUB,
  parameter int SUB_DIM = macam_pkg::SUB_DIM,
  parameter int DLY_W   = macam_pkg::DLY_W,
  localparam int PW = $clog2(NUM_SUB),
  localparam int RW = $clog2(SUB_DIM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic             we_all,
  input  logic [PW-1:0]    w_pos,
  input  logic [RW-1:0]    w_row,
  input  logic [DLY_W-1:0] w_data,
  input  logic [DLY_W-1:0] w_all [SUB_DIM],
  input  logic [PW-1:0]    ra_pos,
  output logic [DLY_W-1:0] ra     [SUB_DIM],
  input  logic [PW-1:0]    rb_pos,
  output logic [DLY_W-1:0] rb     [SUB_DIM]
);

  logic [DLY_W-1:0] r [NUM_SUB][SUB_DIM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_SUB; p++)
        for (int i = 0; i < SUB_DIM; i++) r[p][i] <= '0;
    end else if (we_all) begin
      for (int i = 0; i < SUB_DIM; i++) r[w_pos][i] <= w_all[i];
    end else if (we) begin
      r[w_pos][w_row] <= w_data;
    end
  end

  always_comb begin
    for (int i = 0; i < SUB_DIM; i++) begin
      ra[i] = r[ra_pos][i];
      rb[i] = r[rb_pos][i];
    end
  end

endmodule
