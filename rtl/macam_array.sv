// macam_array: one multifunctional array of a PE.
//
// A 128x128 single-level-cell ReRAM crossbar split into NUM_SUB = 4 regions of
// 64x64 (mf_subarray), each usable as a MAC array or as a CAM array, plus the
// array's peripheral storage:
//  * delay_register - delays of MAC rows, or MCSR row counts of the CAM region;
//  * match_buffer   - rows selected by the last search or row range;
//  * gathered inputs - per CAM row, the vector element (mantissa, exponent) whose
//    index matched that row in the gather search, i.e. the input that the stored
//    matrix entry must be multiplied with.
// Programming: WR cell writes one bit of region w_pos; a CAM index write
// programs a whole row of region w_kpos with the pair encoding (b, ~b).
// Gather (g_en): the key is searched in region cam_pos; the match lines go to
// the match buffer and every matching row latches g_mant/g_exp. g_clr zeroes the
// gathered inputs. Computing: row_in drives the rows of region mac_pos, whose
// column sums appear on col_cnt in the same cycle. All writes are synchronous.
// The region split, the MAC/CAM duality and the buffers follow the
// accelerator's description; the gathered-input registers and port layout are
// this design's.
module macam_array
#(
  parameter int SUB_DIM = macam_pkg::SUB_DIM,
  parameter int NUM_SUB = macam_pkg::NUM_SUB,
  parameter int XW      = macam_pkg::XW,
  parameter int EXP_W   = macam_pkg::EXP_W,
  parameter int DLY_W   = macam_pkg::DLY_W,
  localparam int PW = $clog2(NUM_SUB),
  localparam int RW = $clog2(SUB_DIM),
  localparam int LW = $clog2(SUB_DIM + 1),
  localparam int CW = $clog2(SUB_DIM + 1),
  localparam int KW = SUB_DIM / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // programming
  input  logic                    we_cell,
  input  logic                    we_key,
  input  logic [PW-1:0]           w_pos,
  input  logic [RW-1:0]           w_row,
  input  logic [RW-1:0]           w_col,
  input  logic                    w_bit,
  input  logic [PW-1:0]           w_kpos,
  input  logic [KW-1:0]           w_key,
  // delay register
  input  logic                    dr_we,
  input  logic                    dr_we_all,
  input  logic [PW-1:0]           dr_pos,
  input  logic [RW-1:0]           dr_row,
  input  logic [DLY_W-1:0]        dr_data,
  input  logic [DLY_W-1:0]        dr_all [SUB_DIM],
  input  logic [PW-1:0]           dr_ra_pos,
  output logic [DLY_W-1:0]        dr_ra  [SUB_DIM],
  input  logic [PW-1:0]           dr_rb_pos,
  output logic [DLY_W-1:0]        dr_rb  [SUB_DIM],
  // gather search
  input  logic [PW-1:0]           cam_pos,
  input  logic                    g_clr,
  input  logic                    g_en,
  input  logic [KW-1:0]           g_key,
  input  logic [XW-1:0]           g_mant,
  input  logic signed [EXP_W-1:0] g_exp,
  output logic [XW-1:0]           xg_mant [SUB_DIM],
  output logic signed [EXP_W-1:0] xg_exp  [SUB_DIM],
  // match buffer range
  input  logic                    mb_clr,
  input  logic                    mb_ld_range,
  input  logic [RW-1:0]           mb_start,
  input  logic [LW-1:0]           mb_len,
  output logic [SUB_DIM-1:0]      mb_q,
  // computing
  input  logic [PW-1:0]           mac_pos,
  input  logic [SUB_DIM-1:0]      row_in,
  output logic [CW-1:0]           col_cnt [SUB_DIM]
);

  logic [SUB_DIM-1:0] match_s [NUM_SUB];
  logic [CW-1:0]      cnt_s   [NUM_SUB][SUB_DIM];
  logic [SUB_DIM-1:0] key_row;

  // CAM pair encoding of the index to program.
  always_comb begin
    for (int k = 0; k < KW; k++) begin
      key_row[2*k]   = w_key[k];
      key_row[2*k+1] = ~w_key[k];
    end
  end

  for (genvar p = 0; p < NUM_SUB; p++) begin : g_sub
    mf_subarray #(.SUB_DIM(SUB_DIM)) u_sub (
      .clk, .rst_n,
      .we_cell  (we_cell && w_pos == PW'(p)),
      .we_row   (we_key  && w_kpos == PW'(p)),
      .w_row, .w_col, .w_bit,
      .w_rowdata(key_row),
      .key      (g_key),
      .match    (match_s[p]),
      .row_in   (mac_pos == PW'(p) ? row_in : '0),
      .col_cnt  (cnt_s[p])
    );
  end

  always_comb begin
    for (int c = 0; c < SUB_DIM; c++) col_cnt[c] = cnt_s[mac_pos][c];
  end

  delay_register #(.NUM_SUB(NUM_SUB), .SUB_DIM(SUB_DIM), .DLY_W(DLY_W)) u_dreg (
    .clk, .rst_n,
    .we(dr_we), .we_all(dr_we_all), .w_pos(dr_pos), .w_row(dr_row),
    .w_data(dr_data), .w_all(dr_all),
    .ra_pos(dr_ra_pos), .ra(dr_ra), .rb_pos(dr_rb_pos), .rb(dr_rb)
  );

  match_buffer #(.SUB_DIM(SUB_DIM)) u_mbuf (
    .clk, .rst_n,
    .clr(mb_clr), .ld_match(g_en), .match(match_s[cam_pos]),
    .ld_range(mb_ld_range), .start(mb_start), .len(mb_len), .q(mb_q)
  );

  // Gathered vector inputs, one per CAM row.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < SUB_DIM; r++) begin
        xg_mant[r] <= '0;
        xg_exp[r]  <= '0;
      end
    end else if (g_clr) begin
      for (int r = 0; r < SUB_DIM; r++) begin
        xg_mant[r] <= '0;
        xg_exp[r]  <= '0;
      end
    end else if (g_en) begin
      for (int r = 0; r < SUB_DIM; r++) begin
        if (match_s[cam_pos][r]) begin
          xg_mant[r] <= g_mant;
          xg_exp[r]  <= g_exp;
        end
      end
    end
  end

endmodule
