// macam_pe: processing element of the MACAM accelerator.
//
// NUM_ARRAYS multifunctional arrays (macam_array) and the components they share:
// input buffer (vector), delay unit, one ADC pair per array (bit-slice), one
// shift-and-add unit per column, exponent file, output buffer, merge queue,
// configuration file and controller.
//
// Data layout. Matrix mantissas are two's-complement NUM_ARRAYS-bit numbers,
// bit-sliced: bit b of every stored value lives in array b, at the same region,
// row and column. A region position configured dense holds one 64x64 block
// (crossbar row r = vector element vcol+r, column c = output row row_base+c),
// pre-aligned per column to the exponent in the exponent file. For the sparse
// mode one position is configured CAM and one sparse-MAC: the CAM region of
// array j holds the column indexes of up to 64 non-zeros in row-major order
// (MCSR), its delay register holds the row counts, and the values of those
// entries sit in column j of the sparse-MAC region of all arrays, same rows.
//
// Host writes (wr_valid with wr_kind): macam_pkg::WR_CFG (wr_addr, wr_data), macam_pkg::WR_VEC
// (wr_addr = buffer index, wr_mant, wr_exp), macam_pkg::WR_DENSE (wr_pos, wr_row, wr_col,
// wr_mant), macam_pkg::WR_DEXP (wr_pos, wr_col, wr_exp), macam_pkg::WR_SPARSE (wr_arr = CAM region j,
// wr_row = entry slot, wr_key = column index, wr_mant, wr_exp, wr_cnt = row
// count or 0). Writes are only allowed while busy is low; the CAM and sparse
// positions must be configured before macam_pkg::WR_SPARSE.
//
// Computing. start runs the controller (gather, dense passes, sparse passes,
// flush). Every pass takes XW + DMAX bit-serial steps. Each merged result leaves
// on res_valid as (res_row, res_mant, res_exp), worth res_mant * 2^res_exp, i.e.
// sum over the row of a_mant * x_mant * 2^(a_exp + x_exp). Results of one row
// that were evicted from the merge queue leave as several partials. done pulses
// when everything has left.
// The composition of the PE follows the accelerator's description; the number
// format, the host interface and the sequencing are this design's.
module macam_pe
#(
  parameter int NUM_ARRAYS = macam_pkg::NUM_ARRAYS,
  parameter int SUB_DIM    = macam_pkg::SUB_DIM,
  parameter int NUM_SUB    = macam_pkg::NUM_SUB,
  parameter int XW         = macam_pkg::XW,
  parameter int DMAX       = macam_pkg::DMAX,
  parameter int VBUF_DEPTH = macam_pkg::VBUF_DEPTH,
  parameter int MQ_DEPTH   = macam_pkg::MQ_DEPTH,
  parameter int DENSE_BITS = macam_pkg::DENSE_ADC,
  parameter int SPARSE_BITS= macam_pkg::SPARSE_ADC,
  localparam int EXP_W  = macam_pkg::EXP_W,
  localparam int DLY_W  = macam_pkg::DLY_W,
  localparam int ROW_W  = macam_pkg::ROW_W,
  localparam int RES_W  = macam_pkg::RES_W,
  localparam int MANT_W = (XW > NUM_ARRAYS) ? XW : NUM_ARRAYS,
  localparam int PW = $clog2(NUM_SUB),
  localparam int AW = $clog2(NUM_ARRAYS),
  localparam int RW = $clog2(SUB_DIM),
  localparam int LW = $clog2(SUB_DIM + 1),
  localparam int CW = $clog2(SUB_DIM + 1),
  localparam int KW = SUB_DIM / 2,
  localparam int VW = $clog2(VBUF_DEPTH),
  localparam int STEPS = XW + DMAX,
  localparam int TW = $clog2(STEPS + 1),
  localparam int ACC_W = NUM_ARRAYS + XW + DMAX + CW + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host writes
  input  logic                    wr_valid,
  input  macam_pkg::wr_kind_e                wr_kind,
  input  logic [15:0]             wr_addr,
  input  logic [31:0]             wr_data,
  input  logic [PW-1:0]           wr_pos,
  input  logic [AW-1:0]           wr_arr,
  input  logic [RW-1:0]           wr_row,
  input  logic [RW-1:0]           wr_col,
  input  logic [MANT_W-1:0]       wr_mant,
  input  logic signed [EXP_W-1:0] wr_exp,
  input  logic [ROW_W-1:0]        wr_key,
  input  logic [DLY_W-1:0]        wr_cnt,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // results
  output logic                    res_valid,
  output logic [ROW_W-1:0]        res_row,
  output logic signed [RES_W-1:0] res_mant,
  output logic signed [EXP_W-1:0] res_exp,
  // event pulses (observability)
  output logic [7:0]              ev
);

  // ---------------- configuration ----------------
  macam_pkg::sub_mode_e        mode [NUM_SUB];
  logic [ROW_W-1:0] row_base [NUM_SUB];
  logic [15:0]      vcol [NUM_SUB];
  logic [ROW_W-1:0] vec_base;
  logic [15:0]      nvec;
  logic [ROW_W-1:0] sbase [NUM_ARRAYS];
  logic [LW-1:0]    nent [NUM_ARRAYS];
  logic [PW-1:0]    cam_pos, spmac_pos;
  logic             sparse_on;

  wire host_we = wr_valid && !busy;

  config_file #(.NUM_SUB(NUM_SUB), .NUM_ARRAYS(NUM_ARRAYS), .SUB_DIM(SUB_DIM)) u_cfg (
    .clk, .rst_n,
    .we(host_we && wr_kind == macam_pkg::WR_CFG), .addr(wr_addr[9:0]), .wdata(wr_data),
    .mode, .row_base, .vcol, .vec_base, .nvec, .sbase, .nent,
    .cam_pos, .spmac_pos, .sparse_on
  );

  // ---------------- controller ----------------
  macam_pkg::stage_e           stage;
  logic             g_clr, g_en, mb_ld_range, setup, run, first, ob_load, mq_flush;
  logic [15:0]      g_addr;
  logic [PW-1:0]    cur_pos;
  logic [AW-1:0]    cur_arr;
  logic [RW-1:0]    cur_row;
  logic [LW-1:0]    chunk_len, rng_len, row_cnt;
  logic [ROW_W-1:0] row_off;
  logic [TW-1:0]    step;
  logic             ob_empty, mq_empty;
  logic             ev_dense_pass, ev_sparse_pass, ev_skip, ev_split, ev_pad;
  logic             mq_hit, mq_evict;

  macam_controller #(
    .NUM_SUB(NUM_SUB), .NUM_ARRAYS(NUM_ARRAYS), .SUB_DIM(SUB_DIM),
    .STEPS(STEPS), .SPMAX((1 << SPARSE_BITS) - 1), .ROW_W(ROW_W)
  ) u_ctrl (
    .clk, .rst_n, .start,
    .mode, .nvec, .nent, .sparse_on,
    .row_cnt, .ob_empty, .mq_empty,
    .stage, .g_clr, .g_en, .g_addr, .cur_pos, .cur_arr, .cur_row, .chunk_len,
    .row_off, .mb_ld_range, .rng_len, .setup, .run, .first, .step, .ob_load,
    .mq_flush, .busy, .done,
    .ev_dense_pass, .ev_sparse_pass, .ev_skip, .ev_split, .ev_pad
  );

  wire sparse_phase = (stage == macam_pkg::ST_SSEL) || (stage == macam_pkg::ST_SROW) || (stage == macam_pkg::ST_SSETUP) ||
                      (stage == macam_pkg::ST_SRUN) || (stage == macam_pkg::ST_SOUT);

  // ---------------- input buffer ----------------
  logic [XW-1:0]           vb_mant [SUB_DIM];
  logic signed [EXP_W-1:0] vb_exp  [SUB_DIM];
  logic [XW-1:0]           g_mant;
  logic signed [EXP_W-1:0] g_exp;

  input_buffer #(.DEPTH(VBUF_DEPTH), .NR(SUB_DIM), .XW(XW), .EXP_W(EXP_W)) u_ibuf (
    .clk, .rst_n,
    .we(host_we && wr_kind == macam_pkg::WR_VEC), .waddr(VW'(wr_addr)), .wmant(XW'(wr_mant)), .wexp(wr_exp),
    .rbase(VW'(vcol[cur_pos])), .rmant(vb_mant), .rexp(vb_exp),
    .gaddr(VW'(g_addr)), .gmant(g_mant), .gexp(g_exp)
  );

  // ---------------- arrays ----------------
  logic [DLY_W-1:0]        dr_ra [NUM_ARRAYS][SUB_DIM];
  logic [DLY_W-1:0]        dr_rb [NUM_ARRAYS][SUB_DIM];
  logic [XW-1:0]           xg_mant [NUM_ARRAYS][SUB_DIM];
  logic signed [EXP_W-1:0] xg_exp  [NUM_ARRAYS][SUB_DIM];
  logic [SUB_DIM-1:0]      mb_q [NUM_ARRAYS];
  logic [CW-1:0]           col_cnt [NUM_ARRAYS][SUB_DIM];
  logic [CW-1:0]           code    [NUM_ARRAYS][SUB_DIM];
  logic [DLY_W-1:0]        dly [SUB_DIM];
  logic [SUB_DIM-1:0]      row_in;
  logic [PW-1:0]           mac_pos;

  assign mac_pos = sparse_phase ? spmac_pos : cur_pos;

  wire wr_dense  = host_we && wr_kind == macam_pkg::WR_DENSE;
  wire wr_sparse = host_we && wr_kind == macam_pkg::WR_SPARSE;
  wire [KW-1:0] g_key = KW'(vec_base + ROW_W'(g_addr));

  for (genvar b = 0; b < NUM_ARRAYS; b++) begin : g_arr
    wire this_j = (wr_arr == AW'(b));
    macam_array #(
      .SUB_DIM(SUB_DIM), .NUM_SUB(NUM_SUB), .XW(XW), .EXP_W(EXP_W), .DLY_W(DLY_W)
    ) u_array (
      .clk, .rst_n,
      .we_cell  (wr_dense || wr_sparse),
      .we_key   (wr_sparse && this_j),
      .w_pos    (wr_sparse ? spmac_pos : wr_pos),
      .w_kpos   (cam_pos),
      .w_row    (wr_row),
      .w_col    (wr_sparse ? RW'(wr_arr) : wr_col),
      .w_bit    (wr_mant[b]),
      .w_key    (KW'(wr_key)),
      .dr_we    (wr_sparse && this_j),
      .dr_we_all(setup && (sparse_phase ? (cur_arr == AW'(b)) : 1'b1)),
      .dr_pos   (setup ? mac_pos : cam_pos),
      .dr_row   (wr_row),
      .dr_data  (wr_cnt),
      .dr_all   (dly),
      .dr_ra_pos(cam_pos),
      .dr_ra    (dr_ra[b]),
      .dr_rb_pos(mac_pos),
      .dr_rb    (dr_rb[b]),
      .cam_pos,
      .g_clr,
      .g_en,
      .g_key,
      .g_mant,
      .g_exp,
      .xg_mant  (xg_mant[b]),
      .xg_exp   (xg_exp[b]),
      .mb_clr   (1'b0),
      .mb_ld_range(mb_ld_range && cur_arr == AW'(b)),
      .mb_start (cur_row),
      .mb_len   (rng_len),
      .mb_q     (mb_q[b]),
      .mac_pos,
      .row_in,
      .col_cnt  (col_cnt[b])
    );

    adc_pair #(.SUB_DIM(SUB_DIM), .DENSE_BITS(DENSE_BITS), .SPARSE_BITS(SPARSE_BITS)) u_adc (
      .sparse(sparse_phase), .cnt_in(col_cnt[b]), .code(code[b])
    );
  end

  assign row_cnt = LW'(dr_ra[cur_arr][cur_row]);

  // ---------------- exponents and delays ----------------
  logic signed [EXP_W-1:0] ssum [SUB_DIM];
  logic signed [EXP_W-1:0] dsum [SUB_DIM];
  logic signed [EXP_W-1:0] du_exps [SUB_DIM];
  logic signed [EXP_W-1:0] emax, emax_q;
  logic [SUB_DIM-1:0]      du_act, du_drop, ract;
  logic                    du_any;

  exponent_file #(.NUM_SUB(NUM_SUB), .SUB_DIM(SUB_DIM), .NUM_ARRAYS(NUM_ARRAYS), .EXP_W(EXP_W)) u_exp (
    .clk, .rst_n,
    .we_d(host_we && wr_kind == macam_pkg::WR_DEXP), .w_pos(wr_pos),
    .we_s(wr_sparse), .w_arr(wr_arr),
    .w_idx(wr_kind == macam_pkg::WR_DEXP ? wr_col : wr_row), .w_exp(wr_exp),
    .rd_pos(cur_pos), .rd_arr(cur_arr),
    .vexp(xg_exp[cur_arr]), .voff(emax_q - EXP_W'(DMAX)),
    .ssum, .dsum
  );

  always_comb begin
    for (int i = 0; i < SUB_DIM; i++)
      du_exps[i] = sparse_phase ? ssum[i] : vb_exp[i];
    du_act = sparse_phase ? mb_q[cur_arr] : '1;
  end

  delay_unit #(.N(SUB_DIM), .EXP_W(EXP_W), .DLY_W(DLY_W), .DMAX(DMAX)) u_dly (
    .act(du_act), .exps(du_exps), .emax, .any(du_any), .dly, .drop(du_drop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emax_q <= '0;
      ract   <= '0;
    end else if (setup) begin
      emax_q <= emax;
      ract   <= du_act & ~du_drop;
    end
  end

  // ---------------- row inputs ----------------
  for (genvar r = 0; r < SUB_DIM; r++) begin : g_row
    row_driver #(.XW(XW), .DLY_W(DLY_W), .TW(TW)) u_drv (
      .act  (run && ract[r]),
      .x    (sparse_phase ? xg_mant[cur_arr][r] : vb_mant[r]),
      .d    (sparse_phase ? dr_rb[cur_arr][r] : dr_rb[0][r]),
      .t    (step),
      .bit_o(row_in[r])
    );
  end

  // ---------------- shift-and-add, one per column ----------------
  logic signed [ACC_W-1:0] acc [SUB_DIM];
  logic signed [EXP_W-1:0] ob_exp [SUB_DIM];
  logic [ROW_W-1:0]        ob_row [SUB_DIM];

  for (genvar c = 0; c < SUB_DIM; c++) begin : g_col
    logic [CW-1:0] codes_c [NUM_ARRAYS];
    always_comb for (int b = 0; b < NUM_ARRAYS; b++) codes_c[b] = code[b][c];
    shift_add #(.SLICES(NUM_ARRAYS), .CW(CW), .ACC_W(ACC_W)) u_sa (
      .clk, .rst_n, .clr(setup), .en(run), .first, .codes(codes_c), .acc(acc[c])
    );
    always_comb begin
      ob_exp[c] = sparse_phase ? emax_q - EXP_W'(DMAX) : dsum[c];
      ob_row[c] = sparse_phase ? sbase[cur_arr] + row_off : row_base[cur_pos] + ROW_W'(c);
    end
  end

  // ---------------- output buffer and merge queue ----------------
  logic                    obv;
  logic signed [ACC_W-1:0] ob_mant;
  logic signed [EXP_W-1:0] ob_e;
  logic [ROW_W-1:0]        ob_r;
  logic [SUB_DIM-1:0]      ob_mask;

  always_comb begin
    ob_mask = '0;
    if (sparse_phase) ob_mask[cur_arr] = 1'b1;
    else              ob_mask = '1;
  end

  output_buffer #(.N(SUB_DIM), .ACC_W(ACC_W), .EXP_W(EXP_W), .ROW_W(ROW_W)) u_obuf (
    .clk, .rst_n, .load(ob_load), .vmask(ob_mask),
    .acc_in(acc), .exp_in(ob_exp), .row_in(ob_row),
    .out_valid(obv), .out_mant(ob_mant), .out_exp(ob_e), .out_row(ob_r), .empty(ob_empty)
  );

  merge_queue #(.DEPTH(MQ_DEPTH), .RES_W(RES_W), .EXP_W(EXP_W), .ROW_W(ROW_W)) u_mq (
    .clk, .rst_n,
    .in_valid(obv), .in_row(ob_r), .in_mant(RES_W'(ob_mant)), .in_exp(ob_e),
    .flush(mq_flush),
    .out_valid(res_valid), .out_row(res_row), .out_mant(res_mant), .out_exp(res_exp),
    .empty(mq_empty), .hit(mq_hit), .evict(mq_evict)
  );

  assign ev = {g_en, mq_evict, mq_hit, ev_pad, ev_split, ev_skip, ev_sparse_pass, ev_dense_pass};

endmodule
