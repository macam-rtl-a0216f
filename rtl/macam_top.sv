// macam_top: the MACAM accelerator, NUM_PE processing elements side by side.
//
// The PEs share one host write bus; wr_pe selects the PE a write goes to. start
// is given to all PEs at once; each PE reports busy and pulses done[p] when its
// merged results have all left on its result stream (res_*[p]). The PEs work
// on disjoint parts of the matrix chosen by the host's layout step, so results
// of one output row coming from different PEs (or evicted from a merge queue)
// are partial sums that the receiver adds. The ten-PE organisation follows the
// accelerator's description; the host bus and per-PE result streams are this
// design's, as the description does not give the PE interconnect.
module macam_top
#(
  parameter int NUM_PE     = macam_pkg::NUM_PE,
  parameter int NUM_ARRAYS = macam_pkg::NUM_ARRAYS,
  parameter int SUB_DIM    = macam_pkg::SUB_DIM,
  parameter int XW         = macam_pkg::XW,
  parameter int DMAX       = macam_pkg::DMAX,
  parameter int VBUF_DEPTH = macam_pkg::VBUF_DEPTH,
  parameter int MQ_DEPTH   = macam_pkg::MQ_DEPTH,
  parameter int SPARSE_BITS= macam_pkg::SPARSE_ADC,
  localparam int PEW    = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  localparam int MANT_W = (XW > NUM_ARRAYS) ? XW : NUM_ARRAYS,
  localparam int PW = $clog2(macam_pkg::NUM_SUB),
  localparam int AW = $clog2(NUM_ARRAYS),
  localparam int RW = $clog2(SUB_DIM),
  localparam int EXP_W = macam_pkg::EXP_W,
  localparam int ROW_W = macam_pkg::ROW_W,
  localparam int DLY_W = macam_pkg::DLY_W,
  localparam int RES_W = macam_pkg::RES_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_valid,
  input  logic [PEW-1:0]          wr_pe,
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
  input  logic                    start,
  output logic [NUM_PE-1:0]       busy,
  output logic [NUM_PE-1:0]       done,
  output logic [NUM_PE-1:0]       res_valid,
  output logic [ROW_W-1:0]        res_row  [NUM_PE],
  output logic signed [RES_W-1:0] res_mant [NUM_PE],
  output logic signed [EXP_W-1:0] res_exp  [NUM_PE],
  output logic [7:0]              ev       [NUM_PE]
);

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    macam_pe #(
      .NUM_ARRAYS(NUM_ARRAYS), .SUB_DIM(SUB_DIM), .XW(XW), .DMAX(DMAX),
      .VBUF_DEPTH(VBUF_DEPTH), .MQ_DEPTH(MQ_DEPTH), .SPARSE_BITS(SPARSE_BITS)
    ) u_pe (
      .clk, .rst_n,
      .wr_valid(wr_valid && wr_pe == PEW'(p)),
      .wr_kind, .wr_addr, .wr_data, .wr_pos, .wr_arr, .wr_row, .wr_col,
      .wr_mant, .wr_exp, .wr_key, .wr_cnt,
      .start,
      .busy     (busy[p]),
      .done     (done[p]),
      .res_valid(res_valid[p]),
      .res_row  (res_row[p]),
      .res_mant (res_mant[p]),
      .res_exp  (res_exp[p]),
      .ev       (ev[p])
    );
  end

endmodule
