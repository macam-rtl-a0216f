// output_buffer: holds the column results of one computation pass.
//
// load captures N results at once (mantissa, exponent, output row id) together
// with a mask of the columns that carry a result (all columns after a dense
// pass, the single column of the CAM region after a sparse pass). The buffer
// then hands the marked results to the merge queue one per cycle, lowest column
// first, and raises empty when none is left. load must only be given while
// empty. Staging results between the shift-and-add units and the merge queue
// follows the accelerator's description; the one-per-cycle drain is this
// design's choice.
module output_buffer #(
  parameter int N     = macam_pkg::SUB_DIM,
  parameter int ACC_W = 200,
  parameter int EXP_W = macam_pkg::EXP_W,
  parameter int ROW_W = macam_pkg::ROW_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [N-1:0]            vmask,
  input  logic signed [ACC_W-1:0] acc_in [N],
  input  logic signed [EXP_W-1:0] exp_in [N],
  input  logic [ROW_W-1:0]        row_in [N],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_mant,
  output logic signed [EXP_W-1:0] out_exp,
  output logic [ROW_W-1:0]        out_row,
  output logic                    empty
);

  logic [N-1:0]            pend;
  logic signed [ACC_W-1:0] acc_q [N];
  logic signed [EXP_W-1:0] exp_q [N];
  logic [ROW_W-1:0]        row_q [N];
  int                      sel;

  always_comb begin
    sel = 0;
    for (int i = N - 1; i >= 0; i--) if (pend[i]) sel = i;
  end

  assign out_valid = |pend;
  assign empty     = ~|pend;
  assign out_mant  = acc_q[sel];
  assign out_exp   = exp_q[sel];
  assign out_row   = row_q[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      for (int i = 0; i < N; i++) begin
        acc_q[i] <= '0;
        exp_q[i] <= '0;
        row_q[i] <= '0;
      end
    end else if (load) begin
      pend <= vmask;
      for (int i = 0; i < N; i++) begin
        acc_q[i] <= acc_in[i];
        exp_q[i] <= exp_in[i];
        row_q[i] <= row_in[i];
      end
    end else if (|pend) begin
      pend[sel] <= 1'b0;
    end
  end

endmodule
