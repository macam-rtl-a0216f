// delay_unit: exponent alignment for the bit-serial floating-point MAC.
//
// Among the rows that take part in a computation (act), it finds the largest
// exponent emax and gives every active row the delay emax - e. Row inputs are
// sent MSB first, and a row whose stream starts d cycles late enters the
// shift-and-add with weight 2^-d relative to the aligned rows, which is the
// alignment a floating-point adder would do, performed in time. A delay larger
// than DMAX cannot be applied: such a row is flagged in drop and its delay is
// reported as 0 (the caller must not drive it). Inactive rows get delay 0.
// Purely combinational; the controller stores the delays in the delay
// registers. That the maximum is taken over the data involved follows the
// accelerator's description; DMAX and the drop rule are this design's choice.
module delay_unit #(
  parameter int N     = macam_pkg::SUB_DIM,
  parameter int EXP_W = macam_pkg::EXP_W,
  parameter int DLY_W = macam_pkg::DLY_W,
  parameter int DMAX  = macam_pkg::DMAX
) (
  input  logic [N-1:0]            act,
  input  logic signed [EXP_W-1:0] exps [N],
  output logic signed [EXP_W-1:0] emax,
  output logic                    any,
  output logic [DLY_W-1:0]        dly  [N],
  output logic [N-1:0]            drop
);

  always_comb begin
    emax = '0;
    any  = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (act[i] && (!any || exps[i] > emax)) begin
        emax = exps[i];
        any  = 1'b1;
      end
    end
    for (int i = 0; i < N; i++) begin
      logic signed [EXP_W:0] d;
      d = (EXP_W+1)'(emax) - (EXP_W+1)'(exps[i]);
      dly[i]  = '0;
      drop[i] = 1'b0;
      if (act[i]) begin
        if (d > (EXP_W+1)'(DMAX)) drop[i] = 1'b1;
        else                      dly[i]  = DLY_W'(d);
      end
    end
  end

endmodule
