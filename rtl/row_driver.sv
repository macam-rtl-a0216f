// row_driver: delayed bit-serial input of one crossbar row.
//
// Step t of a computation pass drives bit (XW-1-(t-d)) of the row's two's-
// complement mantissa x, where d is the row's delay from the delay register;
// during the first d steps the sign bit is repeated and after the last bit the
// input is 0. Over STEPS = XW + DMAX steps this is x * 2^(DMAX-d) as an
// STEPS-bit two's-complement stream, MSB first. An inactive row drives 0.
// Combinational; the delayed-input idea follows the accelerator's delay-based
// floating-point scheme, the exact stream format is this design's.
module row_driver #(
  parameter int XW    = macam_pkg::XW,
  parameter int DLY_W = macam_pkg::DLY_W,
  parameter int TW    = 8
) (
  input  logic              act,
  input  logic [XW-1:0]     x,
  input  logic [DLY_W-1:0]  d,
  input  logic [TW-1:0]     t,
  output logic              bit_o
);

  always_comb begin
    int k;
    k = int'(t) - int'(d);
    if (!act)          bit_o = 1'b0;
    else if (k < 0)    bit_o = x[XW-1];
    else if (k < XW)   bit_o = x[XW-1-k];
    else               bit_o = 1'b0;
  end

endmodule
