// shift_add: shift-and-add unit of one column (bit-line position).
//
// The matrix mantissa is bit-sliced over SLICES arrays: slice b holds bit b of a
// two's-complement number, so its ADC code weighs +2^b, except the top slice
// which weighs -2^(SLICES-1). Each cycle the weighted codes of all slices are
// summed into one partial product of the current input bit. The row inputs arrive
// MSB first as two's-complement streams, so the accumulator doubles and adds the
// partial each step (acc = 2*acc + partial), subtracting it on the first (sign)
// step. clr zeroes the accumulator; en takes one step. One-cycle latency from
// codes to acc. Slice weighting follows the bit-sliced layout; the signed number
// format is this design's choice.
module shift_add #(
  parameter int SLICES = macam_pkg::NUM_ARRAYS,
  parameter int CW     = $clog2(macam_pkg::SUB_DIM + 1),
  parameter int ACC_W  = 200
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic                    first,
  input  logic [CW-1:0]           codes [SLICES],
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] partial;

  always_comb begin
    partial = '0;
    for (int b = 0; b < SLICES; b++) begin
      if (b == SLICES - 1) partial -= ACC_W'(codes[b]) <<< b;
      else                 partial += ACC_W'(codes[b]) <<< b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clr)   acc <= '0;
    else if (en)    acc <= first ? (acc <<< 1) - partial : (acc <<< 1) + partial;
  end

endmodule
