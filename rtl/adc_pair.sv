// adc_pair: behavioural model of the two shared ADC types of a PE for one
// bit-slice (an analog part; modelled as ideal saturating quantisers).
//
// The column sums of a MAC region are converted either by the high-precision
// ADC (dense mode, every row of a region may be active) or by the low-precision
// ADC (sparse mode, only the rows of one matrix row are active), selected by the
// mode bit as the multiplexers of the array do. A sum above the full scale of
// the chosen ADC is clipped to its largest code. Both precisions are this
// design's choice: 7 bits is lossless for 64 rows, 5 bits covers up to 31 active
// rows, which the controller respects in sparse mode. Purely combinational.
module adc_pair #(
  parameter int SUB_DIM     = macam_pkg::SUB_DIM,
  parameter int DENSE_BITS  = macam_pkg::DENSE_ADC,
  parameter int SPARSE_BITS = macam_pkg::SPARSE_ADC,
  localparam int CW = $clog2(SUB_DIM + 1)
) (
  input  logic          sparse,
  input  logic [CW-1:0] cnt_in [SUB_DIM],
  output logic [CW-1:0] code   [SUB_DIM]
);

  localparam int DMAXC = (1 << DENSE_BITS) - 1;
  localparam int SMAXC = (1 << SPARSE_BITS) - 1;

  always_comb begin
    for (int c = 0; c < SUB_DIM; c++) begin
      if (sparse)
        code[c] = (int'(cnt_in[c]) > SMAXC) ? CW'(SMAXC) : cnt_in[c];
      else
        code[c] = (int'(cnt_in[c]) > DMAXC) ? CW'(DMAXC) : cnt_in[c];
    end
  end

endmodule
