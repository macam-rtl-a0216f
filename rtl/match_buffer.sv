// match_buffer: one bit per crossbar row selecting the rows that compute.
//
// ld_match captures the match lines of a CAM search. ld_range instead writes the
// rows start .. start+len-1, which is how the controller marks the stored
// entries of one matrix row (found from the MCSR row count) as the rows to
// activate in the MAC regions. clr empties it. Storing search results and using
// them to choose the participating rows follows the accelerator's description;
// the range load is this design's way of expressing the row traversal.
module match_buffer #(
  parameter int SUB_DIM = macam_pkg::SUB_DIM,
  localparam int RW = $clog2(SUB_DIM),
  localparam int LW = $clog2(SUB_DIM + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               ld_match,
  input  logic [SUB_DIM-1:0] match,
  input  logic               ld_range,
  input  logic [RW-1:0]      start,
  input  logic [LW-1:0]      len,
  output logic [SUB_DIM-1:0] q
);

  logic [SUB_DIM-1:0] range_mask;

  always_comb begin
    for (int i = 0; i < SUB_DIM; i++)
      range_mask[i] = (i >= int'(start)) && (i < int'(start) + int'(len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (clr)      q <= '0;
    else if (ld_match) q <= match;
    else if (ld_range) q <= range_mask;
  end

endmodule
