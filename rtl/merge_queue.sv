// merge_queue: merges partial results that belong to the same output row.
//
// Every partial result is (row id, signed mantissa, exponent), worth
// mantissa * 2^exponent. A partial whose row id is already queued is added into
// that entry; otherwise it is appended. When all DEPTH entries are taken, the
// oldest entry is sent out to make room (the receiver must add partials of the
// same row). flush sends the entries out oldest first, one per cycle; in_valid
// must be low while flushing. Output is registered: out_valid pulses once per
// result. hit and evict pulse on a merge and on an eviction.
// Addition keeps sums exact by aligning to the smaller exponent (left shift)
// when the exponents differ by at most LSH; beyond that the value with the
// smaller exponent is shifted right onto the larger one, losing its low bits.
// Merging by row id follows the accelerator's description; the depth, the
// eviction rule and the number format are this design's.
module merge_queue #(
  parameter int DEPTH = macam_pkg::MQ_DEPTH,
  parameter int RES_W = macam_pkg::RES_W,
  parameter int EXP_W = macam_pkg::EXP_W,
  parameter int ROW_W = macam_pkg::ROW_W,
  parameter int LSH   = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [ROW_W-1:0]        in_row,
  input  logic signed [RES_W-1:0] in_mant,
  input  logic signed [EXP_W-1:0] in_exp,
  input  logic                    flush,
  output logic                    out_valid,
  output logic [ROW_W-1:0]        out_row,
  output logic signed [RES_W-1:0] out_mant,
  output logic signed [EXP_W-1:0] out_exp,
  output logic                    empty,
  output logic                    hit,
  output logic                    evict
);

  typedef struct packed {
    logic                    v;
    logic [ROW_W-1:0]        row;
    logic signed [RES_W-1:0] mant;
    logic signed [EXP_W-1:0] ex;
  } ent_t;

  ent_t q [DEPTH];     // q[0] is the oldest

  function automatic ent_t add_ent(ent_t a, logic signed [RES_W-1:0] m,
                                   logic signed [EXP_W-1:0] e);
    ent_t r;
    int   diff;
    r = a;
    if (a.ex == e) begin
      r.mant = a.mant + m;
    end else if (a.ex > e) begin
      diff = int'(a.ex) - int'(e);
      if (diff <= LSH) begin r.mant = (a.mant <<< diff) + m; r.ex = e; end
      else             begin r.mant = a.mant + (m >>> diff); end
    end else begin
      diff = int'(e) - int'(a.ex);
      if (diff <= LSH) begin r.mant = a.mant + (m <<< diff); end
      else             begin r.mant = (a.mant >>> diff) + m; r.ex = e; end
    end
    return r;
  endfunction

  int  hit_idx, free_idx;
  logic full;

  always_comb begin
    hit_idx  = -1;
    free_idx = -1;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (q[i].v && q[i].row == in_row) hit_idx = i;
      if (!q[i].v) free_idx = i;
    end
    full  = (free_idx < 0);
    empty = !q[0].v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_mant  <= '0;
      out_exp   <= '0;
      hit       <= 1'b0;
      evict     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
      evict     <= 1'b0;
      if (in_valid) begin
        if (hit_idx >= 0) begin
          q[hit_idx] <= add_ent(q[hit_idx], in_mant, in_exp);
          hit        <= 1'b1;
        end else if (!full) begin
          q[free_idx] <= '{v: 1'b1, row: in_row, mant: in_mant, ex: in_exp};
        end else begin
          // send the oldest out, shift, append the new one at the tail
          out_valid <= 1'b1;
          out_row   <= q[0].row;
          out_mant  <= q[0].mant;
          out_exp   <= q[0].ex;
          evict     <= 1'b1;
          for (int i = 0; i < DEPTH - 1; i++) q[i] <= q[i+1];
          q[DEPTH-1] <= '{v: 1'b1, row: in_row, mant: in_mant, ex: in_exp};
        end
      end else if (flush && q[0].v) begin
        out_valid <= 1'b1;
        out_row   <= q[0].row;
        out_mant  <= q[0].mant;
        out_exp   <= q[0].ex;
        for (int i = 0; i < DEPTH - 1; i++) q[i] <= q[i+1];
        q[DEPTH-1] <= '0;
      end
    end
  end

endmodule
