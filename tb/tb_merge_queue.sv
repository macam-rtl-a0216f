// tb_merge_queue: streams random partials (row ids from a small set, small
// exponent differences) into a 4-entry queue, collects everything that leaves
// (evictions and the final flush) and checks that each row's total equals the
// exact sum of its partials. Also checks that merges and evictions happened and
// that a flush empties the queue.
module tb_merge_queue;
  localparam int D = 4, RW_ = 128, EW = 16, ROWW = 32;
  localparam int NROW = 7;
  localparam int E0 = -20;
  logic clk = 0, rst_n = 0, in_valid = 0, flush = 0;
  logic [ROWW-1:0] in_row = '0, out_row;
  logic signed [RW_-1:0] in_mant = '0, out_mant;
  logic signed [EW-1:0] in_exp = '0, out_exp;
  logic out_valid, empty, hit, evict;
  logic signed [RW_-1:0] want [NROW], got [NROW];
  int checks = 0, failures = 0, nhit = 0, nev = 0;
  merge_queue #(.DEPTH(D), .RES_W(RW_), .EXP_W(EW), .ROW_W(ROWW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n) begin
    if (out_valid) got[out_row] += out_mant <<< (int'(out_exp) - E0);
    if (hit) nhit++;
    if (evict) nev++;
  end
  initial begin
    for (int r = 0; r < NROW; r++) begin want[r] = '0; got[r] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_row = $urandom % NROW;
      in_mant = RW_'($signed(32'($urandom)));
      in_exp = EW'(E0 + int'($urandom % 20));
      if (in_valid) want[in_row] += in_mant <<< (int'(in_exp) - E0);
    end
    @(negedge clk); in_valid = 0; flush = 1;
    repeat (D + 2) @(negedge clk);
    flush = 0;
    @(negedge clk);
    checks++; if (!empty) failures++;
    for (int r = 0; r < NROW; r++) begin
      checks++;
      if (got[r] != want[r]) begin failures++; $display("row %0d got %0d want %0d", r, got[r], want[r]); end
    end
    checks++; if (nhit == 0) failures++;
    checks++; if (nev == 0) failures++;
    $display("merges %0d evictions %0d", nhit, nev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
