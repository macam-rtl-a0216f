// tb_shift_add: feeds the unit the per-step slice counts of a small bit-sliced
// dot product (8-bit signed matrix values over 8 slices, 8-bit signed inputs
// streamed MSB first) and checks the accumulator against sum(a*x); also checks
// that it takes exactly one step per input bit and that clr restarts it.
module tb_shift_add;
  localparam int S = 8, CW = 4, ACC_W = 40, R = 6;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, first = 0;
  logic [CW-1:0] codes [S];
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  shift_add #(.SLICES(S), .CW(CW), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] a [R], x [R];
    longint e;
    for (int b = 0; b < S; b++) codes[b] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      e = 0;
      for (int r = 0; r < R; r++) begin
        a[r] = 8'($urandom); x[r] = 8'($urandom);
        e += longint'($signed(a[r])) * longint'($signed(x[r]));
      end
      @(negedge clk); clr = 1; en = 0;
      for (int s = 0; s < 8; s++) begin
        @(negedge clk); clr = 0; en = 1; first = (s == 0);
        for (int b = 0; b < S; b++) begin
          automatic int c = 0;
          for (int r = 0; r < R; r++) c += x[r][7-s] & a[r][b];
          codes[b] = CW'(c);
        end
      end
      @(negedge clk); en = 0; first = 0;
      checks++;
      if (longint'(acc) != e) begin failures++; $display("got %0d exp %0d", acc, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
