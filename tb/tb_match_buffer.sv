// tb_match_buffer: captures search results and row ranges and checks the
// stored mask, including clearing and ranges that end at the last row.
module tb_match_buffer;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, clr = 0, ld_match = 0, ld_range = 0;
  logic [N-1:0] match = '0, q, e = '0;
  logic [5:0] start = '0;
  logic [6:0] len = '0;
  int checks = 0, failures = 0;
  match_buffer #(.SUB_DIM(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      clr = 0; ld_match = 0; ld_range = 0;
      case (t % 3)
        0: begin ld_match = 1; match = {$urandom, $urandom}; e = match; end
        1: begin
             ld_range = 1; start = 6'($urandom); len = 7'($urandom % (65 - start));
             for (int i = 0; i < N; i++) e[i] = (i >= start) && (i < start + len);
           end
        default: if (t % 9 == 2) begin clr = 1; e = '0; end
      endcase
      @(posedge clk); #1;
      checks++;
      if (q != e) begin failures++; $display("t %0d q %h exp %h", t, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
