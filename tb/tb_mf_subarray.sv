// tb_mf_subarray: programs random cells of one crossbar region, checks the MAC
// column sums against a reference count for random row inputs, then programs
// CAM indexes (pair encoding) and checks the match lines for hits and misses.
module tb_mf_subarray;
  localparam int N  = 16;
  localparam int CW = $clog2(N + 1);
  localparam int KW = N / 2;
  logic clk = 0, rst_n = 0;
  logic we_cell = 0, we_row = 0, w_bit = 0;
  logic [$clog2(N)-1:0] w_row = '0, w_col = '0;
  logic [N-1:0] w_rowdata = '0, row_in = '0, match;
  logic [KW-1:0] key = '0;
  logic [CW-1:0] col_cnt [N];
  int checks = 0, failures = 0;
  logic [N-1:0] ref_m [N];
  logic [KW-1:0] keys [N];

  mf_subarray #(.SUB_DIM(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [N-1:0] enc(logic [KW-1:0] k);
    logic [N-1:0] r;
    for (int i = 0; i < KW; i++) begin r[2*i] = k[i]; r[2*i+1] = ~k[i]; end
    return r;
  endfunction

  initial begin
    for (int r = 0; r < N; r++) ref_m[r] = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    // MAC mode
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we_cell = 1; w_row = $urandom; w_col = $urandom; w_bit = $urandom;
      ref_m[w_row][w_col] = w_bit;
    end
    @(negedge clk); we_cell = 0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk); row_in = N'($urandom);
      #1;
      for (int c = 0; c < N; c++) begin
        automatic int s = 0;
        for (int r = 0; r < N; r++) s += (row_in[r] & ref_m[r][c]);
        checks++;
        if (int'(col_cnt[c]) != s) begin failures++; $display("MAC col %0d got %0d exp %0d", c, col_cnt[c], s); end
      end
    end
    // CAM mode
    row_in = '0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk); we_row = 1; w_row = r; keys[r] = KW'($urandom); w_rowdata = enc(keys[r]);
    end
    @(negedge clk); we_row = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      key = (t % 2 == 0) ? keys[$urandom % N] : KW'($urandom);
      #1;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (match[r] != (keys[r] == key)) begin failures++; $display("CAM row %0d key %h", r, key); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
