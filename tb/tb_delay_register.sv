// tb_delay_register: single-entry writes (row counts) and whole-region writes
// (delays), checked through both read ports against a reference copy.
module tb_delay_register;
  localparam int NS = 4, N = 16, DW = 7;
  logic clk = 0, rst_n = 0, we = 0, we_all = 0;
  logic [1:0] w_pos = '0, ra_pos = '0, rb_pos = '0;
  logic [3:0] w_row = '0;
  logic [DW-1:0] w_data = '0;
  logic [DW-1:0] w_all [N], ra [N], rb [N];
  logic [DW-1:0] m [NS][N];
  int checks = 0, failures = 0;
  delay_register #(.NUM_SUB(NS), .SUB_DIM(N), .DLY_W(DW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int p = 0; p < NS; p++) for (int i = 0; i < N; i++) m[p][i] = '0;
    for (int i = 0; i < N; i++) w_all[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 0; we_all = 0;
      if (t % 7 == 0) begin
        we_all = 1; w_pos = 2'($urandom);
        for (int i = 0; i < N; i++) begin w_all[i] = DW'($urandom); m[w_pos][i] = w_all[i]; end
      end else begin
        we = 1; w_pos = 2'($urandom); w_row = 4'($urandom); w_data = DW'($urandom); m[w_pos][w_row] = w_data;
      end
      ra_pos = 2'($urandom); rb_pos = 2'($urandom);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (ra[i] != m[ra_pos][i] || rb[i] != m[rb_pos][i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
