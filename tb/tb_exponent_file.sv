// tb_exponent_file: writes random dense-column and sparse-entry exponents and
// checks both adders (entry + vector exponent, column + offset) for every
// position and array.
module tb_exponent_file;
  localparam int NS = 4, N = 8, NA = 8, EW = 16;
  logic clk = 0, rst_n = 0, we_d = 0, we_s = 0;
  logic [1:0] w_pos = '0, rd_pos = '0;
  logic [2:0] w_arr = '0, rd_arr = '0, w_idx = '0;
  logic signed [EW-1:0] w_exp = '0, voff = '0;
  logic signed [EW-1:0] vexp [N], ssum [N], dsum [N];
  logic signed [EW-1:0] md [NS][N], ms [NA][N];
  int checks = 0, failures = 0;
  exponent_file #(.NUM_SUB(NS), .SUB_DIM(N), .NUM_ARRAYS(NA), .EXP_W(EW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < N; i++) vexp[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NS; p++) for (int i = 0; i < N; i++) begin
      @(negedge clk); we_d = 1; we_s = 0; w_pos = p; w_idx = i; w_exp = EW'(int'($urandom % 2000) - 1000); md[p][i] = w_exp;
    end
    for (int a = 0; a < NA; a++) for (int i = 0; i < N; i++) begin
      @(negedge clk); we_d = 0; we_s = 1; w_arr = a; w_idx = i; w_exp = EW'(int'($urandom % 2000) - 1000); ms[a][i] = w_exp;
    end
    @(negedge clk); we_s = 0;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      rd_pos = 2'($urandom); rd_arr = 3'($urandom); voff = EW'(int'($urandom % 200) - 100);
      for (int i = 0; i < N; i++) vexp[i] = EW'(int'($urandom % 200) - 100);
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (ssum[i] != ms[rd_arr][i] + vexp[i]) failures++;
        if (dsum[i] != md[rd_pos][i] + voff) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
