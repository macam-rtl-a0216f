// tb_macam_array: one array with 8x8 regions. Checks (1) MAC sums of a
// programmed region and that the other regions stay silent, (2) CAM index
// programming in another region, gather searches loading the vector element
// into the matching rows and the match buffer, (3) row-range loading of the
// match buffer, and (4) the delay register ports.
module tb_macam_array;
  localparam int N = 8, NS = 4, XW = 8, EW = 16, DW = 7, CW = 4, KW = 4;
  logic clk = 0, rst_n = 0;
  logic we_cell = 0, we_key = 0, w_bit = 0;
  logic [1:0] w_pos = '0, w_kpos = '0, dr_pos = '0, dr_ra_pos = '0, dr_rb_pos = '0, cam_pos = '0, mac_pos = '0;
  logic [2:0] w_row = '0, w_col = '0, dr_row = '0, mb_start = '0;
  logic [KW-1:0] w_key = '0, g_key = '0;
  logic dr_we = 0, dr_we_all = 0, g_clr = 0, g_en = 0, mb_clr = 0, mb_ld_range = 0;
  logic [DW-1:0] dr_data = '0;
  logic [DW-1:0] dr_all [N], dr_ra [N], dr_rb [N];
  logic [XW-1:0] g_mant = '0;
  logic signed [EW-1:0] g_exp = '0;
  logic [XW-1:0] xg_mant [N];
  logic signed [EW-1:0] xg_exp [N];
  logic [3:0] mb_len = '0;
  logic [N-1:0] mb_q, row_in = '0;
  logic [CW-1:0] col_cnt [N];
  logic [N-1:0] m [N];
  logic [KW-1:0] keys [N];
  int checks = 0, failures = 0;

  macam_array #(.SUB_DIM(N), .NUM_SUB(NS), .XW(XW), .EXP_W(EW), .DLY_W(DW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < N; i++) begin m[i] = '0; dr_all[i] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // (1) MAC region at position 1
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); we_cell = 1; w_pos = 1; w_row = 3'($urandom); w_col = 3'($urandom); w_bit = $urandom;
      m[w_row][w_col] = w_bit;
    end
    @(negedge clk); we_cell = 0;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); row_in = N'($urandom); mac_pos = (t % 4 == 0) ? 2 : 1; #1;
      for (int c = 0; c < N; c++) begin
        automatic int s = 0;
        if (mac_pos == 1) for (int r = 0; r < N; r++) s += row_in[r] & m[r][c];
        checks++;
        if (int'(col_cnt[c]) != s) begin failures++; $display("MAC col %0d got %0d exp %0d", c, col_cnt[c], s); end
      end
    end
    // (2) CAM indexes at position 3, distinct keys per row
    for (int r = 0; r < N; r++) begin
      @(negedge clk); we_key = 1; w_kpos = 3; w_row = r; keys[r] = KW'(r * 3 + 1); w_key = keys[r];
    end
    @(negedge clk); we_key = 0; cam_pos = 3; g_clr = 1;
    @(negedge clk); g_clr = 0;
    for (int r = 0; r < N; r++) begin
      checks++; if (xg_mant[r] != 0) failures++;
    end
    for (int k = 0; k < 16; k++) begin
      @(negedge clk); g_en = 1; g_key = KW'(k); g_mant = XW'(k * 7 + 5); g_exp = EW'(-k);
      @(negedge clk); g_en = 0; #1;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (mb_q[r] != (keys[r] == KW'(k))) begin failures++; $display("match buf row %0d key %0d", r, k); end
      end
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (xg_mant[r] != XW'(keys[r] * 7 + 5) || xg_exp[r] != EW'(-int'(keys[r]))) begin
        failures++; $display("gather row %0d got %0d", r, xg_mant[r]);
      end
    end
    // (3) row range
    @(negedge clk); mb_ld_range = 1; mb_start = 2; mb_len = 3;
    @(negedge clk); mb_ld_range = 0; #1;
    checks++; if (mb_q != 8'b0001_1100) begin failures++; $display("range %b", mb_q); end
    // (4) delay registers: a row count in the CAM region, delays in region 1
    @(negedge clk); dr_we = 1; dr_pos = 3; dr_row = 5; dr_data = 7'd42;
    @(negedge clk); dr_we = 0; dr_we_all = 1; dr_pos = 1;
    for (int i = 0; i < N; i++) dr_all[i] = DW'(i + 10);
    @(negedge clk); dr_we_all = 0; dr_ra_pos = 3; dr_rb_pos = 1; #1;
    checks++; if (dr_ra[5] != 42) failures++;
    for (int i = 0; i < N; i++) begin checks++; if (dr_rb[i] != DW'(i + 10)) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
