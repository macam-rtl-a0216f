// tb_macam_top_ten: one complete operation of all ten PEs at a reduced array
// size (16 arrays of four 16x16 regions per PE, 16-bit mantissas, delay window
// 16, 3-bit sparse ADC). PE 0 holds a random dense block at position 0 and a
// sparse part (CAM indexes at position 3, values at position 2) in 8 of its CAM
// regions, including a row longer than one sparse pass and padding entries;
// PE 9 holds a second dense block at position 1. The other PEs are left
// unconfigured and must finish without results. Every output row is compared
// with the exact sum of mantissa products scaled by their exponents.
module tb_macam_top_ten;
  localparam int NP = macam_pkg::NUM_PE, N = 16, NA = 16, XW = 16, DMAX = 16, SB = 3;
  localparam int MW = 16;
  localparam int NROWS = 256, NCOLS = 64, E0 = -60, W = 512;
  localparam int RESW = macam_pkg::RES_W;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, start = 0;
  logic [3:0] wr_pe = '0;
  macam_pkg::wr_kind_e wr_kind = macam_pkg::WR_CFG;
  logic [15:0] wr_addr = '0;
  logic [31:0] wr_data = '0, wr_key = '0;
  logic [1:0] wr_pos = '0;
  logic [3:0] wr_arr = '0, wr_row = '0, wr_col = '0;
  logic [MW-1:0] wr_mant = '0;
  logic signed [15:0] wr_exp = '0;
  logic [6:0] wr_cnt = '0;
  logic [NP-1:0] busy, done, res_valid;
  logic [31:0] res_row [NP];
  logic signed [RESW-1:0] res_mant [NP];
  logic signed [15:0] res_exp [NP];
  logic [7:0] ev [NP];
  logic signed [W-1:0] want [NP][NROWS], got [NP][NROWS];
  logic signed [MW-1:0] xm [NCOLS];
  logic signed [15:0] xe [NCOLS];
  int checks = 0, failures = 0, nres = 0, nsp = 0, ndp = 0;

  macam_top #(.NUM_ARRAYS(NA), .SUB_DIM(N), .XW(XW), .DMAX(DMAX), .SPARSE_BITS(SB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (res_valid[p]) begin
        got[p][res_row[p]] += W'(res_mant[p]) <<< (int'(res_exp[p]) - E0);
        nres++;
      end
      if (ev[p][0]) ndp++;
      if (ev[p][1]) nsp++;
    end
  end

  task automatic wr(macam_pkg::wr_kind_e k);
    wr_kind = k; wr_valid = 1; @(negedge clk); wr_valid = 0;
  endtask
  task automatic cfg(int a, int d); wr_addr = 14'(a); wr_data = d; wr(macam_pkg::WR_CFG); endtask

  function automatic logic signed [W-1:0] term(logic signed [MW-1:0] am, int ae, logic signed [MW-1:0] bm, int be);
    logic signed [W-1:0] pr;
    pr = W'(am) * W'(bm);
    return pr <<< (ae + be - E0);
  endfunction

  task automatic vector(int p);
    wr_pe = 4'(p);
    cfg(12, 0); cfg(13, NCOLS);
    for (int k = 0; k < NCOLS; k++) begin
      wr_addr = 14'(k); wr_mant = xm[k]; wr_exp = xe[k]; wr(macam_pkg::WR_VEC);
    end
  endtask

  task automatic dense(int p, int pos, int rb, int vc);
    wr_pe = 4'(p);
    cfg(pos, 1); cfg(4 + pos, rb); cfg(8 + pos, vc);
    for (int c = 0; c < N; c++) begin
      int ce;
      ce = int'($urandom % 7) - 3;
      wr_pos = 2'(pos); wr_col = 4'(c); wr_exp = 14'(ce); wr(macam_pkg::WR_DEXP);
      for (int r = 0; r < N; r++) begin
        wr_pos = 2'(pos); wr_row = 4'(r); wr_col = 4'(c); wr_mant = MW'($urandom);
        wr(macam_pkg::WR_DENSE);
        want[p][rb + c] += term(wr_mant, ce, xm[vc + r], int'(xe[vc + r]));
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) for (int i = 0; i < NROWS; i++) begin want[p][i] = '0; got[p][i] = '0; end
    for (int k = 0; k < NCOLS; k++) begin xm[k] = MW'($urandom); xe[k] = 14'(int'($urandom % 7) - 3); end
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // PE 0: dense block rows 100..115 x vector 10..25, sparse part rows 0..15
    vector(0);
    dense(0, 0, 100, 10);
    cfg(2, 2); cfg(3, 3);
    for (int j = 0; j < 8; j++) begin
      int slot; slot = 0;
      cfg(256 + j, 2 * j);
      for (int rr = 0; rr < 2; rr++) begin
        int cnt;
        cnt = (j == 3 && rr == 0) ? 12 : int'($urandom % 6);
        if (slot + cnt > N) cnt = N - slot;
        if (cnt == 0) begin
          wr_arr = 4'(j); wr_row = 4'(slot); wr_key = 0; wr_mant = 0; wr_exp = 0; wr_cnt = 0;
          wr(macam_pkg::WR_SPARSE); slot++;
        end
        for (int e = 0; e < cnt; e++) begin
          int col, se;
          col = (e * 3 + 7 * j + rr) % NCOLS;
          se = int'($urandom % 7) - 3;
          wr_arr = 4'(j); wr_row = 4'(slot); wr_key = col; wr_mant = MW'($urandom);
          wr_exp = 14'(se); wr_cnt = (e == 0) ? 7'(cnt) : 7'd0;
          wr(macam_pkg::WR_SPARSE);
          want[0][2 * j + rr] += term(wr_mant, se, xm[col], int'(xe[col]));
          slot++;
        end
      end
      cfg(512 + j, slot);
    end
    // PE 9: dense block rows 180..195 x vector 40..55
    vector(9);
    dense(9, 1, 180, 40);
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    while (busy != '0) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < NROWS; i++) begin
        checks++;
        if (got[p][i] != want[p][i]) begin
          failures++; $display("pe %0d row %0d got %0d want %0d", p, i, got[p][i], want[p][i]);
        end
      end
    checks++; if (ndp != 2) begin failures++; $display("dense passes %0d", ndp); end
    checks++; if (nsp < 10) begin failures++; $display("sparse passes %0d", nsp); end
    $display("results %0d dense passes %0d sparse passes %0d", nres, ndp, nsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
