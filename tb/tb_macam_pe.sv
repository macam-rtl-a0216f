// tb_macam_pe: end-to-end run of one PE at reduced size (8 arrays, 8x8
// regions, 8-bit mantissas, delay window 8, 2-bit sparse ADC so that a matrix
// row of more than 3 entries needs several passes, 4-entry merge queue).
// Position 0 holds a dense 8x8 block, position 1 is idle, position 2 holds the
// values and position 3 the MCSR indexes of a random sparse part. The expected
// y = A*x is computed exactly from the same random numbers (value = mantissa *
// 2^exponent) and compared per output row with the sum of everything the PE
// sends out. Also checks the number of dense and sparse passes.
module tb_macam_pe;
  localparam int NA = 8, N = 8, XW = 8, DMAX = 8, VB = 32, MQ = 4, SB = 2;
  localparam int NROWS = 16, NCOLS = 16, E0 = -40;
  localparam int RESW = macam_pkg::RES_W;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, start = 0, busy, done, res_valid;
  macam_pkg::wr_kind_e wr_kind = macam_pkg::WR_CFG;
  logic [15:0] wr_addr = '0;
  logic [31:0] wr_data = '0, wr_key = '0, res_row;
  logic [1:0] wr_pos = '0;
  logic [2:0] wr_arr = '0, wr_row = '0, wr_col = '0;
  logic [7:0] wr_mant = '0;
  logic signed [15:0] wr_exp = '0, res_exp;
  logic [6:0] wr_cnt = '0;
  logic signed [RESW-1:0] res_mant;
  logic [7:0] ev;
  logic signed [RESW-1:0] want [NROWS], got [NROWS];
  int checks = 0, failures = 0, ndp = 0, nsp = 0, nsplit = 0, npad = 0, nres = 0;
  int exp_sp = 0;

  macam_pe #(.NUM_ARRAYS(NA), .SUB_DIM(N), .XW(XW), .DMAX(DMAX), .VBUF_DEPTH(VB),
             .MQ_DEPTH(MQ), .SPARSE_BITS(SB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (res_valid) begin
      got[res_row] += res_mant <<< (int'(res_exp) - E0);
      nres++;
    end
    if (ev[0]) ndp++;
    if (ev[1]) nsp++;
    if (ev[3]) nsplit++;
    if (ev[4]) npad++;
  end

  task automatic wr(macam_pkg::wr_kind_e k);
    wr_kind = k; wr_valid = 1; @(negedge clk); wr_valid = 0;
  endtask
  task automatic cfg(int a, int d); wr_addr = 16'(a); wr_data = d; wr(macam_pkg::WR_CFG); endtask

  logic signed [7:0]  xm [NCOLS];
  logic signed [15:0] xe [NCOLS];

  function automatic logic signed [RESW-1:0] term(logic signed [7:0] am, int ae, logic signed [7:0] bm, int be);
    logic signed [RESW-1:0] p;
    p = RESW'(am) * RESW'(bm);
    return p <<< (ae + be - E0);
  endfunction

  initial begin
    for (int i = 0; i < NROWS; i++) begin want[i] = '0; got[i] = '0; end
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // configuration
    cfg(0, 1); cfg(1, 0); cfg(2, 2); cfg(3, 3);
    cfg(4, 4);          // dense block: output rows 4..11
    cfg(8, 3);          // dense block: vector elements 3..10
    cfg(12, 0); cfg(13, NCOLS);
    // vector
    for (int k = 0; k < NCOLS; k++) begin
      xm[k] = 8'($urandom); xe[k] = 16'(int'($urandom % 5) - 2);
      wr_addr = 16'(k); wr_mant = xm[k]; wr_exp = xe[k]; wr(macam_pkg::WR_VEC);
    end
    // dense block
    for (int c = 0; c < N; c++) begin
      wr_pos = 0; wr_col = 3'(c); wr_exp = 16'(int'($urandom % 5) - 2); wr(macam_pkg::WR_DEXP);
      for (int r = 0; r < N; r++) begin
        wr_row = 3'(r); wr_col = 3'(c); wr_mant = 8'($urandom);
        wr(macam_pkg::WR_DENSE);
        want[4 + c] += term(wr_mant, int'(wr_exp), xm[3 + r], int'(xe[3 + r]));
      end
    end
    // sparse part: CAM region j covers output rows 2j, 2j+1
    for (int j = 0; j < NA; j++) begin
      int slot; slot = 0;
      cfg(256 + j, 2 * j);
      for (int rr = 0; rr < 2; rr++) begin
        int cnt;
        cnt = (j == 1 && rr == 0) ? 5 : int'($urandom % 4);
        if (slot + cnt > N) cnt = N - slot;
        if (cnt == 0 && slot < N) begin
          // empty row: padding entry with row count 0
          wr_arr = 3'(j); wr_row = 3'(slot); wr_key = 0; wr_mant = 0; wr_exp = 0; wr_cnt = 0;
          wr(macam_pkg::WR_SPARSE); slot++;
        end
        if (cnt > 0) exp_sp += (cnt + (1 << SB) - 2) / ((1 << SB) - 1);
        for (int e = 0; e < cnt; e++) begin
          int col;
          col = (e * 3 + j + rr) % NCOLS;
          wr_arr = 3'(j); wr_row = 3'(slot); wr_key = col; wr_mant = 8'($urandom);
          wr_exp = 16'(int'($urandom % 5) - 2); wr_cnt = (e == 0) ? 7'(cnt) : 7'd0;
          wr(macam_pkg::WR_SPARSE);
          want[2 * j + rr] += term(wr_mant, int'(wr_exp), xm[col], int'(xe[col]));
          slot++;
        end
      end
      cfg(512 + j, slot);
    end
    start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk); @(negedge clk);
    for (int i = 0; i < NROWS; i++) begin
      checks++;
      if (got[i] != want[i]) begin failures++; $display("row %0d got %0d want %0d", i, got[i], want[i]); end
    end
    checks++; if (ndp != 1) begin failures++; $display("dense passes %0d", ndp); end
    checks++; if (nsp != exp_sp) begin failures++; $display("sparse passes %0d exp %0d", nsp, exp_sp); end
    checks++; if (nsplit == 0) begin failures++; $display("no split pass"); end
    $display("results %0d dense %0d sparse %0d split %0d pad %0d", nres, ndp, nsp, nsplit, npad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
