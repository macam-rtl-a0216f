// tb_macam_top: end-to-end test of the accelerator at reduced size (2 PEs, 8
// arrays per PE, 8x8 regions, 8-bit mantissas, delay window 8, 2-bit sparse
// ADC, 4-entry merge queue). Two operations are run. In the first, PE 0 uses
// layout A (dense, idle, sparse values, CAM indexes at positions 0..3) and PE 1
// layout B (CAM, sparse values, dense, idle); in the second the two PEs swap
// layouts, so every position of both PEs switches mode. Each operation's
// results are compared per PE and per output row with the exact y = A*x. The
// test counts each mechanism (dense pass, sparse pass, skipped block, split
// sparse row, padding entry, merge, merge-queue eviction, gather search, mode
// switch) and fails if one never happened.
module tb_macam_top;
  localparam int NP = 2, NA = 8, N = 8, XW = 8, DMAX = 8, VB = 32, MQ = 4, SB = 2;
  localparam int NROWS = 16, NCOLS = 16, E0 = -40;
  localparam int RESW = macam_pkg::RES_W;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, start = 0;
  logic [0:0] wr_pe = '0;
  macam_pkg::wr_kind_e wr_kind = macam_pkg::WR_CFG;
  logic [15:0] wr_addr = '0;
  logic [31:0] wr_data = '0, wr_key = '0;
  logic [1:0] wr_pos = '0;
  logic [2:0] wr_arr = '0, wr_row = '0, wr_col = '0;
  logic [7:0] wr_mant = '0;
  logic signed [15:0] wr_exp = '0;
  logic [6:0] wr_cnt = '0;
  logic [NP-1:0] busy, done, res_valid;
  logic [31:0] res_row [NP];
  logic signed [RESW-1:0] res_mant [NP];
  logic signed [15:0] res_exp [NP];
  logic [7:0] ev [NP];
  logic signed [RESW-1:0] want [NP][NROWS], got [NP][NROWS];
  int checks = 0, failures = 0;
  int cnt_ev [8];
  int nswitch = 0;
  int mode_now [NP][4];

  macam_top #(.NUM_PE(NP), .NUM_ARRAYS(NA), .SUB_DIM(N), .XW(XW), .DMAX(DMAX),
              .VBUF_DEPTH(VB), .MQ_DEPTH(MQ), .SPARSE_BITS(SB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (res_valid[p]) got[p][res_row[p]] += res_mant[p] <<< (int'(res_exp[p]) - E0);
      for (int e = 0; e < 8; e++) if (ev[p][e]) cnt_ev[e]++;
    end
  end

  task automatic wr(macam_pkg::wr_kind_e k);
    wr_kind = k; wr_valid = 1; @(negedge clk); wr_valid = 0;
  endtask
  task automatic cfg(int a, int d); wr_addr = 16'(a); wr_data = d; wr(macam_pkg::WR_CFG); endtask

  function automatic logic signed [RESW-1:0] term(logic signed [7:0] am, int ae, logic signed [7:0] bm, int be);
    logic signed [RESW-1:0] pr;
    pr = RESW'(am) * RESW'(bm);
    return pr <<< (ae + be - E0);
  endfunction

  // Load one PE with a random matrix part and vector. layout 0: D I S C, 1: C S D I
  task automatic load(int p, int layout);
    logic signed [7:0]  xm [NCOLS];
    logic signed [15:0] xe [NCOLS];
    int md [4], dpos, rb, vc;
    md = (layout == 0) ? '{1, 0, 2, 3} : '{3, 2, 1, 0};
    dpos = (layout == 0) ? 0 : 2;
    rb = 4 + 2 * layout; vc = 3 + layout;
    wr_pe = 1'(p);
    for (int q = 0; q < 4; q++) begin
      if (mode_now[p][q] != md[q]) nswitch++;
      mode_now[p][q] = md[q];
      cfg(q, md[q]);
    end
    cfg(4 + dpos, rb); cfg(8 + dpos, vc); cfg(12, 0); cfg(13, NCOLS);
    for (int i = 0; i < NROWS; i++) begin want[p][i] = '0; got[p][i] = '0; end
    for (int k = 0; k < NCOLS; k++) begin
      xm[k] = 8'($urandom); xe[k] = 16'(int'($urandom % 5) - 2);
      wr_addr = 16'(k); wr_mant = xm[k]; wr_exp = xe[k]; wr(macam_pkg::WR_VEC);
    end
    for (int c = 0; c < N; c++) begin
      wr_pos = 2'(dpos); wr_col = 3'(c); wr_exp = 16'(int'($urandom % 5) - 2); wr(macam_pkg::WR_DEXP);
      for (int r = 0; r < N; r++) begin
        wr_row = 3'(r); wr_col = 3'(c); wr_mant = 8'($urandom);
        wr(macam_pkg::WR_DENSE);
        want[p][rb + c] += term(wr_mant, int'(wr_exp), xm[vc + r], int'(xe[vc + r]));
      end
    end
    for (int j = 0; j < NA; j++) begin
      int slot; slot = 0;
      cfg(256 + j, 2 * j);
      for (int rr = 0; rr < 2; rr++) begin
        int cnt;
        cnt = (j == 1 && rr == 0) ? 5 : int'($urandom % 4);
        if (j == 2 && rr == 0) cnt = 0;
        if (slot + cnt > N) cnt = N - slot;
        if (cnt == 0 && slot < N) begin
          wr_arr = 3'(j); wr_row = 3'(slot); wr_key = 0; wr_mant = 0; wr_exp = 0; wr_cnt = 0;
          wr(macam_pkg::WR_SPARSE); slot++;
        end
        for (int e = 0; e < cnt; e++) begin
          int col;
          col = (e * 5 + j + rr + layout) % NCOLS;
          wr_arr = 3'(j); wr_row = 3'(slot); wr_key = col; wr_mant = 8'($urandom);
          wr_exp = 16'(int'($urandom % 5) - 2); wr_cnt = (e == 0) ? 7'(cnt) : 7'd0;
          wr(macam_pkg::WR_SPARSE);
          want[p][2 * j + rr] += term(wr_mant, int'(wr_exp), xm[col], int'(xe[col]));
          slot++;
        end
      end
      cfg(512 + j, slot);
    end
  endtask

  task automatic run_and_check(int op);
    start = 1; @(negedge clk); start = 0;
    while (busy != '0) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < NROWS; i++) begin
        checks++;
        if (got[p][i] != want[p][i]) begin
          failures++; $display("op %0d pe %0d row %0d got %0d want %0d", op, p, i, got[p][i], want[p][i]);
        end
      end
  endtask

  initial begin
    string names [9] = '{"dense pass", "sparse pass", "skipped block", "split sparse row",
                         "padding entry", "merge", "eviction", "gather search", "mode switch"};
    for (int e = 0; e < 8; e++) cnt_ev[e] = 0;
    for (int p = 0; p < NP; p++) for (int q = 0; q < 4; q++) mode_now[p][q] = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    load(0, 0); load(1, 1);
    nswitch = 0;                     // the first configuration is not a switch
    run_and_check(0);
    load(0, 1); load(1, 0);
    run_and_check(1);
    for (int e = 0; e < 9; e++) begin
      int n;
      n = (e == 8) ? nswitch : cnt_ev[e];
      $display("%s: %0d", names[e], n);
      checks++;
      if (n == 0) begin failures++; $display("mechanism never exercised: %s", names[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
