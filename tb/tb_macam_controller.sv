// tb_macam_controller: runs the sequencer on a small configuration with a
// dense, an idle, a sparse-MAC and a CAM position, and a row-count model with a
// row longer than the sparse pass limit and a padding entry. Checks the gather
// addresses, the row ranges given to the match buffer, the event counts and
// the total cycle count, computed from the stage lengths.
module tb_macam_controller;
  localparam int NS = 4, NA = 4, N = 8, STEPS = 10, SPMAX = 3;
  logic clk = 0, rst_n = 0, start = 0;
  macam_pkg::sub_mode_e mode [NS];
  logic [15:0] nvec = 16'd5;
  logic [3:0] nent [NA];
  logic sparse_on = 1;
  logic [3:0] row_cnt;
  logic ob_empty = 1, mq_empty = 1;
  macam_pkg::stage_e stage;
  logic g_clr, g_en, mb_ld_range, setup, run, first, ob_load, mq_flush, busy, done;
  logic ev_dense_pass, ev_sparse_pass, ev_skip, ev_split, ev_pad;
  logic [15:0] g_addr;
  logic [1:0] cur_pos, cur_arr;
  logic [2:0] cur_row;
  logic [3:0] chunk_len, rng_len;
  logic [31:0] row_off;
  logic [3:0] step;
  logic [3:0] rc [NA][N];
  int checks = 0, failures = 0;
  int cyc = 0, ndp = 0, nsp = 0, nsk = 0, nspl = 0, npad = 0, ngat = 0, nrng = 0;
  int exp_rng [4][3] = '{'{0, 0, 3}, '{0, 3, 2}, '{0, 6, 1}, '{2, 0, 3}};

  macam_controller #(.NUM_SUB(NS), .NUM_ARRAYS(NA), .SUB_DIM(N), .STEPS(STEPS), .SPMAX(SPMAX)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  assign row_cnt = rc[cur_arr][cur_row];

  always @(posedge clk) if (rst_n) begin
    if (busy && !done) cyc++;
    if (ev_dense_pass) ndp++;
    if (ev_sparse_pass) nsp++;
    if (ev_skip) nsk++;
    if (ev_split) nspl++;
    if (ev_pad) npad++;
    if (g_en && !g_clr) begin
      checks++; if (int'(g_addr) != ngat) failures++;
      ngat++;
    end
    if (mb_ld_range) begin
      checks++;
      if (nrng > 3 || int'(cur_arr) != exp_rng[nrng][0] || int'(cur_row) != exp_rng[nrng][1] ||
          int'(rng_len) != exp_rng[nrng][2]) begin
        failures++; $display("range %0d: arr %0d row %0d len %0d", nrng, cur_arr, cur_row, rng_len);
      end
      nrng++;
    end
  end

  initial begin
    mode[0] = macam_pkg::SUB_DENSE; mode[1] = macam_pkg::SUB_IDLE;
    mode[2] = macam_pkg::SUB_SPMAC; mode[3] = macam_pkg::SUB_CAM;
    nent[0] = 7; nent[1] = 0; nent[2] = 3; nent[3] = 0;
    for (int a = 0; a < NA; a++) for (int r = 0; r < N; r++) rc[a][r] = '0;
    rc[0][0] = 5; rc[0][5] = 0; rc[0][6] = 1; rc[2][0] = 3;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    // gather 1+5, dense select+setup+steps+out, 3 other positions + exit,
    // 5 array selections, 4 passes of (row+setup+steps+out), 1 pad, 2 array
    // ends, 1 flush
    checks++; if (cyc != 6 + (STEPS + 3) + 4 + 5 + 4 * (STEPS + 3) + 1 + 2 + 1) begin failures++; $display("cycles %0d", cyc); end
    checks++; if (ndp != 1) failures++;
    checks++; if (nsp != 4) failures++;
    checks++; if (nsk != 1) failures++;
    checks++; if (nspl != 1) failures++;
    checks++; if (npad != 1) failures++;
    checks++; if (ngat != 5) failures++;
    checks++; if (nrng != 4) failures++;
    $display("cycles %0d dense %0d sparse %0d skip %0d split %0d pad %0d", cyc, ndp, nsp, nsk, nspl, npad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
