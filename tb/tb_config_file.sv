// tb_config_file: writes every register bank and checks the outputs, the CAM /
// sparse-MAC position decode and sparse_on.
module tb_config_file;
  localparam int NA = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [9:0] addr = '0;
  logic [31:0] wdata = '0;
  macam_pkg::sub_mode_e mode [4];
  logic [31:0] row_base [4], vec_base, sbase [NA];
  logic [15:0] vcol [4], nvec;
  logic [6:0] nent [NA];
  logic [1:0] cam_pos, spmac_pos;
  logic sparse_on;
  int checks = 0, failures = 0;
  config_file #(.NUM_ARRAYS(NA)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic wr(input int a, input int d);
    @(negedge clk); we = 1; addr = 10'(a); wdata = d; @(negedge clk); we = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (sparse_on) failures++;
    wr(0, 1); wr(1, 2); wr(2, 3); wr(3, 0);
    for (int p = 0; p < 4; p++) begin wr(4 + p, 1000 * p + 7); wr(8 + p, 16 * p); end
    wr(12, 4096); wr(13, 200);
    for (int j = 0; j < NA; j++) begin wr(256 + j, 100 + j); wr(512 + j, j * 3); end
    checks++; if (mode[0] != macam_pkg::SUB_DENSE || mode[1] != macam_pkg::SUB_SPMAC || mode[2] != macam_pkg::SUB_CAM || mode[3] != macam_pkg::SUB_IDLE) failures++;
    for (int p = 0; p < 4; p++) begin
      checks++; if (row_base[p] != 32'(1000 * p + 7) || vcol[p] != 16'(16 * p)) failures++;
    end
    checks++; if (vec_base != 4096 || nvec != 200) failures++;
    for (int j = 0; j < NA; j++) begin
      checks++; if (sbase[j] != 32'(100 + j) || nent[j] != 7'(j * 3)) failures++;
    end
    checks++; if (!sparse_on || cam_pos != 2 || spmac_pos != 1) failures++;
    wr(2, 1);
    checks++; if (sparse_on) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
