// tb_output_buffer: loads random results with random masks and checks that the
// marked ones come out in column order, one per cycle, and that empty rises
// exactly after the last one.
module tb_output_buffer;
  localparam int N = 16, AW = 40, EW = 16, RW = 32;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N-1:0] vmask = '0;
  logic signed [AW-1:0] acc_in [N];
  logic signed [EW-1:0] exp_in [N];
  logic [RW-1:0] row_in [N];
  logic out_valid, empty;
  logic signed [AW-1:0] out_mant;
  logic signed [EW-1:0] out_exp;
  logic [RW-1:0] out_row;
  int checks = 0, failures = 0;
  output_buffer #(.N(N), .ACC_W(AW), .EXP_W(EW), .ROW_W(RW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      load = 1; vmask = N'($urandom);
      if (t == 0) vmask = '1;
      for (int i = 0; i < N; i++) begin acc_in[i] = AW'({$urandom, $urandom}); exp_in[i] = EW'($urandom); row_in[i] = $urandom; end
      @(negedge clk); load = 0;
      for (int i = 0; i < N; i++) begin
        if (vmask[i]) begin
          checks++;
          if (!out_valid || out_mant != acc_in[i] || out_exp != exp_in[i] || out_row != row_in[i]) begin
            failures++; $display("t %0d col %0d mismatch", t, i);
          end
          @(negedge clk);
        end
      end
      checks++;
      if (!empty || out_valid) begin failures++; $display("t %0d not empty", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
