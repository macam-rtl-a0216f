// tb_input_buffer: fills the buffer with random elements and checks the block
// read port (including wrap-around of the address) and the gather port.
module tb_input_buffer;
  localparam int D = 32, NR = 8, XW = 16, EW = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = '0, rbase = '0, gaddr = '0;
  logic [XW-1:0] wmant = '0, gmant;
  logic signed [EW-1:0] wexp = '0, gexp;
  logic [XW-1:0] rmant [NR];
  logic signed [EW-1:0] rexp [NR];
  logic [XW-1:0] mm [D];
  logic signed [EW-1:0] me [D];
  int checks = 0, failures = 0;
  input_buffer #(.DEPTH(D), .NR(NR), .XW(XW), .EXP_W(EW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = i; wmant = XW'($urandom); wexp = EW'($urandom); mm[i] = wmant; me[i] = wexp;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk); rbase = 5'($urandom); gaddr = 5'($urandom); #1;
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (rmant[i] != mm[5'(rbase + i)] || rexp[i] != me[5'(rbase + i)]) failures++;
      end
      checks++;
      if (gmant != mm[gaddr] || gexp != me[gaddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
