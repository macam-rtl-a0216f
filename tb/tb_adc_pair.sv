// tb_adc_pair: drives column sums and checks the code of the dense-mode ADC
// (7 bits, never clipped for 64 rows) and the sparse-mode ADC (5 bits, clipped
// at 31).
module tb_adc_pair;
  localparam int N = 64, CW = 7;
  logic sparse;
  logic [CW-1:0] cnt_in [N], code [N];
  int checks = 0, failures = 0;
  adc_pair dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 20; t++) begin
      sparse = t[0];
      for (int c = 0; c < N; c++) cnt_in[c] = CW'($urandom % 65);
      #1;
      for (int c = 0; c < N; c++) begin
        automatic int e = int'(cnt_in[c]);
        if (sparse && e > 31) e = 31;
        checks++;
        if (int'(code[c]) != e) begin failures++; $display("col %0d sparse %0d in %0d code %0d", c, sparse, cnt_in[c], code[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
