// tb_delay_unit: random exponents and active masks; checks the maximum over the
// active rows, every delay, and the drop flag for delays beyond DMAX.
module tb_delay_unit;
  localparam int N = 64, EXP_W = 16, DLY_W = 7, DMAX = 64;
  logic [N-1:0] act, drop;
  logic signed [EXP_W-1:0] exps [N];
  logic signed [EXP_W-1:0] emax;
  logic any;
  logic [DLY_W-1:0] dly [N];
  int checks = 0, failures = 0;
  delay_unit dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 100; t++) begin
      automatic int m; automatic logic have;
      act = {$urandom, $urandom};
      if (t % 10 == 0) act = '0;
      for (int i = 0; i < N; i++) exps[i] = EXP_W'(int'($urandom % 160) - 60);
      #1;
      have = 0; m = -100000;
      for (int i = 0; i < N; i++) if (act[i] && int'(exps[i]) > m) begin m = exps[i]; have = 1; end
      checks++;
      if (any != have || (have && int'(emax) != m)) begin failures++; $display("max got %0d exp %0d", emax, m); end
      for (int i = 0; i < N; i++) begin
        automatic int d = m - int'(exps[i]);
        automatic logic ed; automatic int ev;
        ed = act[i] && d > DMAX;
        ev = (act[i] && !ed) ? d : 0;
        checks++;
        if (drop[i] != ed || int'(dly[i]) != ev) begin failures++; $display("row %0d d %0d got %0d drop %0d", i, d, dly[i], drop[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
