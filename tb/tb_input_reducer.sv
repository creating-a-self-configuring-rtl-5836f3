// tb_input_reducer: exhaustive check of the coin-line reducer. All eight
// combinations of the D, N and Q lines are applied and the 2-bit code is
// compared with the expected value (largest coin wins, none gives 0).
module tb_input_reducer;
  import fsm_pkg::*;

  logic  d, n, q;
  coin_e code;
  int    checks = 0, failures = 0;

  input_reducer dut (.coin_d(d), .coin_n(n), .coin_q(q), .code(code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_code;
      {q, n, d} = 3'(v);
      #1;
      exp_code = q ? 2'd3 : n ? 2'd2 : d ? 2'd1 : 2'd0;
      checks++;
      if (code !== exp_code) begin
        failures++;
        $display("FAIL q=%0b n=%0b d=%0b code=%0d expected %0d", q, n, d, code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
