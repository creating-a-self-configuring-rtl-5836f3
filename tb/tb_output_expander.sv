// tb_output_expander: exhaustive check of the output expander. Every output
// code is applied with the enable low and high; with the enable high exactly
// the matching line must rise, with it low all lines must stay low.
module tb_output_expander;
  import fsm_pkg::*;

  logic     en;
  out_e     code;
  fsm_out_t lines;
  int       checks = 0, failures = 0;

  output_expander dut (.en(en), .code(code), .lines(lines));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 4; c++) begin
        logic [2:0] exp_lines;   // {vend, ret_n, ret_d}
        en   = 1'(e);
        code = out_e'(c);
        #1;
        exp_lines = 3'b000;
        if (e == 1) begin
          if (c == 1) exp_lines = 3'b001;
          if (c == 2) exp_lines = 3'b010;
          if (c == 3) exp_lines = 3'b100;
        end
        checks++;
        if ({lines.vend, lines.ret_n, lines.ret_d} !== exp_lines) begin
          failures++;
          $display("FAIL en=%0d code=%0d lines=%b expected %b", e, c,
                   {lines.vend, lines.ret_n, lines.ret_d}, exp_lines);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
