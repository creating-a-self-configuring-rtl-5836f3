// output_expander: the output signal expander of the LUT state machine.
//
// Turns the 2-bit output code stored in an output byte into the machine's
// separate output lines: vend a can, pay back 5 cents, pay back 10 cents.
// The lines are driven only while 'en' is high, which the pointer logic
// raises for the one cycle in which it executes an output byte; otherwise
// all lines are low. At most one line is high at a time.
//
// Purely combinational. The code assignment is this design's choice.
module output_expander
  import fsm_pkg::*;
(
  input  logic     en,
  input  out_e     code,
  output fsm_out_t lines
);

  always_comb begin
    lines = '0;
    if (en) begin
      unique case (code)
        OUT_RET_D: lines.ret_d = 1'b1;
        OUT_RET_N: lines.ret_n = 1'b1;
        OUT_VEND:  lines.vend  = 1'b1;
        default:   ;
      endcase
    end
  end

endmodule
