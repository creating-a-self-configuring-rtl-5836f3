// input_reducer: the input signal reducer of the LUT state machine.
//
// Folds the three coin-sensor lines into one 2-bit coin code that the pointer
// logic adds to the state pointer. The three lines are D (5 cents),
// N (10 cents) and Q (25 cents). Only one coin is expected at a time; should
// several lines be high together the largest coin wins (Q over N over D), a
// choice of this design. No line high gives COIN_NONE.
//
// Purely combinational, no clock.
module input_reducer
  import fsm_pkg::*;
(
  input  logic  coin_d,
  input  logic  coin_n,
  input  logic  coin_q,
  output coin_e code
);

  always_comb begin
    if (coin_q)      code = COIN_Q;
    else if (coin_n) code = COIN_N;
    else if (coin_d) code = COIN_D;
    else             code = COIN_NONE;
  end

endmodule
