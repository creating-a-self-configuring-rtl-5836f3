// lut_fsm: finite state machine built from a memory look-up table (LUT),
// configured as a soda vending machine.
//
// The state graph lives entirely in a 29-byte memory; the logic around it is
// fixed and small: an input reducer folds the coin lines into a 2-bit code,
// the pointer logic adds that code to the state pointer to pick the
// transition byte, each byte's control bit redirects it either to the
// pointer (input byte) or to the output expander (output byte), and the
// expander turns the output code into separate output lines. Rewriting the
// memory through the cfg_* port changes the machine's behaviour without
// touching the logic.
//
// Vending machine (default memory contents): a can costs 30 cents, coins of
// 5 (D), 10 (N) and 25 (Q) cents are accepted in any order, and an
// overpayment is paid back as 5- and 10-cent returns before the can is
// vended; the machine then waits for the next customer.
//
// Timing: a coin is taken in a cycle in which 'ready' is high and occupies
// two cycles; each return or vend step occupies two cycles, during the
// second of which the matching output line is high for one cycle. Exactly
// 30 cents in six 5-cent coins therefore takes 14 cycles from the first coin
// to 'ready' at the start state again; 5+5+5+5+5+25 cents takes 18.
//
// The partition into reducer, pointer, memory and expander follows the
// document; the byte layout, the phase timing and the configuration port are
// this design's own.
module lut_fsm
  import fsm_pkg::*;
#(
  parameter int unsigned DEPTH = LUT_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // coin sensors
  input  logic             coin_d,     // 5 cents
  input  logic             coin_n,     // 10 cents
  input  logic             coin_q,     // 25 cents
  // LUT configuration
  input  logic             cfg_we,
  input  logic [PTR_W-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  // machine outputs
  output logic             vend,
  output logic             ret_d,      // pay back 5 cents
  output logic             ret_n,      // pay back 10 cents
  // status
  output logic             ready,
  output logic             accept,
  output logic [PTR_W-1:0] state_ptr
);

  coin_e            coin;
  logic [PTR_W-1:0] rd_addr;
  lut_byte_t        rd_data;
  logic             out_en;
  out_e             out_code;
  fsm_out_t         lines;

  input_reducer u_reducer (
    .coin_d (coin_d),
    .coin_n (coin_n),
    .coin_q (coin_q),
    .code   (coin)
  );

  pointer_logic u_pointer (
    .clk      (clk),
    .rst_n    (rst_n),
    .coin     (coin),
    .rd_addr  (rd_addr),
    .rd_data  (rd_data),
    .out_en   (out_en),
    .out_code (out_code),
    .ready    (ready),
    .accept   (accept),
    .ptr      (state_ptr)
  );

  lut_memory #(.DEPTH(DEPTH)) u_memory (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (lut_byte_t'(cfg_wdata))
  );

  output_expander u_expander (
    .en    (out_en),
    .code  (out_code),
    .lines (lines)
  );

  assign vend  = lines.vend;
  assign ret_d = lines.ret_d;
  assign ret_n = lines.ret_n;

endmodule
