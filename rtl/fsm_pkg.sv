// fsm_pkg: types and constants shared by the memory look-up-table (LUT) finite
// state machine.
//
// The machine keeps its whole state graph in a small byte-wide memory. Every
// byte carries a control bit that decides how the controlling logic treats it:
//
//   bit 7      ctrl   0 = input byte: its address field is the next state
//                         taken when a coin arrives (the coin code selects
//                         which of three consecutive input bytes is used)
//                     1 = output byte: its output field is sent to the
//                         output expander and the machine then jumps to its
//                         address field without waiting for an input
//   bits 6:5   out    output code (meaningful in output bytes only)
//   bits 4:0   next   address of the next state's first byte
//
// The control bit and the pointer-plus-coin addressing follow the document;
// the exact bit positions, the codes and the address layout of the default
// program are this design's own choice.
//
// The default program is the soda vending machine: a can costs 30 cents and
// the machine accepts 5-cent (D), 10-cent (N) and 25-cent (Q) coins in any
// order, vending a can and paying back any overpayment as 5- and 10-cent
// returns. A waiting state (S, 5, 10, 15, 20, 25 cents paid) occupies three
// input bytes, one per coin. Overpaid amounts (35, 40, 45, 50 cents) need no
// byte of their own: the coin that reaches them points straight at the first
// return byte. Five output bytes make up the return and vend steps:
//   RD35 : return 5c  -> V30      RN50 : return 10c -> RN
//   RD45 : return 5c  -> RN       RN   : return 10c -> V30
//   V30  : vend       -> S
// That is 6*3 + 5 = 23 bytes, within the 29-byte LUT the design is sized for.
package fsm_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned LUT_DEPTH = 29;
  localparam int unsigned PTR_W = 5;

  // Coin code produced by the input reducer.
  typedef enum logic [1:0] {
    COIN_NONE = 2'd0,
    COIN_D    = 2'd1,   // 5 cents
    COIN_N    = 2'd2,   // 10 cents
    COIN_Q    = 2'd3    // 25 cents
  } coin_e;

  // Output code carried by an output byte.
  typedef enum logic [1:0] {
    OUT_NONE  = 2'd0,   // plain jump
    OUT_RET_D = 2'd1,   // pay back 5 cents
    OUT_RET_N = 2'd2,   // pay back 10 cents
    OUT_VEND  = 2'd3    // eject a can of soda
  } out_e;

  // Expanded output lines.
  typedef struct packed {
    logic vend;
    logic ret_n;
    logic ret_d;
  } fsm_out_t;

  // One LUT byte.
  typedef struct packed {
    logic              ctrl;
    out_e              out;
    logic [PTR_W-1:0]  next;
  } lut_byte_t;

  // Addresses of the default vending-machine program.
  localparam logic [PTR_W-1:0] A_S    = 5'd0;
  localparam logic [PTR_W-1:0] A_5    = 5'd3;
  localparam logic [PTR_W-1:0] A_10   = 5'd6;
  localparam logic [PTR_W-1:0] A_15   = 5'd9;
  localparam logic [PTR_W-1:0] A_20   = 5'd12;
  localparam logic [PTR_W-1:0] A_25   = 5'd15;
  localparam logic [PTR_W-1:0] A_V30  = 5'd18;
  localparam logic [PTR_W-1:0] A_RN   = 5'd19;
  localparam logic [PTR_W-1:0] A_RD45 = 5'd20;
  localparam logic [PTR_W-1:0] A_RD35 = 5'd21;
  localparam logic [PTR_W-1:0] A_RN50 = 5'd22;
  localparam int unsigned VEND_PROG_BYTES = 23;

  function automatic lut_byte_t in_byte(logic [PTR_W-1:0] nxt);
    return '{ctrl: 1'b0, out: OUT_NONE, next: nxt};
  endfunction

  function automatic lut_byte_t out_byte(out_e o, logic [PTR_W-1:0] nxt);
    return '{ctrl: 1'b1, out: o, next: nxt};
  endfunction

  // Default LUT contents: the vending machine. Addresses beyond the program
  // hold 0 (an input byte pointing at S).
  function automatic lut_byte_t vend_prog(int unsigned a);
    case (a)
      // S: D->5, N->10, Q->25
      0:  return in_byte(A_5);
      1:  return in_byte(A_10);
      2:  return in_byte(A_25);
      // 5: D->10, N->15, Q->30
      3:  return in_byte(A_10);
      4:  return in_byte(A_15);
      5:  return in_byte(A_V30);
      // 10: D->15, N->20, Q->35
      6:  return in_byte(A_15);
      7:  return in_byte(A_20);
      8:  return in_byte(A_RD35);
      // 15: D->20, N->25, Q->40
      9:  return in_byte(A_20);
      10: return in_byte(A_25);
      11: return in_byte(A_RN);
      // 20: D->25, N->30, Q->45
      12: return in_byte(A_25);
      13: return in_byte(A_V30);
      14: return in_byte(A_RD45);
      // 25: D->30, N->35, Q->50
      15: return in_byte(A_V30);
      16: return in_byte(A_RD35);
      17: return in_byte(A_RN50);
      // return and vend steps
      18: return out_byte(OUT_VEND,  A_S);
      19: return out_byte(OUT_RET_N, A_V30);
      20: return out_byte(OUT_RET_D, A_RN);
      21: return out_byte(OUT_RET_D, A_V30);
      22: return out_byte(OUT_RET_N, A_RN);
      default: return '0;
    endcase
  endfunction

endpackage
