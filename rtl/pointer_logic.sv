// pointer_logic: state pointer, pointer adder and output redirection of the
// LUT state machine.
//
// The machine's only state is a PTR_W-bit pointer into the LUT, plus a
// one-bit phase and a copy of the byte the pointer selects. Each state step
// has two phases:
//
//   SEL   the byte at the pointer is read from the LUT and latched.
//   EXEC  the latched control bit redirects the work:
//         - output byte (ctrl=1): its output code goes to the output
//           expander for this one cycle and the pointer is loaded with the
//           byte's address field; then SEL again.
//         - input byte (ctrl=0): the machine waits in EXEC ('ready' high).
//           When a coin code c arrives, the read address becomes
//           pointer + (c - 1), so the LUT returns the input byte for that
//           coin, and the pointer is loaded with its address field in the
//           same cycle; then SEL again.
//
// So a coin costs two cycles (its EXEC cycle and the SEL of the state it
// leads to), and an output byte costs two cycles (SEL and EXEC).
//
// The pointer, the adder and the control-bit redirection follow the
// document; the two-phase timing and the 'ready' handshake are this design's
// choices, made so that the cycle counts match the ones the document reports
// for its vending machine.
//
// Interface: 'coin' is sampled only while 'ready' is high; a coin offered
// while the machine is busy is not taken and must be held until 'ready'.
// 'accept' marks the cycle in which a coin is taken.
module pointer_logic
  import fsm_pkg::*;
#(
  parameter logic [PTR_W-1:0] RESET_PTR = A_S
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coin_e            coin,
  // LUT read port
  output logic [PTR_W-1:0] rd_addr,
  input  lut_byte_t        rd_data,
  // to the output expander
  output logic             out_en,
  output out_e             out_code,
  // status
  output logic             ready,
  output logic             accept,
  output logic [PTR_W-1:0] ptr
);

  typedef enum logic {PH_SEL = 1'b0, PH_EXEC = 1'b1} phase_e;

  phase_e    phase;
  lut_byte_t cur;        // byte at the pointer, latched in SEL

  assign ready    = (phase == PH_EXEC) && !cur.ctrl;
  assign accept   = ready && (coin != COIN_NONE);
  assign out_en   = (phase == PH_EXEC) && cur.ctrl;
  assign out_code = cur.out;

  // Pointer adder: the coin code selects one of the state's input bytes.
  always_comb begin
    if (accept) rd_addr = ptr + PTR_W'(coin) - PTR_W'(1);
    else        rd_addr = ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_SEL;
      ptr   <= RESET_PTR;
      cur   <= '0;
    end else begin
      unique case (phase)
        PH_SEL: begin
          cur   <= rd_data;
          phase <= PH_EXEC;
        end
        PH_EXEC: begin
          if (cur.ctrl) begin
            ptr   <= cur.next;
            phase <= PH_SEL;
          end else if (accept) begin
            ptr   <= rd_data.next;
            phase <= PH_SEL;
          end
        end
        default: phase <= PH_SEL;
      endcase
    end
  end

  // The output expander and the adder must never be active together.
  assert property (@(posedge clk) disable iff (!rst_n) !(out_en && accept));

endmodule
