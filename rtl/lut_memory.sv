// lut_memory: the state memory look-up table (LUT) of the state machine.
//
// A byte-wide array of DEPTH entries holding the whole state graph (byte
// layout in fsm_pkg). It has one combinational read port, which the pointer
// logic addresses with the state pointer or with the pointer plus the coin
// offset, and one synchronous write port through which the table can be
// rewritten at run time, so the same logic can run another state graph.
// Reset loads the default vending-machine program. A read beyond DEPTH
// returns 0.
//
// The 29-byte size follows the document; the combinational read, the write
// port and the reset-time load are this design's choices.
//
// Timing: rd_data follows rd_addr in the same cycle; a write takes effect at
// the rising clock edge on which cfg_we is high.
module lut_memory
  import fsm_pkg::*;
#(
  parameter int unsigned DEPTH = LUT_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // read port
  input  logic [PTR_W-1:0] rd_addr,
  output lut_byte_t        rd_data,
  // configuration write port
  input  logic             cfg_we,
  input  logic [PTR_W-1:0] cfg_addr,
  input  lut_byte_t        cfg_wdata
);

  lut_byte_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= vend_prog(i);
    end else if (cfg_we && (32'(cfg_addr) < DEPTH)) begin
      mem[cfg_addr] <= cfg_wdata;
    end
  end

  always_comb begin
    if (32'(rd_addr) < DEPTH) rd_data = mem[rd_addr];
    else                      rd_data = '0;
  end

  // The address field of a byte is PTR_W bits wide, so the table cannot be
  // deeper than the pointer can reach.
  // It must also hold the default program.
  initial assert (DEPTH >= VEND_PROG_BYTES && DEPTH <= (1 << PTR_W))
    else $error("lut_memory: DEPTH %0d outside %0d..%0d", DEPTH, VEND_PROG_BYTES, 1 << PTR_W);

endmodule
