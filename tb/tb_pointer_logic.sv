// tb_pointer_logic: checks the state pointer, the pointer adder and the
// control-bit redirection against a cycle-by-cycle reference model.
//
// The block reads a memory array owned by this testbench, loaded with a small
// test program unrelated to the vending machine (two waiting states, plain
// jumps and output bytes of every code). Random coin codes are offered at
// random times, also while the block is busy. Each cycle the reference model
// (SEL/EXEC phases as specified for the block) predicts ptr, ready, accept,
// out_en, out_code and the read address. Directed steps also check that a
// coin takes two cycles and an output byte two cycles.
module tb_pointer_logic;
  import fsm_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  coin_e            coin;
  logic [PTR_W-1:0] rd_addr;
  lut_byte_t        rd_data;
  logic             out_en;
  out_e             out_code;
  logic             ready;
  logic             accept;
  logic [PTR_W-1:0] ptr;
  int               checks = 0, failures = 0;
  int               n_accept = 0, n_out = 0, n_busy_coin = 0;

  logic [7:0] prog [32];

  pointer_logic dut (.*);

  assign rd_data = lut_byte_t'(prog[rd_addr]);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic       m_exec;
  logic [4:0] m_ptr;
  logic [7:0] m_cur;

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s got %0h expected %0h", $time, what, got, exp);
    end
  endtask

  // Compare outputs in the middle of the cycle, after inputs settled.
  always @(negedge clk) if (rst_n) begin
    logic       e_ready, e_accept, e_outen;
    logic [4:0] e_addr;
    #2;
    e_ready  = m_exec && !m_cur[7];
    e_accept = e_ready && (coin != COIN_NONE);
    e_outen  = m_exec && m_cur[7];
    e_addr   = e_accept ? 5'(m_ptr + 5'(coin) - 5'd1) : m_ptr;
    chk("ptr", 8'(ptr), 8'(m_ptr));
    chk("ready", 8'(ready), 8'(e_ready));
    chk("accept", 8'(accept), 8'(e_accept));
    chk("out_en", 8'(out_en), 8'(e_outen));
    chk("rd_addr", 8'(rd_addr), 8'(e_addr));
    if (e_outen) chk("out_code", 8'(out_code), 8'(m_cur[6:5]));
    if (e_accept) n_accept++;
    if (e_outen) n_out++;
    if (!e_ready && coin != COIN_NONE) n_busy_coin++;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_exec <= 1'b0; m_ptr <= 5'd0; m_cur <= 8'd0;
    end else if (!m_exec) begin
      m_cur  <= prog[m_ptr];
      m_exec <= 1'b1;
    end else if (m_cur[7]) begin
      m_ptr  <= m_cur[4:0];
      m_exec <= 1'b0;
    end else if (coin != COIN_NONE) begin
      m_ptr  <= prog[5'(m_ptr + 5'(coin) - 5'd1)][4:0];
      m_exec <= 1'b0;
    end
  end

  // Count cycles from a coin accepted at the current state to the next
  // cycle with ready high.
  task automatic timed_coin(coin_e c, int exp_cycles);
    int n;
    while (!ready) @(negedge clk);
    coin = c;
    @(negedge clk);
    coin = COIN_NONE;
    n = 1;
    while (!ready) begin @(negedge clk); n++; end
    chk("step cycles", 8'(n), 8'(exp_cycles));
  endtask

  initial begin
    // Test program
    for (int a = 0; a < 32; a++) prog[a] = 8'd0;
    // state A at 0: D->B(8), N->jump chain (3), Q->out chain (5)
    prog[0] = {1'b0, 2'd0, 5'd8};
    prog[1] = {1'b0, 2'd0, 5'd3};
    prog[2] = {1'b0, 2'd0, 5'd5};
    prog[3] = {1'b1, 2'd0, 5'd4};    // plain jump
    prog[4] = {1'b1, 2'd1, 5'd0};    // out 1 -> A
    prog[5] = {1'b1, 2'd2, 5'd6};    // out 2
    prog[6] = {1'b1, 2'd3, 5'd8};    // out 3 -> B
    // state B at 8: D->A, N->B, Q->out(4)
    prog[8]  = {1'b0, 2'd0, 5'd0};
    prog[9]  = {1'b0, 2'd0, 5'd8};
    prog[10] = {1'b0, 2'd0, 5'd4};

    coin  = COIN_NONE;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Directed timing: each coin 2 cycles, each output byte 2 more.
    timed_coin(COIN_D, 2);   // A -> B
    timed_coin(COIN_D, 2);   // B -> A
    timed_coin(COIN_N, 6);   // A -> jump -> out1 -> A
    timed_coin(COIN_Q, 6);   // A -> out2 -> out3 -> B
    timed_coin(COIN_Q, 4);   // B -> out1 -> A

    // Random coins, offered also while busy, held for random lengths.
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      coin = ($urandom_range(2) == 0) ? coin_e'(2'($urandom_range(1, 3))) : COIN_NONE;
    end
    coin = COIN_NONE;
    repeat (4) @(negedge clk);

    checks++;
    if (n_accept < 20 || n_out < 20 || n_busy_coin < 5) begin
      failures++;
      $display("FAIL coverage accept=%0d out=%0d busy_coin=%0d", n_accept, n_out, n_busy_coin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
