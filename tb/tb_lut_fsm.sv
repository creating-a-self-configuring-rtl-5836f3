// tb_lut_fsm: end-to-end test of the LUT state machine as a vending machine,
// at the design's default size.
//
// The reference is arithmetic, not the state table: a customer's coins add up
// to an amount; once it reaches 30 cents the machine must pay back exactly
// amount - 30 cents in 5- and 10-cent returns (the fewest coins: one return
// for 5 or 10 cents, two for 15 or 20), then vend exactly one can, and be
// ready at the start state again. The busy time of a customer (cycles from
// the first coin taken to ready at the start state, not counting cycles spent
// idle waiting for a coin) must be 2 per coin plus 2 per return or vend step.
//
// Parts:
//  1. The four coin sequences of the reference cycle table: 5x5c+25c (18
//     cycles), 6x5c (14), 3x10c (8), 5c+25c (6).
//  2. Every first coin from every waiting state (all 18 input transitions).
//  3. 300 random customers with random idle gaps; coins are offered while
//     the machine is busy and held until taken.
//  4. Run-time reconfiguration: the start state's 25-cent transition is
//     rewritten to vend at once, checked, and written back.
// Each mechanism (idle wait, each coin, each return, vend, a coin held while
// busy, reconfiguration, each overpay amount) is counted and must occur.
module tb_lut_fsm;
  import fsm_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             coin_d, coin_n, coin_q;
  logic             cfg_we;
  logic [PTR_W-1:0] cfg_addr;
  logic [DATA_W-1:0] cfg_wdata;
  logic             vend, ret_d, ret_n, ready, accept;
  logic [PTR_W-1:0] state_ptr;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_idle = 0, n_coin_d = 0, n_coin_n = 0, n_coin_q = 0;
  int n_ret_d = 0, n_ret_n = 0, n_vend = 0, n_held = 0, n_reconf = 0;
  int n_over [5];   // overpay 0, 5, 10, 15, 20 cents

  lut_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-customer observation
  int  busy, seen_ret_cents, seen_rets, seen_vend;
  bit  vend_before_ret;
  bit  in_cust;

  always @(negedge clk) if (rst_n) begin
    #2;
    if (ready && !accept) n_idle++;
    if (!ready && (coin_d || coin_n || coin_q)) n_held++;
    if (in_cust) begin
      if (!(ready && !accept)) busy++;
      if (ret_d) begin seen_ret_cents += 5;  seen_rets++; if (seen_vend > 0) vend_before_ret = 1; end
      if (ret_n) begin seen_ret_cents += 10; seen_rets++; if (seen_vend > 0) vend_before_ret = 1; end
      if (vend) seen_vend++;
    end
    if (ret_d) n_ret_d++;
    if (ret_n) n_ret_n++;
    if (vend) n_vend++;
    checks++;
    if (int'(vend) + int'(ret_d) + int'(ret_n) > 1) begin
      failures++;
      $display("FAIL t=%0t several output lines high", $time);
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Offer a coin (5, 10 or 25) and hold it until the machine takes it.
  task automatic insert(int cents, bit early);
    // 'early' offers the coin right away, possibly while the machine is busy
    if (!(early && in_cust)) @(negedge clk);
    if (!early) while (!ready) @(negedge clk);
    coin_d = (cents == 5);
    coin_n = (cents == 10);
    coin_q = (cents == 25);
    #1;
    while (!accept) begin @(negedge clk); #1; end
    in_cust = 1;
    @(negedge clk);
    {coin_d, coin_n, coin_q} = '0;
    case (cents)
      5:  n_coin_d++;
      10: n_coin_n++;
      default: n_coin_q++;
    endcase
  endtask

  // One customer: coins until 30 cents or more, then check the result.
  task automatic customer(int coins[$], int exp_cycles, int max_gap, string name);
    int paid = 0, change, exp_rets;
    busy = 0; seen_ret_cents = 0; seen_rets = 0; seen_vend = 0;
    vend_before_ret = 0; in_cust = 0;
    foreach (coins[i]) begin
      if (max_gap > 0) repeat ($urandom_range(max_gap)) @(negedge clk);
      insert(coins[i], max_gap > 0 && $urandom_range(1) == 1);
      paid += coins[i];
    end
    // wait for the machine to come back to the start state
    while (!(ready && state_ptr == 5'd0 && seen_vend > 0)) @(negedge clk);
    #3;
    in_cust = 0;
    change   = paid - 30;
    exp_rets = (change == 0) ? 0 : (change <= 10) ? 1 : 2;
    chk({name, " vends"}, seen_vend, 1);
    chk({name, " change cents"}, seen_ret_cents, change);
    chk({name, " return steps"}, seen_rets, exp_rets);
    chk({name, " vend after returns"}, int'(vend_before_ret), 0);
    chk({name, " busy cycles"}, busy, 2 * coins.size() + 2 * (exp_rets + 1));
    if (exp_cycles > 0) chk({name, " table cycles"}, busy, exp_cycles);
    if (change >= 0 && change <= 20) n_over[change / 5]++;
  endtask

  task automatic cfg_write(int addr, logic [7:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = 5'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
    n_reconf++;
  endtask

  initial begin
    static int vals [3] = '{5, 10, 25};
    {coin_d, coin_n, coin_q} = '0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; in_cust = 0;
    foreach (n_over[i]) n_over[i] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. the reference cycle table
    customer('{5, 5, 5, 5, 5, 25}, 18, 0, "5x5c+25c");
    customer('{5, 5, 5, 5, 5, 5},  14, 0, "6x5c");
    customer('{10, 10, 10},         8, 0, "3x10c");
    customer('{5, 25},              6, 0, "5c+25c");

    // 2. every coin from every waiting state (0..25 cents paid)
    for (int paid = 0; paid <= 25; paid += 5) begin
      foreach (vals[v]) begin
        int seq[$];
        int amt;
        amt = paid;
        seq = {};
        repeat (paid / 5) seq.push_back(5);
        seq.push_back(vals[v]);
        amt += vals[v];
        while (amt < 30) begin seq.push_back(5); amt += 5; end
        customer(seq, 0, 0, "graph");
      end
    end

    // 3. random customers
    repeat (300) begin
      int seq[$];
      int amt;
      amt = 0;
      seq = {};
      while (amt < 30) begin
        int c;
        c = vals[$urandom_range(2)];
        seq.push_back(c);
        amt += c;
      end
      customer(seq, 0, 3, "random");
    end

    // 4. reconfiguration: 25 cents at the start vends at once
    cfg_write(2, {1'b0, 2'd0, 5'd18});
    begin
      int t, v0;
      t = 0;
      v0 = n_vend;
      insert(25, 0);
      while (!(ready && state_ptr == 5'd0)) begin @(negedge clk); t++; end
      chk("reconfigured: vends", n_vend - v0, 1);
      chk("reconfigured: cycles", t + 1, 4);
    end
    cfg_write(2, {1'b0, 2'd0, 5'd15});
    customer('{25, 5}, 6, 0, "restored");

    // coverage of mechanisms
    chk("idle waits seen",    int'(n_idle  > 0), 1);
    chk("5c coins seen",      int'(n_coin_d > 0), 1);
    chk("10c coins seen",     int'(n_coin_n > 0), 1);
    chk("25c coins seen",     int'(n_coin_q > 0), 1);
    chk("5c returns seen",    int'(n_ret_d > 0), 1);
    chk("10c returns seen",   int'(n_ret_n > 0), 1);
    chk("vends seen",         int'(n_vend  > 0), 1);
    chk("coins held busy",    int'(n_held  > 0), 1);
    chk("reconfigurations",   int'(n_reconf > 0), 1);
    foreach (n_over[i]) chk($sformatf("overpay %0d cents seen", 5 * i), int'(n_over[i] > 0), 1);
    $display("mechanisms: idle=%0d coinD=%0d coinN=%0d coinQ=%0d retD=%0d retN=%0d vend=%0d held=%0d reconf=%0d over=%p",
             n_idle, n_coin_d, n_coin_n, n_coin_q, n_ret_d, n_ret_n, n_vend, n_held, n_reconf, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
