// tb_lut_memory: checks the state memory LUT.
//  1. After reset every address holds the vending-machine program; the
//     expected bytes are rebuilt here from the state graph (price 30 cents,
//     coins 5/10/25) rather than read from the package table.
//  2. Random configuration writes are mirrored in a local array and every
//     address is read back after each burst.
//  3. Reads beyond the table depth return 0, and writes there are ignored.
//  4. A second reset restores the program.
module tb_lut_memory;
  import fsm_pkg::*;

  localparam int unsigned DEPTH = LUT_DEPTH;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [PTR_W-1:0] rd_addr;
  lut_byte_t        rd_data;
  logic             cfg_we;
  logic [PTR_W-1:0] cfg_addr;
  lut_byte_t        cfg_wdata;
  int               checks = 0, failures = 0;
  logic [7:0]       model [32];

  lut_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected program, built from the amounts: waiting state k (k*5 cents
  // paid, k = 0..5) sits at 3k; coin c (5, 10, 25) leads to amount k*5 + c.
  // Bytes: input = {0,00,next}; output = {1,code,next}.
  function automatic logic [7:0] expected_byte(int a);
    int amount, paid;
    if (a < 18) begin
      paid = (a / 3) * 5;
      case (a % 3)
        0: amount = paid + 5;
        1: amount = paid + 10;
        default: amount = paid + 25;
      endcase
      case (amount)
        30: return 8'd18;           // vend step
        35: return 8'd21;           // return 5, then vend
        40: return 8'd19;           // return 10, then vend
        45: return 8'd20;           // return 5, return 10, vend
        50: return 8'd22;           // return 10, return 10, vend
        default: return 8'(3 * (amount / 5));
      endcase
    end
    case (a)
      18: return {1'b1, 2'd3, 5'd0};   // vend -> start
      19: return {1'b1, 2'd2, 5'd18};  // return 10 -> vend
      20: return {1'b1, 2'd1, 5'd19};  // return 5 -> return 10
      21: return {1'b1, 2'd1, 5'd18};  // return 5 -> vend
      22: return {1'b1, 2'd2, 5'd19};  // return 10 -> return 10
      default: return 8'd0;
    endcase
  endfunction

  task automatic check_all(string what);
    for (int a = 0; a < 32; a++) begin
      rd_addr = 5'(a);
      #1;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL %s addr %0d read %h expected %h", what, a, rd_data, model[a]);
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 32; a++) model[a] = (a < int'(DEPTH)) ? expected_byte(a) : 8'd0;
  endtask

  initial begin
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; rd_addr = '0;
    do_reset();
    check_all("reset");
    for (int burst = 0; burst < 20; burst++) begin
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        cfg_we    = 1'b1;
        cfg_addr  = 5'($urandom_range(31));
        cfg_wdata = lut_byte_t'(8'($urandom));
        if (int'(cfg_addr) < int'(DEPTH)) model[cfg_addr] = cfg_wdata;
        @(posedge clk);
        #1 cfg_we = 1'b0;
      end
      check_all("write");
    end
    do_reset();
    check_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
