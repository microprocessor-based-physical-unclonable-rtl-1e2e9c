// Self-checking testbench for puf_counter.
// Drives the counter's clock input with irregular pulses (as a data bit
// would), toggles the enable between pulses, applies clears and a reset, and
// compares the count with a reference kept here. A short width run checks
// the wrap-around.
module tb_puf_counter;
  logic        puf_clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [31:0] count;
  logic [3:0]  count4;
  logic        puf_clk4 = 0;
  longint unsigned expect_cnt = 0;
  int expect4 = 0;
  int checks = 0, failures = 0;

  puf_counter #(.WIDTH(32)) dut  (.puf_clk(puf_clk),  .rst_n(rst_n), .clr(clr), .en(en), .count(count));
  puf_counter #(.WIDTH(4))  dut4 (.puf_clk(puf_clk4), .rst_n(rst_n), .clr(1'b0), .en(1'b1), .count(count4));

  task automatic pulse();
    #($urandom_range(1, 7)) puf_clk = 1;
    #($urandom_range(1, 7)) puf_clk = 0;
  endtask

  task automatic check(string what);
    #1;
    checks++;
    if (count !== 32'(expect_cnt)) begin
      failures++;
      $display("FAIL %s: count %0d expected %0d", what, count, expect_cnt);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 rst_n = 1;
    check("after reset");
    repeat (500) begin
      en = 1'($urandom);
      #2;
      pulse();
      if (en) expect_cnt++;
      check("pulse");
      if ($urandom_range(0, 49) == 0) begin
        #2 clr = 1; #3 clr = 0;
        expect_cnt = 0;
        check("clear");
      end
    end
    // reset in the middle
    en = 1; pulse(); pulse();
    #2 rst_n = 0; #3 rst_n = 1;
    expect_cnt = 0;
    check("mid reset");
    // clr dominates clock edges while high
    clr = 1; pulse(); #1 clr = 0;
    check("clock during clear");
    // wrap-around of a 4-bit instance
    repeat (37) begin
      #2 puf_clk4 = 1; #2 puf_clk4 = 0;
      expect4++;
      #1 checks++;
      if (count4 !== 4'(expect4)) begin failures++; $display("FAIL wrap: %0d", count4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
