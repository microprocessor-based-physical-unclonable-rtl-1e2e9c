// Self-checking testbench for puf_ctrl.
// Drives the En pin with random measurement windows of varying length and
// random counter values, and checks every cycle against the timing the
// controller promises: counter clear one cycle after En is first sampled
// high, counting enabled while En was high at the last edge, multiplexers
// attached only when En was high at the last three edges, and the response
// {cnt1[24:9], cnt2[24:9]} captured one edge after En is sampled low.
module tb_puf_ctrl;
  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] cnt1 = 0, cnt2 = 0;
  logic        cnt_clr, cnt_en, attach, resp_valid;
  logic [31:0] response;
  int checks = 0, failures = 0;
  int windows = 0, captures = 0;

  puf_ctrl dut (.clk(clk), .rst_n(rst_n), .en(en), .cnt1(cnt1), .cnt2(cnt2),
                .cnt_clr(cnt_clr), .cnt_en(cnt_en), .attach(attach),
                .response(response), .resp_valid(resp_valid));

  always #5 clk = ~clk;

  // en sampled at the last three edges, and the expected response state
  logic [2:0]  enh = 0;
  logic [31:0] exp_resp = 0;
  logic        exp_valid = 0;

  task automatic chk(logic got, logic want, string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s at %0t: got %b want %b", what, $time, got, want); end
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [31:0] c1, c2;
    c1 = cnt1; c2 = cnt2;
    enh = {enh[1:0], en};
    if (enh[0] && !enh[1]) exp_valid = 0;
    else if (!enh[1] && enh[2]) begin
      exp_resp  = {c1[24:9], c2[24:9]};
      exp_valid = 1;
      captures++;
    end
    #1;
    chk(cnt_en,  enh[0], "cnt_en");
    chk(cnt_clr, enh[0] & ~enh[1], "cnt_clr");
    chk(attach,  &enh, "attach");
    chk(resp_valid, exp_valid, "resp_valid");
    if (exp_valid) begin
      checks++;
      if (response !== exp_resp) begin failures++; $display("FAIL response %h want %h", response, exp_resp); end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (60) begin
      @(negedge clk);
      repeat ($urandom_range(1, 5)) @(negedge clk);
      en = 1; windows++;
      repeat ($urandom_range(0, 8)) begin @(negedge clk); cnt1 = $urandom; cnt2 = $urandom; end
      @(negedge clk) en = 0;
      repeat ($urandom_range(0, 3)) begin @(negedge clk); cnt1 = $urandom; cnt2 = $urandom; end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (captures != windows) begin failures++; $display("FAIL %0d windows, %0d captures", windows, captures); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
