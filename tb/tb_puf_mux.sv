// Self-checking testbench for puf_mux.
// For every select value and random inputs, the output must equal the input
// bit whose index is the select value.
module tb_puf_mux;
  logic [31:0] din;
  logic [4:0]  sel;
  logic        dout;
  int checks = 0, failures = 0;

  puf_mux #(.WIDTH(32), .SEL_W(5)) dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      // one-hot and one-cold patterns
      for (int k = 0; k < 32; k++) begin
        din = 32'h1 << k; sel = 5'(s); #1;
        checks++;
        if (dout !== (k == s)) begin failures++; $display("FAIL sel=%0d onehot %0d", s, k); end
        din = ~(32'h1 << k); #1;
        checks++;
        if (dout !== (k != s)) begin failures++; $display("FAIL sel=%0d onecold %0d", s, k); end
      end
      repeat (20) begin
        din = $urandom; #1;
        checks++;
        if (dout !== ((din >> s) & 32'h1) != 0) begin failures++; $display("FAIL sel=%0d din=%h", s, din); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
