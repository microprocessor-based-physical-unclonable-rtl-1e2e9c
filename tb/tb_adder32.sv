// Self-checking testbench for adder32.
// Compares sum and carry with a 64-bit reference for corner and random cases.
module tb_adder32;
  logic [31:0] a, b, sum;
  logic        carry;
  int checks = 0, failures = 0;

  adder32 dut (.a(a), .b(b), .sum(sum), .carry(carry));

  task automatic check(logic [31:0] x, logic [31:0] y);
    longint unsigned r;
    a = x; b = y;
    #1;
    r = longint'(x) + longint'(y);
    checks++;
    if (sum !== r[31:0] || carry !== r[32]) begin
      failures++;
      $display("FAIL %h + %h: got %b/%h expected %b/%h", x, y, carry, sum, r[32], r[31:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0);
    check(32'hFFFF_FFFF, 32'h1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7FFF_FFFF, 32'h1);
    repeat (2000) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
