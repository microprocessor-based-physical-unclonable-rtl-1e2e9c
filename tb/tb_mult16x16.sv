// Self-checking testbench for mult16x16.
// Applies corner-case and random operand pairs in unsigned and signed mode
// and compares the product with a 64-bit reference computed here.
module tb_mult16x16;
  logic [15:0] op1, op2;
  logic        is_signed;
  logic [31:0] product;
  int checks = 0, failures = 0;

  mult16x16 dut (.op1(op1), .op2(op2), .is_signed(is_signed), .product(product));

  function automatic logic [31:0] ref_mul(logic [15:0] a, logic [15:0] b, logic s);
    longint la, lb;
    la = s ? longint'($signed(a)) : longint'(a);
    lb = s ? longint'($signed(b)) : longint'(b);
    return 32'(la * lb);
  endfunction

  task automatic check(logic [15:0] a, logic [15:0] b, logic s);
    op1 = a; op2 = b; is_signed = s;
    #1;
    checks++;
    if (product !== ref_mul(a, b, s)) begin
      failures++;
      $display("FAIL %h * %h signed=%0d: got %h expected %h", a, b, s, product, ref_mul(a, b, s));
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
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    foreach (corners[i]) foreach (corners[j]) begin
      check(corners[i], corners[j], 1'b0);
      check(corners[i], corners[j], 1'b1);
    end
    repeat (2000) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
