// Self-checking testbench for hw_multiplier.
// Runs random sequences of operations in all four modes through the
// peripheral bus: OP1 writes (at the address of the wanted operation), OP2
// writes that start the operation, presets of RESLO/RESHI, and reads of every
// register. A reference model kept here gives the expected RESLO, RESHI and
// SUMEXT. The one-cycle result latency is checked by reading RESLO in the
// cycle right after the OP2 write (old value) and in the cycle after that
// (new value). mult_out is checked in idle cycles against the value the next
// operation would load.
module tb_hw_multiplier;
  import mpuf_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] per_addr = 0, per_din = 0, per_dout;
  logic        per_en = 0, per_we = 0;
  logic [31:0] mult_out;
  int checks = 0, failures = 0;
  int mode_seen [4] = '{0, 0, 0, 0};

  hw_multiplier dut (.clk(clk), .rst_n(rst_n), .per_addr(per_addr), .per_din(per_din),
                     .per_en(per_en), .per_we(per_we), .per_dout(per_dout),
                     .mult_out(mult_out));

  always #5 clk = ~clk;

  // reference state
  logic [15:0] r_op1 = 0, r_op2 = 0, r_sumext = 0;
  logic [31:0] r_res = 0;
  int          r_mode = 0;

  function automatic logic [15:0] op1_addr(int m);
    case (m)
      0: return ADDR_MPY;
      1: return ADDR_MPYS;
      2: return ADDR_MAC;
      default: return ADDR_MACS;
    endcase
  endfunction

  // value the next operation loads into RESHI:RESLO, and SUMEXT
  function automatic void ref_next(output logic [31:0] res, output logic [15:0] ext);
    longint p, sum;
    bit sgn, acc;
    sgn = (r_mode == 1) || (r_mode == 3);
    acc = (r_mode >= 2);
    p = sgn ? longint'($signed(r_op1)) * longint'($signed(r_op2))
            : longint'(r_op1) * longint'(r_op2);
    if (acc) begin
      sum = longint'(p[31:0]) + longint'(r_res);
      res = sum[31:0];
    end else begin
      sum = 0;
      res = p[31:0];
    end
    case (r_mode)
      0: ext = 16'h0000;
      2: ext = {15'd0, sum[32]};
      default: ext = {16{res[31]}};
    endcase
  endfunction

  task automatic bus_write(logic [15:0] a, logic [15:0] d);
    per_en = 1; per_we = 1; per_addr = a; per_din = d;
    @(negedge clk);
    per_en = 0; per_we = 0;
  endtask

  task automatic bus_read_check(logic [15:0] a, logic [15:0] want, string what);
    per_en = 1; per_we = 0; per_addr = a;
    #1;
    checks++;
    if (per_dout !== want) begin
      failures++;
      $display("FAIL read %s (%h) at %0t: got %h want %h", what, a, $time, per_dout, want);
    end
    @(negedge clk);
    per_en = 0;
  endtask

  task automatic run_op();
    logic [31:0] nres, old_res;
    logic [15:0] next;
    if (($urandom_range(0, 3) != 0) || r_mode >= 2 && $urandom_range(0, 1) == 0) begin
      r_mode = $urandom_range(0, 3);
      r_op1  = 16'($urandom);
      if ($urandom_range(0, 5) == 0) r_op1 = 16'h8000;
      bus_write(op1_addr(r_mode), r_op1);
    end
    if ($urandom_range(0, 6) == 0) begin
      r_res[15:0] = 16'($urandom);  bus_write(ADDR_RESLO, r_res[15:0]);
      r_res[31:16] = 16'($urandom); bus_write(ADDR_RESHI, r_res[31:16]);
    end
    r_op2 = 16'($urandom);
    if ($urandom_range(0, 5) == 0) r_op2 = 16'hFFFF;
    old_res = r_res;
    bus_write(ADDR_OP2, r_op2);
    ref_next(nres, next);
    r_res = nres; r_sumext = next;
    mode_seen[r_mode]++;
    bus_read_check(ADDR_RESLO, old_res[15:0], "RESLO before load");
    bus_read_check(ADDR_RESLO, r_res[15:0], "RESLO");
    bus_read_check(ADDR_RESHI, r_res[31:16], "RESHI");
    bus_read_check(ADDR_SUMEXT, r_sumext, "SUMEXT");
    if ($urandom_range(0, 3) == 0) begin
      bus_read_check(op1_addr($urandom_range(0, 3)), r_op1, "OP1");
      bus_read_check(ADDR_OP2, r_op2, "OP2");
    end
    // idle cycle: the combinational output shows what the next OP2 write loads
    ref_next(nres, next);
    checks++;
    if (mult_out !== nres) begin
      failures++;
      $display("FAIL mult_out %h want %h (mode %0d)", mult_out, nres, r_mode);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    bus_read_check(ADDR_RESLO, 16'h0, "RESLO after reset");
    bus_read_check(ADDR_SUMEXT, 16'h0, "SUMEXT after reset");
    // fixed cases with known SUMEXT outcomes
    r_mode = 1; r_op1 = 16'hFFFF; bus_write(ADDR_MPYS, r_op1);          // -1
    r_op2 = 16'h0002; bus_write(ADDR_OP2, r_op2); @(negedge clk);       // -2
    bus_read_check(ADDR_RESHI, 16'hFFFF, "MPYS -2 RESHI");
    bus_read_check(ADDR_RESLO, 16'hFFFE, "MPYS -2 RESLO");
    bus_read_check(ADDR_SUMEXT, 16'hFFFF, "MPYS -2 SUMEXT");
    r_res = 32'hFFFF_FFFE; r_sumext = 16'hFFFF;
    r_mode = 2; r_op1 = 16'h0001; bus_write(ADDR_MAC, r_op1);
    r_op2 = 16'h0003; bus_write(ADDR_OP2, r_op2); @(negedge clk);       // FFFFFFFE + 3
    bus_read_check(ADDR_RESHI, 16'h0000, "MAC carry RESHI");
    bus_read_check(ADDR_RESLO, 16'h0001, "MAC carry RESLO");
    bus_read_check(ADDR_SUMEXT, 16'h0001, "MAC carry SUMEXT");
    r_res = 32'h1; r_sumext = 16'h1;
    repeat (1500) run_op();
    foreach (mode_seen[m]) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never run", m); end
    end
    $display("operations per mode: MPY %0d MPYS %0d MAC %0d MACS %0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
