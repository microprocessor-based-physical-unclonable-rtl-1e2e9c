// End-to-end testbench for mpuf_top at its default sizes.
//
// Plays the role of the CPU: it runs challenge programs on the hardware
// multiplier through the peripheral bus while the PUF is in PUF mode, then
// leaves PUF mode and reads the 32-bit response. A cycle-level reference
// model kept here (multiplier registers, En history, two 32-bit counters)
// predicts every rising edge of the two selected multiplier output bits and
// hence the expected response {cnt1[24:9], cnt2[24:9]}.
//
// Mechanisms exercised and counted (each must occur at least once): normal
// mode operation with the PUF detached, PUF-mode measurements, each of the
// four multiplier operations, long multiply-accumulate loops that carry the
// counters past bit 9, presets of RESLO/RESHI, the counter clear between
// measurements, and a repeated challenge giving the same response.
module tb_mpuf_top;
  import mpuf_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] per_addr = 0, per_din = 0, per_dout;
  logic        per_en = 0, per_we = 0;
  logic        puf_en = 0;
  puf_sel_t    puf_sel = '0;
  logic [31:0] puf_response;
  logic        puf_resp_valid;
  int checks = 0, failures = 0;

  mpuf_top dut (.clk(clk), .rst_n(rst_n), .per_addr(per_addr), .per_din(per_din),
                .per_en(per_en), .per_we(per_we), .per_dout(per_dout),
                .puf_en(puf_en), .puf_sel(puf_sel),
                .puf_response(puf_response), .puf_resp_valid(puf_resp_valid));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  logic [15:0] m_op1 = 0, m_op2 = 0;
  logic [31:0] m_res = 0;
  int          m_mode = 0;
  bit          m_start = 0;
  logic [2:0]  m_enh = 0;
  logic [31:0] m_cnt1 = 0, m_cnt2 = 0, m_gated = 0;
  logic [31:0] m_resp = 0;
  bit          m_valid = 0;

  // counts of mechanisms
  int n_normal_ops = 0, n_meas = 0, n_mode [4] = '{0, 0, 0, 0};
  int n_high_bits = 0, n_preset = 0, n_clear = 0, n_repeat = 0, n_edges = 0;

  function automatic logic [31:0] m_mult_out();
    longint p, s;
    bit sgn;
    sgn = (m_mode == 1) || (m_mode == 3);
    p = sgn ? longint'($signed(m_op1)) * longint'($signed(m_op2))
            : longint'(m_op1) * longint'(m_op2);
    s = longint'(p[31:0]) + longint'(m_res);
    return (m_mode >= 2) ? s[31:0] : p[31:0];
  endfunction

  always @(posedge clk) if (rst_n) begin
    logic [31:0] nres, g;
    bit wr;
    wr   = per_en && per_we;
    nres = m_mult_out();
    if (wr) case (per_addr)
      ADDR_MPY:   begin m_op1 = per_din; m_mode = 0; end
      ADDR_MPYS:  begin m_op1 = per_din; m_mode = 1; end
      ADDR_MAC:   begin m_op1 = per_din; m_mode = 2; end
      ADDR_MACS:  begin m_op1 = per_din; m_mode = 3; end
      ADDR_OP2:   m_op2 = per_din;
      ADDR_RESLO: m_res[15:0]  = per_din;
      ADDR_RESHI: m_res[31:16] = per_din;
      default: ;
    endcase
    if (m_start) m_res = nres;
    m_start = wr && (per_addr == ADDR_OP2);
    m_enh = {m_enh[1:0], puf_en};
    if (m_enh[0] && !m_enh[1]) begin
      m_cnt1 = 0; m_cnt2 = 0; m_valid = 0; n_clear++;
    end else if (!m_enh[1] && m_enh[2]) begin
      m_resp = {m_cnt1[24:9], m_cnt2[24:9]};
      m_valid = 1;
    end
    g = (&m_enh) ? m_mult_out() : 32'h0;
    if (g[puf_sel.sel1] && !m_gated[puf_sel.sel1]) begin m_cnt1++; n_edges++; end
    if (g[puf_sel.sel2] && !m_gated[puf_sel.sel2]) m_cnt2++;
    m_gated = g;
    #1;
    checks++;
    if (puf_resp_valid !== m_valid || (m_valid && puf_response !== m_resp)) begin
      failures++;
      $display("FAIL at %0t: valid %b/%b response %h/%h", $time, puf_resp_valid, m_valid,
               puf_response, m_resp);
    end
  end

  // ---------------------------------------------------------------- driver
  task automatic bus_write(logic [15:0] a, logic [15:0] d);
    per_en = 1; per_we = 1; per_addr = a; per_din = d;
    @(negedge clk);
    per_en = 0; per_we = 0;
  endtask

  task automatic bus_read(logic [15:0] a, output logic [15:0] d);
    per_en = 1; per_we = 0; per_addr = a;
    #1 d = per_dout;
    @(negedge clk);
    per_en = 0;
  endtask

  function automatic logic [15:0] op1_addr(int m);
    case (m)
      0: return ADDR_MPY;
      1: return ADDR_MPYS;
      2: return ADDR_MAC;
      default: return ADDR_MACS;
    endcase
  endfunction

  // A challenge program: an accumulate loop with OP1 loaded once, OP2
  // derived from a seed, and occasional changes of operation and presets.
  task automatic program_run(int unsigned seed, int len, bit count_modes);
    int unsigned x;
    int mode;
    x = seed;
    mode = 2 + (seed & 1);
    bus_write(op1_addr(mode), 16'(seed * 40503));
    if (count_modes) n_mode[mode]++;
    for (int i = 0; i < len; i++) begin
      x = x * 1103515245 + 12345;
      if (x[31:28] == 4'hF) begin
        mode = int'(x[27:26]);
        bus_write(op1_addr(mode), 16'(x >> 8));
        if (count_modes) n_mode[mode]++;
      end
      if (x[31:26] == 6'h15) begin
        bus_write(ADDR_RESLO, 16'(x));
        bus_write(ADDR_RESHI, 16'(x >> 11));
        if (count_modes) n_preset++;
      end
      bus_write(ADDR_OP2, 16'(x >> 12));
      if (x[7:6] == 2'b00) @(negedge clk);  // idle cycle
    end
    repeat (2) @(negedge clk);
  endtask

  // quick = 1: the program runs from whatever state the multiplier is in,
  // and for even seeds starts one cycle after En rises, while the PUF is
  // still being attached.
  task automatic measure(logic [4:0] s1, logic [4:0] s2, int unsigned seed, int len,
                         output logic [31:0] resp, input bit quick = 0);
    puf_sel.sel1 = s1; puf_sel.sel2 = s2;
    if (!quick) begin
      // the program starts from a known multiplier state: result and operands 0
      bus_write(ADDR_MPY, 16'h0000);
      bus_write(ADDR_OP2, 16'h0000);
      @(negedge clk);
    end
    puf_en = 1;
    repeat (quick ? 1 + 2 * (seed & 1) : 3) @(negedge clk);
    program_run(seed, len, 1);
    puf_en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!puf_resp_valid) begin failures++; $display("FAIL no response"); end
    resp = puf_response;
    n_meas++;
    if (resp[31:16] != 0 && resp[15:0] != 0) n_high_bits++;
    $display("challenge sel1=%0d sel2=%0d seed=%0d len=%0d -> response %h (counts %0d, %0d)",
             s1, s2, seed, len, resp, m_cnt1, m_cnt2);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r_a, r_b, r_c;
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Normal mode: the multiplier works as a peripheral, the PUF stays idle.
    bus_write(ADDR_MPYS, 16'hFFFD);     // -3
    bus_write(ADDR_OP2, 16'h0007);      // * 7 = -21
    @(negedge clk);
    bus_read(ADDR_RESLO, d); checks++; if (d !== 16'hFFEB) begin failures++; $display("FAIL normal RESLO %h", d); end
    bus_read(ADDR_RESHI, d); checks++; if (d !== 16'hFFFF) begin failures++; $display("FAIL normal RESHI %h", d); end
    bus_read(ADDR_SUMEXT, d); checks++; if (d !== 16'hFFFF) begin failures++; $display("FAIL normal SUMEXT %h", d); end
    program_run(7, 200, 0);
    n_normal_ops++;
    checks++;
    if (m_cnt1 != 0 || m_cnt2 != 0 || puf_resp_valid) begin
      failures++; $display("FAIL PUF active in normal mode");
    end

    // PUF mode measurements.
    measure(5'd3, 5'd17, 1, 20000, r_a);
    measure(5'd20, 5'd31, 2, 40000, r_b);
    measure(5'd3, 5'd17, 1, 20000, r_c);   // same challenge as the first
    checks++;
    if (r_c !== r_a) begin failures++; $display("FAIL repeated challenge %h vs %h", r_c, r_a); end
    else n_repeat++;
    measure(5'd0, 5'd0, 3, 12000, r_c);    // both counters on the same bit
    checks++;
    if (r_c[31:16] !== r_c[15:0]) begin failures++; $display("FAIL equal selects %h", r_c); end
    // programs that start at once, before the multiplexers are attached
    for (int k = 0; k < 6; k++) begin
      bus_write(ADDR_MPY, 16'hFFFF);
      bus_write(ADDR_OP2, 16'hFFFF);
      @(negedge clk);
      measure(5'(k), 5'(31 - k), 100 + k, 3000, r_c, 1);
    end
    for (int k = 0; k < 4; k++) begin
      measure(5'($urandom), 5'($urandom), $urandom, 8000 + $urandom_range(0, 16000), r_c);
    end

    // every mechanism must have happened
    begin
      int counts [8];
      string names [8] = '{"normal-mode run", "measurement", "MPY", "MPYS", "MAC", "MACS",
                           "response above bit 9", "RES preset"};
      counts = '{n_normal_ops, n_meas, n_mode[0], n_mode[1], n_mode[2], n_mode[3],
                 n_high_bits, n_preset};
      foreach (counts[i]) begin
        checks++;
        $display("mechanism %-22s %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
      checks++;
      $display("mechanism %-22s %0d", "counter clear", n_clear);
      if (n_clear < n_meas) begin failures++; $display("FAIL clears %0d", n_clear); end
      checks++;
      $display("mechanism %-22s %0d", "repeated challenge", n_repeat);
      if (n_repeat == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
