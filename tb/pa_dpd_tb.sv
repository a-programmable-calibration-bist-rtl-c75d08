// pa_dpd_tb: self-checking testbench for the PA pre-distorter.
//
// Checks, against a reference model kept in the testbench:
//   1. bypass: with en = 0 every output equals its input in the same cycle;
//   2. reset table: enabled but unprogrammed, the samples come out unchanged
//      exactly 3 clocks after they went in;
//   3. programmed tables: random complex gains in both taps, random samples
//      (including full-scale ones that saturate) with random gaps between
//      them; every output is compared with
//          y(n) = sum_m G_m[top bits of |x(n)|^2] * x(n-m) >>> 14, saturated
//      and its 3-clock latency is checked;
//   4. a table write while samples flow changes only later outputs.
// The reference shares no code with the design. A watchdog ends the run.
module pa_dpd_tb;
  localparam int TAPS = 2;
  localparam int AW   = 6;
  localparam int LAT  = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  logic        in_valid = 1'b0;
  logic [15:0] in_i = '0, in_q = '0;
  logic        out_valid;
  logic [15:0] out_i, out_q;
  logic        lut_we = 1'b0;
  logic [$clog2(TAPS)+AW-1:0] lut_addr = '0;
  logic [31:0] lut_wdata = '0;

  int checks = 0, failures = 0;

  pa_dpd #(.TAPS(TAPS), .LUT_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // ---- reference model
  longint gi_m [TAPS][1 << AW];
  longint gq_m [TAPS][1 << AW];
  longint hi [TAPS];
  longint hq [TAPS];
  longint exp_i [$], exp_q [$], exp_t [$];
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // called when a sample is accepted while enabled
  task automatic model_push(longint xi, longint xq);
    longint p, ai, aq;
    int idx;
    for (int m = TAPS - 1; m > 0; m--) begin
      hi[m] = hi[m-1];
      hq[m] = hq[m-1];
    end
    hi[0] = xi;
    hq[0] = xq;
    p = xi * xi + xq * xq;
    idx = int'(p >> (32 - AW));
    ai = 0;
    aq = 0;
    for (int m = 0; m < TAPS; m++) begin
      ai += gi_m[m][idx] * hi[m] - gq_m[m][idx] * hq[m];
      aq += gi_m[m][idx] * hq[m] + gq_m[m][idx] * hi[m];
    end
    exp_i.push_back(sat16(ai >>> 14));
    exp_q.push_back(sat16(aq >>> 14));
    exp_t.push_back(cyc + LAT);
  endtask

  // compare every enabled output in order, with its cycle
  int n_out = 0;
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      if (exp_i.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL unexpected output");
      end else begin
        check("out_i", longint'($signed(out_i)), exp_i.pop_front());
        check("out_q", longint'($signed(out_q)), exp_q.pop_front());
        check("latency", cyc, exp_t.pop_front());
        n_out++;
      end
    end
  end

  task automatic send(longint xi, longint xq);
    @(negedge clk);
    in_valid = 1'b1;
    in_i = 16'(xi);
    in_q = 16'(xq);
    if (en) model_push(xi, xq);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic write_lut(int tap, int idx, longint g_i, longint g_q);
    @(negedge clk);
    lut_we = 1'b1;
    lut_addr = {1'(tap), 6'(idx)};
    lut_wdata = {16'(g_q), 16'(g_i)};
    gi_m[tap][idx] = g_i;
    gq_m[tap][idx] = g_q;
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  function automatic longint rsample();
    int r;
    r = int'($urandom_range(0, 9));
    if (r == 0) return 32767;
    if (r == 1) return -32768;
    return longint'($signed(16'($urandom)));
  endfunction

  longint xi, xq;

  initial begin
    for (int m = 0; m < TAPS; m++) begin
      hi[m] = 0;
      hq[m] = 0;
      for (int e = 0; e < (1 << AW); e++) begin
        gi_m[m][e] = (m == 0) ? 16384 : 0;
        gq_m[m][e] = 0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. bypass
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_i = 16'($urandom);
      in_q = 16'($urandom);
      #1;
      check("bypass valid", out_valid, in_valid);
      check("bypass i", out_i, in_i);
      check("bypass q", out_q, in_q);
    end
    @(negedge clk) in_valid = 1'b0;

    // 2. reset table: identity with 3 clocks of latency
    en = 1'b1;
    for (int k = 0; k < 40; k++) begin
      xi = rsample();
      xq = rsample();
      send(xi, xq);
    end
    repeat (6) @(negedge clk);
    check("identity outputs", n_out, 40);

    // 3. random tables, random samples, random gaps
    for (int m = 0; m < TAPS; m++)
      for (int e = 0; e < (1 << AW); e++)
        write_lut(m, e, longint'($signed(16'($urandom))) >>> (m + 1),
                        longint'($signed(16'($urandom))) >>> (m + 2));
    for (int k = 0; k < 600; k++) begin
      xi = rsample();
      xq = rsample();
      @(negedge clk);
      in_valid = 1'b1;
      in_i = 16'(xi);
      in_q = 16'(xq);
      model_push(xi, xq);
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (6) @(negedge clk);

    // 4. a table change between samples
    send(20000, -10000);
    repeat (4) @(negedge clk);
    write_lut(0, int'((longint'(20000) * 20000 + 10000 * 10000) >> (32 - AW)), 8192, -8192);
    send(20000, -10000);
    repeat (6) @(negedge clk);

    check("all outputs seen", exp_i.size(), 0);
    check("output count", n_out, 40 + 600 + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
