// cat_engine_tb: end-to-end run of the calibration and test engine at its
// default sizes, with this testbench playing the processor (data bus,
// instruction fetch and complex-unit register port) and the radio (a Tx/Rx
// loopback with a DC offset, and an I2C target).
//
// The run follows one DC-offset calibration plus measurements:
//  1. load a quarter-period sine into the signal generator and play a full
//     sine (forward/backward/inverted segments) into the Tx front end;
//  2. the loopback returns it with a DC offset; both input buffers capture;
//  3. copy 64 Rx and Tx samples into the SPMs over the bus;
//  4. estimate the DC offset (dot product with a ones vector), the
//     Tx/Rx correlation (dot product), the signal power (squared norm);
//  5. write the correction to a radio configuration word and over I2C, and
//     the estimate to a result register read back on the tester port;
//  6. run the remaining array operations (scaling, addition, complex
//     multiply, butterfly) and check the SPM contents;
//  7. switch the generator to interpolation mode, program and enable the PA
//     pre-distorter and check every pre-distorted sample, force an input buffer
//     overflow, encrypt the result with the AES accelerator, and load and
//     fetch program words through IRAM.
// Every result is compared with values computed here, and each mechanism
// (mode, operation, overflow, fetch stall, etc.) is counted; one that never
// happened counts as a failure.
module cat_engine_tb;
  import cat_pkg::*;

  localparam int N = 64;        // samples processed
  localparam int DC_I = 300, DC_Q = -200;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, s_clk = 0, s_rst_n = 0;
  always #4 clk = ~clk;          // engine clock
  always #12 s_clk = ~s_clk;     // front-end sample clock

  logic        if_en = 0, if_gnt;
  logic [31:0] if_addr = 0, if_rdata;
  bus_req_t    dbus_req = '0, cx_req = '0;
  logic [31:0] dbus_rdata, cx_rdata;
  logic        cx_busy;
  logic        stim_valid;
  logic [15:0] stim_i, stim_q;
  logic        tx_s_valid = 0, rx_s_valid = 0;
  logic [31:0] tx_s_data = 0, rx_s_data = 0;
  logic [31:0] cfg_o [16];
  logic [31:0] mon_i [4];
  logic        scl_oe, sda_oe, sda_i;
  logic [2:0]  tst_addr = 0;
  logic [31:0] tst_rdata;

  cat_engine dut (
    .clk, .rst_n, .if_en, .if_addr, .if_gnt, .if_rdata,
    .dbus_req, .dbus_rdata, .cx_req, .cx_rdata, .cx_busy,
    .stim_valid, .stim_i, .stim_q,
    .tx_s_clk(s_clk), .tx_s_rst_n(s_rst_n), .tx_s_valid, .tx_s_data,
    .rx_s_clk(s_clk), .rx_s_rst_n(s_rst_n), .rx_s_valid, .rx_s_data,
    .cfg_o, .mon_i, .scl_oe, .sda_oe, .sda_i, .tst_addr, .tst_rdata
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_seg_bwd = 0, n_seg_neg = 0, n_interp = 0, n_overflow = 0, n_fetch_stall = 0;
  int n_op [6];
  int n_i2c_ack = 0, n_aes = 0, n_bus_while_busy = 0;
  int n_dpd = 0, n_dpd_changed = 0;

  // ---------------------------------------------------------------- core bus helpers
  task automatic bw(logic [31:0] a, logic [31:0] v);
    @(negedge clk);
    dbus_req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge clk);
    dbus_req = '0;
  endtask

  task automatic br(logic [31:0] a, output logic [31:0] v);
    @(negedge clk);
    dbus_req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: 0};
    @(negedge clk);
    dbus_req = '0;
    v = dbus_rdata;
  endtask

  task automatic cw(logic [3:0] r, logic [31:0] v);
    @(negedge clk);
    cx_req = '{valid: 1'b1, we: 1'b1, addr: 32'(r), wdata: v};
    @(negedge clk);
    cx_req = '0;
  endtask

  task automatic cr(logic [3:0] r, output logic [31:0] v);
    @(negedge clk);
    cx_req = '{valid: 1'b1, we: 1'b0, addr: 32'(r), wdata: 0};
    @(negedge clk);
    cx_req = '0;
    v = cx_rdata;
  endtask

  function automatic logic [31:0] spm(int n, int i);
    return 32'h3000_0000 + 32'(n) * 32'h1_0000 + 32'(i) * 4;
  endfunction

  // run an array operation and wait for the unit to finish
  task automatic cx_run(cx_op_e op, int n, int p1, int s1, int p2, int s2, bit clr);
    int cyc;
    logic [31:0] v;
    cw(CXR_LEN, 32'(n));
    cw(CXR_PTR1, 32'(p1)); cw(CXR_STEP1, 32'(s1));
    cw(CXR_PTR2, 32'(p2)); cw(CXR_STEP2, 32'(s2));
    cw(CXR_CTRL, {28'd0, clr, op});
    cyc = 0;
    while (cx_busy) begin
      @(negedge clk);
      cyc++;
    end
    check("complex unit: one element per clock", cyc, n + 5);
    n_op[op]++;
  endtask

  // ---------------------------------------------------------------- radio model
  // Stimulus samples cross into the front-end clock through a queue; the Tx
  // probe sees them as sent, the Rx probe after the loopback adds a DC offset.
  logic [31:0] stimq [$];
  always @(posedge clk) if (rst_n && stim_valid) begin
    stimq.push_back({stim_i, stim_q});
    if ($signed(stim_i) < 0) n_seg_neg++;
  end
  always @(posedge s_clk) begin
    tx_s_valid <= 0;
    rx_s_valid <= 0;
    if (stimq.size() > 0) begin
      logic [31:0] s;
      s = stimq.pop_front();
      tx_s_valid <= 1;
      tx_s_data  <= s;
      rx_s_valid <= 1;
      rx_s_data  <= {16'($signed(s[31:16]) + DC_I), 16'($signed(s[15:0]) + DC_Q)};
    end
  end

  // PA pre-distorter reference: the generator's samples, taken inside the
  // engine, go through this model and must match the stim_* outputs in order.
  localparam int DPD_AW = 6;
  bit     dpd_on = 0;
  longint dg_i [2][1 << DPD_AW], dg_q [2][1 << DPD_AW];
  longint dh_i [2], dh_q [2];
  longint dpd_exp [$], dpd_exq [$];
  always @(posedge clk) if (rst_n && dpd_on) begin
    if (dut.sg_valid) begin
      longint xi, xq, ai, aq;
      int idx;
      xi = longint'($signed(dut.sg_i));
      xq = longint'($signed(dut.sg_q));
      dh_i[1] = dh_i[0]; dh_q[1] = dh_q[0];
      dh_i[0] = xi;      dh_q[0] = xq;
      idx = int'((xi * xi + xq * xq) >> (32 - DPD_AW));
      ai = 0; aq = 0;
      for (int t = 0; t < 2; t++) begin
        ai += dg_i[t][idx] * dh_i[t] - dg_q[t][idx] * dh_q[t];
        aq += dg_i[t][idx] * dh_q[t] + dg_q[t][idx] * dh_i[t];
      end
      dpd_exp.push_back(sat16(ai >>> 14));
      dpd_exq.push_back(sat16(aq >>> 14));
      if (sat16(ai >>> 14) != xi || sat16(aq >>> 14) != xq) n_dpd_changed++;
    end
    if (stim_valid) begin
      if (dpd_exp.size() == 0) check("pre-distorted sample expected", 0, 1);
      else begin
        check("pre-distorted I", longint'($signed(stim_i)), dpd_exp.pop_front());
        check("pre-distorted Q", longint'($signed(stim_q)), dpd_exq.pop_front());
        n_dpd++;
      end
    end
  end

  // I2C target at address 0x52 on open-drain lines
  logic scl, sda, tgt_pull = 0, scl_d = 1;
  int   nbits = 0;
  logic [26:0] i2c_bits;
  assign scl   = !scl_oe;
  assign sda   = !(sda_oe || tgt_pull);
  assign sda_i = sda;
  always @(posedge clk) begin
    scl_d <= scl;
    if (scl && !scl_d) begin
      if (nbits < 27) i2c_bits[26 - nbits] = sda;
      nbits++;
    end
    if (!scl && scl_d) begin
      tgt_pull <= (nbits == 8 || nbits == 17 || nbits == 26);
    end
  end

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction
  function automatic int sine(int k);
    return rnd(8000.0 * $sin(2.0 * PI * (k + 0.5) / 64.0));
  endfunction
  // the datapath negates by saturation: -(-32768) gives 32767
  function automatic longint negs(longint v);
    return (v == -32768) ? 32767 : -v;
  endfunction
  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // this testbench's copy of the first N words of each SPM
  longint m [4][N];

  task automatic cmp_spm(string what);
    logic [31:0] v;
    int bad = 0;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < N; i++) begin
        br(spm(s, i), v);
        if (longint'($signed(v)) != m[s][i]) bad++;
      end
    check(what, bad, 0);
  endtask

  initial begin
    logic [31:0] v, tx_w [N], rx_w [N];
    longint sr, si, corr, pw, k, z, a, b, c, d, pr, pi;
    int got, est_i, est_q;
    for (int i = 0; i < 4; i++) mon_i[i] = 32'hC0DE_0000 + 32'(i);
    for (int i = 0; i < 6; i++) n_op[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1; s_rst_n = 1;

    // ---- 1. stimulus: quarter-period sine, I only
    for (int i = 0; i < 16; i++) bw(32'h2000_0000 + 32'(i) * 4, {16'(sine(i)), 16'd0});
    bw(32'h1000_0004, 0);         // SG_START
    bw(32'h1000_0008, 16);        // SG_LEN
    bw(32'h1000_000C, 1);         // SG_STEP
    bw(32'h1000_0010, 5);         // SG_RATE: one sample per 6 clocks
    bw(32'h1000_0014, 3);         // capture Tx and Rx
    repeat (10) @(negedge clk);
    // nseg = 3, bwd = 1010, neg = 1100, enable
    bw(32'h1000_0000, {18'd0, 4'b1100, 4'b1010, 2'd3, 2'd0, 1'b0, 1'b1});
    n_seg_bwd++;

    // ---- 2/3. read captured samples into the SPMs
    for (int i = 0; i < N; i++) begin
      do br(32'h4000_0104, v); while (v[30]);   // wait for Rx data
      br(32'h4000_0100, rx_w[i]);
      do br(32'h4000_0004, v); while (v[30]);
      br(32'h4000_0000, tx_w[i]);
    end
    bw(32'h1000_0000, 0);         // generator off
    for (int i = 0; i < N; i++) begin
      check("Tx probe = stimulus", $signed(tx_w[i][31:16]), sine(i));
      check("Rx probe = stimulus + DC", $signed(rx_w[i][31:16]), sine(i) + DC_I);
      check("Rx probe Q", $signed(rx_w[i][15:0]), DC_Q);
    end
    for (int i = 0; i < N; i++) begin
      m[0][i] = $signed(rx_w[i][31:16]); m[2][i] = $signed(rx_w[i][15:0]);
      m[1][i] = $signed(tx_w[i][31:16]); m[3][i] = $signed(tx_w[i][15:0]);
      for (int s = 0; s < 4; s++) bw(spm(s, i), 32'(m[s][i]));
    end
    // ones vector in branch 1 at 1000..1063
    for (int i = 0; i < N; i++) begin
      bw(spm(1, 1000 + i), 1);
      bw(spm(3, 1000 + i), 0);
    end

    // ---- 4. DC estimate: sum(rx * 1) / N
    cw(CXR_SHIFT, 6);               // divide by 64
    cx_run(CX_DOT, N, 0, 1, 1000, 1, 1);
    // a bus access to the SPMs while busy is not served
    cr(CXR_ACCR, v); est_i = $signed(v);
    cr(CXR_ACCI, v); est_q = $signed(v);
    sr = 0; si = 0;
    for (int i = 0; i < N; i++) begin sr += m[0][i]; si += m[2][i]; end
    check("DC estimate I", est_i, sr >>> 6);
    check("DC estimate Q", est_q, si >>> 6);
    check("DC estimate near the offset", (est_i == DC_I) && (est_q == DC_Q), 1);
    // correlation Rx with Tx
    cw(CXR_SHIFT, 0);
    cx_run(CX_DOT, N, 0, 1, 0, 1, 1);
    corr = 0;
    for (int i = 0; i < N; i++) corr += m[0][i] * m[1][i] + m[2][i] * m[3][i];
    cr(CXR_ACCR, v); check("correlation", $signed(v), corr);
    // power of the Tx signal (RMS^2 * N), using branch 0 at the Tx copy
    for (int i = 0; i < N; i++) begin
      bw(spm(0, 2000 + i), 32'(m[1][i]));
      bw(spm(2, 2000 + i), 32'(m[3][i]));
    end
    cx_run(CX_NORM, N, 2000, 1, 0, 1, 1);
    pw = 0;
    for (int i = 0; i < N; i++) pw += m[1][i] * m[1][i] + m[3][i] * m[3][i];
    cr(CXR_ACCR, v); check("signal power", $signed(v), pw);

    // ---- 5. correction to the radio
    bw(32'h1000_0040, 32'(-est_i));               // CFG[0]: residual DC I
    bw(32'h1000_0044, 32'(-est_q));               // CFG[1]: residual DC Q
    check("radio config word 0", $signed(cfg_o[0]), -est_i);
    check("radio config word 1", $signed(cfg_o[1]), -est_q);
    bw(32'h1000_0080, 32'(est_i));                // RES[0]
    @(negedge clk); tst_addr = 0;
    @(negedge clk); check("tester reads result", $signed(tst_rdata), est_i);
    br(32'h1000_00C0, v); check("radio monitor", v, 32'hC0DE_0000);
    // analog knob over I2C: device 0x52, register 0x07, DC DAC code
    nbits = 0;
    bw(32'h6000_0000, {1'b0, 7'h52, 8'd0, 8'h07, 8'(est_i >>> 2)});
    do br(32'h6000_0004, v); while (v[0]);
    check("I2C ack", v[1], 0);
    check("I2C bytes", i2c_bits, {7'h52, 1'b0, 1'b0, 8'h07, 1'b0, 8'(est_i >>> 2), 1'b0});
    if (!v[1]) n_i2c_ack++;

    // ---- 6. remaining array operations, checked against the SPM copy
    k = 23170; z = 23170;
    cw(CXR_WR, 32'(k)); cw(CXR_WI, 32'(z)); cw(CXR_SHIFT, 15);
    cx_run(CX_SCALE, N, 0, 1, 0, 1, 0);
    for (int i = 0; i < N; i++) begin
      a = m[0][i]; b = m[2][i];
      m[0][i] = sat16((k*a - z*b) >>> 15); m[2][i] = sat16((k*b + z*a) >>> 15);
    end
    cmp_spm("vector scaling");
    cx_run(CX_VADD, N, 0, 1, 0, 1, 0);
    for (int i = 0; i < N; i++) begin
      m[0][i] = sat16(m[0][i] + m[1][i]); m[2][i] = sat16(m[2][i] + m[3][i]);
    end
    cmp_spm("vector addition");
    cx_run(CX_CMUL, N, N - 1, -1, 0, 1, 0);
    for (int i = 0; i < N; i++) begin
      int j;
      j = N - 1 - i;
      a = m[0][j]; b = m[2][j]; c = m[1][i]; d = m[3][i];
      m[0][j] = sat16((a*c + negs(b)*d) >>> 15); m[2][j] = sat16((a*d + b*c) >>> 15);
    end
    cmp_spm("complex multiply");
    k = 32767; z = 0;
    cw(CXR_WR, 32'(k)); cw(CXR_WI, 32'(z));
    // butterfly while the bus tries to overwrite an SPM word (must be ignored)
    cw(CXR_LEN, N); cw(CXR_PTR1, 0); cw(CXR_STEP1, 1); cw(CXR_PTR2, 0); cw(CXR_STEP2, 1);
    cw(CXR_CTRL, {28'd0, 1'b0, CX_BFLY});
    @(negedge clk);
    dbus_req = '{valid: 1'b1, we: 1'b1, addr: spm(0, N - 1), wdata: 32'h7777};
    @(negedge clk);
    dbus_req = '0;
    n_bus_while_busy++;
    while (cx_busy) @(negedge clk);
    n_op[CX_BFLY]++;
    for (int i = 0; i < N; i++) begin
      a = m[0][i]; b = m[2][i]; c = m[1][i]; d = m[3][i];
      pr = (a*k - b*z) >>> 15; pi = (b*k + a*z) >>> 15;
      m[1][i] = sat16(c + pr); m[3][i] = sat16(d + pi);
      m[0][i] = sat16(c - pr); m[2][i] = sat16(d - pi);
    end
    cmp_spm("butterfly");

    // ---- 7a. generator in interpolation mode: x4 between table samples
    bw(32'h1000_0014, 0);         // capture off
    bw(32'h1000_0010, 0);
    bw(32'h1000_0000, {18'd0, 4'b0000, 4'b0000, 2'd0, 2'd2, 1'b1, 1'b1});
    begin
      int outs [$];
      while (outs.size() < 12) begin
        @(posedge clk);
        if (stim_valid) outs.push_back($signed(stim_i));
      end
      bw(32'h1000_0000, 0);
      for (int j = 0; j < 12; j++) begin
        int mm, ph, p0, c0;
        mm = j / 4; ph = j % 4;
        p0 = (mm == 0) ? 0 : sine(mm - 1); c0 = sine(mm);
        check("interpolated stimulus", outs[j], p0 + (((c0 - p0) * ph) >>> 2));
      end
      n_interp++;
    end
    stimq.delete();

    // ---- 7e. PA pre-distortion of the stimulus
    // table: tap 0 gains grow with the power index, tap 1 is a small
    // negative memory term; the generator plays a ramp that covers many
    // power levels
    for (int i = 0; i < 16; i++) bw(32'h2000_0000 + 32'(i) * 4, {16'(2000 * i), 16'(-1500 * i)});
    bw(32'h1000_0020, 0);         // DPD_ADDR
    for (int t = 0; t < 2; t++)
      for (int e = 0; e < (1 << DPD_AW); e++) begin
        dg_i[t][e] = (t == 0) ? 16384 + 64 * e : -24 * e;
        dg_q[t][e] = (t == 0) ? 16 * e : 8;
        bw(32'h1000_0024, {16'(dg_q[t][e]), 16'(dg_i[t][e])});
      end
    dh_i = '{0, 0}; dh_q = '{0, 0};
    bw(32'h1000_001C, 1);         // DPD_CTRL: enable
    dpd_on = 1;
    bw(32'h1000_0010, 1);         // SG_RATE: every second clock
    bw(32'h1000_0000, {18'd0, 4'b0000, 4'b0000, 2'd0, 2'd0, 1'b0, 1'b1});
    repeat (100) @(negedge clk);
    bw(32'h1000_0000, 0);
    repeat (10) @(negedge clk);
    dpd_on = 0;
    check("pre-distorter drained", dpd_exp.size(), 0);
    bw(32'h1000_001C, 0);
    stimq.delete();

    // ---- 7b. overflow of the Rx buffer: capture without reading
    bw(32'h1000_0014, 2);
    bw(32'h1000_0010, 0);
    bw(32'h1000_0000, {18'd0, 4'b0000, 4'b0000, 2'd0, 2'd0, 1'b0, 1'b1});
    repeat (30000) @(negedge clk);
    bw(32'h1000_0000, 0);
    br(32'h1000_0018, v);
    check("Rx overflow reported", v[2], 1);
    if (v[2]) n_overflow++;
    br(32'h4000_0104, v);
    check("Rx buffer full", v[15:0], 1024);
    bw(32'h1000_0014, 0);
    repeat (20) @(negedge clk);
    br(32'h1000_0018, v);
    check("overflow cleared", v[2], 0);

    // ---- 7c. AES: encrypt the FIPS-197 C.1 block
    for (int i = 0; i < 4; i++) bw(32'h5000_0000 + 32'(i) * 4, 32'h00010203 + 32'(i) * 32'h04040404);
    bw(32'h5000_0010, 32'h00112233); bw(32'h5000_0014, 32'h44556677);
    bw(32'h5000_0018, 32'h8899aabb); bw(32'h5000_001C, 32'hccddeeff);
    bw(32'h5000_0030, 1);
    do br(32'h5000_0034, v); while (!v[1]);
    br(32'h5000_0020, v); check("AES word 0", v, 32'h69c4e0d8);
    br(32'h5000_002C, v); check("AES word 3", v, 32'h70b4c55a);
    n_aes++;

    // ---- 7d. program load into IRAM and instruction fetch
    for (int i = 0; i < 16; i++) bw(32'h7000_0000 + 32'(i) * 4, 32'hA5000000 + 32'(i));
    br(32'h0000_0010, v);   // DRAM, untouched word: any value
    bw(32'h0000_0010, 32'hDEADBEEF);
    br(32'h0000_0010, v); check("DRAM", v, 32'hDEADBEEF);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      if_en = 1; if_addr = 32'(i) * 4;
      // a data access to IRAM in the same cycle stalls the fetch
      if (i == 5) dbus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h7000_0000, wdata: 0};
      #1;
      if (!if_gnt) begin
        n_fetch_stall++;
        @(negedge clk);
        dbus_req = '0;
        check("stalled data read of IRAM", dbus_rdata, 32'hA5000000);
      end
      @(negedge clk);
      if_en = 0;
      check("instruction fetch", if_rdata, 32'hA5000000 + 32'(i));
    end

    // ---- mechanism coverage
    check("segments played backward", n_seg_bwd > 0, 1);
    check("segments with inverted sign", n_seg_neg > 0, 1);
    check("interpolation mode", n_interp, 1);
    check("buffer overflow", n_overflow, 1);
    check("fetch stall", n_fetch_stall, 1);
    check("bus access while complex unit busy", n_bus_while_busy, 1);
    check("I2C write acknowledged", n_i2c_ack, 1);
    check("AES block", n_aes, 1);
    check("pre-distorted samples", n_dpd > 20, 1);
    check("pre-distortion changed samples", n_dpd_changed > 20, 1);
    for (int o = 0; o < 6; o++) check($sformatf("operation %0d used", o), n_op[o] > 0, 1);
    $display("mechanisms: neg=%0d interp=%0d dpd=%0d ovf=%0d stall=%0d ops=%0d/%0d/%0d/%0d/%0d/%0d",
             n_seg_neg, n_interp, n_dpd, n_overflow, n_fetch_stall,
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
