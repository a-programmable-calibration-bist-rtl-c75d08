// cat_engine_fft_tb: spectrum measurement workload on the engine, a 64-point
// radix-2 FFT built from the complex unit's butterfly instruction, followed
// by a periodogram and an energy measurement with the squared-norm
// instruction. The engine runs at its default sizes.
//
// The testbench plays the processor. Its loads and stores over the data bus
// do what the core's software would do between FFT stages:
//  * the input, two complex tones (bins 5 and 20), is put in bit-reversed
//    order;
//  * for each of the 6 decimation-in-time stages, the bottom operands of all
//    butterflies go to branch 0 (SPM0/SPM2) and the top operands to branch 1
//    (SPM1/SPM3), grouped by twiddle factor, so that one BFLY instruction
//    with LEN = number of groups runs all butterflies sharing a twiddle
//    (1 + 2 + 4 + 8 + 16 + 32 = 63 instructions in all);
//  * after each instruction the results are read back: top = x0 from
//    branch 1, bottom = x1 from branch 0.
// Every butterfly result is compared with a bit-exact model of the Q15
// datapath (twiddles k + zj scaled by 32767, product shifted right by 15,
// sums saturated to 16 bits). The final spectrum is also compared with a
// double-precision DFT of the input, the periodogram peaks must be at bins
// 5 and 20, and the squared norm of the spectrum computed by the NORM instruction must equal the testbench's sum
// of |X_k|^2 and match N times the input energy to within 1 %. The DFT
// bound is 48 LSB: each stage floors its products (a bias of up to half an
// LSB, doubled by every later stage: about N/2 = 32 LSB in all) and the
// twiddles are scaled by 32767, not 32768 (about 4 LSB at the peak bin).
// Each BFLY instruction must take LEN + 5 clocks. A watchdog ends the run.
module cat_engine_fft_tb;
  import cat_pkg::*;

  localparam int N = 64;
  localparam int LOGN = 6;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic        if_en = 0, if_gnt;
  logic [31:0] if_addr = 0, if_rdata;
  bus_req_t    dbus_req = '0, cx_req = '0;
  logic [31:0] dbus_rdata, cx_rdata;
  logic        cx_busy;
  logic        stim_valid;
  logic [15:0] stim_i, stim_q;
  logic [31:0] cfg_o [16];
  logic [31:0] mon_i [4];
  logic        scl_oe, sda_oe;
  logic [2:0]  tst_addr = 0;
  logic [31:0] tst_rdata;

  cat_engine dut (
    .clk, .rst_n, .if_en, .if_addr, .if_gnt, .if_rdata,
    .dbus_req, .dbus_rdata, .cx_req, .cx_rdata, .cx_busy,
    .stim_valid, .stim_i, .stim_q,
    .tx_s_clk(clk), .tx_s_rst_n(rst_n), .tx_s_valid(1'b0), .tx_s_data(32'd0),
    .rx_s_clk(clk), .rx_s_rst_n(rst_n), .rx_s_valid(1'b0), .rx_s_data(32'd0),
    .cfg_o, .mon_i, .scl_oe, .sda_oe, .sda_i(1'b1), .tst_addr, .tst_rdata
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

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

  int n_bfly = 0, n_norm = 0;

  task automatic cx_run(cx_op_e op, int n, int p1, int p2, bit clr);
    int cyc;
    cw(CXR_LEN, 32'(n));
    cw(CXR_PTR1, 32'(p1)); cw(CXR_STEP1, 1);
    cw(CXR_PTR2, 32'(p2)); cw(CXR_STEP2, 1);
    cw(CXR_CTRL, {28'd0, clr, op});
    cyc = 0;
    while (cx_busy) begin
      @(negedge clk);
      cyc++;
    end
    check("complex unit: one element per clock", cyc, n + 5);
  endtask

  // ---------------------------------------------------------------- reference arithmetic
  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction
  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction
  function automatic longint negs(longint v);
    return (v == -32768) ? 32767 : -v;
  endfunction
  function automatic int bitrev(int i);
    int r;
    r = 0;
    for (int b = 0; b < LOGN; b++) r |= ((i >> b) & 1) << (LOGN - 1 - b);
    return r;
  endfunction

  longint xr [N], xi [N];     // time-domain input
  longint yr [N], yi [N];     // working array (the "DRAM" copy)
  real    dr [N], di [N];     // double-precision DFT

  initial begin
    logic [31:0] v;
    int h, g_n, top, bot, k, z, pk1, pk2;
    longint tr, ti, er, ei, pw [N], e_in, e_out, e_acc;
    real th, err, maxerr;

    for (int i = 0; i < 4; i++) mon_i[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // two complex tones: 300 at bin 5, 150 at bin 20
    for (int n = 0; n < N; n++) begin
      th = 2.0 * PI * n / N;
      xr[n] = rnd(300.0 * $cos(5.0 * th) + 150.0 * $cos(20.0 * th));
      xi[n] = rnd(300.0 * $sin(5.0 * th) + 150.0 * $sin(20.0 * th));
    end
    for (int kk = 0; kk < N; kk++) begin
      dr[kk] = 0.0; di[kk] = 0.0;
      for (int n = 0; n < N; n++) begin
        th = -2.0 * PI * kk * n / N;
        dr[kk] += xr[n] * $cos(th) - xi[n] * $sin(th);
        di[kk] += xr[n] * $sin(th) + xi[n] * $cos(th);
      end
    end
    for (int i = 0; i < N; i++) begin
      yr[i] = xr[bitrev(i)];
      yi[i] = xi[bitrev(i)];
    end

    cw(CXR_SHIFT, 15);
    for (int s = 0; s < LOGN; s++) begin
      h = 1 << s;
      g_n = N / (2 * h);
      // lay out the operands: branch 0 bottom, branch 1 top, grouped by twiddle
      for (int j = 0; j < h; j++)
        for (int g = 0; g < g_n; g++) begin
          top = g * 2 * h + j;
          bot = top + h;
          bw(spm(0, j * g_n + g), 32'(yr[bot]));
          bw(spm(2, j * g_n + g), 32'(yi[bot]));
          bw(spm(1, j * g_n + g), 32'(yr[top]));
          bw(spm(3, j * g_n + g), 32'(yi[top]));
        end
      for (int j = 0; j < h; j++) begin
        th = 2.0 * PI * j / (2 * h);
        k = rnd(32767.0 * $cos(th));
        z = rnd(-32767.0 * $sin(th));
        cw(CXR_WR, 32'(k));
        cw(CXR_WI, 32'(z));
        cx_run(CX_BFLY, g_n, j * g_n, j * g_n, 0);
        n_bfly++;
        for (int g = 0; g < g_n; g++) begin
          top = g * 2 * h + j;
          bot = top + h;
          // bit-exact model of the butterfly
          tr = (yr[bot] * k + yi[bot] * negs(z)) >>> 15;
          ti = (yi[bot] * k + yr[bot] * z) >>> 15;
          er = yr[top];
          ei = yi[top];
          yr[top] = sat16(er + tr); yi[top] = sat16(ei + ti);
          yr[bot] = sat16(er - tr); yi[bot] = sat16(ei - ti);
          br(spm(1, j * g_n + g), v); check("butterfly x0 re", longint'($signed(v)), yr[top]);
          br(spm(3, j * g_n + g), v); check("butterfly x0 im", longint'($signed(v)), yi[top]);
          br(spm(0, j * g_n + g), v); check("butterfly x1 re", longint'($signed(v)), yr[bot]);
          br(spm(2, j * g_n + g), v); check("butterfly x1 im", longint'($signed(v)), yi[bot]);
        end
      end
    end

    // spectrum against the floating-point DFT (bound explained above)
    maxerr = 0.0;
    for (int kk = 0; kk < N; kk++) begin
      err = $sqrt((yr[kk] - dr[kk]) ** 2 + (yi[kk] - di[kk]) ** 2);
      if (err > maxerr) maxerr = err;
    end
    check("FFT within 48 LSB of the exact DFT", maxerr < 48.0, 1);
    $display("largest FFT error against the DFT: %0.2f LSB", maxerr);

    // periodogram |X_k|^2: the two largest bins
    pk1 = 0; pk2 = -1;
    for (int kk = 0; kk < N; kk++) begin
      pw[kk] = yr[kk] * yr[kk] + yi[kk] * yi[kk];
      if (pw[kk] > pw[pk1]) pk1 = kk;
    end
    for (int kk = 0; kk < N; kk++)
      if (kk != pk1 && (pk2 < 0 || pw[kk] > pw[pk2])) pk2 = kk;
    check("periodogram peak bin", pk1, 5);
    check("periodogram second bin", pk2, 20);

    // spectrum energy with NORM: put the spectrum in branch 0 and accumulate
    for (int kk = 0; kk < N; kk++) begin
      bw(spm(0, 4096 + kk), 32'(yr[kk]));
      bw(spm(2, 4096 + kk), 32'(yi[kk]));
    end
    cw(CXR_SHIFT, 0);
    cx_run(CX_NORM, N, 4096, 0, 1);
    n_norm++;
    cr(CXR_ACCR, v);
    e_acc = longint'(v);
    e_out = 0;
    e_in = 0;
    for (int kk = 0; kk < N; kk++) e_out += pw[kk];
    for (int n = 0; n < N; n++) e_in += xr[n] * xr[n] + xi[n] * xi[n];
    check("NORM of the spectrum", e_acc, e_out);
    check("Parseval within 1 %", (100 * (e_out - N * e_in) < N * e_in) &&
                                 (100 * (N * e_in - e_out) < N * e_in), 1);

    check("butterfly instructions", n_bfly, 63);
    check("norm instructions", n_norm, 1);
    $display("mechanisms: butterflies=%0d norm=%0d", n_bfly, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
