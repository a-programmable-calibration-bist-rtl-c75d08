// cplx_unit_tb: runs each accelerated array operation of the complex unit
// against SPM contents held in this testbench (four synchronous-read arrays
// wired like the real SPM branches) and checks memory results and
// accumulators against a reference computed here. Array pointers use
// different starts and positive and negative steps. It also checks that an
// operation over N elements keeps the unit busy for exactly N + 5 clocks,
// i.e. one complex element pair per clock.
module cplx_unit_tb;
  import cat_pkg::*;
  localparam int AW = 10;
  localparam int D  = 1 << AW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    cx_req = '0;
  logic [31:0] cx_rdata;
  logic        busy, rd_en, we0, we1;
  logic [AW-1:0] rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic signed [15:0] rd0r, rd0i, rd1r, rd1i, wd0r, wd0i, wd1r, wd1i;

  cplx_unit #(.AW(AW)) dut (.*);

  // SPM model: index 0 = SPM0 (b0 real), 1 = SPM1 (b1 real), 2 = SPM2 (b0 imag), 3 = SPM3
  logic signed [15:0] m [4][D];
  always @(posedge clk) begin
    if (rd_en) begin
      rd0r <= m[0][rd_addr0]; rd0i <= m[2][rd_addr0];
      rd1r <= m[1][rd_addr1]; rd1i <= m[3][rd_addr1];
    end
    if (we0) begin m[0][wr_addr0] <= wd0r; m[2][wr_addr0] <= wd0i; end
    if (we1) begin m[1][wr_addr1] <= wd1r; m[3][wr_addr1] <= wd1i; end
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic wreg(logic [3:0] r, logic [31:0] v);
    @(negedge clk);
    cx_req = '{valid: 1'b1, we: 1'b1, addr: 32'(r), wdata: v};
    @(negedge clk);
    cx_req = '0;
  endtask

  task automatic rreg(logic [3:0] r, output logic [31:0] v);
    @(negedge clk);
    cx_req = '{valid: 1'b1, we: 1'b0, addr: 32'(r), wdata: 32'd0};
    @(negedge clk);
    cx_req = '0;
    v = cx_rdata;
  endtask

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // the datapath negates by saturation: -(-32768) gives 32767
  function automatic longint negs(longint v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  longint ref_m [4][D];
  logic [31:0] v;

  // run op over n elements, check busy length
  task automatic run(cx_op_e op, int n, int p1, int s1, int p2, int s2, bit clr);
    int cyc;
    wreg(CXR_LEN, 32'(n));
    wreg(CXR_PTR1, 32'(p1)); wreg(CXR_STEP1, 32'(s1));
    wreg(CXR_PTR2, 32'(p2)); wreg(CXR_STEP2, 32'(s2));
    @(negedge clk);
    cx_req = '{valid: 1'b1, we: 1'b1, addr: 32'(CXR_CTRL), wdata: {28'd0, clr, op}};
    @(negedge clk);
    cx_req = '0;
    cyc = 0;
    while (busy) begin
      cyc++;
      @(negedge clk);
    end
    check("busy cycles", cyc, n + 5);
  endtask

  task automatic fill(int lim);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < D; i++) begin
        m[s][i] = 16'(int'($urandom_range(0, 2*lim)) - lim);
        ref_m[s][i] = m[s][i];
      end
  endtask

  task automatic cmp_mem(string what);
    int bad = 0;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < D; i++)
        if (longint'(m[s][i]) != ref_m[s][i]) bad++;
    check(what, bad, 0);
  endtask

  initial begin
    longint ar, ai, k, z, a, b, c, d, pr, pi;
    int i0, i1, n;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- dot product, conjugating branch 1
    fill(2000);
    n = 100;
    ar = 0; ai = 0;
    for (int i = 0; i < n; i++) begin
      i0 = (3 + i) % D; i1 = (500 - 2*i + D) % D;
      a = ref_m[0][i0]; b = ref_m[2][i0]; c = ref_m[1][i1]; d = ref_m[3][i1];
      ar += a*c + b*d; ai += b*c - a*d;
    end
    wreg(CXR_SHIFT, 0);
    run(CX_DOT, n, 3, 1, 500, -2, 1);
    rreg(CXR_ACCR, v); check("dot re", longint'($signed(v)), ar);
    rreg(CXR_ACCI, v); check("dot im", longint'($signed(v)), ai);
    rreg(CXR_PTR1, v); check("ptr1 after", v, 103);
    // accumulate a second time without clearing, read with a shift
    run(CX_DOT, n, 3, 1, 500, -2, 0);
    wreg(CXR_SHIFT, 4);
    rreg(CXR_ACCR, v); check("dot re x2 >>4", longint'($signed(v)), (2*ar) >>> 4);
    cmp_mem("dot leaves memory alone");

    // ---- squared norm
    ar = 0;
    for (int i = 0; i < 64; i++) begin
      a = ref_m[0][10 + 3*i]; b = ref_m[2][10 + 3*i];
      ar += a*a + b*b;
    end
    wreg(CXR_SHIFT, 0);
    run(CX_NORM, 64, 10, 3, 0, 0, 1);
    rreg(CXR_ACCR, v); check("norm", longint'($signed(v)), ar);

    // ---- vector scaling, in place over branch 0, walked backwards
    fill(30000);
    k = 23170; z = -23170;   // (1-j)/sqrt(2) in Q15
    wreg(CXR_WR, 32'(k)); wreg(CXR_WI, 32'(z)); wreg(CXR_SHIFT, 15);
    for (int i = 0; i < 200; i++) begin
      i0 = 700 - i; a = ref_m[0][i0]; b = ref_m[2][i0];
      ref_m[0][i0] = sat16((k*a - z*b) >>> 15);
      ref_m[2][i0] = sat16((k*b + z*a) >>> 15);
    end
    run(CX_SCALE, 200, 700, -1, 0, 1, 0);
    cmp_mem("scale");

    // ---- vector addition
    for (int i = 0; i < 300; i++) begin
      i0 = i; i1 = 400 + i;
      ref_m[0][i0] = sat16(ref_m[0][i0] + ref_m[1][i1]);
      ref_m[2][i0] = sat16(ref_m[2][i0] + ref_m[3][i1]);
    end
    run(CX_VADD, 300, 0, 1, 400, 1, 0);
    cmp_mem("vadd");

    // ---- complex multiplication
    wreg(CXR_SHIFT, 15);
    for (int i = 0; i < 128; i++) begin
      i0 = 2*i; i1 = 900 - i;
      a = ref_m[0][i0]; b = ref_m[2][i0]; c = ref_m[1][i1]; d = ref_m[3][i1];
      ref_m[0][i0] = sat16((a*c + negs(b)*d) >>> 15);
      ref_m[2][i0] = sat16((a*d + b*c) >>> 15);
    end
    run(CX_CMUL, 128, 0, 2, 900, -1, 0);
    cmp_mem("cmul");

    // ---- radix-2 butterflies, in place
    fill(16000);
    k = 30274; z = -12540;   // Q15 twiddle
    wreg(CXR_WR, 32'(k)); wreg(CXR_WI, 32'(z)); wreg(CXR_SHIFT, 15);
    for (int i = 0; i < 256; i++) begin
      i0 = 256 + i; i1 = i;
      a = ref_m[0][i0]; b = ref_m[2][i0]; c = ref_m[1][i1]; d = ref_m[3][i1];
      pr = (a*k - b*z) >>> 15; pi = (b*k + a*z) >>> 15;
      ref_m[1][i1] = sat16(c + pr); ref_m[3][i1] = sat16(d + pi);
      ref_m[0][i0] = sat16(c - pr); ref_m[2][i0] = sat16(d - pi);
    end
    run(CX_BFLY, 256, 256, 1, 0, 1, 0);
    cmp_mem("butterfly");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
