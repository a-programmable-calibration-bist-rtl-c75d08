// sig_gen_tb: checks the stimulus generator.
//  - a full sine period produced from a quarter-period table (forward,
//    backward, inverted forward, inverted backward), against sine values
//    computed here, with the output spacing set by rate_div;
//  - address skipping (step 2) and a two-segment pattern, against a
//    reference playback model;
//  - a non-periodic single-segment stream replayed as stored;
//  - linear interpolation by 2 and 4 against the interpolation formula;
//  - bus read-back of the sample memory.
module sig_gen_tb;
  import cat_pkg::*;
  localparam int D = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sg_cfg_t     cfg = '0;
  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;
  logic        out_valid, active;
  logic [15:0] out_i, out_q;

  sig_gen #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
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

  logic [31:0] ref_mem [D];

  task automatic bwr(int i, logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b1, addr: 32'h2000_0000 | (32'(i) << 2), wdata: v};
    @(negedge clk);
    bus_req = '0;
    ref_mem[i] = v;
  endtask

  // collect n outputs and the clock count between consecutive ones
  int got_i [$], got_q [$];
  longint cyc = 0, last_cyc;
  int     gap_bad;
  int     want_gap;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      if (got_i.size() > 0 && (cyc - last_cyc) != want_gap) gap_bad++;
      last_cyc = cyc;
      got_i.push_back(int'($signed(out_i)));
      got_q.push_back(int'($signed(out_q)));
    end
  end

  task automatic play(int n);
    got_i.delete(); got_q.delete(); gap_bad = 0;
    want_gap = int'(cfg.rate_div) + 1;
    @(negedge clk);
    cfg.enable = 1;
    while (got_i.size() < n) @(negedge clk);
    cfg.enable = 0;
    repeat (4) @(negedge clk);
    check("output spacing", gap_bad, 0);
  endtask

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  function automatic int sneg(int v, bit n);
    if (!n) return v;
    if (v == -32768) return 32767;
    return -v;
  endfunction

  // reference playback of the memory (no interpolation)
  function automatic void ref_stream(int n, ref int ei[$], ref int eq[$]);
    int seg = 0, j = 0, a;
    ei.delete(); eq.delete();
    while (ei.size() < n) begin
      a = cfg.seg_bwd[seg] ? int'(cfg.start) + (int'(cfg.len) - 1 - j) * int'(cfg.step)
                           : int'(cfg.start) + j * int'(cfg.step);
      ei.push_back(sneg(int'($signed(ref_mem[a % D][31:16])), cfg.seg_neg[seg]));
      eq.push_back(sneg(int'($signed(ref_mem[a % D][15:0])), cfg.seg_neg[seg]));
      j++;
      if (j == int'(cfg.len)) begin
        j = 0;
        seg = (seg == int'(cfg.nseg)) ? 0 : seg + 1;
      end
    end
  endfunction

  int ei [$], eq [$];
  localparam real PI = 3.14159265358979;

  initial begin
    int bad, n, l, pi_, ci, pq, cq;
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- quarter-wave sine table at addresses 32..47: I = sin, Q = 0
    for (int i = 0; i < 16; i++)
      bwr(32 + i, {16'(rnd(30000.0 * $sin(2.0 * PI * (i + 0.5) / 64.0))), 16'd0});
    cfg = '0;
    cfg.start = 32; cfg.len = 16; cfg.step = 1; cfg.nseg = 3;
    cfg.seg_bwd = 4'b1010; cfg.seg_neg = 4'b1100; cfg.rate_div = 2;
    play(128);
    bad = 0;
    for (int k = 0; k < 128; k++)
      if (got_i[k] != rnd(30000.0 * $sin(2.0 * PI * (k + 0.5) / 64.0)) || got_q[k] != 0) bad++;
    check("sine from quarter table", bad, 0);

    // ---- random table, skip every other sample, forward then backward inverted
    for (int i = 0; i < D; i++) bwr(i, $urandom);
    // bus read-back
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      bus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h2000_0000 | (32'(i * 7) << 2), wdata: 0};
      @(negedge clk);
      bus_req = '0;
      check("memory read-back", bus_rdata, ref_mem[i * 7]);
    end
    cfg = '0;
    cfg.start = 5; cfg.len = 20; cfg.step = 2; cfg.nseg = 1;
    cfg.seg_bwd = 4'b0010; cfg.seg_neg = 4'b0010; cfg.rate_div = 0;
    play(100);
    ref_stream(100, ei, eq);
    bad = 0;
    for (int k = 0; k < 100; k++) if (got_i[k] != ei[k] || got_q[k] != eq[k]) bad++;
    check("skip and backward", bad, 0);

    // ---- stored non-periodic stream, replayed as is
    cfg = '0;
    cfg.start = 0; cfg.len = 200; cfg.step = 1; cfg.nseg = 0; cfg.rate_div = 5;
    play(250);
    ref_stream(250, ei, eq);
    bad = 0;
    for (int k = 0; k < 250; k++) if (got_i[k] != ei[k] || got_q[k] != eq[k]) bad++;
    check("stored stream", bad, 0);

    // ---- interpolation by 2^l on a small-valued table
    for (int i = 0; i < 64; i++) bwr(100 + i, {16'($urandom_range(0, 20000) - 10000), 16'($urandom_range(0, 20000) - 10000)});
    for (l = 1; l <= 2; l++) begin
      cfg = '0;
      cfg.start = 100; cfg.len = 64; cfg.step = 1; cfg.nseg = 0; cfg.rate_div = 1;
      cfg.interp_en = 1; cfg.interp_log2 = 2'(l);
      n = 40 << l;
      play(n);
      ref_stream(40, ei, eq);
      bad = 0;
      for (int k = 0; k < n; k++) begin
        int m, ph;
        m = k >> l;
        ph = k % (1 << l);
        pi_ = (m == 0) ? 0 : ei[m-1]; ci = ei[m];
        pq  = (m == 0) ? 0 : eq[m-1]; cq = eq[m];
        if (got_i[k] != pi_ + (((ci - pi_) * ph) >>> l) ||
            got_q[k] != pq + (((cq - pq) * ph) >>> l)) bad++;
      end
      check("interpolation", bad, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
