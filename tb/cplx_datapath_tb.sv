// cplx_datapath_tb: self-checking test of the complex datapath.
//
// For every operation it streams random operand sets on consecutive clocks
// and compares each result, or the accumulators after the burst, with a
// reference computed here in 64-bit integer arithmetic. It also checks the
// four-cycle latency, that one operand set is accepted per clock, the
// accumulator clear / load from the core, and saturation of written results.
module cplx_datapath_tb;
  import cat_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  cx_op_e      op = CX_DOT;
  logic signed [15:0] a = 0, b = 0, c = 0, d = 0, wr = 0, wi = 0;
  logic [4:0]  shift = 0;
  logic        acc_clr = 0, accr_we = 0, acci_we = 0;
  logic signed [ACC_W-1:0] acc_wdata = 0, accr, acci;
  logic        out_valid;
  logic signed [15:0] x0r, x0i, x1r, x1i;

  cplx_datapath dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int rnd16();
    return int'($urandom_range(0, 65534)) - 32767;
  endfunction

  // expected results, in order
  longint exp_q[$];
  longint ref_accr, ref_acci;
  longint in_cyc, out_cyc;
  bit     first_out;

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // result monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (first_out) begin
        first_out = 0;
        out_cyc = cyc;
      end
      if (exp_q.size() < 4) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        check("x0r", x0r, exp_q.pop_front());
        check("x0i", x0i, exp_q.pop_front());
        check("x1r", x1r, exp_q.pop_front());
        check("x1i", x1i, exp_q.pop_front());
      end
    end
  end

  task automatic burst(cx_op_e o, int n, int sh, bit big);
    longint la, lb, lc, ld, lk, lz, pr, pi;
    first_out = 1;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      op = o; shift = 5'(sh);
      if (big) begin
        a = 16'sh7fff; b = 16'sh7fff; c = 16'sh7fff; d = 16'sh7fff; wr = 16'sh7fff; wi = 16'sh7fff;
      end else begin
        a = 16'(rnd16()); b = 16'(rnd16()); c = 16'(rnd16()); d = 16'(rnd16());
        wr = 16'(rnd16()); wi = 16'(rnd16());
      end
      la = a; lb = b; lc = c; ld = d; lk = wr; lz = wi;
      unique case (o)
        CX_DOT:  begin ref_accr += la*lc + lb*ld; ref_acci += lb*lc - la*ld; end
        CX_NORM: ref_accr += la*la + lb*lb;
        CX_SCALE: begin
          exp_q.push_back(sat16((lk*la - lz*lb) >>> sh));
          exp_q.push_back(sat16((lk*lb + lz*la) >>> sh));
          exp_q.push_back(0); exp_q.push_back(0);
        end
        CX_VADD: begin
          exp_q.push_back(sat16(la + lc)); exp_q.push_back(sat16(lb + ld));
          exp_q.push_back(0); exp_q.push_back(0);
        end
        CX_CMUL: begin
          exp_q.push_back(sat16((la*lc - lb*ld) >>> sh));
          exp_q.push_back(sat16((la*ld + lb*lc) >>> sh));
          exp_q.push_back(0); exp_q.push_back(0);
        end
        CX_BFLY: begin
          pr = (la*lk - lb*lz) >>> sh;
          pi = (lb*lk + la*lz) >>> sh;
          exp_q.push_back(sat16(lc + pr)); exp_q.push_back(sat16(ld + pi));
          exp_q.push_back(sat16(lc - pr)); exp_q.push_back(sat16(ld - pi));
        end
        default: ;
      endcase
      in_valid = 1;
      if (i == 0) in_cyc = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    if (o inside {CX_DOT, CX_NORM}) begin
      check("accr", accr, ref_accr);
      check("acci", acci, ref_acci);
    end else begin
      check("latency", out_cyc - in_cyc, 4);
      check("all results seen", exp_q.size(), 0);
    end
  endtask

  task automatic clear_acc();
    @(negedge clk);
    acc_clr = 1;
    @(negedge clk);
    acc_clr = 0;
    ref_accr = 0;
    ref_acci = 0;
  endtask

  initial begin
    ref_accr = 0; ref_acci = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear_acc();
    burst(CX_DOT, 64, 0, 0);
    clear_acc();
    burst(CX_NORM, 64, 0, 0);
    // load the accumulators from the core, then accumulate on top
    @(negedge clk);
    accr_we = 1; acc_wdata = 40'sd123456789;
    @(negedge clk);
    accr_we = 0; acci_we = 1; acc_wdata = -40'sd987654;
    @(negedge clk);
    acci_we = 0;
    ref_accr = 123456789; ref_acci = -987654;
    check("accr load", accr, ref_accr);
    check("acci load", acci, ref_acci);
    burst(CX_DOT, 16, 0, 0);
    burst(CX_SCALE, 40, 15, 0);
    burst(CX_VADD, 40, 0, 0);
    burst(CX_CMUL, 40, 15, 0);
    burst(CX_BFLY, 40, 15, 0);
    burst(CX_BFLY, 40, 16, 0);
    // saturation: full-scale operands overflow 16 bits
    burst(CX_VADD, 2, 0, 1);
    burst(CX_BFLY, 2, 15, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
