// spm_bank_tb: fills the four SPMs from the core bus, reads them back, then
// checks the branch mapping seen by the complex unit (SPM0/SPM2 on branch 0,
// SPM1/SPM3 on branch 1), simultaneous read and write by the complex unit,
// and that bus accesses are not served while the complex unit owns the SPMs.
module spm_bank_tb;
  import cat_pkg::*;
  localparam int D  = 256;
  localparam int AW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;
  logic        cx_busy = 0, rd_en = 0, we0 = 0, we1 = 0;
  logic [AW-1:0] rd_addr0 = 0, rd_addr1 = 0, wr_addr0 = 0, wr_addr1 = 0;
  logic signed [15:0] rd0r, rd0i, rd1r, rd1i;
  logic signed [15:0] wd0r = 0, wd0i = 0, wd1r = 0, wd1i = 0;

  spm_bank #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
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

  function automatic logic [31:0] adr(int s, int i);
    return 32'h3000_0000 | (32'(s) << 16) | (32'(i) << 2);
  endfunction

  task automatic bwr(int s, int i, logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b1, addr: adr(s, i), wdata: v};
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic brd(int s, int i, output logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b0, addr: adr(s, i), wdata: 0};
    @(negedge clk);
    bus_req = '0;
    v = bus_rdata;
  endtask

  logic signed [15:0] ref_m [4][D];
  logic [31:0] v;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < D; i++) begin
        ref_m[s][i] = 16'($urandom);
        bwr(s, i, 32'($signed(ref_m[s][i])));
      end
    for (int t = 0; t < 200; t++) begin
      int s, i;
      s = $urandom_range(0, 3);
      i = $urandom_range(0, D - 1);
      brd(s, i, v);
      check("bus readback", $signed(v), ref_m[s][i]);
    end
    // complex unit side
    @(negedge clk);
    cx_busy = 1;
    for (int t = 0; t < 200; t++) begin
      int i0, i1, w0, w1;
      i0 = $urandom_range(0, D - 1); i1 = $urandom_range(0, D - 1);
      w0 = $urandom_range(0, D - 1); w1 = $urandom_range(0, D - 1);
      rd_en = 1; rd_addr0 = AW'(i0); rd_addr1 = AW'(i1);
      we0 = (t % 2 == 0); we1 = (t % 3 == 0);
      wr_addr0 = AW'(w0); wr_addr1 = AW'(w1);
      wd0r = 16'($urandom); wd0i = 16'($urandom); wd1r = 16'($urandom); wd1i = 16'($urandom);
      // a bus access at the same time must be ignored
      bus_req = '{valid: 1'b1, we: 1'b1, addr: adr(0, w0 ^ 1), wdata: 32'h1234};
      @(negedge clk);
      check("b0 re", rd0r, ref_m[0][i0]);
      check("b0 im", rd0i, ref_m[2][i0]);
      check("b1 re", rd1r, ref_m[1][i1]);
      check("b1 im", rd1i, ref_m[3][i1]);
      if (we0) begin ref_m[0][w0] = wd0r; ref_m[2][w0] = wd0i; end
      if (we1) begin ref_m[1][w1] = wd1r; ref_m[3][w1] = wd1i; end
    end
    rd_en = 0; we0 = 0; we1 = 0; bus_req = '0;
    @(negedge clk);
    cx_busy = 0;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < D; i++) begin
        brd(s, i, v);
        check("after complex unit", $signed(v), ref_m[s][i]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
