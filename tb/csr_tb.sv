// csr_tb: writes every register of the CSR block with random values and
// checks the decoded outputs (signal generator fields, capture enables,
// radio configuration words), the bus read-back, the read-only status and
// monitor registers, and the tester port to the result registers. The
// pre-distorter table port is checked by logging every dpd_we strobe and
// comparing address and data with the indirect writes that were made.
module csr_tb;
  import cat_pkg::*;
  localparam int N_CFG = 16, N_RES = 8, N_MON = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;
  sg_cfg_t     sg_cfg;
  logic        cap_tx, cap_rx;
  logic        sg_active = 0, ovf_tx = 0, ovf_rx = 0;
  logic [31:0] cfg_o [N_CFG];
  logic [31:0] mon_i [N_MON];
  logic [2:0]  tst_addr = 0;
  logic [31:0] tst_rdata;
  logic        dpd_en, dpd_we;
  logic [15:0] dpd_waddr;
  logic [31:0] dpd_wdata;
  logic [15:0] we_addr [$];
  logic [31:0] we_data [$];

  always @(posedge clk)
    if (rst_n && dpd_we) begin
      we_addr.push_back(dpd_waddr);
      we_data.push_back(dpd_wdata);
    end

  csr #(.N_CFG(N_CFG), .N_RES(N_RES), .N_MON(N_MON)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  task automatic wr(int w, logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b1, addr: 32'h1000_0000 | (32'(w) << 2), wdata: v};
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic rd(int w, output logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h1000_0000 | (32'(w) << 2), wdata: 0};
    @(negedge clk);
    bus_req = '0;
    v = bus_rdata;
  endtask

  logic [31:0] v, x, cfgv [N_CFG], resv [N_RES];
  logic [15:0] a0;
  logic [31:0] dv [8];

  initial begin
    for (int i = 0; i < N_MON; i++) mon_i[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset enable", sg_cfg.enable, 0);
    for (int t = 0; t < 20; t++) begin
      x = $urandom;
      wr(0, x);
      check("sg enable", sg_cfg.enable, x[0]);
      check("sg interp_en", sg_cfg.interp_en, x[1]);
      check("sg interp_log2", sg_cfg.interp_log2, x[3:2]);
      check("sg nseg", sg_cfg.nseg, x[5:4]);
      check("sg seg_bwd", sg_cfg.seg_bwd, x[9:6]);
      check("sg seg_neg", sg_cfg.seg_neg, x[13:10]);
      rd(0, v); check("sg ctrl read", v, x[13:0]);
      x = $urandom; wr(1, x); check("start", sg_cfg.start, x[15:0]);
      x = $urandom; wr(2, x); check("len", sg_cfg.len, x[15:0]);
      x = $urandom; wr(3, x); check("step", sg_cfg.step, x[15:0]);
      x = $urandom; wr(4, x); check("rate", sg_cfg.rate_div, x[15:0]);
      rd(4, v); check("rate read", v, x[15:0]);
      x = $urandom; wr(5, x); check("cap tx", cap_tx, x[0]); check("cap rx", cap_rx, x[1]);
      sg_active = x[5]; ovf_tx = x[6]; ovf_rx = x[7];
      rd(6, v); check("status", v, {x[7:5]});
    end
    for (int i = 0; i < N_CFG; i++) begin cfgv[i] = $urandom; wr(16 + i, cfgv[i]); end
    for (int i = 0; i < N_RES; i++) begin resv[i] = $urandom; wr(32 + i, resv[i]); end
    for (int i = 0; i < N_CFG; i++) begin
      check("cfg out", cfg_o[i], cfgv[i]);
      rd(16 + i, v); check("cfg read", v, cfgv[i]);
    end
    for (int i = 0; i < N_RES; i++) begin
      rd(32 + i, v); check("res read", v, resv[i]);
      @(negedge clk); tst_addr = 3'(i);
      @(negedge clk); check("tester read", tst_rdata, resv[i]);
    end
    for (int i = 0; i < N_MON; i++) begin
      rd(48 + i, v); check("monitor read", v, mon_i[i]);
    end
    // pre-distorter: enable bit, address register and table write strobes
    check("dpd reset", dpd_en, 0);
    x = $urandom; wr(7, x); check("dpd enable", dpd_en, x[0]); rd(7, v); check("dpd ctrl read", v, x[0]);
    wr(7, 1); check("dpd enable on", dpd_en, 1);
    check("no stray strobes", we_addr.size(), 0);
    a0 = 16'($urandom);
    wr(8, 32'(a0));
    rd(8, v); check("dpd addr read", v, a0);
    for (int i = 0; i < 8; i++) begin dv[i] = $urandom; wr(9, dv[i]); end
    check("dpd strobes", we_addr.size(), 8);
    for (int i = 0; i < 8 && we_addr.size() > 0; i++) begin
      check("dpd write addr", we_addr.pop_front(), 16'(a0 + 16'(i)));
      check("dpd write data", we_data.pop_front(), dv[i]);
    end
    rd(8, v); check("dpd addr incremented", v, 16'(a0 + 16'd8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
