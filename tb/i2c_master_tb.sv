// i2c_master_tb: an I2C target model in this testbench decodes START,
// address, register and data bytes and STOP from the open-drain lines and
// acknowledges each byte when the device address is 0x52. The test checks
// the decoded bytes of several register writes, the NACK flag for a wrong
// device address, and the length of a transaction (29 symbols of 4*DIV
// clocks).
module i2c_master_tb;
  import cat_pkg::*;
  localparam int DIV = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;
  logic        scl_oe, sda_oe, sda_i;

  i2c_master #(.DIV(DIV)) dut (.*);

  // wired-AND lines
  logic scl, sda, tgt_pull;
  assign scl   = !scl_oe;
  assign sda   = !(sda_oe || tgt_pull);
  assign sda_i = sda;

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
      $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  // ---------------------------------------------------------------- target model
  logic scl_d = 1, sda_d = 1;
  int   nbits = 0;
  logic [26:0] bits;
  int   starts = 0, stops = 0;
  bit   addr_ok = 0;
  initial tgt_pull = 0;
  always @(posedge clk) begin
    scl_d <= scl;
    sda_d <= sda;
    if (scl && scl_d && sda_d && !sda) begin starts++; nbits = 0; end
    if (scl && scl_d && !sda_d && sda) stops++;
    if (scl && !scl_d) begin          // rising SCL: sample
      if (nbits < 27) bits[26 - nbits] = sda;
      nbits++;
    end
    if (!scl && scl_d) begin          // falling SCL: drive ACK slot
      tgt_pull <= 0;
      if (nbits == 8) addr_ok = (bits[26:20] == 7'h52);
      if ((nbits == 8 || nbits == 17 || nbits == 26) && (nbits == 8 ? bits[26:20] == 7'h52 : addr_ok))
        tgt_pull <= 1;
    end
  end

  task automatic wr(int w, logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b1, addr: 32'h6000_0000 | (32'(w) << 2), wdata: v};
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic rd(int w, output logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h6000_0000 | (32'(w) << 2), wdata: 0};
    @(negedge clk);
    bus_req = '0;
    v = bus_rdata;
  endtask

  task automatic xfer(logic [6:0] dev, logic [7:0] r, logic [7:0] d, bit expect_ack);
    logic [31:0] v;
    int cyc, s0, p0;
    s0 = starts; p0 = stops;
    wr(0, {1'b0, dev, 8'd0, r, d});
    cyc = 1;
    do begin
      rd(1, v);
      cyc += 2;
    end while (v[0] && cyc < 5000);
    check("transaction length", (cyc >= 4*DIV*29) && (cyc <= 4*DIV*29 + 4), 1);
    check("one start", starts - s0, 1);
    check("one stop", stops - p0, 1);
    check("address byte", bits[26:19], {dev, 1'b0});
    check("register byte", bits[17:10], r);
    check("data byte", bits[8:1], d);
    check("nack flag", v[1], !expect_ack);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check("idle lines", {scl, sda}, 2'b11);
    for (int t = 0; t < 6; t++) xfer(7'h52, 8'($urandom), 8'($urandom), 1);
    xfer(7'h31, 8'h10, 8'hA5, 0);
    xfer(7'h52, 8'h11, 8'h5A, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
