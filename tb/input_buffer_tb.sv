// input_buffer_tb: feeds samples from a 37 MHz-like sample clock into the
// buffer while the engine (100 MHz-like clock) reads them over the bus, and
// checks that every captured sample arrives once and in order. It then
// fills the buffer without reading to force an overflow, checks the level
// and the sticky overflow flag, that the stored samples are the first ones,
// and that turning capture off clears the flag and stops capture.
module input_buffer_tb;
  import cat_pkg::*;
  localparam int D = 16;

  logic clk = 0, rst_n = 0, s_clk = 0, s_rst_n = 0;
  always #5 clk = ~clk;
  always #13.5 s_clk = ~s_clk;

  logic        s_valid = 0;
  logic [31:0] s_data = 0;
  logic        capture_en = 0;
  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;
  logic        overflow;
  logic [15:0] level;

  input_buffer #(.DEPTH(D)) dut (.*);

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

  task automatic rd(int w, output logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h4000_0000 | (32'(w) << 2), wdata: 0};
    @(negedge clk);
    bus_req = '0;
    v = bus_rdata;
  endtask

  // sample source: counts while enabled, a sample on about 2 of 3 clocks
  int  sent = 0;
  bit  src_on = 0;
  int  src_limit = 0;
  always @(posedge s_clk) begin
    s_valid <= 0;
    if (src_on && sent < src_limit && $urandom_range(0, 2) != 0) begin
      s_valid <= 1;
      s_data  <= 32'h5A00_0000 + 32'(sent);
      sent    <= sent + 1;
    end
  end

  logic [31:0] v;
  int recv;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; s_rst_n = 1;
    capture_en = 1;
    repeat (10) @(negedge clk);
    src_limit = 300; src_on = 1;
    recv = 0;
    while (recv < 300) begin
      rd(1, v);
      if (!v[30]) begin
        rd(0, v);
        check("stream order", v, 32'h5A00_0000 + 32'(recv));
        recv++;
      end
    end
    rd(1, v);
    check("no overflow while read", v[31], 0);
    check("empty", v[30], 1);
    // overflow: stop reading
    src_on = 0;
    @(posedge s_clk); @(posedge s_clk);
    src_limit = 300 + 40; src_on = 1;
    while (sent < 340) @(negedge clk);
    repeat (20) @(negedge clk);
    rd(1, v);
    check("overflow flag", v[31], 1);
    check("level full", v[15:0], D);
    check("overflow port", overflow, 1);
    for (int i = 0; i < D; i++) begin
      rd(0, v);
      check("kept first samples", v, 32'h5A00_0000 + 32'(300 + i));
    end
    rd(1, v);
    check("empty again", v[30], 1);
    // capture off: flag clears, nothing stored
    capture_en = 0;
    repeat (10) @(negedge clk);   // let the enable reach the sample clock domain
    src_limit = 360;
    repeat (200) @(negedge clk);
    rd(1, v);
    check("flag cleared", v[31], 0);
    check("nothing captured", v[15:0], 0);
    rd(0, v);
    check("empty read returns 0", v, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
