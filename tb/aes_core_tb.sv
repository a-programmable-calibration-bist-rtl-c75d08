// aes_core_tb: checks AES-128 encryption and decryption against the FIPS-197
// example vectors (Appendix B and C.1), decryption of encrypted random
// blocks, and the start-to-done latency of both directions.
module aes_core_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start = 0, decrypt = 0;
  logic [127:0] key = 0, din = 0, dout;
  logic         busy, done;

  aes_core dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] x, input bit dec,
                     output logic [127:0] y, output int lat);
    @(negedge clk);
    key = k; din = x; decrypt = dec; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    y = dout;
  endtask

  task automatic check(string what, logic [127:0] got, logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  logic [127:0] y, z, k, p;
  int lat;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0, y, lat);
    check("C.1 encrypt", y, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    checks++; if (lat != 11) begin failures++; $display("FAIL encrypt latency %0d", lat); end
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, y, lat);
    check("C.1 decrypt", y, 128'h00112233445566778899aabbccddeeff);
    checks++; if (lat != 21) begin failures++; $display("FAIL decrypt latency %0d", lat); end
    // FIPS-197 Appendix B
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 0, y, lat);
    check("B encrypt", y, 128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, 1, y, lat);
    check("B decrypt", y, 128'h3243f6a8885a308d313198a2e0370734);
    // round trips
    for (int i = 0; i < 20; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, 0, y, lat);
      run(k, y, 1, z, lat);
      check("round trip", z, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
