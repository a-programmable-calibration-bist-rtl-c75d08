// aes_accel_tb: drives the AES accelerator through its bus registers only:
// loads key and block, starts encryption and decryption, polls the status
// register, and checks the result words against the FIPS-197 Appendix C.1
// vector, plus key/data read-back and the done flag being cleared by start.
module aes_accel_tb;
  import cat_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    bus_req = '0;
  logic [31:0] bus_rdata;

  aes_accel dut (.*);

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
    bus_req = '{valid: 1'b1, we: 1'b1, addr: 32'h5000_0000 | (32'(w) << 2), wdata: v};
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic rd(int w, output logic [31:0] v);
    @(negedge clk);
    bus_req = '{valid: 1'b1, we: 1'b0, addr: 32'h5000_0000 | (32'(w) << 2), wdata: 0};
    @(negedge clk);
    bus_req = '0;
    v = bus_rdata;
  endtask

  task automatic run(logic [127:0] k, logic [127:0] x, bit dec, output logic [127:0] y);
    logic [31:0] v;
    int polls;
    for (int i = 0; i < 4; i++) wr(i, k[127 - 32*i -: 32]);
    for (int i = 0; i < 4; i++) wr(4 + i, x[127 - 32*i -: 32]);
    wr(12, {30'd0, dec, 1'b1});
    rd(13, v);
    check("busy after start", v[0], 1);
    check("done cleared by start", v[1], 0);
    polls = 0;
    do begin
      rd(13, v);
      polls++;
    end while (!v[1] && polls < 100);
    check("done", v[1], 1);
    for (int i = 0; i < 4; i++) begin
      rd(8 + i, v);
      y[127 - 32*i -: 32] = v;
    end
  endtask

  logic [127:0] y;
  logic [31:0] v;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0, y);
    check("ciphertext hi", y[127:64], 64'h69c4e0d86a7b0430);
    check("ciphertext lo", y[63:0],   64'hd8cdb78070b4c55a);
    rd(1, v); check("key read-back", v, 32'h04050607);
    rd(6, v); check("data read-back", v, 32'h8899aabb);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, y);
    check("plaintext hi", y[127:64], 64'h0011223344556677);
    check("plaintext lo", y[63:0],   64'h8899aabbccddeeff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
