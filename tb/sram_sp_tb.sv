// sram_sp_tb: random writes and reads against a reference array, checking
// that read data appear one clock after the request and that a disabled
// port neither reads nor writes.
module sram_sp_tb;
  localparam int D = 512;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        en = 0, we = 0;
  logic [8:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;

  sram_sp #(.W(32), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_m [D];
  logic [31:0] last;

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(i); wdata = $urandom; ref_m[i] = wdata;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      we = ($urandom_range(0, 2) == 0);
      addr = 9'($urandom);
      wdata = $urandom;
      if (en && we) ref_m[addr] = wdata;
      if (en && !we) begin
        last = ref_m[addr];
        @(negedge clk);
        en = 0; we = 1; wdata = ~last;   // disabled write must be ignored
        checks++;
        if (rdata !== last) begin
          failures++;
          $display("FAIL read %0d: %h want %h", addr, rdata, last);
        end
        @(negedge clk);
        checks++;
        if (rdata !== last) begin
          failures++;
          $display("FAIL disabled port changed read data");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
