// spm_agu_tb: checks the array pointer against a reference walk: loads of
// pointer and step, forward and backward (negative) steps, wrap-around at the
// end of the address space, and priority of a pointer load over advancing.
module spm_agu_tb;
  localparam int AW = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ld_ptr = 0, ld_step = 0, adv = 0;
  logic [AW-1:0] wdata = 0, ptr, step;

  spm_agu #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_ptr, ref_step;

  task automatic check();
    checks++;
    if (ptr != AW'(ref_ptr) || step != AW'(ref_step)) begin
      failures++;
      $display("FAIL ptr %0d step %0d, want %0d %0d", ptr, step, AW'(ref_ptr), AW'(ref_step));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ref_ptr = 0; ref_step = 1;
    check();
    for (int t = 0; t < 40; t++) begin
      // new pointer and step
      ld_ptr = 1; ld_step = 1;
      wdata = AW'($urandom);
      @(negedge clk);
      ref_ptr = wdata; ref_step = wdata;
      check();
      ld_step = 1; ld_ptr = 0;
      wdata = (t % 2) ? AW'(-(t + 1)) : AW'(t + 2);
      @(negedge clk);
      ld_step = 0;
      ref_step = wdata;
      check();
      for (int i = 0; i < 50; i++) begin
        adv = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (adv) ref_ptr = (ref_ptr + ref_step) % (1 << AW);
        check();
      end
      // load wins over advance
      adv = 1; ld_ptr = 1; wdata = 13'd100;
      @(negedge clk);
      adv = 0; ld_ptr = 0;
      ref_ptr = 100;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
