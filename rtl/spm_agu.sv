// spm_agu: one SPM array address generator (Array Ptr + Array Step).
//
// The complex datapath reads a new operand every cycle; to make that possible
// the address of the next operand is computed while the current one is being
// read, as the source describes. The pointer register drives the SPM address
// bus directly; each cycle `adv` is high it is replaced by pointer + step.
// Pointer and step are loaded from, and read back to, the core's general
// purpose registers. The step is a two's-complement value, so arrays can be
// walked backwards, and addresses wrap modulo 2^AW (this design's choice).
//
// Timing: a load (ld_ptr / ld_step) takes effect at the next clock edge and
// has priority over adv for the pointer.
module spm_agu #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_ptr,
  input  logic          ld_step,
  input  logic [AW-1:0] wdata,
  input  logic          adv,
  output logic [AW-1:0] ptr,
  output logic [AW-1:0] step
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      step <= AW'(1);
    end else begin
      if (ld_ptr)   ptr <= wdata;
      else if (adv) ptr <= ptr + step;
      if (ld_step)  step <= wdata;
    end
  end

endmodule
