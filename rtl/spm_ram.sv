// spm_ram: one signal processing memory (SPM), DEPTH words of W bits.
//
// One synchronous read port and one write port, so the complex unit can read
// the next operands while it writes back earlier results in the same cycle.
// Read data appear one clock after rd_en; a read of the address being written
// in the same cycle returns the old word. The two-port organisation is this
// design's choice; the source gives neither the port count nor the depth.
module spm_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (we)    mem[wr_addr] <= wr_data;
  end

endmodule
