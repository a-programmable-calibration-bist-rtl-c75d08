// sram_sp: single-port synchronous RAM used for the processor's instruction
// memory (IRAM) and data memory (DRAM).
//
// One access per clock: a write stores wdata at addr; a read returns the word
// at addr one clock later. The source names these memories and says they
// were deliberately oversized; their organisation and size here are this
// design's choice (32-bit words, 8192 words = 32 KiB each by default).
module sram_sp #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
