// aes_accel: memory-mapped register wrapper around aes_core, making it an
// accelerator the processor drives through loads and stores.
//
// Word offsets (address bits [5:2]); 128-bit values are four words, the
// first word holding bytes 0..3 with byte 0 in bits [31:24]:
//   0..3  KEY   write/read
//   4..7  DIN   write/read, plaintext or ciphertext
//   8..11 DOUT  read only, result
//   12    CTRL  write: [0] start, [1] decrypt (ignored while busy)
//   13    STATUS read: [0] busy, [1] done (sticky, cleared by start)
// The register layout is this design's choice.
// Timing: bus read data one clock after the request.
module aes_accel
  import cat_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    bus_req,      // already selected
  output logic [31:0] bus_rdata
);

  logic [3:0][31:0] key_q, din_q;
  logic [127:0]     dout;
  logic             busy, done, done_q, start, decrypt;
  logic [3:0]       widx;

  assign widx    = bus_req.addr[5:2];
  assign start   = bus_req.valid && bus_req.we && widx == 4'd12 && bus_req.wdata[0] && !busy;
  assign decrypt = bus_req.wdata[1];

  aes_core u_core (
    .clk, .rst_n, .start, .decrypt,
    .key (key_q),
    .din (din_q),
    .dout, .busy, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q     <= '0;
      din_q     <= '0;
      done_q    <= 1'b0;
      bus_rdata <= '0;
    end else begin
      if (start)     done_q <= 1'b0;
      else if (done) done_q <= 1'b1;
      if (bus_req.valid && bus_req.we) begin
        if (widx < 4'd4)                   key_q[3 - widx[1:0]] <= bus_req.wdata;
        if (widx >= 4'd4 && widx < 4'd8)   din_q[3 - widx[1:0]] <= bus_req.wdata;
      end
      bus_rdata <= '0;
      if (bus_req.valid && !bus_req.we) begin
        if (widx < 4'd4)                    bus_rdata <= key_q[3 - widx[1:0]];
        else if (widx < 4'd8)               bus_rdata <= din_q[3 - widx[1:0]];
        else if (widx < 4'd12)              bus_rdata <= dout[{~widx[1:0], 5'd0} +: 32];
        else if (widx == 4'd13)             bus_rdata <= {30'd0, done_q, busy};
      end
    end
  end

endmodule
