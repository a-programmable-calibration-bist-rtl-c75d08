// input_buffer: sample capture buffer between a DFE filtering chain and the
// engine (one instance for the Tx chain, one for the Rx chain).
//
// The filtering chains produce samples at their own rates in their own clock
// domain; the buffer stores them and lets the core read them at the engine
// clock, decoupling the two rates. It is an asynchronous FIFO with Gray-coded
// pointers passed through two-flop synchronisers. Capture runs while the
// CSR's capture enable is set (synchronised into the sample clock); a sample
// arriving when the FIFO is full is dropped and sets a sticky overflow flag,
// which is cleared by turning capture off. Storing decoupled samples is the
// source's; the FIFO organisation, depth and flags are this design's choice.
//
// Core bus registers (word offsets): 0 DATA, a read pops one sample (0 when
// empty); 1 STATUS, [31] overflow, [30] empty, [15:0] fill level.
// Timing: bus read data one clock after the request. A written sample is
// visible to the reader three to four engine clocks later.
module input_buffer
  import cat_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  // sample side (DFE clock domain)
  input  logic        s_clk,
  input  logic        s_rst_n,
  input  logic        s_valid,
  input  logic [31:0] s_data,     // I in [31:16], Q in [15:0]
  // engine side
  input  logic        clk,
  input  logic        rst_n,
  input  logic        capture_en,
  input  bus_req_t    bus_req,    // already selected
  output logic [31:0] bus_rdata,
  output logic        overflow,
  output logic [15:0] level
);

  logic [31:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [AW:0] rgray_q;   // read pointer, Gray coded (engine domain)

  // ---------------------------------------------------------------- write side
  logic [AW:0] wbin_q, wgray_q, rgray_s1, rgray_s2;
  logic        cap_s1, cap_s2, ovf_w_q;
  logic        full;

  assign full = (wgray_q == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  always_ff @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
      cap_s1   <= 1'b0;
      cap_s2   <= 1'b0;
      ovf_w_q  <= 1'b0;
    end else begin
      rgray_s1 <= rgray_q;
      rgray_s2 <= rgray_s1;
      cap_s1   <= capture_en;
      cap_s2   <= cap_s1;
      if (!cap_s2) ovf_w_q <= 1'b0;
      if (s_valid && cap_s2) begin
        if (full) ovf_w_q <= 1'b1;
        else begin
          wbin_q  <= wbin_q + 1'b1;
          wgray_q <= bin2gray(wbin_q + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge s_clk) begin
    if (s_valid && cap_s2 && !full) mem[wbin_q[AW-1:0]] <= s_data;
  end

  // ---------------------------------------------------------------- read side
  logic [AW:0] rbin_q, wgray_s1, wgray_s2, wbin_r;
  logic        ovf_s1, ovf_s2;
  logic        empty, pop, rd_data_q, rd_stat_q;
  logic [31:0] rdata_q;

  assign wbin_r = gray2bin(wgray_s2);
  assign empty  = (rgray_q == wgray_s2);
  assign level  = 16'(wbin_r - rbin_q);
  assign overflow = ovf_s2;
  assign pop    = bus_req.valid && !bus_req.we && bus_req.addr[2] == 1'b0 && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin_q    <= '0;
      rgray_q   <= '0;
      wgray_s1  <= '0;
      wgray_s2  <= '0;
      ovf_s1    <= 1'b0;
      ovf_s2    <= 1'b0;
      rd_data_q <= 1'b0;
      rd_stat_q <= 1'b0;
    end else begin
      wgray_s1  <= wgray_q;
      wgray_s2  <= wgray_s1;
      ovf_s1    <= ovf_w_q;
      ovf_s2    <= ovf_s1;
      rd_data_q <= pop;
      rd_stat_q <= bus_req.valid && !bus_req.we && bus_req.addr[2] == 1'b1;
      if (pop) begin
        rbin_q  <= rbin_q + 1'b1;
        rgray_q <= bin2gray(rbin_q + 1'b1);
      end
    end
  end

  logic [31:0] stat_q;
  always_ff @(posedge clk) begin
    if (pop) rdata_q <= mem[rbin_q[AW-1:0]];
    stat_q <= {overflow, empty, 14'd0, level};
  end

  assign bus_rdata = rd_data_q ? rdata_q : (rd_stat_q ? stat_q : '0);

endmodule
