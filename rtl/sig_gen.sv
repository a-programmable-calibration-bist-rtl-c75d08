// sig_gen: stimulus signal generator, a memory-mapped accelerator of the core.
//
// A sample memory holds complex samples (I in bits [31:16], Q in [15:0], both
// signed 16-bit) written by the core. A small register set (sg_cfg_t, held in
// the CSR block) tells the address generator how to play them: a pattern of
// up to four segments, each reading `len` samples starting at `start` with an
// address increment of `step`, forward or backward, with or without inverting
// the sign. The pattern repeats while `enable` stays set. A quarter-period
// sine table played as forward, backward, forward inverted, backward inverted
// gives a full sine; step = 2 plays every other sample and so doubles the
// tone frequency. One output sample is produced every rate_div+1 clocks.
// Optionally a linear interpolator inserts 2^interp_log2 - 1 points between
// consecutive memory samples, so a short table can be played at a higher
// rate. These capabilities are the source's; the segment-list encoding,
// the linear interpolation and the exact timing are this design's.
//
// Data path: address generator -> memory -> sign change -> mux (direct or
// interpolator) -> output register.
//
// Timing: a tick (rate counter wrap) reads the memory; out_valid is high for
// one clock, two clocks after the tick. With interpolation the output lags
// the memory by one sample: the k-th of L outputs between memory samples
// s[m-1] and s[m] is s[m-1] + ((s[m]-s[m-1])*k >>> log2 L). The first tick
// comes one clock after enable is set.
module sig_gen
  import cat_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sg_cfg_t        cfg,
  // core bus access to the sample memory (already selected)
  input  bus_req_t       bus_req,
  output logic [31:0]    bus_rdata,
  // stimulus towards the Tx digital front end
  output logic           out_valid,
  output logic [15:0]    out_i,
  output logic [15:0]    out_q,
  output logic           active
);

  logic [31:0] mem [DEPTH];

  // ---------------------------------------------------------------- address generator
  logic          run_q;
  logic [15:0]   div_q;
  logic [1:0]    seg_q;
  logic [15:0]   idx_q;
  logic [AW-1:0] addr_q;
  logic [2:0]    k_q;          // interpolation phase
  logic [2:0]    k_last;
  logic          tick;

  assign k_last = cfg.interp_en ? 3'((4'd1 << cfg.interp_log2) - 4'd1) : 3'd0;
  assign tick   = run_q && (div_q == cfg.rate_div);
  assign active = run_q;

  // first address of segment s
  function automatic logic [AW-1:0] seg_first(input logic [1:0] s);
    if (cfg.seg_bwd[s]) return AW'(cfg.start + (cfg.len - 16'd1) * cfg.step);
    return AW'(cfg.start);
  endfunction

  logic fetch;
  assign fetch = tick && (k_q == 3'd0);

  logic [1:0] seg_nx;
  assign seg_nx = (seg_q == cfg.nseg) ? 2'd0 : seg_q + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      div_q  <= '0;
      seg_q  <= '0;
      idx_q  <= '0;
      addr_q <= '0;
      k_q    <= '0;
    end else if (!cfg.enable) begin
      run_q  <= 1'b0;
      div_q  <= '0;
      seg_q  <= '0;
      idx_q  <= '0;
      addr_q <= seg_first(2'd0);
      k_q    <= '0;
    end else begin
      run_q <= 1'b1;
      if (run_q) div_q <= tick ? '0 : div_q + 16'd1;
      if (tick) k_q <= (k_q == k_last) ? 3'd0 : k_q + 3'd1;
      if (fetch) begin
        if (idx_q == cfg.len - 16'd1) begin
          idx_q  <= '0;
          seg_q  <= seg_nx;
          addr_q <= seg_first(seg_nx);
        end else begin
          idx_q  <= idx_q + 16'd1;
          addr_q <= cfg.seg_bwd[seg_q] ? addr_q - AW'(cfg.step) : addr_q + AW'(cfg.step);
        end
      end
    end
  end

  // ---------------------------------------------------------------- memory
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  logic [31:0]   rd_data;
  assign rd_en   = run_q ? fetch : (bus_req.valid && !bus_req.we);
  assign rd_addr = run_q ? addr_q : bus_req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (bus_req.valid && bus_req.we) mem[bus_req.addr[AW+1:2]] <= bus_req.wdata;
  end

  logic bus_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rd_q <= 1'b0;
    else        bus_rd_q <= bus_req.valid && !bus_req.we && !run_q;
  end
  assign bus_rdata = bus_rd_q ? rd_data : '0;

  // ---------------------------------------------------------------- sign change
  logic       tick1_q, fetch1_q, neg1_q;
  logic [2:0] k1_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick1_q  <= 1'b0;
      fetch1_q <= 1'b0;
      neg1_q   <= 1'b0;
      k1_q     <= '0;
    end else begin
      tick1_q  <= tick;
      fetch1_q <= fetch;
      neg1_q   <= cfg.seg_neg[seg_q];
      k1_q     <= k_q;
    end
  end

  function automatic logic signed [15:0] sneg(input logic signed [15:0] v, input logic n);
    if (!n) return v;
    if (v == 16'sh8000) return 16'sh7fff;
    return -v;
  endfunction

  logic signed [15:0] si, sq;
  assign si = sneg(rd_data[31:16], neg1_q);
  assign sq = sneg(rd_data[15:0], neg1_q);

  // ---------------------------------------------------------------- interpolator
  logic signed [15:0] prev_i, prev_q, cur_i, cur_q;
  logic signed [15:0] p_i, p_q, c_i, c_q;   // values after this cycle's update
  logic signed [19:0] ip_i, ip_q;

  always_comb begin
    p_i = prev_i; p_q = prev_q; c_i = cur_i; c_q = cur_q;
    if (fetch1_q) begin
      p_i = cur_i; p_q = cur_q; c_i = si; c_q = sq;
    end
    ip_i = 20'(p_i) + ((20'(c_i) - 20'(p_i)) * $signed({1'b0, k1_q}) >>> cfg.interp_log2);
    ip_q = 20'(p_q) + ((20'(c_q) - 20'(p_q)) * $signed({1'b0, k1_q}) >>> cfg.interp_log2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_i <= '0; prev_q <= '0; cur_i <= '0; cur_q <= '0;
      out_valid <= 1'b0;
      out_i <= '0;
      out_q <= '0;
    end else begin
      if (!cfg.enable) begin
        prev_i <= '0; prev_q <= '0; cur_i <= '0; cur_q <= '0;
      end else begin
        prev_i <= p_i; prev_q <= p_q; cur_i <= c_i; cur_q <= c_q;
      end
      out_valid <= tick1_q;
      if (tick1_q) begin
        if (cfg.interp_en) begin
          out_i <= ip_i[15:0];
          out_q <= ip_q[15:0];
        end else begin
          out_i <= si;
          out_q <= sq;
        end
      end
    end
  end

endmodule
