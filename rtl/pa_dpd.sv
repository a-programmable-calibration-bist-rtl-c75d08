// pa_dpd: look-up-table pre-distorter for the power amplifier in the Tx path.
//
// What it does: each outgoing complex sample x(n) is replaced by
//     y(n) = sum_{m=0}^{TAPS-1} G_m[ idx(n) ] * x(n-m)
// where idx(n) is the power |x(n)|^2 = I^2 + Q^2 quantised to LUT_AW bits
// (its top bits), and G_m is a table of complex gains, one table per memory
// tap. The calibration software computes the kernels of a truncated Volterra
// model, folds the power terms into the tables and writes them here; the
// hardware only indexes the tables by power and multiplies the outputs with
// the current and delayed samples. That split (tables indexed by power, their
// outputs multiplied with the memory terms) follows the source; the number of
// taps, the table size, indexing by the power of the newest sample and the
// gain format are this design's choices.
//
// Interface:
//   en          0: bypass, out = in combinationally (no latency);
//               1: pre-distort, out is valid 3 clocks after in_valid.
//   in_valid/in_i/in_q    16-bit signed samples, one per clock at most.
//   lut_we/lut_addr/lut_wdata  table write port, lut_addr = {tap, index},
//               lut_wdata = {G_q, G_i}, each signed Q2.14 (16384 = 1.0).
// After reset tap 0 holds 1.0 everywhere and the other taps 0, so an enabled
// but unprogrammed pre-distorter passes samples unchanged after 3 clocks.
// Results are rounded down (arithmetic shift) and saturated to 16 bits.
module pa_dpd #(
  parameter int unsigned TAPS   = 2,
  parameter int unsigned LUT_AW = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [15:0] in_i,
  input  logic [15:0] in_q,
  output logic        out_valid,
  output logic [15:0] out_i,
  output logic [15:0] out_q,
  input  logic        lut_we,
  input  logic [$clog2(TAPS)+LUT_AW-1:0] lut_addr,
  input  logic [31:0] lut_wdata
);

  localparam int unsigned ENTRIES = TAPS << LUT_AW;
  localparam int unsigned TW = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam logic signed [39:0] SMAX = 40'sd32767;
  localparam logic signed [39:0] SMIN = -40'sd32768;

  logic [31:0] lut_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++)
        lut_q[e] <= (e < (1 << LUT_AW)) ? 32'h0000_4000 : 32'h0;
    end else if (lut_we) begin
      lut_q[lut_addr] <= lut_wdata;
    end
  end

  // power index of the incoming sample
  logic signed [31:0] xi, xq;
  logic        [31:0] pw;
  assign xi = 32'($signed(in_i));
  assign xq = 32'($signed(in_q));
  assign pw = 32'(xi * xi + xq * xq);

  // stage 1: sample history and index
  logic               v1, v2;
  logic [15:0]        hist_i [TAPS];
  logic [15:0]        hist_q [TAPS];
  logic [LUT_AW-1:0]  idx1;
  // stage 2: gains and the matching samples
  logic [31:0]        g2   [TAPS];
  logic [15:0]        x2_i [TAPS];
  logic [15:0]        x2_q [TAPS];
  // stage 3: result
  logic               v3;
  logic [15:0]        y_i, y_q;

  function automatic logic [15:0] sat16(logic signed [39:0] v);
    if (v > SMAX) return 16'h7fff;
    if (v < SMIN) return 16'h8000;
    return v[15:0];
  endfunction

  logic signed [39:0] acc_i, acc_q;
  logic signed [39:0] gr, gq, sr, sq;
  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int m = 0; m < int'(TAPS); m++) begin
      gr = 40'($signed(g2[m][15:0]));
      gq = 40'($signed(g2[m][31:16]));
      sr = 40'($signed(x2_i[m]));
      sq = 40'($signed(x2_q[m]));
      acc_i += gr * sr - gq * sq;
      acc_q += gr * sq + gq * sr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      idx1 <= '0;
      y_i <= '0;
      y_q <= '0;
      for (int m = 0; m < int'(TAPS); m++) begin
        hist_i[m] <= '0;
        hist_q[m] <= '0;
        g2[m]     <= '0;
        x2_i[m]   <= '0;
        x2_q[m]   <= '0;
      end
    end else begin
      v1 <= in_valid && en;
      if (in_valid && en) begin
        hist_i[0] <= in_i;
        hist_q[0] <= in_q;
        for (int m = 1; m < int'(TAPS); m++) begin
          hist_i[m] <= hist_i[m-1];
          hist_q[m] <= hist_q[m-1];
        end
        idx1 <= pw[31 -: LUT_AW];
      end
      v2 <= v1;
      for (int m = 0; m < int'(TAPS); m++) begin
        g2[m]   <= lut_q[{TW'(m), idx1}];
        x2_i[m] <= hist_i[m];
        x2_q[m] <= hist_q[m];
      end
      v3 <= v2;
      y_i <= sat16(acc_i >>> 14);
      y_q <= sat16(acc_q >>> 14);
    end
  end

  assign out_valid = en ? v3  : in_valid;
  assign out_i     = en ? y_i : in_i;
  assign out_q     = en ? y_q : in_q;

endmodule
