// cplx_datapath: pipelined complex arithmetic unit of the engine's processor.
//
// Each cycle it accepts one operand set: the complex sample a+bj from SPM
// branch 0, c+dj from branch 1, and the weight k+zj held in the Weight R/I
// registers. Following the structure of the source's datapath figure, the
// operands pass a first crossbar that also offers their negated values, four
// multipliers, a second crossbar feeding two adders (real and imaginary sum),
// and a third crossbar feeding four final adders. Those adders either close
// the loop through the Acc R / Acc I registers (dot product, squared norm) or
// produce up to four words for the SPM write data bus (vector scaling, vector
// addition, complex multiply, radix-2 butterfly). The set of operations is the
// source's; the exact crossbar settings, the fixed-point scaling and the
// pipeline depth are this design's own.
//
// Fixed point: samples and weights are signed 16-bit. Products are full
// 32-bit; sums are carried at 33 bits and accumulated at ACC_W bits. Results
// written to the SPMs are arithmetic-shifted right by `shift` (not for vector
// addition, which multiplies by one) and saturated to 16 bits. In the
// butterfly the shift applies to the product before it is added to c+dj.
//
// Timing: fully pipelined, one operand set per clock. in_valid at cycle t
// gives out_valid (and the accumulator update) at the end of cycle t+3
// (LAT = 4 register stages). Accumulator clear / load from the core has
// priority over an update in the same cycle.
module cplx_datapath
  import cat_pkg::*;
#(
  parameter int unsigned W  = SMP_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // operands
  input  logic                 in_valid,
  input  cx_op_e               op,
  input  logic signed [W-1:0]  a, b,      // branch 0: real, imaginary
  input  logic signed [W-1:0]  c, d,      // branch 1: real, imaginary
  input  logic signed [W-1:0]  wr, wi,    // Weight R / Weight I
  input  logic        [4:0]    shift,
  // accumulator access from the core's general purpose registers
  input  logic                 acc_clr,
  input  logic                 accr_we, acci_we,
  input  logic signed [AW-1:0] acc_wdata,
  output logic signed [AW-1:0] accr, acci,
  // results towards the SPM write data bus
  output logic                 out_valid,
  output logic signed [W-1:0]  x0r, x0i,  // first result (branch 0 for most ops)
  output logic signed [W-1:0]  x1r, x1i   // second butterfly output
);

  localparam int unsigned PW = 2*W;      // product width
  localparam int unsigned SW = 2*W + 1;  // sum width

  // ---------------------------------------------------------------- stage 1: crossbar 1
  logic signed [W-1:0] mx [4];
  logic signed [W-1:0] my [4];
  logic signed [W-1:0] mx_q [4], my_q [4];
  logic signed [W-1:0] c1_q, d1_q;
  logic                v1_q;
  cx_op_e              op1_q;

  // -x for the most negative value would overflow; it saturates instead.
  function automatic logic signed [W-1:0] neg(input logic signed [W-1:0] v);
    if (v == {1'b1, {(W-1){1'b0}}}) return {1'b0, {(W-1){1'b1}}};
    return -v;
  endfunction

  localparam logic signed [W-1:0] ONE = W'(1);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      mx[i] = '0;
      my[i] = '0;
    end
    unique case (op)
      CX_DOT: begin   // (a+bj)(c-dj): re = ac+bd, im = bc-ad
        mx[0] = a;      my[0] = c;
        mx[1] = b;      my[1] = d;
        mx[2] = b;      my[2] = c;
        mx[3] = neg(a); my[3] = d;
      end
      CX_SCALE: begin // (k+zj)(a+bj): re = ka-zb, im = kb+za
        mx[0] = a;      my[0] = wr;
        mx[1] = b;      my[1] = neg(wi);
        mx[2] = b;      my[2] = wr;
        mx[3] = a;      my[3] = wi;
      end
      CX_VADD: begin  // (a+c) + (b+d)j through unit multipliers
        mx[0] = a;      my[0] = ONE;
        mx[1] = c;      my[1] = ONE;
        mx[2] = b;      my[2] = ONE;
        mx[3] = d;      my[3] = ONE;
      end
      CX_NORM: begin  // a^2 + b^2
        mx[0] = a;      my[0] = a;
        mx[1] = b;      my[1] = b;
      end
      CX_BFLY: begin  // product (a+bj)(k+zj), added to / subtracted from c+dj
        mx[0] = a;      my[0] = wr;
        mx[1] = b;      my[1] = neg(wi);
        mx[2] = b;      my[2] = wr;
        mx[3] = a;      my[3] = wi;
      end
      CX_CMUL: begin  // (a+bj)(c+dj): re = ac-bd, im = ad+bc
        mx[0] = a;      my[0] = c;
        mx[1] = neg(b); my[1] = d;
        mx[2] = a;      my[2] = d;
        mx[3] = b;      my[3] = c;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q  <= 1'b0;
      op1_q <= CX_DOT;
      c1_q  <= '0;
      d1_q  <= '0;
      for (int i = 0; i < 4; i++) begin
        mx_q[i] <= '0;
        my_q[i] <= '0;
      end
    end else begin
      v1_q  <= in_valid;
      op1_q <= op;
      c1_q  <= c;
      d1_q  <= d;
      for (int i = 0; i < 4; i++) begin
        mx_q[i] <= mx[i];
        my_q[i] <= my[i];
      end
    end
  end

  // ---------------------------------------------------------------- stage 2: multipliers
  logic signed [PW-1:0] p_q [4];
  logic signed [W-1:0]  c2_q, d2_q;
  logic                 v2_q;
  cx_op_e               op2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2_q  <= 1'b0;
      op2_q <= CX_DOT;
      c2_q  <= '0;
      d2_q  <= '0;
      for (int i = 0; i < 4; i++) p_q[i] <= '0;
    end else begin
      v2_q  <= v1_q;
      op2_q <= op1_q;
      c2_q  <= c1_q;
      d2_q  <= d1_q;
      for (int i = 0; i < 4; i++) p_q[i] <= mx_q[i] * my_q[i];
    end
  end

  // ---------------------------------------------------------------- stage 3: two adders
  logic signed [SW-1:0] sr_q, si_q;
  logic signed [W-1:0]  c3_q, d3_q;
  logic                 v3_q;
  cx_op_e               op3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3_q  <= 1'b0;
      op3_q <= CX_DOT;
      sr_q  <= '0;
      si_q  <= '0;
      c3_q  <= '0;
      d3_q  <= '0;
    end else begin
      v3_q  <= v2_q;
      op3_q <= op2_q;
      sr_q  <= SW'(p_q[0]) + SW'(p_q[1]);
      si_q  <= SW'(p_q[2]) + SW'(p_q[3]);
      c3_q  <= c2_q;
      d3_q  <= d2_q;
    end
  end

  // ---------------------------------------------------------------- stage 4: final adders
  localparam logic signed [SW:0] SMAX = {{(SW-W+2){1'b0}}, {(W-1){1'b1}}};
  localparam logic signed [SW:0] SMIN = {{(SW-W+2){1'b1}}, {(W-1){1'b0}}};

  function automatic logic signed [W-1:0] sat(input logic signed [SW:0] v);
    if (v > SMAX) return {1'b0, {(W-1){1'b1}}};
    if (v < SMIN) return {1'b1, {(W-1){1'b0}}};
    return v[W-1:0];
  endfunction

  logic signed [SW-1:0] tr, ti;           // shifted sums
  logic signed [SW:0]   f0r, f0i, f1r, f1i;
  logic                 acc_upd;

  always_comb begin
    tr = sr_q >>> shift;
    ti = si_q >>> shift;
    f0r = (SW+1)'(tr);
    f0i = (SW+1)'(ti);
    f1r = '0;
    f1i = '0;
    acc_upd = 1'b0;
    unique case (op3_q)
      CX_DOT, CX_NORM: acc_upd = v3_q;
      CX_VADD: begin
        f0r = (SW+1)'(sr_q);
        f0i = (SW+1)'(si_q);
      end
      CX_BFLY: begin
        f0r = (SW+1)'(c3_q) + (SW+1)'(tr);
        f0i = (SW+1)'(d3_q) + (SW+1)'(ti);
        f1r = (SW+1)'(c3_q) - (SW+1)'(tr);
        f1i = (SW+1)'(d3_q) - (SW+1)'(ti);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x0r <= '0; x0i <= '0; x1r <= '0; x1i <= '0;
      accr <= '0;
      acci <= '0;
    end else begin
      out_valid <= v3_q && !(op3_q inside {CX_DOT, CX_NORM});
      x0r <= sat(f0r);
      x0i <= sat(f0i);
      x1r <= sat(f1r);
      x1i <= sat(f1i);
      if (acc_clr) begin
        accr <= '0;
        acci <= '0;
      end else begin
        if (accr_we)      accr <= acc_wdata;
        else if (acc_upd) accr <= accr + AW'(sr_q);
        if (acci_we)      acci <= acc_wdata;
        else if (acc_upd) acci <= acci + AW'(si_q);
      end
    end
  end

endmodule
