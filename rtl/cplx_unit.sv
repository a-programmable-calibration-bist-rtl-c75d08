// cplx_unit: the processor's accelerated complex-array instructions.
//
// This unit gathers what the source draws around the complex datapath: a
// control block, the two SPM array pointers with their steps, and the
// datapath itself. The core moves values between its general purpose
// registers and the unit's registers (cx_req / cx_rdata, numbered as in
// cat_pkg CXR_*) and starts an operation by writing CXR_CTRL. From then on
// the unit reads one complex element from each branch per clock: branch 0
// (SPM0 real, SPM2 imaginary) at Array Ptr 1 and branch 1 (SPM1 real, SPM3
// imaginary) at Array Ptr 2, while the pointers advance by their steps for
// the next cycle. Results that go back to memory are written in place:
// scaled, added and multiplied vectors over the branch-0 operand, butterfly
// outputs x0 over the branch-1 operand and x1 over the branch-0 operand. The
// in-place write-back and the register encoding are this design's choices.
//
// CXR_CTRL write data: [2:0] operation (cx_op_e), [3] clear Acc R/I first.
// Writes to other registers while busy are ignored.
//
// Timing: with LEN = N the unit is busy for N + 5 cycles after the cycle in
// which CTRL is written: N read cycles, one cycle of synchronous SPM read, and
// four datapath stages. cx_rdata answers a read one cycle after the request.
// An assertion checks that the core never writes a register while the unit
// is busy. Its reset qualifier (disable iff) is what lint tools report as
// rst_n being used both synchronously and asynchronously; no flop uses it so.
module cplx_unit
  import cat_pkg::*;
#(
  parameter int unsigned AW = 13   // SPM address width (8192 words)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // register port from the core's custom instructions
  input  bus_req_t               cx_req,
  output logic [31:0]            cx_rdata,
  output logic                   busy,
  // SPM read ports (synchronous: data one cycle after rd_en)
  output logic                   rd_en,
  output logic [AW-1:0]          rd_addr0,   // branch 0
  output logic [AW-1:0]          rd_addr1,   // branch 1
  input  logic signed [SMP_W-1:0] rd0r, rd0i, rd1r, rd1i,
  // SPM write ports
  output logic                   we0,
  output logic [AW-1:0]          wr_addr0,
  output logic signed [SMP_W-1:0] wd0r, wd0i,
  output logic                   we1,
  output logic [AW-1:0]          wr_addr1,
  output logic signed [SMP_W-1:0] wd1r, wd1i
);

  localparam int unsigned DLY = 5;   // issue -> result cycles

  // ---------------------------------------------------------------- registers
  cx_op_e              op_q;
  logic [AW:0]         cnt_q;        // elements still to issue
  logic [15:0]         len_q;
  logic signed [15:0]  wr_q, wi_q;
  logic [4:0]          shift_q;
  logic [DLY-1:0]      inflight_q;

  logic reg_wr;
  assign reg_wr = cx_req.valid && cx_req.we && !busy;

  logic issue;
  assign issue = (cnt_q != 0);
  assign busy  = issue || (inflight_q != '0);

  logic ld_ptr1, ld_ptr2, ld_step1, ld_step2;
  assign ld_ptr1  = reg_wr && cx_req.addr[3:0] == CXR_PTR1;
  assign ld_ptr2  = reg_wr && cx_req.addr[3:0] == CXR_PTR2;
  assign ld_step1 = reg_wr && cx_req.addr[3:0] == CXR_STEP1;
  assign ld_step2 = reg_wr && cx_req.addr[3:0] == CXR_STEP2;

  logic [AW-1:0] ptr1, ptr2, step1, step2;

  spm_agu #(.AW(AW)) u_agu1 (
    .clk, .rst_n, .ld_ptr(ld_ptr1), .ld_step(ld_step1), .wdata(cx_req.wdata[AW-1:0]),
    .adv(issue), .ptr(ptr1), .step(step1)
  );
  spm_agu #(.AW(AW)) u_agu2 (
    .clk, .rst_n, .ld_ptr(ld_ptr2), .ld_step(ld_step2), .wdata(cx_req.wdata[AW-1:0]),
    .adv(issue), .ptr(ptr2), .step(step2)
  );

  logic start, acc_clr;
  assign start   = reg_wr && cx_req.addr[3:0] == CXR_CTRL;
  assign acc_clr = start && cx_req.wdata[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= CX_DOT;
      cnt_q      <= '0;
      len_q      <= '0;
      wr_q       <= '0;
      wi_q       <= '0;
      shift_q    <= '0;
      inflight_q <= '0;
    end else begin
      inflight_q <= {inflight_q[DLY-2:0], issue};
      if (issue) cnt_q <= cnt_q - 1'b1;
      if (reg_wr) begin
        unique case (cx_req.addr[3:0])
          CXR_CTRL: begin
            op_q  <= cx_op_e'(cx_req.wdata[2:0]);
            cnt_q <= (AW+1)'(len_q);
          end
          CXR_LEN:   len_q   <= cx_req.wdata[15:0];
          CXR_WR:    wr_q    <= cx_req.wdata[15:0];
          CXR_WI:    wi_q    <= cx_req.wdata[15:0];
          CXR_SHIFT: shift_q <= cx_req.wdata[4:0];
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- SPM reads
  assign rd_en    = issue;
  assign rd_addr0 = ptr1;
  assign rd_addr1 = ptr2;

  // write-back addresses follow the read addresses through the pipeline
  logic [AW-1:0] a0_dly [DLY];
  logic [AW-1:0] a1_dly [DLY];
  always_ff @(posedge clk) begin
    a0_dly[0] <= ptr1;
    a1_dly[0] <= ptr2;
    for (int i = 1; i < DLY; i++) begin
      a0_dly[i] <= a0_dly[i-1];
      a1_dly[i] <= a1_dly[i-1];
    end
  end

  // ---------------------------------------------------------------- datapath
  logic signed [ACC_W-1:0] accr, acci;
  logic                    out_valid;
  logic signed [SMP_W-1:0] x0r, x0i, x1r, x1i;

  cplx_datapath u_dp (
    .clk, .rst_n,
    .in_valid (inflight_q[0]),
    .op       (op_q),
    .a(rd0r), .b(rd0i), .c(rd1r), .d(rd1i),
    .wr(wr_q), .wi(wi_q),
    .shift    (shift_q),
    .acc_clr,
    .accr_we  (reg_wr && cx_req.addr[3:0] == CXR_ACCR),
    .acci_we  (reg_wr && cx_req.addr[3:0] == CXR_ACCI),
    .acc_wdata(ACC_W'($signed(cx_req.wdata))),
    .accr, .acci,
    .out_valid, .x0r, .x0i, .x1r, .x1i
  );

  // butterfly: x0 replaces c+dj (branch 1), x1 replaces a+bj (branch 0);
  // the other writing operations replace a+bj with x0.
  always_comb begin
    we0 = 1'b0; we1 = 1'b0;
    wd0r = x0r; wd0i = x0i;
    wd1r = x0r; wd1i = x0i;
    if (out_valid) begin
      if (op_q == CX_BFLY) begin
        we0 = 1'b1; wd0r = x1r; wd0i = x1i;
        we1 = 1'b1;
      end else begin
        we0 = 1'b1;
      end
    end
  end
  assign wr_addr0 = a0_dly[DLY-1];
  assign wr_addr1 = a1_dly[DLY-1];

  // ---------------------------------------------------------------- register read
  logic signed [ACC_W-1:0] accr_s, acci_s;
  assign accr_s = accr >>> shift_q;
  assign acci_s = acci >>> shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cx_rdata <= '0;
    else if (cx_req.valid && !cx_req.we) begin
      unique case (cx_req.addr[3:0])
        CXR_CTRL:  cx_rdata <= 32'(op_q);
        CXR_LEN:   cx_rdata <= 32'(len_q);
        CXR_PTR1:  cx_rdata <= 32'(ptr1);
        CXR_PTR2:  cx_rdata <= 32'(ptr2);
        CXR_STEP1: cx_rdata <= 32'(step1);
        CXR_STEP2: cx_rdata <= 32'(step2);
        CXR_WR:    cx_rdata <= 32'($signed(wr_q));
        CXR_WI:    cx_rdata <= 32'($signed(wi_q));
        CXR_ACCR:  cx_rdata <= accr_s[31:0];
        CXR_ACCI:  cx_rdata <= acci_s[31:0];
        CXR_SHIFT: cx_rdata <= 32'(shift_q);
        CXR_STAT:  cx_rdata <= 32'(busy);
        default:   cx_rdata <= '0;
      endcase
    end
  end

  // The core must poll CXR_STAT and write no register while the unit is busy.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (cx_req.valid && cx_req.we) |-> !busy);

endmodule
