// cat_engine: calibration and test engine for an RF transceiver (top level).
//
// The engine is a small processing system placed beside a radio's digital
// front ends. It plays a stimulus into the Tx chain (sig_gen), captures
// samples from the Tx and Rx filtering chains (two input_buffer), processes
// them with a processor whose complex-array instructions run on a dedicated
// datapath fed by four signal processing memories (cplx_unit + spm_bank), and
// writes the resulting corrections to the radio through memory-mapped
// configuration registers (csr) and an I2C master (i2c_master). An AES block
// (aes_accel) protects programs and results exchanged with a remote operator.
// The stimulus leaves through the power amplifier's pre-distorter (pa_dpd),
// which belongs to the Tx front end and is configured through the CSR; it is
// placed here so that the generator-to-PA path can be simulated as one unit.
// With the pre-distorter disabled (the reset state) the generator's samples
// appear on the stim_* ports unchanged and without delay.
// These blocks and their connections follow the source's architecture; the
// processor core itself is not part of this RTL: its instruction fetch port,
// its data bus and its custom-instruction port to the complex unit are the
// top's ports, so any 32-bit core (or a testbench) can drive them.
//
// Data bus map (bits [31:28]): 0 DRAM, 1 CSR, 2 signal generator memory,
// 3 SPMs, 4 input buffers (Tx at +0x000, Rx at +0x100), 5 AES, 6 I2C,
// 7 IRAM (for loading programs). Every slave answers one clock after the
// request, so dbus_rdata is valid in the cycle after a read. A data access to
// IRAM takes the IRAM port for that cycle: if_gnt is then low and the fetch
// must be repeated.
module cat_engine
  import cat_pkg::*;
#(
  parameter int unsigned IRAM_DEPTH = 8192,
  parameter int unsigned DRAM_DEPTH = 8192,
  parameter int unsigned SPM_DEPTH  = 8192,
  parameter int unsigned SG_DEPTH   = 1024,
  parameter int unsigned IBUF_DEPTH = 1024,
  parameter int unsigned N_CFG      = 16,
  parameter int unsigned N_RES      = 8,
  parameter int unsigned N_MON      = 4,
  parameter int unsigned I2C_DIV    = 75,
  parameter int unsigned DPD_TAPS   = 2,
  parameter int unsigned DPD_LUT_AW = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor: instruction fetch
  input  logic        if_en,
  input  logic [31:0] if_addr,
  output logic        if_gnt,
  output logic [31:0] if_rdata,
  // processor: data bus
  input  bus_req_t    dbus_req,
  output logic [31:0] dbus_rdata,
  // processor: custom instructions to the complex unit
  input  bus_req_t    cx_req,
  output logic [31:0] cx_rdata,
  output logic        cx_busy,
  // stimulus into the Tx digital front end
  output logic        stim_valid,
  output logic [15:0] stim_i,
  output logic [15:0] stim_q,
  // sample probes from the Tx and Rx digital front ends
  input  logic        tx_s_clk,
  input  logic        tx_s_rst_n,
  input  logic        tx_s_valid,
  input  logic [31:0] tx_s_data,
  input  logic        rx_s_clk,
  input  logic        rx_s_rst_n,
  input  logic        rx_s_valid,
  input  logic [31:0] rx_s_data,
  // radio configuration and monitors
  output logic [31:0] cfg_o [N_CFG],
  input  logic [31:0] mon_i [N_MON],
  // I2C to the analog front end's configuration block
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i,
  // tester access to the result registers
  input  logic [$clog2(N_RES)-1:0] tst_addr,
  output logic [31:0] tst_rdata
);

  // ---------------------------------------------------------------- decode
  logic [3:0] sel;
  assign sel = dbus_req.addr[31:28];

  function automatic bus_req_t pick(input bus_req_t r, input logic hit);
    bus_req_t o;
    o = r;
    o.valid = r.valid && hit;
    return o;
  endfunction

  bus_req_t r_dram, r_csr, r_sgm, r_spm, r_ibtx, r_ibrx, r_aes, r_i2c, r_iram;
  assign r_dram = pick(dbus_req, sel == SEL_DRAM);
  assign r_csr  = pick(dbus_req, sel == SEL_CSR);
  assign r_sgm  = pick(dbus_req, sel == SEL_SGM);
  assign r_spm  = pick(dbus_req, sel == SEL_SPM);
  assign r_ibtx = pick(dbus_req, sel == SEL_IBUF && !dbus_req.addr[8]);
  assign r_ibrx = pick(dbus_req, sel == SEL_IBUF &&  dbus_req.addr[8]);
  assign r_aes  = pick(dbus_req, sel == SEL_AES);
  assign r_i2c  = pick(dbus_req, sel == SEL_I2C);
  assign r_iram = pick(dbus_req, sel == 4'h7);

  logic [31:0] d_dram, d_csr, d_sgm, d_spm, d_ibtx, d_ibrx, d_aes, d_i2c, d_iram;
  logic [3:0]  sel_q;
  logic        rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      rd_q  <= 1'b0;
    end else begin
      sel_q <= sel;
      rd_q  <= dbus_req.valid && !dbus_req.we;
    end
  end

  always_comb begin
    dbus_rdata = '0;
    if (rd_q) begin
      unique case (sel_q)
        SEL_DRAM: dbus_rdata = d_dram;
        SEL_CSR:  dbus_rdata = d_csr;
        SEL_SGM:  dbus_rdata = d_sgm;
        SEL_SPM:  dbus_rdata = d_spm;
        SEL_IBUF: dbus_rdata = d_ibtx | d_ibrx;
        SEL_AES:  dbus_rdata = d_aes;
        SEL_I2C:  dbus_rdata = d_i2c;
        4'h7:     dbus_rdata = d_iram;
        default:  dbus_rdata = '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- memories
  localparam int unsigned DAW = $clog2(DRAM_DEPTH);
  localparam int unsigned IAW = $clog2(IRAM_DEPTH);

  sram_sp #(.W(32), .DEPTH(DRAM_DEPTH)) u_dram (
    .clk, .en(r_dram.valid), .we(r_dram.we), .addr(r_dram.addr[DAW+1:2]),
    .wdata(r_dram.wdata), .rdata(d_dram)
  );

  logic          i_en, i_we;
  logic [IAW-1:0] i_addr;
  logic [31:0]   i_rdata;
  assign i_en    = r_iram.valid || if_en;
  assign i_we    = r_iram.valid && r_iram.we;
  assign i_addr  = r_iram.valid ? r_iram.addr[IAW+1:2] : if_addr[IAW+1:2];
  assign if_gnt  = !r_iram.valid;
  assign if_rdata = i_rdata;
  assign d_iram  = i_rdata;

  sram_sp #(.W(32), .DEPTH(IRAM_DEPTH)) u_iram (
    .clk, .en(i_en), .we(i_we), .addr(i_addr), .wdata(r_iram.wdata), .rdata(i_rdata)
  );

  // ---------------------------------------------------------------- complex unit and SPMs
  localparam int unsigned SAW = $clog2(SPM_DEPTH);
  logic                    rd_en, we0, we1;
  logic [SAW-1:0]          rd_addr0, rd_addr1, wr_addr0, wr_addr1;
  logic signed [SMP_W-1:0] rd0r, rd0i, rd1r, rd1i, wd0r, wd0i, wd1r, wd1i;

  cplx_unit #(.AW(SAW)) u_cx (
    .clk, .rst_n, .cx_req, .cx_rdata, .busy(cx_busy),
    .rd_en, .rd_addr0, .rd_addr1, .rd0r, .rd0i, .rd1r, .rd1i,
    .we0, .wr_addr0, .wd0r, .wd0i, .we1, .wr_addr1, .wd1r, .wd1i
  );

  spm_bank #(.DEPTH(SPM_DEPTH)) u_spm (
    .clk, .rst_n, .bus_req(r_spm), .bus_rdata(d_spm), .cx_busy,
    .rd_en, .rd_addr0, .rd_addr1, .rd0r, .rd0i, .rd1r, .rd1i,
    .we0, .wr_addr0, .wd0r, .wd0i, .we1, .wr_addr1, .wd1r, .wd1i
  );

  // ---------------------------------------------------------------- CSR and signal generator
  sg_cfg_t sg_cfg;
  logic    sg_active, cap_tx, cap_rx, ovf_tx, ovf_rx;
  logic        dpd_en, dpd_we;
  logic [15:0] dpd_waddr;
  logic [31:0] dpd_wdata;
  logic        sg_valid;
  logic [15:0] sg_i, sg_q;

  csr #(.N_CFG(N_CFG), .N_RES(N_RES), .N_MON(N_MON)) u_csr (
    .clk, .rst_n, .bus_req(r_csr), .bus_rdata(d_csr),
    .sg_cfg, .cap_tx, .cap_rx, .sg_active, .ovf_tx, .ovf_rx,
    .dpd_en, .dpd_we, .dpd_waddr, .dpd_wdata,
    .cfg_o, .mon_i, .tst_addr, .tst_rdata
  );

  sig_gen #(.DEPTH(SG_DEPTH)) u_sg (
    .clk, .rst_n, .cfg(sg_cfg), .bus_req(r_sgm), .bus_rdata(d_sgm),
    .out_valid(sg_valid), .out_i(sg_i), .out_q(sg_q), .active(sg_active)
  );

  pa_dpd #(.TAPS(DPD_TAPS), .LUT_AW(DPD_LUT_AW)) u_dpd (
    .clk, .rst_n, .en(dpd_en),
    .in_valid(sg_valid), .in_i(sg_i), .in_q(sg_q),
    .out_valid(stim_valid), .out_i(stim_i), .out_q(stim_q),
    .lut_we(dpd_we), .lut_addr(dpd_waddr[$clog2(DPD_TAPS)+DPD_LUT_AW-1:0]),
    .lut_wdata(dpd_wdata)
  );

  // ---------------------------------------------------------------- input buffers
  logic [15:0] lvl_tx, lvl_rx;

  input_buffer #(.DEPTH(IBUF_DEPTH)) u_ibuf_tx (
    .s_clk(tx_s_clk), .s_rst_n(tx_s_rst_n), .s_valid(tx_s_valid), .s_data(tx_s_data),
    .clk, .rst_n, .capture_en(cap_tx), .bus_req(r_ibtx), .bus_rdata(d_ibtx),
    .overflow(ovf_tx), .level(lvl_tx)
  );

  input_buffer #(.DEPTH(IBUF_DEPTH)) u_ibuf_rx (
    .s_clk(rx_s_clk), .s_rst_n(rx_s_rst_n), .s_valid(rx_s_valid), .s_data(rx_s_data),
    .clk, .rst_n, .capture_en(cap_rx), .bus_req(r_ibrx), .bus_rdata(d_ibrx),
    .overflow(ovf_rx), .level(lvl_rx)
  );

  // ---------------------------------------------------------------- AES and I2C
  aes_accel u_aes (.clk, .rst_n, .bus_req(r_aes), .bus_rdata(d_aes));

  i2c_master #(.DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .bus_req(r_i2c), .bus_rdata(d_i2c), .scl_oe, .sda_oe, .sda_i
  );

endmodule
