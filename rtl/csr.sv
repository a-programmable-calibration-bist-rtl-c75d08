// csr: configuration and status registers of the engine.
//
// All communication of the engine with its peripherals and with the radio is
// memory mapped through this block: the signal generator's register set, the
// capture enables of the input buffers, configuration words for the radio
// (digital pre-/post-distorter coefficients, filtering chain settings,
// analog front-end knobs), status read from the radio's monitors, and result
// registers where test algorithms leave their estimates for a digital tester
// to read. Which kinds of registers exist is the source's; their number,
// layout and the tester read port are this design's choice.
//
// Word offsets (address bits [7:2]):
//   0 SG_CTRL   [0] enable [1] interp_en [3:2] interp_log2 [5:4] nseg
//               [9:6] seg_bwd [13:10] seg_neg
//   1 SG_START  2 SG_LEN  3 SG_STEP  4 SG_RATE      (16 bits each)
//   5 IBUF_CTRL [0] Tx capture [1] Rx capture
//   6 STATUS    read only: [0] generator active [1] Tx overflow [2] Rx overflow
//   7 DPD_CTRL  [0] PA pre-distorter enable
//   8 DPD_ADDR  table index for the next DPD_DATA write
//   9 DPD_DATA  write only: writes the pre-distorter table entry at DPD_ADDR
//               (one-clock strobe on dpd_we) and increments DPD_ADDR
//   16..16+N_CFG-1   CFG words, driven to the radio
//   32..32+N_RES-1   RES words, also readable on the tester port
//   48..48+N_MON-1   MON words, read only, from the radio's monitors
// The pre-distorter table is reached indirectly (address, then data words)
// so that a table of any size costs only two register words.
// Timing: writes take effect at the next clock edge; bus and tester read data
// appear one clock after the request.
module csr
  import cat_pkg::*;
#(
  parameter int unsigned N_CFG = 16,
  parameter int unsigned N_RES = 8,
  parameter int unsigned N_MON = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    bus_req,       // already selected
  output logic [31:0] bus_rdata,
  // signal generator and input buffers
  output sg_cfg_t     sg_cfg,
  output logic        cap_tx,
  output logic        cap_rx,
  input  logic        sg_active,
  input  logic        ovf_tx,
  input  logic        ovf_rx,
  // PA pre-distorter of the Tx front end
  output logic        dpd_en,
  output logic        dpd_we,
  output logic [15:0] dpd_waddr,
  output logic [31:0] dpd_wdata,
  // radio
  output logic [31:0] cfg_o [N_CFG],
  input  logic [31:0] mon_i [N_MON],
  // tester
  input  logic [$clog2(N_RES)-1:0] tst_addr,
  output logic [31:0] tst_rdata
);

  logic [31:0] res_q [N_RES];
  logic [5:0]  widx;
  assign widx = bus_req.addr[7:2];

  logic wr;
  assign wr = bus_req.valid && bus_req.we;

  // indices into the CFG, RES and MON arrays (only used when in range)
  localparam int unsigned CIW = (N_CFG > 1) ? $clog2(N_CFG) : 1;
  localparam int unsigned RIW = (N_RES > 1) ? $clog2(N_RES) : 1;
  localparam int unsigned MIW = (N_MON > 1) ? $clog2(N_MON) : 1;
  logic [5:0]     cfg_off, res_off, mon_off;
  logic [CIW-1:0] cfg_idx;
  logic [RIW-1:0] res_idx;
  logic [MIW-1:0] mon_idx;
  assign cfg_off = widx - 6'd16;
  assign res_off = widx - 6'd32;
  assign mon_off = widx - 6'd48;
  assign cfg_idx = cfg_off[CIW-1:0];
  assign res_idx = res_off[RIW-1:0];
  assign mon_idx = mon_off[MIW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sg_cfg <= '{rate_div: 16'd0, step: 16'd1, len: 16'd1, start: 16'd0,
                  seg_neg: 4'd0, seg_bwd: 4'd0, nseg: 2'd0, interp_log2: 2'd0,
                  interp_en: 1'b0, enable: 1'b0};
      cap_tx <= 1'b0;
      cap_rx <= 1'b0;
      dpd_en <= 1'b0;
      dpd_waddr <= '0;
      for (int i = 0; i < N_CFG; i++) cfg_o[i] <= '0;
      for (int i = 0; i < N_RES; i++) res_q[i] <= '0;
    end else if (wr) begin
      unique case (widx)
        6'd0: begin
          sg_cfg.enable      <= bus_req.wdata[0];
          sg_cfg.interp_en   <= bus_req.wdata[1];
          sg_cfg.interp_log2 <= bus_req.wdata[3:2];
          sg_cfg.nseg        <= bus_req.wdata[5:4];
          sg_cfg.seg_bwd     <= bus_req.wdata[9:6];
          sg_cfg.seg_neg     <= bus_req.wdata[13:10];
        end
        6'd1: sg_cfg.start    <= bus_req.wdata[15:0];
        6'd2: sg_cfg.len      <= bus_req.wdata[15:0];
        6'd3: sg_cfg.step     <= bus_req.wdata[15:0];
        6'd4: sg_cfg.rate_div <= bus_req.wdata[15:0];
        6'd5: begin
          cap_tx <= bus_req.wdata[0];
          cap_rx <= bus_req.wdata[1];
        end
        6'd7: dpd_en    <= bus_req.wdata[0];
        6'd8: dpd_waddr <= bus_req.wdata[15:0];
        6'd9: dpd_waddr <= dpd_waddr + 16'd1;
        default: begin
          if (widx >= 6'd16 && widx < 6'(16 + N_CFG)) cfg_o[cfg_idx] <= bus_req.wdata;
          if (widx >= 6'd32 && widx < 6'(32 + N_RES)) res_q[res_idx] <= bus_req.wdata;
        end
      endcase
    end
  end

  // table write strobe, aligned with the address before its increment
  assign dpd_we    = wr && (widx == 6'd9);
  assign dpd_wdata = bus_req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
      tst_rdata <= '0;
    end else begin
      tst_rdata <= res_q[tst_addr];
      bus_rdata <= '0;
      if (bus_req.valid && !bus_req.we) begin
        unique case (widx)
          6'd0: bus_rdata <= 32'({sg_cfg.seg_neg, sg_cfg.seg_bwd, sg_cfg.nseg,
                                  sg_cfg.interp_log2, sg_cfg.interp_en, sg_cfg.enable});
          6'd1: bus_rdata <= 32'(sg_cfg.start);
          6'd2: bus_rdata <= 32'(sg_cfg.len);
          6'd3: bus_rdata <= 32'(sg_cfg.step);
          6'd4: bus_rdata <= 32'(sg_cfg.rate_div);
          6'd5: bus_rdata <= 32'({cap_rx, cap_tx});
          6'd6: bus_rdata <= 32'({ovf_rx, ovf_tx, sg_active});
          6'd7: bus_rdata <= 32'(dpd_en);
          6'd8: bus_rdata <= 32'(dpd_waddr);
          default: begin
            if (widx >= 6'd16 && widx < 6'(16 + N_CFG)) bus_rdata <= cfg_o[cfg_idx];
            if (widx >= 6'd32 && widx < 6'(32 + N_RES)) bus_rdata <= res_q[res_idx];
            if (widx >= 6'd48 && widx < 6'(48 + N_MON)) bus_rdata <= mon_i[mon_idx];
          end
        endcase
      end
    end
  end

endmodule
