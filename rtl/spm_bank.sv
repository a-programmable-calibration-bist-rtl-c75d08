// spm_bank: the four signal processing memories and their port sharing.
//
// SPMs are paired into two branches that each hold complex samples, real and
// imaginary part at the same address: branch 0 is SPM0 (real) with SPM2
// (imaginary), branch 1 is SPM1 (real) with SPM3 (imaginary), as the source's
// architecture figure assigns them. With both branches read at once the
// complex datapath receives two complex operands per cycle.
//
// Each SPM is also reachable from the core bus so that software can fill and
// read arrays: SPM n is at word addresses 0x3000_0000 + n*0x1_0000, one
// sign-extended 16-bit sample per 32-bit word. While the complex unit is busy
// it owns all ports and bus accesses are not served (reads return 0, writes
// are dropped); this arbitration is this design's choice.
//
// Timing: bus read data one cycle after the request; complex unit read data
// one cycle after rd_en.
module spm_bank
  import cat_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // core bus (already selected: valid only for SPM addresses)
  input  bus_req_t                bus_req,
  output logic [31:0]             bus_rdata,
  // complex unit
  input  logic                    cx_busy,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr0, rd_addr1,
  output logic signed [SMP_W-1:0] rd0r, rd0i, rd1r, rd1i,
  input  logic                    we0,
  input  logic [AW-1:0]           wr_addr0,
  input  logic signed [SMP_W-1:0] wd0r, wd0i,
  input  logic                    we1,
  input  logic [AW-1:0]           wr_addr1,
  input  logic signed [SMP_W-1:0] wd1r, wd1i
);

  logic [1:0]    bsel;
  logic [AW-1:0] baddr;
  logic          bus_ok;
  assign bsel   = bus_req.addr[17:16];
  assign baddr  = bus_req.addr[AW+1:2];
  assign bus_ok = bus_req.valid && !cx_busy;

  logic             m_rd_en [4];
  logic [AW-1:0]    m_rd_addr [4];
  logic [SMP_W-1:0] m_rd_data [4];
  logic             m_we [4];
  logic [AW-1:0]    m_wr_addr [4];
  logic [SMP_W-1:0] m_wr_data [4];

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      // branch of SPM n: 0 and 2 -> branch 0, 1 and 3 -> branch 1
      if (cx_busy) begin
        m_rd_en[n]   = rd_en;
        m_rd_addr[n] = n[0] ? rd_addr1 : rd_addr0;
        m_we[n]      = n[0] ? we1 : we0;
        m_wr_addr[n] = n[0] ? wr_addr1 : wr_addr0;
      end else begin
        m_rd_en[n]   = bus_ok && !bus_req.we && bsel == 2'(n);
        m_rd_addr[n] = baddr;
        m_we[n]      = bus_ok && bus_req.we && bsel == 2'(n);
        m_wr_addr[n] = baddr;
      end
    end
    if (cx_busy) begin
      m_wr_data[0] = wd0r;
      m_wr_data[2] = wd0i;
      m_wr_data[1] = wd1r;
      m_wr_data[3] = wd1i;
    end else begin
      for (int n = 0; n < 4; n++) m_wr_data[n] = bus_req.wdata[SMP_W-1:0];
    end
  end

  for (genvar n = 0; n < 4; n++) begin : g_spm
    spm_ram #(.W(SMP_W), .DEPTH(DEPTH)) u_spm (
      .clk,
      .rd_en  (m_rd_en[n]),
      .rd_addr(m_rd_addr[n]),
      .rd_data(m_rd_data[n]),
      .we     (m_we[n]),
      .wr_addr(m_wr_addr[n]),
      .wr_data(m_wr_data[n])
    );
  end

  assign rd0r = m_rd_data[0];
  assign rd0i = m_rd_data[2];
  assign rd1r = m_rd_data[1];
  assign rd1i = m_rd_data[3];

  logic       brd_q;
  logic [1:0] bsel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brd_q  <= 1'b0;
      bsel_q <= '0;
    end else begin
      brd_q  <= bus_ok && !bus_req.we;
      bsel_q <= bsel;
    end
  end
  assign bus_rdata = brd_q ? 32'($signed(m_rd_data[bsel_q])) : '0;

endmodule
