// i2c_master: write-only I2C master through which the engine sets the analog
// front end's tuning knobs (biases, DAC settings, loopback switches).
//
// The source says the engine reaches the transceiver's configuration block
// over I2C; the transfer format is this design's choice: one register write
// per transaction, START, 7-bit device address with R/W = 0, 8-bit register
// number, 8-bit data, STOP, with the acknowledge bit checked after each byte.
// A missing acknowledge sets a sticky NACK flag (cleared by the next command);
// the transfer still runs to its STOP.
//
// Pins are open drain: scl_oe / sda_oe high pull the line low; sda_i is the
// line as seen at the pad.
// Core bus registers (word offsets): 0 CMD, a write starts a transfer
// (ignored while busy): [30:24] device, [15:8] register, [7:0] data;
// 1 STATUS, read: [0] busy, [1] nack.
// Timing: each bit lasts 4*DIV clocks (SCL low for the first half, high for
// the second); SDA changes at the start of the first quarter and the
// acknowledge is sampled at the start of the third. A transaction is START,
// 27 bits and STOP, 29 symbols of 4*DIV clocks; busy drops one clock later.
module i2c_master
  import cat_pkg::*;
#(
  parameter int unsigned DIV = 75   // quarter bit clocks: 120 MHz / (4*75) = 400 kHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    bus_req,      // already selected
  output logic [31:0] bus_rdata,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i
);

  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_e;
  state_e      st_q;
  logic [15:0] div_q;
  logic [1:0]  q_q;          // quarter within the current symbol
  logic [4:0]  bit_q;        // 0..26
  logic [26:0] sh_q;         // bits to send, MSB first; ACK slots hold 1 (released)
  logic        nack_q;
  logic        qtick;

  assign qtick = (div_q == 16'(DIV - 1));

  logic cmd;
  assign cmd = bus_req.valid && bus_req.we && !bus_req.addr[2] && st_q == IDLE;

  // ack slots are bits 8, 17 and 26 (counting from 0)
  logic ack_slot;
  assign ack_slot = (bit_q == 5'd8) || (bit_q == 5'd17) || (bit_q == 5'd26);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= IDLE;
      div_q  <= '0;
      q_q    <= '0;
      bit_q  <= '0;
      sh_q   <= '1;
      nack_q <= 1'b0;
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      if (st_q == IDLE) div_q <= '0;
      else              div_q <= qtick ? '0 : div_q + 16'd1;
      unique case (st_q)
        IDLE: begin
          scl_oe <= 1'b0;
          sda_oe <= 1'b0;
          if (cmd) begin
            sh_q   <= {bus_req.wdata[30:24], 1'b0, 1'b1,
                       bus_req.wdata[15:8], 1'b1,
                       bus_req.wdata[7:0], 1'b1};
            nack_q <= 1'b0;
            q_q    <= '0;
            st_q   <= START;
          end
        end
        START: if (qtick) begin
          // SCL high throughout; SDA falls after the first quarter
          q_q <= q_q + 2'd1;
          if (q_q == 2'd0) sda_oe <= 1'b1;
          if (q_q == 2'd3) begin
            st_q  <= BITS;
            bit_q <= '0;
          end
        end
        BITS: begin
          if (div_q == '0) begin
            unique case (q_q)
              2'd0: begin
                scl_oe <= 1'b1;
                sda_oe <= ~sh_q[26];
              end
              2'd2: begin
                scl_oe <= 1'b0;
                if (ack_slot && sda_i) nack_q <= 1'b1;
              end
              default: ;
            endcase
          end
          if (qtick) begin
            q_q <= q_q + 2'd1;
            if (q_q == 2'd3) begin
              sh_q <= {sh_q[25:0], 1'b1};
              if (bit_q == 5'd26) begin
                st_q <= STOP;
              end else begin
                bit_q <= bit_q + 5'd1;
              end
            end
          end
        end
        STOP: begin
          if (div_q == '0) begin
            unique case (q_q)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
              2'd1: scl_oe <= 1'b0;
              2'd3: sda_oe <= 1'b0;
              default: ;
            endcase
          end
          if (qtick) begin
            q_q <= q_q + 2'd1;
            if (q_q == 2'd3) st_q <= IDLE;
          end
        end
        default: st_q <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_rdata <= '0;
    else if (bus_req.valid && !bus_req.we && bus_req.addr[2])
      bus_rdata <= {30'd0, nack_q, st_q != IDLE};
    else bus_rdata <= '0;
  end

endmodule
