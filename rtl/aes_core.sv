// aes_core: AES-128 block cipher (FIPS-197), encryption and decryption.
//
// The engine uses it to decrypt and check test or calibration programs sent
// to the radio in the field, and to encrypt results before they are sent
// back. The source adds an AES block as an accelerator but does not describe
// its structure; this is an iterative design of this project's own, one round
// per clock on a 128-bit state with the key schedule computed on the fly.
// Decryption first runs the key schedule forward for ten clocks to reach the
// last round key, then walks it backwards while applying the inverse rounds.
// S-box and inverse S-box are computed at elaboration from their definition:
// the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0)
// followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
// rotl(b,4) ^ 0x63.
//
// Byte order: byte 0 of a block or key is bits [127:120]; byte i sits in row
// i mod 4, column i / 4 of the state, as in FIPS-197.
// Interface: start (one clock, while idle) with key, din and decrypt; done is
// a one-clock pulse with dout valid until the next start.
// Timing: done rises at the 10th clock edge after the edge that samples
// start when encrypting, at the 20th when decrypting.
module aes_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         busy,
  output logic         done
);

  // ---------------------------------------------------------------- tables
  function automatic logic [7:0] gmul(input logic [7:0] x, input logic [7:0] y);
    logic [7:0] p, a;
    p = '0;
    a = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // Walks all non-zero field elements p = 3^i together with q = 3^-i, so
  // each q is the multiplicative inverse of its p.
  function automatic logic [255:0][7:0] gen_sbox();
    logic [255:0][7:0] t;
    logic [7:0] p, q;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    t[0] = 8'h63;
    for (int i = 0; i < 255; i++) begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);     // p *= 3
      q = q ^ {q[6:0], 1'b0};                               // q /= 3
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      q = q ^ (q[7] ? 8'h09 : 8'h00);
      t[p] = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]} ^ 8'h63;
    end
    return t;
  endfunction

  function automatic logic [255:0][7:0] gen_inv(input logic [255:0][7:0] s);
    logic [255:0][7:0] t;
    for (int x = 0; x < 256; x++) t[s[x]] = 8'(x);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX  = gen_sbox();
  localparam logic [255:0][7:0] ISBOX = gen_inv(SBOX);

  // ---------------------------------------------------------------- helpers
  typedef logic [15:0][7:0] blk_t;   // blk[15] is byte 0

  function automatic logic [7:0] byte_of(input blk_t s, input int i);
    return s[15 - i];
  endfunction

  function automatic blk_t sub_shift(input blk_t s);   // SubBytes, ShiftRows
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[15 - (r + 4*c)] = SBOX[byte_of(s, r + 4*((c + r) % 4))];
    return o;
  endfunction

  function automatic blk_t inv_shift_sub(input blk_t s);  // InvShiftRows, InvSubBytes
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[15 - (r + 4*c)] = ISBOX[byte_of(s, r + 4*((c - r + 4) % 4))];
    return o;
  endfunction

  function automatic blk_t mix(input blk_t s, input logic inv);
    blk_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = byte_of(s, 4*c); a1 = byte_of(s, 4*c+1);
      a2 = byte_of(s, 4*c+2); a3 = byte_of(s, 4*c+3);
      if (!inv) begin
        o[15-4*c]   = gmul(a0,8'h02) ^ gmul(a1,8'h03) ^ a2 ^ a3;
        o[15-4*c-1] = a0 ^ gmul(a1,8'h02) ^ gmul(a2,8'h03) ^ a3;
        o[15-4*c-2] = a0 ^ a1 ^ gmul(a2,8'h02) ^ gmul(a3,8'h03);
        o[15-4*c-3] = gmul(a0,8'h03) ^ a1 ^ a2 ^ gmul(a3,8'h02);
      end else begin
        o[15-4*c]   = gmul(a0,8'h0e) ^ gmul(a1,8'h0b) ^ gmul(a2,8'h0d) ^ gmul(a3,8'h09);
        o[15-4*c-1] = gmul(a0,8'h09) ^ gmul(a1,8'h0e) ^ gmul(a2,8'h0b) ^ gmul(a3,8'h0d);
        o[15-4*c-2] = gmul(a0,8'h0d) ^ gmul(a1,8'h09) ^ gmul(a2,8'h0e) ^ gmul(a3,8'h0b);
        o[15-4*c-3] = gmul(a0,8'h0b) ^ gmul(a1,8'h0d) ^ gmul(a2,8'h09) ^ gmul(a3,8'h0e);
      end
    end
    return o;
  endfunction

  function automatic logic [31:0] sub_rot(input logic [31:0] w);  // SubWord(RotWord(w))
    return {SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]], SBOX[w[31:24]]};
  endfunction

  // round key i+1 from round key i, rcon = x^i
  function automatic logic [127:0] key_fwd(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot(k[31:0]) ^ {rcon, 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0]  ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // round key i-1 from round key i, rcon = x^(i-1)
  function automatic logic [127:0] key_bwd(input logic [127:0] k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3;
    w3 = k[31:0]  ^ k[63:32];
    w2 = k[63:32] ^ k[95:64];
    w1 = k[95:64] ^ k[127:96];
    w0 = k[127:96] ^ sub_rot(w3) ^ {rcon, 24'h0};
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction
  function automatic logic [7:0] xdiv(input logic [7:0] a);  // inverse of xtime
    return a[0] ? ({1'b0, a[7:1]} ^ 8'h8d) : {1'b0, a[7:1]};
  endfunction

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {IDLE, KEXP, ENC, DEC} state_e;
  state_e       st_q;
  logic [3:0]   rnd_q;
  logic [7:0]   rcon_q;
  logic [127:0] k_q;
  blk_t         s_q;
  logic [127:0] din_q;

  logic [127:0] k_nx;
  blk_t         s_nx;

  always_comb begin
    k_nx = k_q;
    s_nx = s_q;
    unique case (st_q)
      KEXP: k_nx = key_fwd(k_q, rcon_q);
      ENC: begin
        k_nx = key_fwd(k_q, rcon_q);
        s_nx = sub_shift(s_q);
        if (rnd_q != 4'd10) s_nx = mix(s_nx, 1'b0);
        s_nx = s_nx ^ k_nx;
      end
      DEC: begin
        // rcon_q holds x^(r) for the round key r-1 about to be derived
        k_nx = key_bwd(k_q, rcon_q);
        s_nx = inv_shift_sub(s_q) ^ k_nx;
        if (rnd_q != 4'd1) s_nx = mix(s_nx, 1'b1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= IDLE;
      rnd_q  <= '0;
      rcon_q <= 8'h01;
      k_q    <= '0;
      s_q    <= '0;
      din_q  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        IDLE: if (start) begin
          k_q    <= key;
          rcon_q <= 8'h01;
          rnd_q  <= 4'd1;
          if (decrypt) begin
            din_q <= din;
            st_q  <= KEXP;
          end else begin
            s_q  <= din ^ key;
            st_q <= ENC;
          end
        end
        KEXP: begin
          k_q    <= k_nx;
          rnd_q  <= rnd_q + 4'd1;
          if (rnd_q == 4'd10) begin
            // k_nx is round key 10
            s_q    <= din_q ^ k_nx;
            rnd_q  <= 4'd10;
            st_q   <= DEC;
            rcon_q <= 8'h36;
          end else begin
            rcon_q <= xtime(rcon_q);
          end
        end
        ENC: begin
          k_q    <= k_nx;
          s_q    <= s_nx;
          rcon_q <= xtime(rcon_q);
          rnd_q  <= rnd_q + 4'd1;
          if (rnd_q == 4'd10) begin
            st_q <= IDLE;
            done <= 1'b1;
          end
        end
        DEC: begin
          k_q    <= k_nx;
          s_q    <= s_nx;
          rcon_q <= xdiv(rcon_q);
          rnd_q  <= rnd_q - 4'd1;
          if (rnd_q == 4'd1) begin
            st_q <= IDLE;
            done <= 1'b1;
          end
        end
        default: st_q <= IDLE;
      endcase
    end
  end

  assign dout = s_q;
  assign busy = (st_q != IDLE);

endmodule
