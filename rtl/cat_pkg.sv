// cat_pkg: types and constants shared by the calibration and test engine.
//
// The engine is built around a 32-bit processor bus. Every slave on it takes a
// single-cycle request (bus_req_t) and answers with read data one clock later;
// there are no wait states and only whole 32-bit words are transferred. The
// address map, the sample format and the operation codes of the complex
// datapath below are this design's own choices: the source describes the
// blocks but not their encodings.
package cat_pkg;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  // Address map: bits [31:28] select the slave.
  localparam logic [3:0] SEL_DRAM = 4'h0;
  localparam logic [3:0] SEL_CSR  = 4'h1;
  localparam logic [3:0] SEL_SGM  = 4'h2;   // signal generator sample memory
  localparam logic [3:0] SEL_SPM  = 4'h3;   // SPM n at 0x3000_0000 + n*0x1_0000
  localparam logic [3:0] SEL_IBUF = 4'h4;   // Tx buffer at +0x000, Rx buffer at +0x100
  localparam logic [3:0] SEL_AES  = 4'h5;
  localparam logic [3:0] SEL_I2C  = 4'h6;

  // ---------------------------------------------------------------- samples
  // Signal processing samples are signed 16-bit values; a complex sample is
  // kept as its real part in one SPM and its imaginary part in another.
  localparam int unsigned SMP_W = 16;
  localparam int unsigned ACC_W = 40;   // accumulator width (guard bits)

  // ---------------------------------------------------------------- complex unit
  typedef enum logic [2:0] {
    CX_DOT   = 3'd0,  // acc += (a+bj)(c-dj)
    CX_SCALE = 3'd1,  // x[i] <- (k+zj)(a+bj)
    CX_VADD  = 3'd2,  // x[i] <- (a+bj)+(c+dj)
    CX_NORM  = 3'd3,  // accR += a^2+b^2
    CX_BFLY  = 3'd4,  // radix-2 butterfly, in place
    CX_CMUL  = 3'd5   // x[i] <- (a+bj)(c+dj)
  } cx_op_e;

  // Register numbers of the complex unit, as seen by the core's custom
  // instructions (GPR <-> unit register moves).
  localparam logic [3:0] CXR_CTRL  = 4'd0;  // write: [2:0] op, starts the operation
  localparam logic [3:0] CXR_LEN   = 4'd1;  // number of elements
  localparam logic [3:0] CXR_PTR1  = 4'd2;  // Array Ptr 1 (branch 0)
  localparam logic [3:0] CXR_PTR2  = 4'd3;  // Array Ptr 2 (branch 1)
  localparam logic [3:0] CXR_STEP1 = 4'd4;  // Array 1 Step
  localparam logic [3:0] CXR_STEP2 = 4'd5;  // Array 2 Step
  localparam logic [3:0] CXR_WR    = 4'd6;  // Weight R
  localparam logic [3:0] CXR_WI    = 4'd7;  // Weight I
  localparam logic [3:0] CXR_ACCR  = 4'd8;  // Acc R (read: shifted, 32 bits)
  localparam logic [3:0] CXR_ACCI  = 4'd9;  // Acc I
  localparam logic [3:0] CXR_SHIFT = 4'd10; // right shift for products / results
  localparam logic [3:0] CXR_STAT  = 4'd11; // [0] busy

  // ---------------------------------------------------------------- signal generator
  typedef struct packed {
    logic        enable;      // play while set
    logic        interp_en;   // linear interpolation on
    logic [1:0]  interp_log2; // interpolation factor 2^n
    logic [1:0]  nseg;        // number of segments in the pattern, minus one
    logic [3:0]  seg_bwd;     // per segment: play backward
    logic [3:0]  seg_neg;     // per segment: invert the sign
    logic [15:0] start;       // first memory address
    logic [15:0] len;         // samples read per segment
    logic [15:0] step;        // address increment (2 = use one, skip one)
    logic [15:0] rate_div;    // one output sample every rate_div+1 clocks
  } sg_cfg_t;

endpackage
