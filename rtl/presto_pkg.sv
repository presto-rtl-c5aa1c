// presto_pkg: types and constants shared by the Presto co-processor.
//
// The array has 32 processing engines (PEs). Each PE has 16 banks, and each
// bank holds two polynomial buffers (PBUF0/1) of 32 x 32-bit words plus an
// 8 x 32-bit register file. A 512-coefficient polynomial lives in one PBUF of
// one PE: coefficient i sits in bank (i mod 16), entry (i div 16). A 512-bit
// "line" carries entry e of all 16 banks, with bank b in bits [32b+31:32b].
//
// Every bank of a PE receives the same 57-bit control word each cycle. The
// 57-bit width is the document's; the field layout below is this design's.
package presto_pkg;

  localparam int unsigned W      = 32;   // native word width
  localparam int unsigned NBANK  = 16;   // banks per PE (parallelism 16)
  localparam int unsigned DEPTH  = 32;   // words per PBUF
  localparam int unsigned RFD    = 8;    // RF words per bank
  localparam int unsigned NPE    = 32;   // PEs in the array
  localparam int unsigned LINE   = W * NBANK;      // 512-bit line
  localparam int unsigned NDIM   = NBANK * DEPTH;  // 512 coefficients per PE buffer
  localparam int unsigned CTRL_W = 57;   // control word width

  typedef logic [W-1:0]    word_t;
  typedef logic [LINE-1:0] line_t;
  typedef logic [NPE-1:0]  pemask_t;

  // Bank operations executed by mod_alu.
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // nothing is written
    OP_ADD  = 4'd1,   // r0 = x + y
    OP_SUB  = 4'd2,   // r0 = x - y
    OP_MUL  = 4'd3,   // r0 = x * y
    OP_MOVY = 4'd4,   // r0 = y
    OP_NEGY = 4'd5,   // r0 = -y
    OP_CT   = 4'd6,   // r0 = x + w*y, r1 = x - w*y   (forward butterfly)
    OP_GS   = 4'd7,   // r0 = x + y,   r1 = (x - y)*w (inverse butterfly)
    OP_HBF  = 4'd8,   // lower bank: x + w*y, upper bank: y - w*x
    OP_HBI  = 4'd9    // lower bank: x + y,   upper bank: (y - x)*w
  } bank_op_e;

  // Source of operand y.
  typedef enum logic [1:0] {
    YS_PBUF = 2'd0,   // PBUF[b_pbuf] port B at address rb
    YS_RF   = 2'd1,   // RF[rf_ra]
    YS_TOP  = 2'd2,   // this bank's lane of the PE input line
    YS_NOC  = 2'd3    // this bank's lane of the intra-PE shifter
  } ysrc_e;

  // 57-bit control word (4+16+5+5+5+1+1+1+2+3+3+1+4+2+1+1+1+1 = 57).
  typedef struct packed {
    bank_op_e          op;       // 4  operation
    logic [NBANK-1:0]  bank_en;  // 16 banks that write this cycle
    logic [4:0]        ra;       // 5  PBUF port-A read address
    logic [4:0]        rb;       // 5  PBUF port-B read address (second butterfly write)
    logic [4:0]        wa;       // 5  PBUF write address
    logic              a_pbuf;   // 1  PBUF of operand x
    logic              b_pbuf;   // 1  PBUF of operand y (YS_PBUF)
    logic              w_pbuf;   // 1  PBUF written
    ysrc_e             ysrc;     // 2  operand y source
    logic [2:0]        rf_ra;    // 3  RF read address
    logic [2:0]        rf_wa;    // 3  RF write address
    logic              rf_we;    // 1  write r0 to RF instead of PBUF
    logic [3:0]        shift;    // 4  intra-PE cyclic shift amount
    logic [1:0]        hb_lg;    // 2  log2 of half-butterfly partner distance (1,2,4,8)
    logic              sh_top;   // 1  shifter takes the PE input line instead of port-A line
    logic              pbuf_we;  // 1  write r0 to PBUF[w_pbuf][wa]
    logic              dual_we;  // 1  also write r1 to PBUF[w_pbuf][rb] (butterflies)
    logic              rd_en;    // 1  PE output line is being read (top memory interface)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  // RISC-V custom opcodes (base opcode map: custom-0, custom-2, custom-3).
  localparam logic [6:0] OPC_HE       = 7'b0001011;  // custom-0: OP-HE
  localparam logic [6:0] OPC_HE_LOAD  = 7'b1011011;  // custom-2: OP-HE-LOAD
  localparam logic [6:0] OPC_HE_STORE = 7'b1111011;  // custom-3: OP-HE-STORE

  // FSM classes of the extension controller.
  typedef enum logic [1:0] {
    CL_MEM = 2'd0, CL_ELM = 2'd1, CL_MUL = 2'd2, CL_NTT = 2'd3
  } fsm_class_e;

  // Decoded operations.
  typedef enum logic [3:0] {
    HE_VADD  = 4'd0,  HE_VSUB = 4'd1,  HE_VADDS = 4'd2, HE_VNEG  = 4'd3,
    HE_VMOV  = 4'd4,  HE_VROT = 4'd5,  HE_VMUL  = 4'd6, HE_VMULS = 4'd7,
    HE_NTT   = 4'd8,  HE_INTT = 4'd9,  HE_VLOAD = 4'd10, HE_VSTORE = 4'd11,
    HE_SLOAD = 4'd12, HE_AUTO = 4'd13, HE_CFG  = 4'd14, HE_ILLEGAL = 4'd15
  } he_op_e;

  typedef struct packed {
    he_op_e      op;
    fsm_class_e  cls;
    pemask_t     mask;     // PEs touched
    logic        dst;      // destination PBUF
    logic        srca;     // source PBUF of x
    logic        srcb;     // source PBUF of y
    logic [2:0]  rfi;      // RF index
    logic [4:0]  pe;       // single PE (vector load/store, automorphism base)
    logic [31:0] val;      // address, scalar, rotation amount or Galois element
    logic [31:0] aux;      // configuration index or dimension log2
  } he_dec_t;

  // Configuration index space of OP-HE-LOAD funct3=2 (rs1 = index, rs2 = value).
  localparam int unsigned CFG_ZETA  = 0;     // 0..511    forward twiddles
  localparam int unsigned CFG_ZINV  = 512;   // 512..1023 inverse twiddles
  localparam int unsigned CFG_Q     = 1024;  // modulus
  localparam int unsigned CFG_NINV  = 1025;  // n^-1 mod q

endpackage
