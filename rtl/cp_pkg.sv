// cp_pkg: constants and types shared by the curve-based cryptoprocessor.
//
// The defaults describe the main configuration: six MALU cores (ALPHA) whose
// data path is a 97-bit x 12-bit digit-serial GF(2^n) multiplier (MALU_97x12),
// one 32-entry register file per core, an instruction window of six (ILP_D),
// at most four-way issue (LMAX) and a 1-Kbyte micro-code RAM (256 words).
// A slice of the data path and one register-file word are n+1 = 98 bits wide,
// so that ALPHA chained slices reach the ALPHA*(n+1)-1 bit field sizes.
//
// Host instruction word (32 bits), opcode in [31:28]; a 32-bit data word is
// sent alongside every instruction:
//   MALU   [24:20]=&R [19:15]=&A [14:10]=&B [9:5]=&C [4:0]=&D   R = A(B+D)+C mod P
//   CALL   [16:8]=length (1..256) [7:0]=start      run a micro-code routine
//   CFG    [26:24]=core                data: [0]=cfg1, [25:16]=field size N
//   STORE  [26:24]=slice [10:8]=word [4:0]=&dst   data: the 32-bit word
//   LOAD   [26:24]=slice [10:8]=word [4:0]=&src   word returned on the data output
//   UWRITE [7:0]=micro-code address               data: the micro-code word
// Register 0 of every register file holds the reduction polynomial P.
package cp_pkg;

  localparam int unsigned N_MALU   = 97;          // n of one MALU_nxd
  localparam int unsigned SLICE_W  = N_MALU + 1;  // bits per slice and per RF word
  localparam int unsigned DIGIT    = 12;          // digit size d
  localparam int unsigned ALPHA    = 6;           // number of MALU cores and RFs
  localparam int unsigned RF_DEPTH = 32;          // entries per RF (RF_nx32)
  localparam int unsigned RF_AW    = 5;
  localparam int unsigned ILP_D    = 6;           // instruction window
  localparam int unsigned LMAX     = 4;           // maximum instructions per bundle
  localparam int unsigned UC_WORDS = 256;         // 1 Kbyte of 32-bit words
  localparam int unsigned UC_AW    = 8;
  localparam int unsigned NFW      = 10;          // width of the field-size field

  typedef logic [RF_AW-1:0] raddr_t;

  // MALU(&R, &A, &B, &C, &D): R = A(B+D)+C mod P
  typedef struct packed {
    raddr_t r;
    raddr_t a;
    raddr_t b;
    raddr_t c;
    raddr_t d;
  } malu_instr_t;

  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_MALU   = 4'h1,
    OP_CALL   = 4'h2,
    OP_CFG    = 4'h3,
    OP_STORE  = 4'h4,
    OP_LOAD   = 4'h5,
    OP_UWRITE = 4'h6
  } opcode_t;

  // per-core configuration register
  typedef struct packed {
    logic           cfg1;    // 1: take m and the A digit from the upper neighbour
    logic [NFW-1:0] nfield;  // field size N handled by this core's group
  } core_cfg_t;

  // activity of the instruction bus controller, for performance monitoring
  typedef struct packed {
    logic       issue;     // a bundle is issued this cycle
    logic [2:0] l;         // its size
    logic       ooo;       // it leaves an older instruction behind
    logic       blocked;   // a dependency holds an instruction back
    logic       waiting;   // the instruction queue is not empty
    logic       iqb_full;  // the instruction queue is full
    logic       stream;    // a micro-code word is read
  } activity_t;

  function automatic malu_instr_t instr_fields(logic [31:0] w);
    malu_instr_t m;
    m.r = w[24:20];
    m.a = w[19:15];
    m.b = w[14:10];
    m.c = w[9:5];
    m.d = w[4:0];
    return m;
  endfunction

endpackage
