// dfp_pkg: types and constants shared by the data-flow processor (DFP) and the
// machine built from it.
//
// A data-flow word is 9 bits: 8 data bits and a type bit (bit 8). A word with
// the type bit set is a control word inserted in a data flow (for example an
// end-of-line marker); the datapath forwards it unchanged. On the 10-line
// inter-processor port the 9 data lines carry the word and the 10th line is the
// acknowledge. Because the port has no separate strobe, the code 9'h1FF
// (control word with all data bits set) is reserved as "no word on the lines".
// The 9-bit word, the 10-line port and the 8-deep stacks follow the document;
// the meaning of the type bit, the idle code and the 32-bit microinstruction
// layout below are this design's own choices.
package dfp_pkg;

  localparam int unsigned WORD_W     = 9;
  localparam int unsigned NPORTS     = 6;   // N S E W U D
  localparam int unsigned NSTACKS    = 3;   // input A B E, output C D F
  localparam int unsigned STACK_DEPTH = 8;
  localparam int unsigned PROG_WORDS = 64;
  localparam int unsigned DATA_WORDS = 256;

  typedef logic [WORD_W-1:0] word_t;

  localparam word_t IDLE_CODE = 9'h1FF;
  localparam word_t EOL_WORD  = 9'h100;   // conventional end-of-line control word

  // Port indices (Figure 3 order)
  localparam int unsigned P_N = 0, P_S = 1, P_E = 2, P_W = 3, P_U = 4, P_D = 5;


  // Commands on COM3-0
  typedef enum logic [3:0] {
    COM_HOLD  = 4'h0,  // freeze: nothing fires, nothing moves
    COM_RUN   = 4'h1,  // data-driven execution
    COM_SHIFT = 4'h2,  // shift the scan register one bit (SCANA in, SCANB out)
    COM_WRITE = 4'h3,  // commit the scan register to its target
    COM_CLEAR = 4'h4,  // empty stacks and pipeline, pc/P/Q to 0
    COM_READ  = 4'h5   // load the scan register from its target (test readback)
  } com_e;

  // Scan register targets
  typedef enum logic [1:0] {
    TGT_NONE = 2'd0,
    TGT_PROG = 2'd1,
    TGT_CFG  = 2'd2,
    TGT_DATA = 2'd3
  } scan_tgt_e;

  localparam int unsigned SCAN_W = 2 + 8 + 32;  // {target, address, data}

  // Configuration register addresses (TGT_CFG)
  localparam logic [7:0] CFG_INSEL  = 8'd0;  // [2:0] A, [5:3] B, [8:6] E source port (7 = none)
  localparam logic [7:0] CFG_OUTSEL = 8'd1;  // 4 bits per port N..D: 0 receive, 1..3 stack C/D/F, 4..9 route from port N..D
  localparam logic [7:0] CFG_K      = 8'd2;  // K0..K3 constants, 8 bits each
  localparam logic [7:0] CFG_SEQ    = 8'd3;  // [5:0] LAST, [13:8] JT, [23:16] PLEN (0 = 256)

  // Operand selects
  typedef enum logic [1:0] {R_A = 2'd0, R_B = 2'd1, R_E = 2'd2, R_RAM = 2'd3} rsel_e;
  typedef enum logic [2:0] {
    S_A = 3'd0, S_B = 3'd1, S_E = 3'd2, S_K = 3'd3, S_Q = 3'd4, S_RAM = 3'd5, S_ZERO = 3'd6, S_ZERO2 = 3'd7
  } ssel_e;

  // 2901-type ALU functions
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,  // R + S
    ALU_SUBR = 3'd1,  // S - R
    ALU_SUBS = 3'd2,  // R - S
    ALU_OR   = 3'd3,
    ALU_AND  = 3'd4,
    ALU_NOTRS = 3'd5, // ~R & S
    ALU_EXOR = 3'd6,
    ALU_EXNOR = 3'd7
  } alu_e;

  typedef enum logic [1:0] {POST_NONE = 2'd0, POST_ABS = 2'd1, POST_MIN = 2'd2, POST_MAX = 2'd3} post_e;

  typedef enum logic [1:0] {
    RAM_NONE  = 2'd0,  // no access
    RAM_LINE  = 2'd1,  // read RAM[P], write stack-A word to RAM[P], advance P (line/pixel delay FIFO);
                       // a control word at stack A is forwarded instead
    RAM_HIST  = 2'd2,  // read RAM[A head], write result to it (histogram, table update)
    RAM_TABLE = 2'd3   // read RAM[P], advance P (table playback)
  } ram_mode_e;

  typedef enum logic [1:0] {
    SEQ_NEXT  = 2'd0,  // pc+1, back to 0 after LAST
    SEQ_TAGJ  = 2'd1,  // jump to JT if the R word is a control word, else as SEQ_NEXT
    SEQ_JUMP  = 2'd2,  // jump to JT
    SEQ_UNTIL = 2'd3   // repeat until the R word is a control word, then as SEQ_NEXT
  } seq_e;

  // 32-bit microinstruction
  typedef struct packed {
    seq_e      seq;     // [31:30]
    ram_mode_e ram;     // [29:28]
    logic      tag;     // [27]    output words get the type bit set
    logic      qwe;     // [26]    Q := result
    logic      flag;    // [25]    output 1 if result > 0 else 0 (threshold)
    logic [3:0] shr;    // [24:21] output right shift (arithmetic)
    post_e     post;    // [20:19]
    alu_e      alu;     // [18:16]
    logic [1:0] shl;    // [15:14] stage-2 input left shift of R
    logic      mul;     // [13]    stage-2 R := R * K
    logic [1:0] ksel;   // [12:11]
    ssel_e     ssel;    // [10:8]
    rsel_e     rsel;    // [7:6]
    logic [2:0] push;   // [5:3]   output stacks C D F
    logic [2:0] pop;    // [2:0]   input stacks A B E
  } uinstr_t;

  // Command passed from the decode stage to stages 2 and 3
  typedef struct packed {
    logic       pass;   // control word: forward R word unchanged
    logic       tag;
    logic       qwe;
    logic       flag;
    logic [3:0] shr;
    post_e      post;
    alu_e       alu;
    logic [1:0] shl;
    logic       mul;
    logic [7:0] k;
    ssel_e      ssel;
    rsel_e      rsel;
    logic [2:0] push;
    logic       ram_we;
    logic       ram_wr_a; // RAM write data is the stack-A word, else the result
    logic [7:0] ram_addr;
  } dp_cmd_t;

endpackage
