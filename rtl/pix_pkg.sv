// Shared constants and types of the pixel-module read-out.
// The FE-to-MCC word is 21 bits. A hit word is {row[7:0], col[4:0], tot[7:0]}.
// An End-of-Event (EoE) word is marked by its three top bits being 111, a row
// value no pixel can have. The MCC output word is a 3-bit type and a 21-bit payload.
// The word widths, the 8-bit time stamp, the 16 FE chips and the 16 pending events
// are the published numbers. The bit layouts and command codes are this design's own.
package pix_pkg;
  localparam int TS_W      = 8;    // Gray time stamp / BCID width
  localparam int L1_W      = 4;    // Lev1 (event) number width
  localparam int WORD_W    = 21;   // FE data word / MCC FIFO word
  localparam int OWORD_W   = 24;   // MCC output word (type + payload)
  localparam int NREG      = 8;    // MCC configuration registers
  localparam int REG_W     = 16;

  localparam logic [2:0] EOE_TAG = 3'b111;

  typedef struct packed {
    logic [7:0] row;
    logic [4:0] col;
    logic [7:0] tot;
  } hit_word_t;

  typedef struct packed {
    logic [2:0]      tag;        // 3'b111
    logic            overflow;   // hits were lost for this event (EoC or FIFO)
    logic [4:0]      spare;
    logic [L1_W-1:0] l1id;
    logic [TS_W-1:0] bcid;
  } eoe_word_t;

  // MCC output word types
  typedef enum logic [2:0] {
    OT_IDLE    = 3'b000,
    OT_HEADER  = 3'b001,
    OT_FEFLAG  = 3'b010,
    OT_HIT     = 3'b011,
    OT_TRAILER = 3'b100,
    OT_REGDATA = 3'b101
  } otype_e;

  // MCC output modes (CSR[1:0])
  typedef enum logic [1:0] {
    OM_40_1L     = 2'd0,  // one line, one bit per clock
    OM_80_2L     = 2'd1,  // two lines, one bit per clock each
    OM_80_1L_DDR = 2'd2,  // one line, both clock edges
    OM_160_2L    = 2'd3   // two lines, both clock edges
  } omode_e;

  // Serial command codes (ROD -> MCC)
  localparam logic [4:0] TRIG_CODE = 5'b11101;
  localparam logic [4:0] HDR_CODE  = 5'b10110;
  localparam logic [3:0] F_BCR  = 4'b0001;
  localparam logic [3:0] F_ECR  = 4'b0010;
  localparam logic [3:0] F_CAL  = 4'b0100;
  localparam logic [3:0] F_SYNC = 4'b1000;
  localparam logic [3:0] F_SLOW = 4'b1011;

  // Slow command opcodes
  typedef enum logic [3:0] {
    OP_WRREG   = 4'd0,   // addr, 16 data bits
    OP_RDREG   = 4'd1,   // addr
    OP_RUN     = 4'd2,   // enter Run Mode
    OP_GRST    = 4'd3,   // MCC global reset
    OP_FEGRST  = 4'd4,   // FE global reset (broadcast)
    OP_WRFE    = 4'd5,   // addr[3]=LD level, then 5-bit length-1, then data bits
    OP_WRFIFO  = 4'd6    // addr = FE number, then 21 data bits (self test)
  } sop_e;

  // Decoded MCC command: one-clock strobes plus their arguments
  typedef struct packed {
    logic        trig;
    logic        bcr;
    logic        ecr;
    logic        cal;
    logic        sync;
    logic        wrreg;
    logic        rdreg;
    logic        grst;
    logic        fegrst;
    logic        wrfe;
    logic        wrfifo;
    logic [3:0]  addr;
    logic [5:0]  len;     // WRFE: number of data bits (1..32)
    logic [31:0] data;    // payload, last received bit in bit 0
  } mcc_cmd_t;

  // FE command register bits (cmd[4:0])
  localparam int FC_GRST   = 0;
  localparam int FC_CKGLOB = 1;
  localparam int FC_WRGLOB = 2;
  localparam int FC_CKPIX  = 3;

  function automatic logic [TS_W-1:0] gray2bin(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W-2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [TS_W-1:0] bin2gray(input logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction
endpackage
