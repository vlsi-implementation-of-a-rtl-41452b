// np_pkg: types and constants shared by the numerical processor blocks.
//
// The processor executes 50-bit horizontal microinstructions from its
// program memory. The two leftmost bits select the instruction type:
//   00 type 1, AU and MU both used     01 type 1, AU fields ignored
//   10 type 1, MU fields ignored       11 type 2
// A type 1 word carries an 8-bit destination and two 8-bit source register
// numbers for the floating point adder (AU) and for the multiplier (MU).
// A type 2 word carries two ignore bits (IB, OB), an IB destination
// register, an OB source register, a 10-bit next address NA and a 20-bit
// condition field CC. The field order and the meaning of the type and
// ignore bits follow the published instruction format; the field widths
// follow from a 50-bit word with 256 registers and a 1K program memory,
// which leaves 20 bits for CC. The encoding inside CC (a 4-bit condition
// select and a 16-bit loop count) is this design's own choice.
package np_pkg;

  localparam int unsigned IW        = 50;   // instruction width
  localparam int unsigned RA        = 8;    // register address width
  localparam int unsigned PA        = 10;   // program address width
  localparam int unsigned DW        = 32;   // data word width
  localparam int unsigned LCW       = 16;   // loop counter width
  localparam int unsigned STEPS     = 4;    // steps per M-cycle (125 ns each)
  localparam int unsigned FU_STAGES = 3;    // pipeline depth of AU and MU
  localparam int unsigned DEST_DLY  = 4;    // destination field delay, M-cycles

  typedef struct packed {
    logic           ign_mu;   // bit 49
    logic           ign_au;   // bit 48
    logic [RA-1:0]  da;
    logic [RA-1:0]  sa1;
    logic [RA-1:0]  sa2;
    logic [RA-1:0]  dm;
    logic [RA-1:0]  sm1;
    logic [RA-1:0]  sm2;
  } type1_t;

  typedef struct packed {
    logic [LCW-1:0] lc_val;   // loop counter load value
    logic [3:0]     cond;     // condition select, see cond_e
  } cc_field_t;

  typedef struct packed {
    logic [1:0]     kind;     // 2'b11
    logic           ign_ob;   // bit 47
    logic           ign_ib;   // bit 46
    logic [RA-1:0]  ib;       // destination register for the IB head word
    logic [RA-1:0]  ob;       // source register for the OB tail
    logic [PA-1:0]  na;       // next address
    cc_field_t      cc;
  } type2_t;

  // Condition select of a type 2 instruction.
  typedef enum logic [3:0] {
    C_NEVER  = 4'd0,   // no branch
    C_IBFULL = 4'd1,   // jump to NA if the input buffer is full
    C_OBFULL = 4'd2,   // jump to NA if the output buffer is full
    C_POS    = 4'd3,   // jump to NA if the last add result was positive
    C_NEG    = 4'd4,   // jump to NA if the last add result was negative
    C_ZERO   = 4'd5,   // jump to NA if the last add result was zero
    C_ALWAYS = 4'd6,   // unconditional jump to NA
    C_LOOP   = 4'd7,   // if LC != 0: decrement LC and jump to NA
    C_CALL   = 4'd8,   // push the return address and jump to NA
    C_RET    = 4'd9,   // pop the program counter stack
    C_LDLC   = 4'd10   // load LC with the lc_val field, no branch
  } cond_e;

  // Program counter stack operations.
  typedef enum logic [2:0] {
    PC_HOLD = 3'd0,    // nothing
    PC_SEQ  = 3'd1,    // fetch from the top of stack
    PC_JUMP = 3'd2,    // fetch from NA
    PC_CALL = 3'd3,    // push, fetch from NA
    PC_RET  = 3'd4,    // pop, fetch from the return address
    PC_LOAD = 3'd5     // set the top of stack, empty the rest
  } pc_op_e;

  // Register file write bus sources.
  typedef enum logic [1:0] {
    WS_AU = 2'd0,
    WS_MU = 2'd1,
    WS_IB = 2'd2
  } wsel_e;

  // One entry of the destination delay lines.
  typedef struct packed {
    logic           valid;    // a type 1 instruction was issued
    logic           ign_mu;
    logic           ign_au;
    logic [RA-1:0]  da;
    logic [RA-1:0]  dm;
  } dest_t;

  // Loader command words (bits 31:30 of a word read in load mode).
  localparam logic [1:0] LD_PM    = 2'b01;  // next two words: PM word, low then high
  localparam logic [1:0] LD_START = 2'b10;  // set the PC to bits 9:0 and start

endpackage
