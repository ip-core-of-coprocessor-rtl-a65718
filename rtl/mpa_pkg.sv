// mpa_pkg: shared constants and types of the multiple-precision-arithmetic
// (MPA) coprocessor.
//
// Numbers are held in sign-magnitude form: a magnitude made of 64-bit limbs
// (least significant limb at address 0), a sign bit (1 = negative) and a size
// field counting the limbs in use. A register holds up to 512 limbs, i.e.
// 32 kbit, and there are 16 registers; limb width, register length and
// register count follow the source design. The value zero always has size 0
// and sign 0.
//
// The instruction encoding is this design's own: the source names seven
// instructions (Table "instruction set") but gives no binary format. Every
// instruction starts with a byte {opcode[7:4], regX[3:0]}; instructions with
// more register operands add a second byte {regY[7:4], regZ[3:0]}
// (loaab uses only regY of it).
package mpa_pkg;

  localparam int unsigned LIMB_W    = 64;   // limb width (bits)
  localparam int unsigned MAX_LIMBS = 512;  // 512 x 64 bit = 32 kbit per register
  localparam int unsigned NREGS     = 16;   // register count
  localparam int unsigned AW        = $clog2(MAX_LIMBS);  // limb address width (9)
  localparam int unsigned SW        = AW + 1;             // size field width (10)
  localparam int unsigned RW        = $clog2(NREGS);      // register index width (4)

  typedef logic [LIMB_W-1:0] limb_t;
  typedef logic [AW-1:0]     laddr_t;
  typedef logic [SW-1:0]     lsize_t;
  typedef logic [RW-1:0]     ridx_t;

  // Write stream from one source (loader, multiplier, adder, move path) into
  // the register bank. 'we' writes one limb; 'meta_we' writes sign and size
  // and marks the end of a result.
  typedef struct packed {
    logic   we;
    laddr_t addr;
    limb_t  data;
    logic   meta_we;
    logic   sign;
    lsize_t size;
  } wr_t;

  localparam wr_t WR_IDLE = '0;

  // Inputs of the 5-to-1 multiplexer in front of every register.
  typedef enum logic [2:0] {
    SRC_DBUSA = 3'd0,  // data loader A
    SRC_DBUSB = 3'd1,  // data loader B
    SRC_RESM  = 3'd2,  // multiplier result
    SRC_RESAS = 3'd3,  // adder/subtractor result
    SRC_REGM  = 3'd4   // register-to-register path
  } wsrc_e;

  localparam int unsigned NSRC = 5;

  // Control of one register's input multiplexer (Ctrl0..Ctrl15).
  typedef struct packed {
    logic  en;
    wsrc_e src;
  } wctl_t;

  // Read ports of the register bank, one per 16-to-1 multiplexer.
  typedef enum logic [2:0] {
    RP_MA  = 3'd0,  // multiplier operand X  (Ctrl16)
    RP_MB  = 3'd1,  // multiplier operand Y  (Ctrl17)
    RP_ASA = 3'd2,  // adder operand X       (Ctrl18)
    RP_ASB = 3'd3,  // adder operand Y       (Ctrl19)
    RP_UL  = 3'd4,  // unloader              (CtrlUL)
    RP_RM  = 3'd5   // register-to-register  (Ctrl20)
  } rport_e;

  localparam int unsigned NRP = 6;

  // Opcodes (upper nibble of the first instruction byte).
  typedef enum logic [3:0] {
    OP_LOAA  = 4'h1,
    OP_LOAB  = 4'h2,
    OP_LOAAB = 4'h3,
    OP_UNL   = 4'h4,
    OP_MULT  = 4'h5,
    OP_ADD   = 4'h6,
    OP_SUB   = 4'h7
  } opcode_e;

  // Number of bytes of an instruction with this opcode (0 = not an opcode).
  function automatic int unsigned op_len(logic [3:0] op);
    case (op)
      OP_LOAA, OP_LOAB, OP_UNL:      return 1;
      OP_LOAAB, OP_MULT, OP_ADD, OP_SUB: return 2;
      default:                       return 0;
    endcase
  endfunction

endpackage
