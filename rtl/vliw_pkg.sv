// vliw_pkg: types and constants shared by the fault-tolerant 8-issue VLIW core.
//
// The machine issues bundles of eight operations.  Every issue slot holds an
// ALU; slots 2, 3, 6 and 7 also hold a multiplier, slots 1 and 5 a memory
// unit and slot 0 the single branch unit (8 ALU, 4 MUL, 2 MEM, 1 BR, as the
// design's reference configuration lists).  The slot placement of the MUL and
// MEM units follows the unit labels of the design's slot diagram; the branch
// unit sits in slot 0 only because the configuration has a single one.
//
// The operation encoding below is this design's own, loosely modelled on a
// VEX-style RISC operation set; the fault-tolerance mechanism does not depend on it:
//   [31:26] opcode  [25:20] rd  [19:14] rs1  [13:8] rs2  /  [13:0] signed imm
package vliw_pkg;

  localparam int unsigned ISSUE_W  = 8;    // operations per bundle / issue slots
  localparam int unsigned SLOT_W   = 3;    // log2(ISSUE_W)
  localparam int unsigned XLEN     = 32;   // data path width
  localparam int unsigned NREGS    = 64;   // general purpose registers, r0 reads 0
  localparam int unsigned RIDX_W   = 6;
  localparam int unsigned NCLASS   = 4;    // FU classes
  localparam int unsigned NCOPY    = 3;    // at most three copies of an operation
  localparam int unsigned PC_W     = 10;   // bundle address width

  // Functional-unit classes.  A slot's capability mask has bit [cls] set
  // when the slot holds a unit of that class.
  typedef enum logic [1:0] {
    FU_ALU = 2'd0,
    FU_MUL = 2'd1,
    FU_MEM = 2'd2,
    FU_BR  = 2'd3
  } fu_class_e;

  typedef logic [NCLASS-1:0] caps_t;

  // Fault-tolerance mode.  MODE_OFF runs the program unreplicated and is
  // kept as the unprotected reference point.
  typedef enum logic [1:0] {
    MODE_DMR        = 2'd0,  // duplication: error detection
    MODE_TMR        = 2'd1,  // triplication: detection and correction by vote
    MODE_DMR_REEXEC = 2'd2,  // duplication, third execution after a mismatch
    MODE_OFF        = 2'd3   // no replication
  } mode_e;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,  OP_SUB   = 6'd2,  OP_AND   = 6'd3,  OP_OR    = 6'd4,
    OP_XOR   = 6'd5,  OP_SHL   = 6'd6,  OP_SHR   = 6'd7,  OP_SRA   = 6'd8,
    OP_SLT   = 6'd9,  OP_SLTU  = 6'd10, OP_CMPEQ = 6'd11, OP_CMPNE = 6'd12,
    OP_ADDI  = 6'd16, OP_ANDI  = 6'd17, OP_ORI   = 6'd18, OP_XORI  = 6'd19,
    OP_MOVI  = 6'd20, OP_SHLI  = 6'd21, OP_SHRI  = 6'd22,
    OP_MUL   = 6'd32, OP_MULHU = 6'd33, OP_MULI  = 6'd34,
    OP_LDW   = 6'd40, OP_STW   = 6'd41,
    OP_BR    = 6'd48, OP_BRF   = 6'd49, OP_GOTO  = 6'd50
  } opcode_e;

  // One decoded operation.
  typedef struct packed {
    logic              valid;      // a real operation (not a NOP)
    fu_class_e         cls;        // FU class it needs
    opcode_e           opc;
    logic [RIDX_W-1:0] rd;
    logic [RIDX_W-1:0] rs1;
    logic [RIDX_W-1:0] rs2;
    logic [XLEN-1:0]   imm;        // sign-extended immediate / branch target
    logic              use_imm;    // second operand is imm
    logic              rd_is_src;  // store: rd names the data register
    logic              wr_rd;      // writes rd at commit
  } dec_op_t;

  typedef dec_op_t [ISSUE_W-1:0] dec_bundle_t;

  // Binding information: which copy of which operation a slot executes.
  typedef struct packed {
    logic              valid;
    logic [SLOT_W-1:0] op_idx;     // operation's position in the fetched bundle
    logic [1:0]        copy;       // 0 original, 1 and 2 replicas
  } bind_t;

  typedef bind_t [ISSUE_W-1:0] bind_vec_t;

  // Result of one FU.  ALU/MUL: val = result.  MEM: val = word address,
  // aux = store data.  BR: val[0] = taken, aux = target.
  typedef struct packed {
    logic [XLEN-1:0] val;
    logic [XLEN-1:0] aux;
  } fu_res_t;

  typedef fu_res_t [ISSUE_W-1:0] res_vec_t;

  // Fetched bundle in the F/DC register.
  typedef struct packed {
    logic                          valid;
    logic [PC_W-1:0]               pc;
    logic [ISSUE_W-1:0][XLEN-1:0]  ops;
  } fdc_t;

  // Decoded bundle in the DC/EX register.
  typedef struct packed {
    logic            valid;
    logic [PC_W-1:0] pc;
    dec_bundle_t     ops;
  } dcex_t;

  // One executed time slot in the EX/M-WB register.
  typedef struct packed {
    logic            valid;
    logic            last;     // final time slot of the bundle (or of its re-execution)
    logic            reexec;   // time slot holds re-execution copies
    logic [PC_W-1:0] pc;
    bind_vec_t       bnd; 
    res_vec_t        res;
    dec_bundle_t     ops;      // the fetched bundle, for commit
  } exwb_t;

  // Capability mask of each issue slot: {BR, MEM, MUL, ALU}.
  function automatic caps_t slot_caps(input int unsigned s);
    case (s)
      0:       return 4'b1001;
      1, 5:    return 4'b0101;
      2, 3,
      6, 7:    return 4'b0011;
      default: return 4'b0001;
    endcase
  endfunction

  // Number of copies the mode asks for.
  function automatic int unsigned mode_copies(input mode_e m);
    case (m)
      MODE_TMR: return 3;
      MODE_OFF: return 1;
      default:  return 2;
    endcase
  endfunction

endpackage
