// plx_pkg: types and constants shared by the PLX processor.
//
// PLX is a 32-bit-instruction RISC ISA with subword-parallel (packed)
// operations, 32 general registers and 16 sets of eight 1-bit predicates.
// The ISA names nine instruction formats (0, 1, 2, 3, 4a, 4b, 4c, 5a, 5b) and
// their operand fields, but not where the fields sit in the word or which
// opcode values are used. The bit layout below is this implementation's own:
//
//   [31:26] major opcode (6 bits)   [25:23] qualifying predicate (P0..P7)
//   [22:0]  operand field, laid out per format:
//     0   : imm23 [22:0]
//     1   : rd [22:18], imm18 [17:0]
//     2   : rd [22:18], rs1 [17:13], imm13 [12:0]
//     3   : rd [22:18], rs1 [17:13], imm7 [12:6], imm6 [5:0]
//           (mix: rs2 [12:8], sw [1:0])
//     4a  : rd [22:18], rs1 [17:13], rs2 [12:8], func [7:2], sw [1:0]
//     4b  : rd [22:18], rs1 [17:13], imm5 [12:8], func [7:2], sw [1:0]
//     4c  : rd [22:18], rs1 [17:13], rs2 [12:8], imm8 [7:0]
//     5a  : rs1 [22:18], rs2 [17:13], p1 [12:10], p2 [9:7], rel [3:0]
//     5b  : rs1/rd [22:18], imm8 [17:10], p1 [9:7], p2 [6:4], imm4 [3:0]
//
// The 2-bit sw field holds the subword size as log2(bytes): 0=1, 1=2, 2=4,
// 3=8 bytes. For pmulshr it holds the shift amount code (0,8,15,16) and for
// pshiftadd the shift amount (1,2,3). Load and store carry size and the
// update option in the opcode: opcode = {3'b100 (load) or 3'b101 (store),
// update, sw}.
package plx_pkg;

  typedef enum logic [5:0] {
    OP_JMP          = 6'd0,
    OP_JMP_LINK     = 6'd1,
    OP_TRAP         = 6'd2,
    OP_JMP_REG      = 6'd3,
    OP_JMP_REG_LINK = 6'd4,
    OP_LOADI_HI     = 6'd5,
    OP_LOADI_LO     = 6'd6,
    OP_ADDI         = 6'd7,
    OP_SUBI         = 6'd8,
    OP_ANDI         = 6'd9,
    OP_ORI          = 6'd10,
    OP_XORI         = 6'd11,
    OP_SLLI         = 6'd12,
    OP_SRAI         = 6'd13,
    OP_SRLI         = 6'd14,
    OP_EXTRACT      = 6'd15,
    OP_DEPOSIT      = 6'd16,
    OP_MIX_L        = 6'd17,
    OP_MIX_R        = 6'd18,
    OP_F4A          = 6'd19,
    OP_F4B          = 6'd20,
    OP_SHRP         = 6'd21,
    OP_CMP          = 6'd22,
    OP_CMPI         = 6'd23,
    OP_TESTBIT      = 6'd24,
    OP_CHANGEPR     = 6'd25,
    OP_CHANGEPR_LD  = 6'd26
  } opcode_e;

  // Load/store opcodes: {LS_LOAD or LS_STORE, update, sw}
  localparam logic [2:0] LS_LOAD  = 3'b100;
  localparam logic [2:0] LS_STORE = 3'b101;

  // Function codes of format 4a (register-register) instructions.
  typedef enum logic [5:0] {
    F_PADD        = 6'd0,
    F_PADD_U      = 6'd1,
    F_PADD_S      = 6'd2,
    F_PADDINCR    = 6'd3,
    F_PSUB        = 6'd4,
    F_PSUB_U      = 6'd5,
    F_PSUB_S      = 6'd6,
    F_PSUBDECR    = 6'd7,
    F_PAVG        = 6'd8,
    F_PAVG_RAZ    = 6'd9,
    F_PSUBAVG     = 6'd10,
    F_AND         = 6'd11,
    F_ANDCM       = 6'd12,
    F_OR          = 6'd13,
    F_XOR         = 6'd14,
    F_NOT         = 6'd15,
    F_PCMP_EQ     = 6'd16,
    F_PCMP_GT     = 6'd17,
    F_PMAX        = 6'd18,
    F_PMIN        = 6'd19,
    F_PSHIFTADD_L = 6'd20,
    F_PSHIFTADD_R = 6'd21,
    F_PMUL_ODD    = 6'd22,
    F_PMUL_EVEN   = 6'd23,
    F_PMULSHR     = 6'd24,
    F_PMULSHR_A   = 6'd25,
    F_PSHIFT_L    = 6'd26,
    F_PSHIFT_R    = 6'd27,
    F_PSHIFT_RA   = 6'd28,
    F_PERM        = 6'd29
  } func4a_e;

  // Function codes of format 4b (register-immediate) instructions.
  typedef enum logic [5:0] {
    G_PSHIFTI_L  = 6'd0,
    G_PSHIFTI_R  = 6'd1,
    G_PSHIFTI_RA = 6'd2,
    G_MUX_REV    = 6'd3,
    G_MUX_MIX    = 6'd4,
    G_MUX_SHUF   = 6'd5,
    G_MUX_ALT    = 6'd6,
    G_MUX_BRCST  = 6'd7
  } func4b_e;

  // Compare relations of cmp / cmpi.
  typedef enum logic [3:0] {
    REL_EQ  = 4'd0,
    REL_NE  = 4'd1,
    REL_LT  = 4'd2,
    REL_LE  = 4'd3,
    REL_GT  = 4'd4,
    REL_GE  = 4'd5,
    REL_LTU = 4'd6,
    REL_LEU = 4'd7,
    REL_GTU = 4'd8,
    REL_GEU = 4'd9
  } rel_e;

  // Operation groups inside the packed ALU (one per family of instructions).
  typedef enum logic [4:0] {
    PA_ADD, PA_ADD_U, PA_ADD_S, PA_ADDINCR,
    PA_SUB, PA_SUB_U, PA_SUB_S, PA_SUBDECR,
    PA_AVG, PA_AVG_RAZ, PA_SUBAVG,
    PA_AND, PA_ANDCM, PA_OR, PA_XOR, PA_NOT,
    PA_CMPEQ, PA_CMPGT, PA_MAX, PA_MIN,
    PA_SHADD_L, PA_SHADD_R
  } palu_op_e;

  // Permutation unit operations.
  typedef enum logic [3:0] {
    PM_MIX_L, PM_MIX_R, PM_REV, PM_MIX, PM_SHUF, PM_ALT, PM_BRCST, PM_PERM
  } perm_op_e;

  // Packed shift operations.
  typedef enum logic [1:0] {PS_LEFT, PS_RIGHT, PS_RIGHT_ARITH} pshift_op_e;

  // Scalar immediate ALU operations.
  typedef enum logic [2:0] {IA_ADD, IA_SUB, IA_AND, IA_OR, IA_XOR, IA_LOADI_HI, IA_LOADI_LO} int_op_e;

  // Whole-register shift and bit-field operations.
  typedef enum logic [2:0] {SB_SLL, SB_SRA, SB_SRL, SB_SHRP, SB_EXTRACT, SB_DEPOSIT} sb_op_e;

  // Branch-unit operations.
  typedef enum logic [2:0] {BR_NONE, BR_JMP, BR_JMP_LINK, BR_JMP_REG, BR_JMP_REG_LINK, BR_TRAP} br_op_e;

  // Predicate-producing operations.
  typedef enum logic [1:0] {CP_CMP, CP_CMPI, CP_TESTBIT} cmp_op_e;

  // Which execution unit produces the register result.
  typedef enum logic [2:0] {
    U_NONE, U_INT, U_SB, U_PALU, U_PMUL, U_PSHIFT, U_PERM, U_LOAD
  } unit_e;

  // Fully decoded instruction.
  typedef struct packed {
    logic        valid;       // a known opcode/function
    logic [2:0]  qp;          // qualifying predicate
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [1:0]  sw;          // subword size code (log2 bytes)
    logic [1:0]  sa;          // shift code of pshiftadd / pmulshr
    logic [22:0] imm23;
    logic [17:0] imm18;
    logic [12:0] imm13;
    logic [7:0]  imm8;        // shrp amount, cmpi/testbit immediate, changepr value
    logic [6:0]  imm7;        // extract/deposit position
    logic [5:0]  imm6;        // extract/deposit length
    logic [4:0]  imm5;        // pshifti amount
    logic [3:0]  imm4;        // changepr set number
    logic [2:0]  p1;
    logic [2:0]  p2;
    rel_e        rel;
    unit_e       unit;        // result source for rd
    int_op_e     int_op;
    sb_op_e      sb_op;
    palu_op_e    palu_op;
    logic        pmul_shr;    // 1: pmulshr, 0: pmul.odd/even
    logic        pmul_odd_or_arith; // pmul: odd; pmulshr: arithmetic
    pshift_op_e  pshift_op;
    logic        pshift_imm;  // amount from imm5 rather than rs2
    perm_op_e    perm_op;
    br_op_e      br_op;
    cmp_op_e     cmp_op;
    logic        pred_write;  // cmp/cmpi/testbit write P1/P2
    logic        setpr;       // changepr / changepr.ld
    logic        setpr_ld;    // changepr.ld
    logic        rd_we;       // writes rd
    logic        is_load;
    logic        is_store;
    logic        ls_update;   // writes rs1 := rs1 + imm13
  } dec_t;

endpackage
