// plx_decode: instruction decoder of the PLX processor.
//
// Turns a 32-bit instruction into the dec_t control word: operand fields of
// every format, the qualifying predicate, which unit produces the result and
// that unit's operation, and the register, predicate and memory write
// enables. The field layout and opcode values are those of plx_pkg (this
// design's encoding; the ISA names formats and fields only). Unknown opcodes
// or function codes, and subword sizes the ISA does not list for an
// operation, give valid = 0, which the core executes as a no-op.
// Combinational.
module plx_decode
  import plx_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        d
);
  logic [5:0] op;
  logic [5:0] fn;
  logic [1:0] swf;

  always_comb begin
    op  = instr[31:26];
    fn  = instr[7:2];
    swf = instr[1:0];

    d           = '0;
    d.valid     = 1'b1;
    d.qp        = instr[25:23];
    d.rd        = instr[22:18];
    d.rs1       = instr[17:13];
    d.rs2       = instr[12:8];
    d.sw        = swf;
    d.imm23     = instr[22:0];
    d.imm18     = instr[17:0];
    d.imm13     = instr[12:0];
    d.imm8      = instr[7:0];
    d.imm7      = instr[12:6];
    d.imm6      = instr[5:0];
    d.imm5      = instr[12:8];
    d.imm4      = instr[3:0];
    d.p1        = instr[9:7];
    d.p2        = instr[6:4];
    d.rel       = rel_e'(instr[3:0]);

    if (op[5:3] == LS_LOAD || op[5:3] == LS_STORE) begin
      d.sw        = op[1:0];
      d.ls_update = op[2];
      d.is_load   = op[5:3] == LS_LOAD;
      d.is_store  = op[5:3] == LS_STORE;
      d.rd_we     = d.is_load;
      d.unit      = d.is_load ? U_LOAD : U_NONE;
    end else begin
      case (op)
        OP_JMP:          d.br_op = BR_JMP;
        OP_JMP_LINK:     d.br_op = BR_JMP_LINK;
        OP_TRAP:         d.br_op = BR_TRAP;
        OP_JMP_REG:      d.br_op = BR_JMP_REG;
        OP_JMP_REG_LINK: d.br_op = BR_JMP_REG_LINK;
        OP_LOADI_HI, OP_LOADI_LO, OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI: begin
          d.unit  = U_INT;
          d.rd_we = 1'b1;
          case (op)
            OP_LOADI_HI: d.int_op = IA_LOADI_HI;
            OP_LOADI_LO: d.int_op = IA_LOADI_LO;
            OP_ADDI:     d.int_op = IA_ADD;
            OP_SUBI:     d.int_op = IA_SUB;
            OP_ANDI:     d.int_op = IA_AND;
            OP_ORI:      d.int_op = IA_OR;
            default:     d.int_op = IA_XOR;
          endcase
        end
        OP_SLLI, OP_SRAI, OP_SRLI, OP_EXTRACT, OP_DEPOSIT, OP_SHRP: begin
          d.unit  = U_SB;
          d.rd_we = 1'b1;
          case (op)
            OP_SLLI:    d.sb_op = SB_SLL;
            OP_SRAI:    d.sb_op = SB_SRA;
            OP_SRLI:    d.sb_op = SB_SRL;
            OP_EXTRACT: d.sb_op = SB_EXTRACT;
            OP_DEPOSIT: d.sb_op = SB_DEPOSIT;
            default:    d.sb_op = SB_SHRP;
          endcase
        end
        OP_MIX_L, OP_MIX_R: begin
          d.unit    = U_PERM;
          d.rd_we   = 1'b1;
          d.perm_op = (op == OP_MIX_L) ? PM_MIX_L : PM_MIX_R;
          d.valid   = swf != 2'd3;
        end
        OP_F4A: begin
          d.rd_we = 1'b1;
          d.unit  = U_PALU;
          case (fn)
            F_PADD:        d.palu_op = PA_ADD;
            F_PADD_U:      d.palu_op = PA_ADD_U;
            F_PADD_S:      d.palu_op = PA_ADD_S;
            F_PADDINCR:    d.palu_op = PA_ADDINCR;
            F_PSUB:        d.palu_op = PA_SUB;
            F_PSUB_U:      d.palu_op = PA_SUB_U;
            F_PSUB_S:      d.palu_op = PA_SUB_S;
            F_PSUBDECR:    d.palu_op = PA_SUBDECR;
            F_PAVG:        begin d.palu_op = PA_AVG;     d.valid = !swf[1]; end
            F_PAVG_RAZ:    begin d.palu_op = PA_AVG_RAZ; d.valid = !swf[1]; end
            F_PSUBAVG:     begin d.palu_op = PA_SUBAVG;  d.valid = !swf[1]; end
            F_AND:         d.palu_op = PA_AND;
            F_ANDCM:       d.palu_op = PA_ANDCM;
            F_OR:          d.palu_op = PA_OR;
            F_XOR:         d.palu_op = PA_XOR;
            F_NOT:         d.palu_op = PA_NOT;
            F_PCMP_EQ:     d.palu_op = PA_CMPEQ;
            F_PCMP_GT:     d.palu_op = PA_CMPGT;
            F_PMAX:        begin d.palu_op = PA_MAX; d.valid = !swf[1]; end
            F_PMIN:        begin d.palu_op = PA_MIN; d.valid = !swf[1]; end
            F_PSHIFTADD_L, F_PSHIFTADD_R: begin
              d.palu_op = (fn == F_PSHIFTADD_L) ? PA_SHADD_L : PA_SHADD_R;
              d.sw      = 2'd1;
              d.sa      = swf;
              d.valid   = swf != 2'd0;
            end
            F_PMUL_ODD, F_PMUL_EVEN, F_PMULSHR, F_PMULSHR_A: begin
              d.unit              = U_PMUL;
              d.sw                = 2'd1;
              d.sa                = swf;
              d.pmul_shr          = fn inside {F_PMULSHR, F_PMULSHR_A};
              d.pmul_odd_or_arith = fn inside {F_PMUL_ODD, F_PMULSHR_A};
            end
            F_PSHIFT_L, F_PSHIFT_R, F_PSHIFT_RA: begin
              d.unit      = U_PSHIFT;
              d.pshift_op = (fn == F_PSHIFT_L) ? PS_LEFT :
                            (fn == F_PSHIFT_R) ? PS_RIGHT : PS_RIGHT_ARITH;
              d.valid     = swf != 2'd0;
            end
            F_PERM: begin
              d.unit    = U_PERM;
              d.perm_op = PM_PERM;
              d.sw      = 2'd1;
            end
            default: d.valid = 1'b0;
          endcase
        end
        OP_F4B: begin
          d.rd_we = 1'b1;
          d.unit  = U_PERM;
          case (fn)
            G_PSHIFTI_L, G_PSHIFTI_R, G_PSHIFTI_RA: begin
              d.unit       = U_PSHIFT;
              d.pshift_imm = 1'b1;
              d.pshift_op  = (fn == G_PSHIFTI_L) ? PS_LEFT :
                             (fn == G_PSHIFTI_R) ? PS_RIGHT : PS_RIGHT_ARITH;
              d.valid      = swf != 2'd0;
            end
            G_MUX_REV:   begin d.perm_op = PM_REV;   d.sw = 2'd0; end
            G_MUX_MIX:   begin d.perm_op = PM_MIX;   d.sw = 2'd0; end
            G_MUX_SHUF:  begin d.perm_op = PM_SHUF;  d.sw = 2'd0; end
            G_MUX_ALT:   begin d.perm_op = PM_ALT;   d.sw = 2'd0; end
            G_MUX_BRCST: begin d.perm_op = PM_BRCST; d.sw = 2'd0; end
            default:     d.valid = 1'b0;
          endcase
        end
        OP_CMP: begin
          d.cmp_op     = CP_CMP;
          d.pred_write = 1'b1;
          d.rs1        = instr[22:18];
          d.rs2        = instr[17:13];
          d.p1         = instr[12:10];
          d.p2         = instr[9:7];
          d.valid      = instr[3:0] <= 4'd9;
        end
        OP_CMPI, OP_TESTBIT: begin
          d.cmp_op     = (op == OP_CMPI) ? CP_CMPI : CP_TESTBIT;
          d.pred_write = 1'b1;
          d.rs1        = instr[22:18];
          d.imm8       = instr[17:10];
          d.p1         = instr[9:7];
          d.p2         = instr[6:4];
          d.valid      = (op == OP_TESTBIT) || instr[3:0] <= 4'd9;
        end
        OP_CHANGEPR, OP_CHANGEPR_LD: begin
          d.setpr    = 1'b1;
          d.setpr_ld = op == OP_CHANGEPR_LD;
          d.imm8     = instr[17:10];
        end
        default: d.valid = 1'b0;
      endcase
    end
  end
endmodule
