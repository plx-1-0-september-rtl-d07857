// plx_asm_pkg: instruction encoders for PLX test programs.
//
// One function per instruction format, producing the 32-bit words the
// decoder expects: opcode in bits 31:26, qualifying predicate in 25:23 and
// the format's operand fields below (see plx_pkg for the layout).
package plx_asm_pkg;
  import plx_pkg::*;

  function automatic logic [31:0] hdr(logic [5:0] op, logic [2:0] qp);
    return {op, qp, 23'd0};
  endfunction

  function automatic logic [31:0] f0(opcode_e op, logic [22:0] imm23, logic [2:0] qp = 0);
    return hdr(op, qp) | 32'(imm23);
  endfunction
  function automatic logic [31:0] f1(opcode_e op, logic [4:0] rd, logic [17:0] imm18, logic [2:0] qp = 0);
    return hdr(op, qp) | {9'd0, rd, imm18};
  endfunction
  function automatic logic [31:0] f2(opcode_e op, logic [4:0] rd, logic [4:0] rs1, logic [12:0] imm13,
                                     logic [2:0] qp = 0);
    return hdr(op, qp) | {9'd0, rd, rs1, imm13};
  endfunction
  function automatic logic [31:0] f3(opcode_e op, logic [4:0] rd, logic [4:0] rs1, logic [6:0] pos,
                                     logic [5:0] len, logic [2:0] qp = 0);
    return hdr(op, qp) | {9'd0, rd, rs1, pos, len};
  endfunction
  function automatic logic [31:0] mix(bit left, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                                      logic [1:0] sw, logic [2:0] qp = 0);
    return hdr(left ? OP_MIX_L : OP_MIX_R, qp) | {9'd0, rd, rs1, rs2, 6'd0, sw};
  endfunction
  function automatic logic [31:0] f4a(func4a_e fn, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                                      logic [1:0] sw = 0, logic [2:0] qp = 0);
    return hdr(OP_F4A, qp) | {9'd0, rd, rs1, rs2, 6'(fn), sw};
  endfunction
  function automatic logic [31:0] f4b(func4b_e fn, logic [4:0] rd, logic [4:0] rs1, logic [4:0] imm5,
                                      logic [1:0] sw = 0, logic [2:0] qp = 0);
    return hdr(OP_F4B, qp) | {9'd0, rd, rs1, imm5, 6'(fn), sw};
  endfunction
  function automatic logic [31:0] shrp(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2, logic [7:0] imm8,
                                       logic [2:0] qp = 0);
    return hdr(OP_SHRP, qp) | {9'd0, rd, rs1, rs2, imm8};
  endfunction
  function automatic logic [31:0] cmp(rel_e rel, logic [4:0] rs1, logic [4:0] rs2, logic [2:0] p1,
                                      logic [2:0] p2, logic [2:0] qp = 0);
    return hdr(OP_CMP, qp) | {9'd0, rs1, rs2, p1, p2, 3'd0, 4'(rel)};
  endfunction
  function automatic logic [31:0] cmpi(rel_e rel, logic [4:0] rs1, logic [7:0] imm8, logic [2:0] p1,
                                       logic [2:0] p2, logic [2:0] qp = 0);
    return hdr(OP_CMPI, qp) | {9'd0, rs1, imm8, p1, p2, 4'(rel)};
  endfunction
  function automatic logic [31:0] testbit(logic [4:0] rd, logic [7:0] imm8, logic [2:0] p1, logic [2:0] p2,
                                          logic [2:0] qp = 0);
    return hdr(OP_TESTBIT, qp) | {9'd0, rd, imm8, p1, p2, 4'd0};
  endfunction
  function automatic logic [31:0] changepr(bit ld, logic [3:0] set, logic [7:0] imm8, logic [2:0] qp = 0);
    return hdr(ld ? OP_CHANGEPR_LD : OP_CHANGEPR, qp) | {9'd0, 5'd0, imm8, 6'd0, set};
  endfunction
  function automatic logic [31:0] load(logic [1:0] sw, bit upd, logic [4:0] rd, logic [4:0] rs1,
                                       logic [12:0] imm13, logic [2:0] qp = 0);
    return {3'b100, upd, sw, qp, rd, rs1, imm13};
  endfunction
  function automatic logic [31:0] store(logic [1:0] sw, bit upd, logic [4:0] rd, logic [4:0] rs1,
                                        logic [12:0] imm13, logic [2:0] qp = 0);
    return {3'b101, upd, sw, qp, rd, rs1, imm13};
  endfunction
endpackage
