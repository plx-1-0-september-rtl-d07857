// tb_plx_core_random: random PLX programs on the core, compared after every
// clock with an instruction-set model kept in this testbench.
//
// Each program has PROG_LEN random instructions of every kind except
// register jumps (forward jmp and jmp.link with short offsets are included),
// random qualifying predicates, random predicate-set switches and loads and
// stores at random addresses, and ends with trap. After each clock the model
// executes the same instruction and the full register file, the active
// predicate set, its predicates, the PC and the data memory are compared.
// Committed instructions are counted per opcode and function code; one that
// never commits counts as a failure.
module tb_plx_core_random;
  import plx_pkg::*;
  import plx_asm_pkg::*;
  localparam int W = 64;
  localparam int PROG_LEN = 1000;
  localparam int NPROG = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [9:0] imem_addr, dmem_addr;
  logic [31:0] imem_rdata;
  logic [W-1:0] dmem_rdata, dmem_wdata, pc, dbg_reg_val;
  logic dmem_we, halted, retire, misaligned;
  logic [7:0] dmem_be, pred_bits;
  logic [3:0] pred_set;

  logic [31:0] imem [1024];
  logic [W-1:0] dmem [1024];

  plx_core #(.W(W)) dut (.clk, .rst_n, .imem_addr, .imem_rdata, .dmem_addr, .dmem_rdata, .dmem_we,
                         .dmem_be, .dmem_wdata, .pc, .halted, .retire, .misaligned,
                         .dbg_reg(5'd0), .dbg_reg_val, .pred_set, .pred_bits);

  assign imem_rdata = imem[imem_addr];
  assign dmem_rdata = dmem[dmem_addr];
  always_ff @(posedge clk)
    if (dmem_we) for (int k = 0; k < 8; k++) if (dmem_be[k]) dmem[dmem_addr][k*8 +: 8] <= dmem_wdata[k*8 +: 8];

  // ---------------- model state ----------------
  logic [W-1:0] R [32];
  logic [7:0]   P [16];
  logic [3:0]   act;
  logic [W-1:0] mpc;
  logic [W-1:0] M [1024];
  bit           mhalt;

  function automatic logic signed [71:0] sx(logic [63:0] v, int bits);
    logic [71:0] u = 72'(v) & ((72'd1 << bits) - 1);
    return u[bits-1] ? $signed(u) - $signed(72'd1 << bits) : $signed(u);
  endfunction
  function automatic logic [71:0] zx(logic [63:0] v, int bits);
    return 72'(v) & ((72'd1 << bits) - 1);
  endfunction
  function automatic logic signed [71:0] sat(logic signed [71:0] v, int bits);
    logic signed [71:0] mx = (72'sd1 <<< (bits - 1)) - 1;
    logic signed [71:0] mn = -(72'sd1 <<< (bits - 1));
    return v > mx ? mx : v < mn ? mn : v;
  endfunction

  function automatic logic [63:0] lane(logic [63:0] v, int bits, int i);
    return 64'(zx(v >> (i * bits), bits));
  endfunction

  function automatic logic [63:0] packed_op(func4a_e fn, logic [63:0] a, logic [63:0] b, int szc);
    int bits = 8 << szc;
    logic [63:0] res = 0;
    for (int i = 0; i < 64 / bits; i++) begin
      logic [71:0] ua = zx(lane(a, bits, i), bits), ub = zx(lane(b, bits, i), bits);
      logic signed [71:0] sa_ = sx(lane(a, bits, i), bits), sb_ = sx(lane(b, bits, i), bits);
      logic signed [71:0] v;
      case (fn)
        F_PADD:     v = ua + ub;
        F_PADD_U:   begin v = ua + ub; if (v > (72'sd1 <<< bits) - 1) v = (72'sd1 <<< bits) - 1; end
        F_PADD_S:   v = sat(sa_ + sb_, bits);
        F_PADDINCR: v = ua + ub + 1;
        F_PSUB:     v = ua - ub;
        F_PSUB_U:   begin v = $signed(ua) - $signed(ub); if (v < 0) v = 0; end
        F_PSUB_S:   v = sat(sa_ - sb_, bits);
        F_PSUBDECR: v = ua - ub - 1;
        F_PAVG:     begin v = ua + ub; v = (v >>> 1) | (v & 1); end
        F_PAVG_RAZ: v = (ua + ub + 1) >>> 1;
        F_PSUBAVG:  begin v = $signed(ua) - $signed(ub); v = (v >>> 1) | (v & 1); end
        F_AND:      v = ua & ub;
        F_ANDCM:    v = ua & ~ub;
        F_OR:       v = ua | ub;
        F_XOR:      v = ua ^ ub;
        F_NOT:      v = ~ua;
        F_PCMP_EQ:  v = (ua == ub) ? -1 : 0;
        F_PCMP_GT:  v = (sa_ > sb_) ? -1 : 0;
        F_PMAX:     v = (sa_ > sb_) ? sa_ : sb_;
        F_PMIN:     v = (sa_ < sb_) ? sa_ : sb_;
        default:    v = 0;
      endcase
      res |= 64'(zx(64'(v), bits) << (i * bits));
    end
    return res;
  endfunction

  function automatic bit size_ok(func4a_e fn, logic [1:0] sw);
    if (fn inside {F_PAVG, F_PAVG_RAZ, F_PSUBAVG, F_PMAX, F_PMIN}) return sw <= 1;
    if (fn inside {F_PSHIFTADD_L, F_PSHIFTADD_R}) return sw != 0;
    if (fn inside {F_PSHIFT_L, F_PSHIFT_R, F_PSHIFT_RA}) return sw != 0;
    return 1;
  endfunction

  function automatic logic [63:0] pshift(logic [63:0] a, logic [63:0] n, int kind, int szc);
    int bits = 8 << szc;
    logic [63:0] res = 0;
    for (int i = 0; i < 64 / bits; i++) begin
      logic signed [71:0] s = sx(lane(a, bits, i), bits);
      logic [71:0] u = zx(lane(a, bits, i), bits);
      logic [71:0] v;
      if (n >= 64'(bits)) v = (kind == 2) ? 72'(s >>> 70) : 0;
      else if (kind == 0) v = u << n;
      else if (kind == 1) v = u >> n;
      else v = 72'(s >>> n);
      res |= 64'(zx(64'(v), bits) << (i * bits));
    end
    return res;
  endfunction

  function automatic bit rel_true(rel_e rl, logic [63:0] a, logic [63:0] b);
    case (rl)
      REL_EQ: return a == b;                 REL_NE: return a != b;
      REL_LT: return $signed(a) < $signed(b);  REL_LE: return $signed(a) <= $signed(b);
      REL_GT: return $signed(a) > $signed(b);  REL_GE: return $signed(a) >= $signed(b);
      REL_LTU: return a < b;  REL_LEU: return a <= b;
      REL_GTU: return a > b;  default: return a >= b;
    endcase
  endfunction

  function automatic logic [7:0] byte_of(logic [63:0] v, int pos); // pos 0 = most significant
    return v[(7 - pos) * 8 +: 8];
  endfunction

  task automatic wr(int r, logic [63:0] v);
    if (r != 0) R[r] = v;
  endtask
  task automatic wp(int p, bit v);
    if (p != 0) P[act][p] = v;
  endtask

  // execute one instruction in the model
  task automatic step(logic [31:0] ins);
    logic [5:0] op = ins[31:26];
    logic [2:0] qp = ins[25:23];
    int rd = ins[22:18], rs1 = ins[17:13], rs2 = ins[12:8];
    logic [63:0] a = R[ins[17:13]], b = R[ins[12:8]], d = R[ins[22:18]];
    logic [12:0] i13 = ins[12:0];
    logic [63:0] s13 = 64'(sx(64'(i13), 13)), z13 = 64'(i13);
    logic [1:0] sw = ins[1:0];
    logic [5:0] fn = ins[7:2];
    logic [63:0] next = mpc + 4;
    bit qv = (qp == 0) ? 1'b1 : P[act][qp];
    if (mhalt) return;
    if (qv) begin
      if (op[5:3] == 3'b100 || op[5:3] == 3'b101) begin
        logic [63:0] ea = a + s13;
        int size = 1 << op[1:0];
        int widx = int'(ea[12:3]);
        int off = int'(ea[2:0]) & ~(size - 1);
        if (op[5:3] == 3'b100) begin
          logic [63:0] v = 0;
          for (int k = 0; k < size; k++) v[k*8 +: 8] = M[widx][(off + k) * 8 +: 8];
          wr(rd, v);
        end else begin
          for (int k = 0; k < size; k++) M[widx][(off + k) * 8 +: 8] = d[k*8 +: 8];
        end
        if (op[2]) wr(rs1, ea);
      end else begin
        case (opcode_e'(op))
          OP_JMP:      next = mpc + 64'(sx(64'(ins[22:0]), 23));
          OP_JMP_LINK: begin R[31] = mpc + 4; next = mpc + 64'(sx(64'(ins[22:0]), 23)); end
          OP_TRAP:     mhalt = 1;
          OP_JMP_REG:  next = mpc + d;
          OP_JMP_REG_LINK: begin next = mpc + d; R[31] = mpc + 4; end
          OP_LOADI_HI: wr(rd, {d[63:32], ins[15:0], d[15:0]});
          OP_LOADI_LO: wr(rd, {d[63:16], ins[15:0]});
          OP_ADDI: wr(rd, a + s13);
          OP_SUBI: wr(rd, a - s13);
          OP_ANDI: wr(rd, a & z13);
          OP_ORI:  wr(rd, a | z13);
          OP_XORI: wr(rd, a ^ z13);
          OP_SLLI: wr(rd, a << i13[5:0]);
          OP_SRAI: wr(rd, 64'($signed(a) >>> i13[5:0]));
          OP_SRLI: wr(rd, a >> i13[5:0]);
          OP_EXTRACT: begin
            logic [63:0] v = 0;
            for (int k = 0; k < int'(ins[5:0]); k++)
              if (k + int'(ins[12:6]) < 64) v[k] = a[k + int'(ins[12:6])];
            wr(rd, v);
          end
          OP_DEPOSIT: begin
            logic [63:0] v = d;
            for (int k = 0; k < int'(ins[5:0]); k++)
              if (k + int'(ins[12:6]) < 64) v[k + int'(ins[12:6])] = a[k];
            wr(rd, v);
          end
          OP_MIX_L, OP_MIX_R: if (sw != 3) begin
            int bits = 8 << sw, n = 64 / bits;
            logic [63:0] v = 0;
            for (int p = 0; p < n; p++) begin
              int sp = (p / 2) * 2 + (op == OP_MIX_L ? 0 : 1);
              logic [63:0] src = (p % 2 == 0) ? a : b;
              v |= lane(src, bits, n - 1 - sp) << ((n - 1 - p) * bits);
            end
            wr(rd, v);
          end
          OP_SHRP: begin
            logic [127:0] pr = {a, b};
            wr(rd, 64'(pr >> ins[6:0]));
          end
          OP_F4A: begin
            func4a_e f = func4a_e'(fn);
            if (fn <= 6'd21 && fn != 6'd20 && fn != 6'd21) begin
              if (size_ok(f, sw)) wr(rd, packed_op(f, a, b, int'(sw)));
            end else if (f == F_PSHIFTADD_L || f == F_PSHIFTADD_R) begin
              if (sw != 0) begin
                logic [63:0] v = 0;
                for (int i = 0; i < 4; i++) begin
                  logic signed [71:0] x = sx(lane(a, 16, i), 16);
                  x = (f == F_PSHIFTADD_L) ? x * (72'sd1 <<< sw) : x >>> sw;
                  v[i*16 +: 16] = 16'(sat(x + sx(lane(b, 16, i), 16), 16));
                end
                wr(rd, v);
              end
            end else if (f == F_PMUL_ODD || f == F_PMUL_EVEN) begin
              logic [63:0] v;
              int o = (f == F_PMUL_ODD) ? 1 : 0;
              for (int j = 0; j < 2; j++)
                v[j*32 +: 32] = 32'(sx(lane(a, 16, 2*j+o), 16) * sx(lane(b, 16, 2*j+o), 16));
              wr(rd, v);
            end else if (f == F_PMULSHR || f == F_PMULSHR_A) begin
              int amts[4] = '{0, 8, 15, 16};
              logic [63:0] v;
              for (int i = 0; i < 4; i++) begin
                logic signed [71:0] pr;
                if (f == F_PMULSHR_A) pr = sx(lane(a, 16, i), 16) * sx(lane(b, 16, i), 16);
                else pr = $signed(zx(lane(a, 16, i), 16) * zx(lane(b, 16, i), 16));
                v[i*16 +: 16] = 16'(pr >>> amts[sw]);
              end
              wr(rd, v);
            end else if (f inside {F_PSHIFT_L, F_PSHIFT_R, F_PSHIFT_RA}) begin
              if (sw != 0) wr(rd, pshift(a, b, int'(fn) - int'(F_PSHIFT_L), int'(sw)));
            end else if (f == F_PERM) begin
              logic [63:0] v;
              for (int i = 0; i < 4; i++) v[i*16 +: 16] = lane(a, 16, int'(b[2*i +: 2]));
              wr(rd, v);
            end
          end
          OP_F4B: begin
            int t_mix[8]  = '{0, 4, 2, 6, 1, 5, 3, 7};
            int t_shuf[8] = '{0, 4, 1, 5, 2, 6, 3, 7};
            int t_alt[8]  = '{0, 2, 4, 6, 1, 3, 5, 7};
            logic [63:0] v = 0;
            case (func4b_e'(fn))
              G_PSHIFTI_L, G_PSHIFTI_R, G_PSHIFTI_RA:
                if (sw != 0) wr(rd, pshift(a, 64'(ins[12:8]), int'(fn), int'(sw)));
              G_MUX_REV:   begin for (int p = 0; p < 8; p++) v[(7-p)*8 +: 8] = byte_of(a, 7 - p); wr(rd, v); end
              G_MUX_MIX:   begin for (int p = 0; p < 8; p++) v[(7-p)*8 +: 8] = byte_of(a, t_mix[p]); wr(rd, v); end
              G_MUX_SHUF:  begin for (int p = 0; p < 8; p++) v[(7-p)*8 +: 8] = byte_of(a, t_shuf[p]); wr(rd, v); end
              G_MUX_ALT:   begin for (int p = 0; p < 8; p++) v[(7-p)*8 +: 8] = byte_of(a, t_alt[p]); wr(rd, v); end
              G_MUX_BRCST: wr(rd, {8{a[7:0]}});
              default: ;
            endcase
          end
          OP_CMP: if (ins[3:0] <= 9) begin
            bit t = rel_true(rel_e'(ins[3:0]), R[ins[22:18]], R[ins[17:13]]);
            wp(ins[12:10], t); wp(ins[9:7], !t);
          end
          OP_CMPI: if (ins[3:0] <= 9) begin
            bit t = rel_true(rel_e'(ins[3:0]), R[ins[22:18]], 64'(sx(64'(ins[17:10]), 8)));
            wp(ins[9:7], t); wp(ins[6:4], !t);
          end
          OP_TESTBIT: begin
            bit t = (ins[17:10] < 64) ? R[ins[22:18]][ins[15:10]] : 1'b0;
            wp(ins[9:7], t); wp(ins[6:4], !t);
          end
          OP_CHANGEPR:    act = ins[3:0];
          OP_CHANGEPR_LD: begin act = ins[3:0]; P[act] = ins[17:10]; end
          default: ;
        endcase
      end
    end
    if (!mhalt) mpc = next;
  endtask

  // ---------------- random program ----------------
  function automatic logic [31:0] rnd_instr(int idx);
    logic [4:0] rd = 5'($urandom), rs1 = 5'($urandom), rs2 = 5'($urandom);
    logic [2:0] qp = ($urandom_range(0, 2) == 0) ? 3'($urandom) : 3'd0;
    logic [1:0] sw = 2'($urandom);
    int kind = $urandom_range(0, 19);
    case (kind)
      0: return f1($urandom_range(0, 1) ? OP_LOADI_HI : OP_LOADI_LO, rd, 18'($urandom), qp);
      1, 2: return f2(opcode_e'($urandom_range(OP_ADDI, OP_SRLI)), rd, rs1, 13'($urandom), qp);
      3: return f3($urandom_range(0, 1) ? OP_EXTRACT : OP_DEPOSIT, rd, rs1, 7'($urandom), 6'($urandom), qp);
      4: return mix($urandom_range(0, 1), rd, rs1, rs2, sw, qp);
      5, 6, 7, 8: return f4a(func4a_e'($urandom_range(0, 29)), rd, rs1, rs2, sw, qp);
      9: return f4b(func4b_e'($urandom_range(0, 7)), rd, rs1, 5'($urandom), sw, qp);
      10: return shrp(rd, rs1, rs2, 8'($urandom), qp);
      11: return cmp(rel_e'($urandom_range(0, 9)), rs1, rs2, 3'($urandom), 3'($urandom), qp);
      12: return cmpi(rel_e'($urandom_range(0, 9)), rs1, 8'($urandom), 3'($urandom), 3'($urandom), qp);
      13: return testbit(rd, 8'($urandom_range(0, 70)), 3'($urandom), 3'($urandom), qp);
      14: return changepr($urandom_range(0, 1), 4'($urandom), 8'($urandom), qp);
      15, 16: return load(sw, $urandom_range(0, 1), rd, rs1, 13'($urandom), qp);
      17: return store(sw, $urandom_range(0, 1), rd, rs1, 13'($urandom), qp);
      18: if (idx + 4 < PROG_LEN)
            return f0($urandom_range(0, 1) ? OP_JMP : OP_JMP_LINK, 23'(4 * $urandom_range(1, 3)), qp);
          else return f2(OP_ADDI, rd, rs1, 13'($urandom), qp);
      default: return {6'($urandom_range(27, 31)), 26'($urandom)};   // unused opcodes
    endcase
  endfunction

  int n_retired, n_null, n_cycles;
  int op_seen [64];   // committed instructions per major opcode
  int f4a_seen [32];  // ... per format-4a function code
  int f4b_seen [8];   // ... per format-4b function code
  initial begin
    n_retired = 0; n_null = 0; n_cycles = 0;
    op_seen = '{default: 0}; f4a_seen = '{default: 0}; f4b_seen = '{default: 0};
    for (int prog = 0; prog < NPROG; prog++) begin
      for (int i = 0; i < 1024; i++) begin
        imem[i] = (i < PROG_LEN) ? rnd_instr(i) : f0(OP_TRAP, 23'd0);
        dmem[i] = {$urandom, $urandom};
        M[i] = dmem[i];
      end
      for (int i = 0; i < 32; i++) R[i] = 0;
      for (int i = 0; i < 16; i++) P[i] = 0;
      act = 0; mpc = 0; mhalt = 0;
      rst_n = 0;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1;
      while (!halted) begin
        logic [31:0] ins;
        ins = imem[pc[11:2]];
        if (dut.exec) begin
          n_retired++;
          op_seen[ins[31:26]]++;
          if (ins[31:26] == OP_F4A && ins[7:2] < 32) f4a_seen[ins[6:2]]++;
          if (ins[31:26] == OP_F4B && ins[7:2] < 8) f4b_seen[ins[4:2]]++;
        end
        else if (!dut.qp_val) n_null++;
        @(posedge clk);
        step(ins);
        #1;
        n_cycles++;
        checks++;
        begin
          bit bad = 0;
          for (int r = 0; r < 32; r++) if (dut.u_rf.regs[r] !== R[r]) bad = 1;
          if (pc !== mpc || pred_set !== act || pred_bits !== {P[act][7:1], 1'b1} || halted !== mhalt) bad = 1;
          for (int i = 0; i < 1024; i++) if (dmem[i] !== M[i]) bad = 1;
          if (bad) begin
            failures++;
            if (failures < 5) begin
              $display("MISMATCH after instr %h (pc model %0d dut %0d)", ins, mpc, pc);
              for (int r = 0; r < 32; r++)
                if (dut.u_rf.regs[r] !== R[r]) $display("  r%0d dut %h model %h", r, dut.u_rf.regs[r], R[r]);
            end
            // resynchronise nothing: stop this program
            break;
          end
        end
      end
    end
    $display("cycles %0d, committed %0d, nullified %0d", n_cycles, n_retired, n_null);
    checks++;
    if (n_retired == 0 || n_null == 0) failures++;
    // every opcode except the register jumps, every function code
    for (int o = 0; o <= int'(OP_CHANGEPR_LD); o++) begin
      if (o == int'(OP_JMP_REG) || o == int'(OP_JMP_REG_LINK)) continue;
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("opcode %0d never committed", o); end
    end
    for (int o = 32; o < 48; o++) begin
      checks++;
      if (op_seen[o] == 0) begin failures++; $display("load/store opcode %b never committed", 6'(o)); end
    end
    for (int f = 0; f <= int'(F_PERM); f++) begin
      checks++;
      if (f4a_seen[f] == 0) begin failures++; $display("4a function %0d never committed", f); end
    end
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (f4b_seen[f] == 0) begin failures++; $display("4b function %0d never committed", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
