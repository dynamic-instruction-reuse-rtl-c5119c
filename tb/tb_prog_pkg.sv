// tb_prog_pkg: a tiny instruction set, a random static program and a golden
// interpreter, used by the reuse buffer testbenches to produce dynamic
// instruction streams and the true outcome of every instruction.
//
// Instructions: LI rd=imm, ADDI rd=rs+imm, ADD rd=rs+rt, LW rd=mem[rs+imm],
// SW mem[rs+imm]=rt, BEQ (result rs==rt, no destination). Registers r1..r8
// are used (architectural names of the integer file); r8 holds the data base
// address 0x1000 and memory has 16 words there.
package tb_prog_pkg;
  import rb_pkg::*;

  typedef enum logic [2:0] {I_LI, I_ADDI, I_ADD, I_LW, I_SW, I_BEQ} iop_e;

  typedef struct packed {
    iop_e        op;
    logic [3:0]  rd;
    logic [3:0]  rs;
    logic [3:0]  rt;
    logic [31:0] imm;
    logic [31:0] pc;
  } instr_t;

  typedef logic [15:0][31:0] regs_t;
  typedef logic [15:0][31:0] mem_t;

  localparam logic [31:0] DBASE = 32'h1000;

  function automatic logic uses_rs(instr_t i);
    return i.op != I_LI;
  endfunction

  function automatic logic uses_rt(instr_t i);
    return i.op == I_ADD || i.op == I_SW || i.op == I_BEQ;
  endfunction

  function automatic logic has_rd(instr_t i);
    return i.op inside {I_LI, I_ADDI, I_ADD, I_LW};
  endfunction

  function automatic kind_e kind_of(instr_t i);
    case (i.op)
      I_LW:    return K_LOAD;
      I_SW:    return K_STORE;
      default: return K_ALU;
    endcase
  endfunction

  // Effective address of a load or store.
  function automatic word_t ea(instr_t i, regs_t r);
    return r[i.rs] + i.imm;
  endfunction

  // Result of an instruction (loaded value for LW, comparison for BEQ).
  function automatic word_t result_of(instr_t i, regs_t r, mem_t m);
    word_t a;
    a = ea(i, r);
    case (i.op)
      I_LI:    return i.imm;
      I_ADDI:  return r[i.rs] + i.imm;
      I_ADD:   return r[i.rs] + r[i.rt];
      I_LW:    return m[a[5:2]];
      I_BEQ:   return {31'd0, r[i.rs] == r[i.rt]};
      default: return a;
    endcase
  endfunction

  // Architectural effect of one instruction.
  function automatic void step(instr_t i, ref regs_t r, ref mem_t m);
    word_t res, a;
    res = result_of(i, r, m);
    a   = ea(i, r);
    if (i.op == I_SW) m[a[5:2]] = r[i.rt];
    else if (has_rd(i)) r[i.rd] = res;
  endfunction

  // Decode request for one instruction; inflight is a mask of registers
  // whose newest producer has not committed.
  function automatic lookup_req_t mk_req(instr_t i, regs_t r, logic [15:0] inflight);
    lookup_req_t q;
    q              = '0;
    q.valid        = 1'b1;
    q.pc           = i.pc;
    q.kind         = kind_of(i);
    q.src_used[0]  = uses_rs(i);
    q.src_used[1]  = uses_rt(i) && i.op != I_SW;  // a store reuses its address only
    q.src[0]       = areg_t'(i.rs);
    q.src[1]       = areg_t'(i.rt);
    q.src_val[0]   = uses_rs(i) ? r[i.rs] : '0;
    q.src_val[1]   = uses_rt(i) ? r[i.rt] : '0;
    q.src_inflight = {q.src_used[1] && inflight[i.rt], uses_rs(i) && inflight[i.rs]};
    q.src_known    = ~q.src_inflight;
    q.has_dest     = has_rd(i);
    q.dest         = areg_t'(i.rd);
    return q;
  endfunction

  function automatic write_req_t mk_wr(instr_t i, regs_t r, mem_t m);
    write_req_t w;
    w            = '0;
    w.valid      = 1'b1;
    w.kind       = kind_of(i);
    w.result     = result_of(i, r, m);
    w.address    = ea(i, r);
    w.src_val[0] = uses_rs(i) ? r[i.rs] : '0;
    w.src_val[1] = uses_rt(i) ? r[i.rt] : '0;
    return w;
  endfunction

  function automatic commit_req_t mk_cm(instr_t i, regs_t r);
    commit_req_t c;
    c          = '0;
    c.valid    = 1'b1;
    c.is_store = i.op == I_SW;
    c.st_addr  = ea(i, r);
    c.has_dest = has_rd(i);
    c.dest     = areg_t'(i.rd);
    return c;
  endfunction

  function automatic instr_t mk(iop_e op, int rd, int rs, int rt, int imm, logic [31:0] pc);
    instr_t i;
    i.op = op; i.rd = 4'(rd); i.rs = 4'(rs); i.rt = 4'(rt); i.imm = imm; i.pc = pc;
    return i;
  endfunction

  // Random instruction for slot n of a static program at base pc.
  // Slot 0 sets the data base, slot 1 is a pass counter in r7; the rest
  // write r1..r6 only, loads and stores address off r8.
  function automatic instr_t rand_instr(int n, logic [31:0] base);
    int sel, rd, rs, rt;
    logic [31:0] pc;
    pc = base + 32'(4 * n);
    if (n == 0) return mk(I_LI, 8, 0, 0, DBASE, pc);
    if (n == 1) return mk(I_ADDI, 7, 7, 0, 1, pc);
    sel = $urandom_range(0, 99);
    rd  = $urandom_range(1, 6);
    rs  = $urandom_range(1, 7);
    rt  = $urandom_range(1, 6);
    if (sel < 15) return mk(I_LI, rd, 0, 0, $urandom_range(0, 9), pc);
    if (sel < 40) return mk(I_ADDI, rd, rs, 0, $urandom_range(1, 5), pc);
    if (sel < 60) return mk(I_ADD, rd, rs, rt, 0, pc);
    if (sel < 78) return mk(I_LW, rd, 8, 0, 4 * $urandom_range(0, 15), pc);
    if (sel < 88) return mk(I_SW, 0, 8, rt, 4 * $urandom_range(0, 15), pc);
    return mk(I_BEQ, 0, rs, rt, 0, pc);
  endfunction

endpackage
