// simd_asm_pkg: test-side assembler and reduction programs for the wide-SIMD.
//
// Builds two-slot instruction words (CP slot, PE slot) in a queue and provides
// generators for the three reduction programs with a selectable associative
// combine operation:
//   gen_straight  : every vector is shifted element by element into the CP,
//                   which combines the elements as they arrive;
//   gen_pipelined : each PE combines its own element with the partial result
//                   of its right neighbour and passes it on, so V PEs work on
//                   V different vectors at once; a fill loop, an unrolled
//                   steady-state loop when N_Vect > V_size, and a drain loop,
//                   the CP storing one result per step after the fill;
//   gen_diagonal  : for N_Vect <= V_size, PE j starts at vector (j mod N_Vect)
//                   and walks its column with wrap-around, the CP stores the
//                   partials that reach it, then the whole array shifts into the
//                   CP, which folds the chunks into the stored results;
//   gen_fold      : for V_size > N_PE, folds each PE's elements of a vector
//                   locally so that the programs above apply;
//   gen_prefix_cp : a CP-only running sum over results (cumulative histogram).
// Data layout: element j of vector k is word BASE+k of PE j; result k goes to
// word RES+k of the CP data memory. Each generator also returns the number of
// cycles from start to done implied by the pipeline: one cycle per executed
// word, two more per taken branch, two for filling the fetch pipeline.
package simd_asm_pkg;
  import simd_pkg::*;

  instr_t prog[$];

  function automatic slot_t sl(op_e op, int rd = 0, int ra = 0, int rb = 0,
                               bsel_e bsel = B_REG, int imm = 0,
                               pred_e pred = PR_ALWAYS);
    slot_t s;
    s.op   = op;
    s.rd   = REG_AW'(rd);
    s.ra   = REG_AW'(ra);
    s.rb   = REG_AW'(rb);
    s.bsel = bsel;
    s.pred = pred;
    s.imm  = IMM_W'(imm);
    return s;
  endfunction

  function automatic slot_t nop();
    return sl(OP_NOP);
  endfunction

  function automatic int emit(slot_t cp, slot_t pe);
    instr_t w;
    w.cp = cp;
    w.pe = pe;
    prog.push_back(w);
    return prog.size() - 1;
  endfunction

  function automatic int here();
    return prog.size();
  endfunction

  function automatic void emit_on(bit on_pe, slot_t s);
    if (on_pe) void'(emit(nop(), s));
    else       void'(emit(s, nop()));
  endfunction

  // Constant into a register of the CP (on_pe=0) or of every PE (on_pe=1).
  function automatic int load_const(bit on_pe, int rd, int value);
    int v, hi, lo, n;
    v  = value & 16'hFFFF;
    if (v >= 16'h8000) v -= 32'h10000;
    n  = 0;
    if (v >= -512 && v <= 511) begin
      emit_on(on_pe, sl(OP_MOV, rd, 0, 0, B_IMM, v));
      n = 1;
    end else begin
      hi = v >>> 8;
      lo = v & 255;
      emit_on(on_pe, sl(OP_MOV, rd, 0, 0, B_IMM, hi));
      emit_on(on_pe, sl(OP_MUL, rd, rd, 0, B_IMM, 256));
      emit_on(on_pe, sl(OP_ADD, rd, rd, 0, B_IMM, lo));
      n = 3;
    end
    return n;
  endfunction

  function automatic int identity_of(op_e cop);
    case (cop)
      OP_ADD, OP_OR, OP_XOR: return 0;
      OP_MUL:                return 1;
      OP_AND:                return 16'hFFFF;
      OP_MAX:                return 16'h8000;
      OP_MIN:                return 16'h7FFF;
      default:               return 0;
    endcase
  endfunction

  // Reference combine, independent of the RTL ALU.
  function automatic logic [15:0] combine_ref(op_e cop, logic [15:0] a, logic [15:0] b);
    case (cop)
      OP_ADD: return a + b;
      OP_MUL: return 16'((32'(a) * 32'(b)));
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_MAX: return ($signed(a) > $signed(b)) ? a : b;
      OP_MIN: return ($signed(a) < $signed(b)) ? a : b;
      default: return a;
    endcase
  endfunction

  // Common prologue: boundary value = identity, ring broken at both ends.
  function automatic int prologue(op_e cop);
    int n;
    n = load_const(0, 3, identity_of(cop));
    void'(emit(sl(OP_NETCFG, 0, 3, 0, B_REG, int'(NET_BROKEN)), nop()));
    return n + 1;
  endfunction

  // ---------------------------------------------------------------- Alg. 1
  function automatic int gen_straight(op_e cop, int nvect, int vsize, int base, int res);
    int n, body, lbl;
    prog.delete();
    n = prologue(cop);
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, nvect), sl(OP_MOV, 1, 0, 0, B_IMM, 0)));
    void'(emit(sl(OP_MOV, 2, 0, 0, B_IMM, 0), nop()));
    n += 2;
    lbl = here();
    // PE r2 <- element; CP r1 counts vectors, r2 indexes results, r3 accumulates
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_LD, 2, 1, 0, B_REG, base)));
    for (int j = 0; j < vsize; j++) begin
      void'(emit(j == 0 ? sl(OP_MOV, 3, 0, 0, B_RIGHT) : sl(cop, 3, 3, 0, B_RIGHT),
                 j == vsize - 1 ? sl(OP_NOP, 0, 0, 2) : sl(OP_MOV, 2, 0, 2, B_RIGHT)));
    end
    void'(emit(sl(OP_ST, 0, 2, 3, B_REG, res), sl(OP_ADD, 1, 1, 0, B_IMM, 1)));
    void'(emit(sl(OP_ADD, 2, 2, 0, B_IMM, 1), nop()));
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, lbl), nop()));
    body = vsize + 4;
    void'(emit(sl(OP_HALT), nop()));
    return (n + nvect * body + 1) + 2 * (nvect - 1) + 2;
  endfunction

  // ---------------------------------------------------------------- Alg. 2
  // PE: r0 id, r1 k (vector index this PE works on), r2 limit, r3 v, r4 s.
  // CP: r1 loop counter, r2 result index.
  function automatic int gen_pipelined(op_e cop, int nvect, int vsize, int base, int res);
    int n, la, lb, ls, it8, cnt, cyc;
    prog.delete();
    n = prologue(cop);
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, vsize), sl(OP_PEID, 0)));
    n += 1 + load_const(1, 4, identity_of(cop));
    void'(emit(sl(OP_MOV, 2, 0, 0, B_IMM, 0), sl(OP_SUB, 1, 0, 0, B_IMM, vsize - 1)));
    void'(emit(nop(), sl(OP_MOV, 2, 0, 0, B_IMM, nvect)));
    void'(emit(nop(), sl(OP_CGE, 0, 0, 0, B_IMM, vsize)));
    void'(emit(nop(), sl(OP_MOV, 2, 0, 0, B_IMM, 0, PR_P0)));
    n += 4;
    // fill: V steps, nothing reaches the CP yet
    la = here();
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_CLTU, 1, 1, 2)));
    void'(emit(nop(), sl(OP_LD, 3, 1, 0, B_REG, base, PR_P1)));
    void'(emit(nop(), sl(cop, 4, 3, 4, B_RIGHT, 0, PR_P1)));
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, la), sl(OP_ADD, 1, 1, 0, B_IMM, 1)));
    cyc = n + 4 * vsize + 2 * (vsize - 1);
    // steady state (only when N_Vect > V_size): every PE below V_size is
    // active, so the predicate stays as the last fill step left it and the
    // step is just load + combine; unrolled 8 times with the step number in
    // the load offset, and one result into the CP per step
    it8 = (nvect > vsize) ? (nvect - vsize) / 8 : 0;
    if (it8 > 0) begin
      void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, it8), nop()));
      ls = here();
      for (int u = 0; u < 8; u++) begin
        void'(emit(u == 0 ? sl(OP_SUB, 1, 1, 0, B_IMM, 1) : u == 7 ? sl(OP_ADD, 2, 2, 0, B_IMM, 8) : nop(),
                   sl(OP_LD, 3, 1, 0, B_REG, base + u, PR_P1)));
        void'(emit(sl(OP_ST, 0, 2, 4, B_RIGHT, u == 7 ? res - 1 : res + u),
                   sl(cop, 4, 3, 4, B_RIGHT, 0, PR_P1)));
      end
      void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, ls), sl(OP_ADD, 1, 1, 0, B_IMM, 8)));
      cyc += 1 + 17 * it8 + 2 * (it8 - 1);
    end
    // remaining steps and drain: one result into the CP per step
    cnt = nvect - 8 * it8;
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, cnt), nop()));
    lb = here();
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_CLTU, 1, 1, 2)));
    void'(emit(sl(OP_ADD, 2, 2, 0, B_IMM, 1), sl(OP_LD, 3, 1, 0, B_REG, base, PR_P1)));
    void'(emit(sl(OP_ST, 0, 2, 4, B_RIGHT, res - 1), sl(cop, 4, 3, 4, B_RIGHT, 0, PR_P1)));
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, lb), sl(OP_ADD, 1, 1, 0, B_IMM, 1)));
    void'(emit(sl(OP_HALT), nop()));
    return cyc + 1 + 4 * cnt + 2 * (cnt - 1) + 1 + 2;
  endfunction

  // ---------------------------------------------------------------- prefix
  // CP only: dst[k] = src[0] + ... + src[k] for k < n (cumulative histogram
  // from a merged one). CP: r1 counter, r2 index, r3 running sum, r4 element.
  function automatic int gen_prefix_cp(int n, int src, int dst);
    int l;
    prog.delete();
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, n), nop()));
    void'(emit(sl(OP_MOV, 2, 0, 0, B_IMM, 0), nop()));
    void'(emit(sl(OP_MOV, 3, 0, 0, B_IMM, 0), nop()));
    l = here();
    void'(emit(sl(OP_LD, 4, 2, 0, B_REG, src), nop()));
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), nop()));
    void'(emit(sl(OP_ADD, 3, 3, 4), nop()));
    void'(emit(sl(OP_ST, 0, 2, 3, B_REG, dst), nop()));
    void'(emit(sl(OP_ADD, 2, 2, 0, B_IMM, 1), nop()));
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, l), nop()));
    void'(emit(sl(OP_HALT), nop()));
    return 3 + 8 * n - 2 + 1 + 2;
  endfunction

  // ---------------------------------------------------------------- Alg. 3
  // PE: r0 id, r1 load address offset, r3 v, r4 s.
  // CP: r1 loop counter, r2 result index, r3 identity, r5 partial, r6 flag.
  function automatic int gen_diagonal(op_e cop, int nvect, int vsize, int npe, int base, int res);
    int n, lm, l1, mod_iter, cyc, t0, r;
    prog.delete();
    n = prologue(cop);
    n += load_const(1, 4, identity_of(cop));
    mod_iter = (npe + nvect - 1) / nvect;
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, mod_iter), sl(OP_PEID, 0)));
    void'(emit(nop(), sl(OP_CLT, 1, 0, 0, B_IMM, vsize)));
    void'(emit(nop(), sl(OP_MOV, 1, 0, 0, B_REG)));
    n += 3;
    // r1 <- id mod N_Vect: a mask for a power of two, otherwise repeated
    // subtraction under predication
    if ((nvect & (nvect - 1)) == 0) begin
      void'(emit(nop(), sl(OP_AND, 1, 0, 0, B_IMM, nvect - 1)));
      cyc = n + 1;
    end else begin
      lm = here();
      void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_CGE, 0, 1, 0, B_IMM, nvect)));
      void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, lm), sl(OP_SUB, 1, 1, 0, B_IMM, nvect, PR_P0)));
      cyc = n + 2 * mod_iter + 2 * (mod_iter - 1);
    end
    void'(emit(sl(OP_MOV, 2, 0, 0, B_IMM, 0), sl(OP_LD, 4, 1, 0, B_REG, base, PR_P1)));
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, nvect - 1), nop()));
    cyc += 2;
    // diagonal phase: N_Vect-1 more loads per PE, CP stores what reaches it
    if (nvect > 1) begin
      l1 = here();
      void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_ADD, 1, 1, 0, B_IMM, 1)));
      void'(emit(sl(OP_ADD, 2, 2, 0, B_IMM, 1), sl(OP_CEQ, 0, 1, 0, B_IMM, nvect)));
      void'(emit(nop(), sl(OP_MOV, 1, 0, 0, B_IMM, 0, PR_P0)));
      void'(emit(nop(), sl(OP_LD, 3, 1, 0, B_REG, base, PR_P1)));
      void'(emit(sl(OP_ST, 0, 2, 4, B_RIGHT, res - 1), sl(cop, 4, 3, 4, B_RIGHT, 0, PR_P1)));
      void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, l1), nop()));
      cyc += 6 * (nvect - 1) + 2 * (nvect - 2);
    end
    // Last result starts at the identity; then the array shifts V_size times
    // into the CP, which folds chunk u into result (u-1) mod N_Vect. The
    // shift phase is unrolled, so result indices are constants. Up to 7
    // results are kept in CP registers r1..r7 (one word per shift); more are
    // kept in the CP memory (load, combine, store: three words per shift).
    t0 = here();
    if (nvect <= 7) begin
      void'(emit(sl(OP_MOV, nvect, 0, 3), nop()));
      for (int k = 0; k < nvect - 1; k++) void'(emit(sl(OP_LD, 1 + k, 0, 0, B_REG, res + k), nop()));
      for (int u = 0; u < vsize; u++) begin
        r = 1 + ((u + nvect - 1) % nvect);
        void'(emit(sl(cop, r, r, 4, B_RIGHT), sl(OP_MOV, 4, 0, 4, B_RIGHT)));
      end
      for (int k = 0; k < nvect; k++) void'(emit(sl(OP_ST, 0, 0, 1 + k, B_REG, res + k), nop()));
    end else begin
      void'(emit(sl(OP_ST, 0, 0, 3, B_REG, res + nvect - 1), nop()));
      for (int u = 0; u < vsize; u++) begin
        r = res + ((u + nvect - 1) % nvect);
        void'(emit(sl(OP_LD, 5, 0, 0, B_REG, r), nop()));
        void'(emit(sl(cop, 5, 5, 4, B_RIGHT), sl(OP_MOV, 4, 0, 4, B_RIGHT)));
        void'(emit(sl(OP_ST, 0, 0, 5, B_REG, r), nop()));
      end
    end
    void'(emit(sl(OP_HALT), nop()));
    cyc += here() - t0 + 2;
    return cyc;
  endfunction

  // ---------------------------------------------------------------- case 2
  // Vectors longer than the array: element e of vector k is word
  // src + k*R + (e / npe) of PE (e mod npe), R = ceil(vsize / npe). Each PE
  // folds its R elements of every vector into one word, dst + k, leaving the
  // one-element-per-PE layout the reduction programs expect. Only the last
  // row can be partly empty; it is predicated on the PE index.
  // PE: r0 id, r1 source pointer, r2 vector index, r3 v, r4 s. CP: r1 counter.
  function automatic int gen_fold(op_e cop, int nvect, int vsize, int npe, int src, int dst);
    int rows, lbl, body;
    prog.delete();
    rows = (vsize + npe - 1) / npe;
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, nvect), sl(OP_PEID, 0)));
    void'(emit(nop(), sl(OP_MOV, 1, 0, 0, B_IMM, src)));
    void'(emit(nop(), sl(OP_MOV, 2, 0, 0, B_IMM, 0)));
    lbl = here();
    void'(emit(nop(), sl(OP_LD, 4, 1, 0, B_REG, 0)));
    body = 1;
    for (int r = 1; r < rows; r++) begin
      if (r == rows - 1) begin
        void'(emit(nop(), sl(OP_CLT, 0, 0, 0, B_IMM, vsize - r * npe)));
        void'(emit(nop(), sl(OP_LD, 3, 1, 0, B_REG, r, PR_P0)));
        void'(emit(nop(), sl(cop, 4, 4, 3, B_REG, 0, PR_P0)));
        body += 3;
      end else begin
        void'(emit(nop(), sl(OP_LD, 3, 1, 0, B_REG, r)));
        void'(emit(nop(), sl(cop, 4, 4, 3)));
        body += 2;
      end
    end
    void'(emit(nop(), sl(OP_ST, 0, 2, 4, B_REG, dst)));
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), sl(OP_ADD, 1, 1, 0, B_IMM, rows)));
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, lbl), sl(OP_ADD, 2, 2, 0, B_IMM, 1)));
    body += 3;
    void'(emit(sl(OP_HALT), nop()));
    return 3 + nvect * body + 2 * (nvect - 1) + 1 + 2;
  endfunction

endpackage
