// simd_pkg: types and constants shared by the wide-SIMD processor.
//
// The processor is a control processor (CP) driving an array of RISC-like
// processing elements (PEs) in lock-step; neighbouring PEs read each other's
// operands over a circular neighbourhood network. Each instruction word holds
// two slots issued in the same cycle: one for the CP and one broadcast to every
// PE. A slot names one operation (arithmetic, compare, load, store or, for the
// CP, a branch), a destination, two source registers, a selector for the second
// operand (own register, left neighbour, right neighbour or immediate), a
// predicate selector (PE only) and a 10-bit signed immediate.
//
// The 16-bit data width and the 1 KB data memories follow the design; the
// instruction encoding, the register count and the program memory size are
// choices of this implementation.
package simd_pkg;

  parameter int unsigned DATA_W     = 16;    // data path and DMEM word width
  parameter int unsigned NREG       = 8;     // registers per PE and in the CP
  parameter int unsigned REG_AW     = 3;     // register index width
  parameter int unsigned IMM_W      = 10;    // signed immediate width
  parameter int unsigned DMEM_DEPTH = 512;   // 1 KB of 16-bit words
  parameter int unsigned IMEM_DEPTH = 1024;  // CP program memory entries

  typedef logic [DATA_W-1:0] word_t;

  // Operations. Compares write a predicate flag in a PE and 0/1 into a
  // register in the CP. Branches, HALT and NETCFG only act in the CP slot;
  // PEID only acts in the PE slot.
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_ADD    = 5'd1,
    OP_SUB    = 5'd2,
    OP_MUL    = 5'd3,
    OP_MIN    = 5'd4,   // signed
    OP_MAX    = 5'd5,   // signed
    OP_AND    = 5'd6,
    OP_OR     = 5'd7,
    OP_XOR    = 5'd8,
    OP_MOV    = 5'd9,   // rd <- B
    OP_LD     = 5'd10,  // rd <- mem[A + imm]
    OP_ST     = 5'd11,  // mem[A + imm] <- B
    OP_CLT    = 5'd12,  // A <  B signed
    OP_CLTU   = 5'd13,  // A <  B unsigned
    OP_CGE    = 5'd14,  // A >= B signed
    OP_CEQ    = 5'd15,  // A == B
    OP_CNE    = 5'd16,  // A != B
    OP_PEID   = 5'd17,  // rd <- index of this PE
    OP_BNZ    = 5'd18,  // CP: if A != 0 goto imm
    OP_BZ     = 5'd19,  // CP: if A == 0 goto imm
    OP_JMP    = 5'd20,  // CP: goto imm
    OP_HALT   = 5'd21,  // CP: stop fetching, raise done
    OP_NETCFG = 5'd22   // CP: network mode <- imm[1:0], boundary value <- A
  } op_e;

  // Source of operand B.
  typedef enum logic [1:0] {
    B_REG   = 2'd0,   // own register rb
    B_LEFT  = 2'd1,   // operand of the left neighbour
    B_RIGHT = 2'd2,   // operand of the right neighbour
    B_IMM   = 2'd3    // sign-extended immediate
  } bsel_e;

  // Predicate selector of a PE slot.
  typedef enum logic [1:0] {
    PR_ALWAYS = 2'd0,
    PR_P0     = 2'd1,
    PR_P1     = 2'd2,
    PR_P0P1   = 2'd3
  } pred_e;

  // Configuration of the ring ends (neighbourhood network).
  typedef enum logic [1:0] {
    NET_RING_PE = 2'd0,  // PE0 and PE(N-1) are each other's neighbours
    NET_RING_CP = 2'd1,  // the CP sits between PE(N-1) and PE0
    NET_BROKEN  = 2'd2   // boundary PEs read the predefined boundary value
  } netmode_e;

  typedef struct packed {
    op_e                op;
    logic [REG_AW-1:0]  rd;
    logic [REG_AW-1:0]  ra;
    logic [REG_AW-1:0]  rb;
    bsel_e              bsel;
    pred_e              pred;
    logic [IMM_W-1:0]   imm;
  } slot_t;

  typedef struct packed {
    slot_t cp;
    slot_t pe;
  } instr_t;

  parameter int unsigned INSTR_W = $bits(instr_t);

  function automatic word_t sext_imm(input logic [IMM_W-1:0] imm);
    return word_t'({{(DATA_W-IMM_W){imm[IMM_W-1]}}, imm});
  endfunction

  function automatic logic is_compare(input op_e op);
    return op inside {OP_CLT, OP_CLTU, OP_CGE, OP_CEQ, OP_CNE};
  endfunction

  // Operations whose result goes to register rd (a PE writes compares to a
  // predicate flag instead, which the PE handles itself).
  function automatic logic writes_reg(input op_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_MIN, OP_MAX, OP_AND, OP_OR,
                      OP_XOR, OP_MOV, OP_LD, OP_PEID};
  endfunction

endpackage
