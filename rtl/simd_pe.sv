// simd_pe: one RISC-like processing element of the wide-SIMD array.
//
// Every cycle the PE receives the PE slot of the instruction the control
// processor has in its execute stage, so all PEs run in lock-step. The PE owns
// a register file, two predicate flags and a private data memory whose address
// comes from the PE's own register, so each PE can address a different word.
// One instruction does either an arithmetic/compare operation or one memory
// access. Operand B is an own register, the right or left neighbour's operand,
// or the immediate.
//
// Pipeline (the last two of the processor's four stages: fetch and decode sit
// in the CP): EX reads registers, computes in the ALU, issues the memory access
// and writes compares into the predicate flags; WB writes the ALU result or the
// loaded word into rd. Results in WB are forwarded to EX, so no instruction
// waits. The value this PE offers its neighbours (`nb_out`) is its own register
// rb of the current instruction, forwarded the same way, so a neighbour read
// sees exactly what an own-register read of rb would see.
//
// Predication: the slot's pred field selects always, P0, P1 or P0&P1; a PE whose
// predicate is false does nothing for that instruction (its operand stays
// readable by its neighbours). Compares write P[rd[0]].
//
// Host port: while the processor is idle, `host_en` hands the DMEM port to the
// outside for loading data and reading results; `host_rdata` is valid one
// cycle after a read. Register file, flags and pipeline reset to zero.
module simd_pe
  import simd_pkg::*;
#(
  parameter int unsigned DEPTH = DMEM_DEPTH,
  parameter int unsigned ID_W  = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] pe_id,
  // instruction broadcast by the control processor
  input  slot_t           instr,
  input  logic            instr_valid,
  // neighbourhood network
  input  word_t           nb_left,
  input  word_t           nb_right,
  output word_t           nb_out,
  // host access to the DMEM
  input  logic            host_en,
  input  logic            host_we,
  input  logic [AW-1:0]   host_addr,
  input  word_t           host_wdata,
  output word_t           host_rdata
);

  word_t      rf [NREG];
  logic [1:0] pflag;

  // WB stage
  logic              wb_we;
  logic              wb_load;
  logic [REG_AW-1:0] wb_rd;
  word_t             wb_res;
  word_t             mem_q;
  word_t             wb_val;

  assign wb_val = wb_load ? mem_q : wb_res;

  // EX stage: operand read with forwarding from WB
  word_t opa, opb_reg, opb, alu_res, imm_x;
  logic  alu_cond, pred_ok, exec;

  always_comb begin
    imm_x   = sext_imm(instr.imm);
    opa     = (wb_we && wb_rd == instr.ra) ? wb_val : rf[instr.ra];
    opb_reg = (wb_we && wb_rd == instr.rb) ? wb_val : rf[instr.rb];
    unique case (instr.bsel)
      B_REG:   opb = opb_reg;
      B_LEFT:  opb = nb_left;
      B_RIGHT: opb = nb_right;
      default: opb = imm_x;
    endcase
    unique case (instr.pred)
      PR_ALWAYS: pred_ok = 1'b1;
      PR_P0:     pred_ok = pflag[0];
      PR_P1:     pred_ok = pflag[1];
      default:   pred_ok = &pflag;
    endcase
    exec = instr_valid && pred_ok;
  end

  assign nb_out = opb_reg;

  simd_alu u_alu (.op(instr.op), .a(opa), .b(opb), .result(alu_res), .cond(alu_cond));

  // data memory: PE access in EX, or host access when idle
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  word_t         m_wdata;

  always_comb begin
    if (host_en) begin
      m_en    = 1'b1;
      m_we    = host_we;
      m_addr  = host_addr;
      m_wdata = host_wdata;
    end else begin
      m_en    = exec && (instr.op inside {OP_LD, OP_ST});
      m_we    = instr.op == OP_ST;
      m_addr  = opa[AW-1:0] + imm_x[AW-1:0];   // wraps within the memory
      m_wdata = opb;
    end
  end

  simd_dmem #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_dmem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(mem_q)
  );

  assign host_rdata = mem_q;

  // The host may only use the memory port while no instruction is issued.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_en |-> !instr_valid)
    else $error("host access to a PE memory while instructions are issued");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we   <= 1'b0;
      wb_load <= 1'b0;
      wb_rd   <= '0;
      wb_res  <= '0;
      pflag   <= '0;
    end else begin
      wb_we   <= exec && writes_reg(instr.op);
      wb_load <= instr.op == OP_LD;
      wb_rd   <= instr.rd;
      wb_res  <= (instr.op == OP_PEID) ? word_t'(pe_id) : alu_res;
      if (exec && is_compare(instr.op)) pflag[instr.rd[0]] <= alu_cond;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else if (wb_we) begin
      rf[wb_rd] <= wb_val;
    end
  end

endmodule
