// simd_cp: control processor of the wide-SIMD.
//
// The CP owns the program: it fetches one two-slot instruction word per cycle,
// executes the CP slot itself and hands the PE slot to the PE array in the same
// cycle, so the array runs in lock-step with it. The CP has its own register
// file, ALU and data memory, reads PE0 (right) and PE(N-1) (left) over the
// neighbourhood network, offers its own operand to the ring, and sets the
// network's end configuration with NETCFG.
//
// Pipeline, four stages: IF presents the PC to the program memory, ID holds the
// fetched word, EX executes (CP slot here, PE slot in every PE), WB writes the
// register. WB results are forwarded to EX. Branches (BNZ, BZ, JMP) and HALT
// are resolved in EX; the two younger words in IF and ID are squashed, so a
// taken branch costs two extra cycles and a not-taken one none.
//
// Control: while idle the program memory is written through the prog_* port
// and the CP data memory through the host_* port. A one-cycle `start` begins
// execution at address 0; `done` rises the cycle after HALT leaves EX, when
// every earlier instruction has completed, and stays high until the next start.
// The instruction encoding and this control interface are the implementation's
// own; the design only fixes that the CP handles program flow and the PEs run in
// lock-step with it.
module simd_cp
  import simd_pkg::*;
#(
  parameter int unsigned IDEPTH = IMEM_DEPTH,
  parameter int unsigned DEPTH  = DMEM_DEPTH,
  localparam int unsigned IAW   = $clog2(IDEPTH),
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  // program load (while idle)
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  instr_t         prog_data,
  // PE array issue
  output slot_t          pe_instr,
  output logic           pe_valid,
  // neighbourhood network
  output word_t          cp_opnd,
  input  word_t          right_in,
  input  word_t          left_in,
  output netmode_e       net_mode,
  output word_t          boundary,
  // host access to the CP data memory (while idle)
  input  logic           host_en,
  input  logic           host_we,
  input  logic [AW-1:0]  host_addr,
  input  word_t          host_wdata,
  output word_t          host_rdata
);

  localparam instr_t NOP_INSTR = '0;

  // ---------------- fetch / decode ----------------
  logic           running;
  logic [IAW-1:0] pc;
  logic           id_valid;
  instr_t         imem_q;
  logic           imem_en, imem_we;
  logic [IAW-1:0] imem_addr;

  always_comb begin
    imem_en   = running || prog_we;
    imem_we   = !running && prog_we;
    imem_addr = running ? pc : prog_addr;
  end

  simd_dmem #(.WIDTH(INSTR_W), .DEPTH(IDEPTH)) u_imem (
    .clk, .en(imem_en), .we(imem_we), .addr(imem_addr),
    .wdata(prog_data), .rdata(imem_q)
  );

  // ---------------- execute ----------------
  instr_t ex_instr;
  logic   ex_valid;
  slot_t  s;
  assign  s = ex_instr.cp;

  word_t             rf [NREG];
  logic              wb_we, wb_load;
  logic [REG_AW-1:0] wb_rd;
  word_t             wb_res, mem_q, wb_val;

  assign wb_val = wb_load ? mem_q : wb_res;

  word_t opa, opb_reg, opb, alu_res, imm_x;
  logic  alu_cond;
  logic  taken, halt, flush;
  logic [IAW-1:0] target;

  always_comb begin
    imm_x   = sext_imm(s.imm);
    opa     = (wb_we && wb_rd == s.ra) ? wb_val : rf[s.ra];
    opb_reg = (wb_we && wb_rd == s.rb) ? wb_val : rf[s.rb];
    unique case (s.bsel)
      B_REG:   opb = opb_reg;
      B_LEFT:  opb = left_in;
      B_RIGHT: opb = right_in;
      default: opb = imm_x;
    endcase
    taken = 1'b0;
    if (ex_valid) begin
      unique case (s.op)
        OP_BNZ:  taken = opa != '0;
        OP_BZ:   taken = opa == '0;
        OP_JMP:  taken = 1'b1;
        default: taken = 1'b0;
      endcase
    end
    halt   = ex_valid && s.op == OP_HALT;
    flush  = taken || halt;
    target = IAW'(s.imm);
  end

  assign cp_opnd  = opb_reg;
  assign pe_instr = ex_instr.pe;
  assign pe_valid = ex_valid;

  simd_alu u_alu (.op(s.op), .a(opa), .b(opb), .result(alu_res), .cond(alu_cond));

  // CP data memory
  logic          m_en, m_we;
  logic [AW-1:0] m_addr;
  word_t         m_wdata;

  always_comb begin
    if (host_en && !running) begin
      m_en    = 1'b1;
      m_we    = host_we;
      m_addr  = host_addr;
      m_wdata = host_wdata;
    end else begin
      m_en    = ex_valid && (s.op inside {OP_LD, OP_ST});
      m_we    = s.op == OP_ST;
      m_addr  = opa[AW-1:0] + imm_x[AW-1:0];   // wraps within the memory
      m_wdata = opb;
    end
  end

  simd_dmem #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_dmem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(mem_q)
  );

  assign host_rdata = mem_q;

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      done     <= 1'b0;
      pc       <= '0;
      id_valid <= 1'b0;
      ex_instr <= NOP_INSTR;
      ex_valid <= 1'b0;
      wb_we    <= 1'b0;
      wb_load  <= 1'b0;
      wb_rd    <= '0;
      wb_res   <= '0;
      net_mode <= NET_BROKEN;
      boundary <= '0;
    end else begin
      // fetch
      if (!running) begin
        id_valid <= 1'b0;
        if (start) begin
          running <= 1'b1;
          done    <= 1'b0;
          pc      <= '0;
        end
      end else if (flush) begin
        pc       <= target;
        id_valid <= 1'b0;
        if (halt) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else begin
        pc       <= pc + 1'b1;
        id_valid <= 1'b1;
      end
      // decode -> execute
      if (running && id_valid && !flush) begin
        ex_instr <= imem_q;
        ex_valid <= 1'b1;
      end else begin
        ex_instr <= NOP_INSTR;
        ex_valid <= 1'b0;
      end
      // execute -> write back
      wb_we   <= ex_valid && (writes_reg(s.op) && s.op != OP_PEID || is_compare(s.op));
      wb_load <= s.op == OP_LD;
      wb_rd   <= s.rd;
      wb_res  <= is_compare(s.op) ? word_t'(alu_cond) : alu_res;
      if (ex_valid && s.op == OP_NETCFG) begin
        net_mode <= netmode_e'(s.imm[1:0]);
        boundary <= opa;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else if (wb_we) begin
      rf[wb_rd] <= wb_val;
    end
  end

  assign busy = running;

  // Program memory is loaded only while idle; start is ignored while running.
  a_prog_idle: assert property (@(posedge clk) disable iff (!rst_n) running |-> !prog_we)
    else $error("program write while running");
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) running |-> !host_en)
    else $error("host access to the CP memory while running");

endmodule
