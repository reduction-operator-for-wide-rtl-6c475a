// tb_simd_pe: random-instruction test of one processing element.
//
// Issues a stream of random PE slots back to back (every cycle, so each result
// is consumed by the very next instruction and must be forwarded), with random
// predicates, operand-B sources (own register, left/right neighbour driven by
// the test, immediate), loads and stores. An architectural model written here
// executes the same stream; after every instruction the PE's neighbour operand
// (its register rb, forwarded) is compared with the model, and at the end every
// register and every data-memory word (read through the host port) is compared.
module tb_simd_pe;
  import simd_pkg::*;

  localparam int ID = 37;

  logic clk = 1'b0, rst_n = 1'b0;
  slot_t instr = '0;
  logic instr_valid = 1'b0;
  word_t nb_left = '0, nb_right = '0, nb_out;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [8:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_pe #(.DEPTH(512), .ID_W(8)) dut (.clk, .rst_n, .pe_id(8'(ID)), .instr, .instr_valid,
    .nb_left, .nb_right, .nb_out, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata);

  word_t m_rf [8];
  logic [1:0] m_p;
  word_t m_mem [512];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t sx(logic [9:0] i);
    return {{6{i[9]}}, i};
  endfunction

  // architectural effect of one slot
  task automatic model_exec(slot_t s);
    word_t a, b, r;
    logic ok, c;
    logic [8:0] ad;
    a = m_rf[s.ra];
    case (s.bsel)
      B_REG: b = m_rf[s.rb];
      B_LEFT: b = nb_left;
      B_RIGHT: b = nb_right;
      default: b = sx(s.imm);
    endcase
    case (s.pred)
      PR_ALWAYS: ok = 1;
      PR_P0: ok = m_p[0];
      PR_P1: ok = m_p[1];
      default: ok = m_p[0] && m_p[1];
    endcase
    if (!ok) return;
    ad = 9'(a + sx(s.imm));
    c = 0;
    case (s.op)
      OP_ADD: m_rf[s.rd] = a + b;
      OP_SUB: m_rf[s.rd] = a - b;
      OP_MUL: m_rf[s.rd] = 16'(32'(a) * 32'(b));
      OP_MIN: m_rf[s.rd] = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX: m_rf[s.rd] = ($signed(a) > $signed(b)) ? a : b;
      OP_AND: m_rf[s.rd] = a & b;
      OP_OR:  m_rf[s.rd] = a | b;
      OP_XOR: m_rf[s.rd] = a ^ b;
      OP_MOV: m_rf[s.rd] = b;
      OP_PEID: m_rf[s.rd] = word_t'(ID);
      OP_LD:  m_rf[s.rd] = m_mem[ad];
      OP_ST:  m_mem[ad] = b;
      OP_CLT:  m_p[s.rd[0]] = $signed(a) < $signed(b);
      OP_CLTU: m_p[s.rd[0]] = a < b;
      OP_CGE:  m_p[s.rd[0]] = $signed(a) >= $signed(b);
      OP_CEQ:  m_p[s.rd[0]] = a == b;
      OP_CNE:  m_p[s.rd[0]] = a != b;
      default: ;
    endcase
  endtask

  initial begin
    op_e ops [18] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_MIN, OP_MAX, OP_AND, OP_OR, OP_XOR,
                      OP_MOV, OP_LD, OP_ST, OP_CLT, OP_CLTU, OP_CGE, OP_CEQ, OP_CNE, OP_PEID};
    slot_t s;
    logic [15:0] got;
    int npred_off = 0;
    for (int i = 0; i < 8; i++) m_rf[i] = '0;
    m_p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // preload memory through the host port
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 9'(i); host_wdata = word_t'($urandom);
      m_mem[i] = host_wdata;
    end
    @(negedge clk);
    host_en = 0; host_we = 0;
    // random stream; a few register-initialising MOVs first
    for (int i = 0; i < 6000; i++) begin
      s.op   = (i < 8) ? OP_MOV : ops[$urandom_range(17)];
      s.rd   = (i < 8) ? 3'(i) : 3'($urandom);
      s.ra   = 3'($urandom);
      s.rb   = 3'($urandom);
      s.bsel = (i < 8) ? B_IMM : bsel_e'($urandom);
      s.pred = (i < 8) ? PR_ALWAYS : pred_e'($urandom);
      s.imm  = 10'($urandom);
      instr = s;
      instr_valid = 1'b1;
      nb_left  = word_t'($urandom);
      nb_right = word_t'($urandom);
      #1;
      chk(nb_out == m_rf[s.rb], $sformatf("instr %0d: operand r%0d = %h, model %h", i, s.rb, nb_out, m_rf[s.rb]));
      if (!dut.pred_ok) npred_off++;
      model_exec(s);
      @(negedge clk);
    end
    chk(npred_off > 100, "predication rarely false");
    // invalid slot must do nothing
    instr = '{op: OP_MOV, rd: 3'd0, ra: 3'd0, rb: 3'd0, bsel: B_IMM, pred: PR_ALWAYS, imm: 10'h155};
    instr_valid = 1'b0;
    @(negedge clk);
    // drain and read registers through the operand output
    for (int r = 0; r < 8; r++) begin
      instr = '{op: OP_NOP, rd: 3'd0, ra: 3'd0, rb: 3'(r), bsel: B_REG, pred: PR_ALWAYS, imm: '0};
      instr_valid = 1'b1;
      #1;
      chk(nb_out == m_rf[r], $sformatf("final r%0d = %h, model %h", r, nb_out, m_rf[r]));
      @(negedge clk);
    end
    instr_valid = 1'b0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      host_en = 1; host_we = 0; host_addr = 9'(i);
      @(negedge clk);
      got = host_rdata;
      chk(got == m_mem[i], $sformatf("mem[%0d] = %h, model %h", i, got, m_mem[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
