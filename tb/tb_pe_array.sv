// tb_pe_array: PE array of 8 PEs driven directly with PE slots.
//
// Checks: host writes/reads reach the selected PE only; PEID gives each PE its
// index; a value moves exactly one PE per instruction over the ring (seen at
// the CP's right input every cycle); left reads; the three ring-end
// configurations (PE-only ring, CP in the ring, broken ring with boundary);
// predication on the PE index; per-PE addressing of the private memories.
module tb_pe_array;
  import simd_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  slot_t instr = '0;
  logic instr_valid = 1'b0;
  word_t cp_opnd = '0, boundary = '0, cp_right, cp_left;
  netmode_e net_mode = NET_BROKEN;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [2:0] host_pe = '0;
  logic [8:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pe_array #(.N_PE(N), .DEPTH(512)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic slot_t sl(op_e op, int rd = 0, int ra = 0, int rb = 0,
                               bsel_e bsel = B_REG, int imm = 0, pred_e pred = PR_ALWAYS);
    slot_t s;
    s = '{op: op, rd: 3'(rd), ra: 3'(ra), rb: 3'(rb), bsel: bsel, pred: pred, imm: 10'(imm)};
    return s;
  endfunction

  task automatic issue(slot_t s);
    @(negedge clk);
    instr = s;
    instr_valid = 1'b1;
  endtask

  task automatic idle();
    @(negedge clk);
    instr = '0;
    instr_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic hread(int pe, int addr, output word_t d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_pe = 3'(pe); host_addr = 9'(addr);
    @(negedge clk);
    d = host_rdata;
    host_en = 0;
  endtask

  initial begin
    word_t d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // host writes: PE p gets 100*p + a at address a (a < 4)
    for (int p = 0; p < N; p++)
      for (int a = 0; a < 4; a++) begin
        @(negedge clk);
        host_en = 1; host_we = 1; host_pe = 3'(p); host_addr = 9'(a); host_wdata = word_t'(100 * p + a);
      end
    // clear the words the predicated store may skip
    for (int p = 0; p < N; p++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_pe = 3'(p); host_addr = 9'(13 + p); host_wdata = '0;
    end
    @(negedge clk);
    host_en = 0; host_we = 0;
    for (int p = 0; p < N; p++)
      for (int a = 0; a < 4; a++) begin
        hread(p, a, d);
        chk(d == word_t'(100 * p + a), $sformatf("host PE%0d[%0d] = %0d", p, a, d));
      end
    // PEID into r1; r2 = 10*id + 5
    issue(sl(OP_PEID, 1));
    issue(sl(OP_MUL, 2, 1, 0, B_IMM, 10));
    issue(sl(OP_ADD, 2, 2, 0, B_IMM, 5));
    // broken ring, boundary 0x77: shift r2 left one hop per instruction; the CP
    // input must show PE k's original value after k hops
    net_mode = NET_BROKEN;
    boundary = 16'h77;
    for (int k = 0; k < N + 2; k++) begin
      issue(sl(OP_MOV, 2, 0, 2, B_RIGHT));
      #1;
      chk(cp_right == ((k < N) ? word_t'(10 * k + 5) : 16'h77),
          $sformatf("hop %0d: CP sees %0d", k, cp_right));
    end
    // PE-only ring: r1 = id rotated right by one (left read) -> id-1 mod N
    idle();
    net_mode = NET_RING_PE;
    issue(sl(OP_MOV, 3, 0, 1, B_LEFT));
    issue(sl(OP_ST, 0, 0, 3, B_REG, 10));
    // CP in the ring: PE(N-1) right read and PE0 left read give cp_opnd
    idle();
    net_mode = NET_RING_CP;
    cp_opnd = 16'h1234;
    issue(sl(OP_MOV, 4, 0, 1, B_RIGHT));
    issue(sl(OP_ST, 0, 0, 4, B_REG, 11));
    issue(sl(OP_MOV, 4, 0, 1, B_LEFT));
    issue(sl(OP_ST, 0, 0, 4, B_REG, 12));
    // predication: P0 = id >= 5; predicated store of r1 to address 13 + id
    issue(sl(OP_CGE, 0, 1, 0, B_IMM, 5));
    issue(sl(OP_ST, 0, 1, 1, B_REG, 13, PR_P0));
    // per-PE addressing: load from address (id mod 4) and store it at 30
    issue(sl(OP_AND, 5, 1, 0, B_IMM, 3));
    issue(sl(OP_LD, 6, 5, 0, B_REG, 0));
    issue(sl(OP_ST, 0, 0, 6, B_REG, 30));
    idle();
    for (int p = 0; p < N; p++) begin
      hread(p, 10, d);
      chk(d == word_t'((p + N - 1) % N), $sformatf("ring left PE%0d = %0d", p, d));
      hread(p, 11, d);
      chk(d == ((p == N - 1) ? 16'h1234 : word_t'(p + 1)), $sformatf("CP ring right PE%0d = %h", p, d));
      hread(p, 12, d);
      chk(d == ((p == 0) ? 16'h1234 : word_t'(p - 1)), $sformatf("CP ring left PE%0d = %h", p, d));
      hread(p, 13 + p, d);
      chk(d == ((p >= 5) ? word_t'(p) : word_t'(0)), $sformatf("predicated store PE%0d = %0d", p, d));
      hread(p, 30, d);
      chk(d == word_t'(100 * p + p % 4), $sformatf("own address PE%0d = %0d", p, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
