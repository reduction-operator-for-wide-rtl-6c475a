// tb_simd_cp: control processor on its own, with the PE side observed.
//
// The program (built with the test assembler) sums 1..10 in a loop, multiplies,
// compares, takes and skips BZ/JMP branches, adds a value read from the right
// neighbour (driven by the test) and from the left neighbour, stores results in
// the CP data memory, sets the network configuration, and halts. Every
// instruction carries a numbered PE slot (MOV imm = its address); the test
// checks that exactly the PE slots of executed instructions are issued, in
// program order, that squashed words never reach the PEs, that the run takes one
// cycle per executed word plus two per taken branch plus two, and the results.
module tb_simd_cp;
  import simd_pkg::*;
  import simd_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic prog_we = 1'b0;
  logic [9:0] prog_addr = '0;
  instr_t prog_data = '0;
  slot_t pe_instr;
  logic pe_valid;
  word_t cp_opnd, right_in = 16'h0100, left_in = 16'h2000, boundary;
  netmode_e net_mode;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [8:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  int issued[$];

  always #5 clk = ~clk;
  simd_cp #(.IDEPTH(1024), .DEPTH(512)) dut (.*);

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

  always @(posedge clk) if (pe_valid) issued.push_back(int'(pe_instr.imm));

  // PE slot tagged with the word's address
  function automatic slot_t tag();
    return sl(OP_MOV, 0, 0, 0, B_IMM, here());
  endfunction

  initial begin
    int lbl, skip1, cyc;
    int expect_issue[$];
    word_t d;
    prog.delete();
    // 0..1: r1 = 10 (counter), r2 = 0 (sum)
    void'(emit(sl(OP_MOV, 1, 0, 0, B_IMM, 10), tag()));
    void'(emit(sl(OP_MOV, 2, 0, 0, B_IMM, 0), tag()));
    lbl = here();                                                   // 2
    void'(emit(sl(OP_ADD, 2, 2, 1), tag()));                         // 2
    void'(emit(sl(OP_SUB, 1, 1, 0, B_IMM, 1), tag()));               // 3
    void'(emit(sl(OP_BNZ, 0, 1, 0, B_REG, lbl), tag()));             // 4
    void'(emit(sl(OP_ST, 0, 0, 2, B_REG, 5), tag()));                // 5: mem[5] = 55
    void'(emit(sl(OP_MUL, 3, 2, 0, B_IMM, -3), tag()));              // 6: r3 = -165
    void'(emit(sl(OP_ST, 0, 0, 3, B_REG, 6), tag()));                // 7
    void'(emit(sl(OP_CLT, 4, 3, 0, B_IMM, 0), tag()));               // 8: r4 = 1
    void'(emit(sl(OP_BZ, 0, 4, 0, B_REG, 0), tag()));                // 9: not taken
    skip1 = 13;
    void'(emit(sl(OP_JMP, 0, 0, 0, B_REG, skip1), tag()));           // 10: taken
    void'(emit(sl(OP_ST, 0, 0, 0, B_IMM, 7), tag()));                // 11: skipped
    void'(emit(sl(OP_ST, 0, 0, 0, B_IMM, 8), tag()));                // 12: skipped
    void'(emit(sl(OP_ADD, 5, 2, 0, B_RIGHT), tag()));                // 13: r5 = 55 + 0x100
    void'(emit(sl(OP_ADD, 5, 5, 0, B_LEFT), tag()));                 // 14: + 0x2000
    void'(emit(sl(OP_ST, 0, 0, 5, B_REG, 9), tag()));                // 15
    void'(emit(sl(OP_LD, 6, 0, 0, B_REG, 5), tag()));                // 16: r6 = 55
    void'(emit(sl(OP_MAX, 6, 6, 3), tag()));                         // 17: max(55,-165)
    void'(emit(sl(OP_ST, 0, 0, 6, B_REG, 10), tag()));               // 18
    void'(emit(sl(OP_NETCFG, 0, 6, 0, B_REG, int'(NET_RING_CP)), tag())); // 19
    void'(emit(sl(OP_NOP, 0, 0, 6), tag()));                         // 20: cp_opnd = r6
    void'(emit(sl(OP_HALT), tag()));                                 // 21
    void'(emit(sl(OP_ST, 0, 0, 0, B_IMM, 11), tag()));               // 22: never
    for (int i = 0; i < 2; i++) expect_issue.push_back(i);
    for (int k = 0; k < 10; k++) for (int i = 2; i <= 4; i++) expect_issue.push_back(i);
    for (int i = 5; i <= 10; i++) expect_issue.push_back(i);
    for (int i = 13; i <= 21; i++) expect_issue.push_back(i);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // clear result words, load program
    for (int a = 5; a <= 11; a++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 9'(a); host_wdata = '0;
    end
    @(negedge clk);
    host_en = 0; host_we = 0;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    chk(!busy && !done, "idle after load");
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      if (net_mode == NET_RING_CP && dut.s.op == OP_NOP && dut.ex_valid)
        chk(cp_opnd == 16'd55, "CP operand offered to the ring");
      @(negedge clk);
      cyc++;
    end
    // executed words: 2 + 30 + 6 + 9 = 47; taken branches: 9 loop + 1 jump
    chk(cyc == 47 + 2 * 10 + 2, $sformatf("cycles %0d", cyc));
    chk(issued.size() == expect_issue.size(), $sformatf("issued %0d PE slots", issued.size()));
    for (int i = 0; i < issued.size() && i < expect_issue.size(); i++)
      chk(issued[i] == expect_issue[i], $sformatf("issue %0d: slot %0d expected %0d", i, issued[i], expect_issue[i]));
    chk(net_mode == NET_RING_CP && boundary == 16'd55, "network configuration");
    begin
      int exp_mem [7] = '{55, 16'hFF5B, 0, 0, 55 + 16'h2100, 55, 0};
      for (int a = 5; a <= 11; a++) begin
        @(negedge clk);
        host_en = 1; host_we = 0; host_addr = 9'(a);
        @(negedge clk);
        d = host_rdata;
        host_en = 0;
        chk(d == word_t'(exp_mem[a-5]), $sformatf("mem[%0d] = %h expected %h", a, d, exp_mem[a-5]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
