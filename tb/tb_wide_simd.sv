// tb_wide_simd: end-to-end test of the wide-SIMD with a reduced array (16 PEs).
//
// Runs the three reduction programs (straightforward, pipelined, diagonal
// access) for several associative operations and sizes, including
// V_size < N_PE and N_Vect larger and smaller than V_size, and a ring program
// that exercises the three network end configurations and left and right
// neighbour reads. Vectors longer than the array (several elements per PE) are
// first folded locally in every PE, then reduced with the pipelined program. Results in the CP data memory are checked against a
// reference computed here, and every run's cycle count against the count the
// program structure implies. Mechanisms counted: predicated-off PE
// instructions, taken branches (pipeline flush), left and right neighbour
// reads, CP reads of PE0, and neighbour reads under each ring mode.
module tb_wide_simd;
  import simd_pkg::*;
  import simd_asm_pkg::*;

  localparam int NPE = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic prog_we = 1'b0;
  logic [9:0] prog_addr = '0;
  instr_t prog_data = '0;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [$clog2(NPE+1)-1:0] host_sel = '0;
  logic [8:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wide_simd #(.N_PE(NPE)) dut (.*);

  `include "simd_tb_util.svh"

  // -------- mechanism counters
  int n_pred_off = 0, n_taken = 0, n_right = 0, n_left = 0, n_cpread = 0;
  int n_mode [3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (dut.pe_valid && !dut.u_array.g_pe[NPE-1].u_pe.pred_ok) n_pred_off++;
    if (dut.u_cp.taken) n_taken++;
    if (dut.pe_valid && dut.pe_instr.op != OP_NOP) begin
      if (dut.pe_instr.bsel == B_RIGHT) n_right++;
      if (dut.pe_instr.bsel == B_LEFT)  n_left++;
      if (dut.pe_instr.bsel inside {B_LEFT, B_RIGHT} && dut.net_mode <= NET_BROKEN)
        n_mode[dut.net_mode]++;
    end
    if (dut.u_cp.ex_valid && dut.u_cp.s.bsel == B_RIGHT && dut.u_cp.s.op != OP_NOP) n_cpread++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ring program: PE r1 = id; rotate left NPE times in a PE-only ring
  // (back to id), store at 100; rotate right once (PE j gets id of j-1 mod N),
  // store at 101; CP in the ring: PE(N-1) reads CP r3 = 0x55 from the right,
  // PE0 reads it from the left, stored at 102/103.
  task automatic ring_test();
    int cyc, e;
    logic [15:0] got;
    prog.delete();
    void'(emit(sl(OP_NETCFG, 0, 0, 0, B_REG, int'(NET_RING_PE)), sl(OP_PEID, 1)));
    for (int i = 0; i < NPE; i++) void'(emit(nop(), sl(OP_MOV, 1, 0, 1, B_RIGHT)));
    void'(emit(nop(), sl(OP_ST, 0, 0, 1, B_REG, 100)));
    void'(emit(nop(), sl(OP_MOV, 1, 0, 1, B_LEFT)));
    void'(emit(nop(), sl(OP_ST, 0, 0, 1, B_REG, 101)));
    void'(emit(sl(OP_MOV, 3, 0, 0, B_IMM, 16'h55), sl(OP_MOV, 2, 0, 0, B_IMM, 7)));
    void'(emit(sl(OP_NETCFG, 0, 0, 0, B_REG, int'(NET_RING_CP)), nop()));
    void'(emit(sl(OP_NOP, 0, 0, 3), sl(OP_MOV, 2, 0, 2, B_RIGHT)));
    void'(emit(nop(), sl(OP_ST, 0, 0, 2, B_REG, 102)));
    void'(emit(sl(OP_NOP, 0, 0, 3), sl(OP_MOV, 2, 0, 2, B_LEFT)));
    void'(emit(nop(), sl(OP_ST, 0, 0, 2, B_REG, 103)));
    void'(emit(sl(OP_HALT), nop()));
    load_program();
    run_program(cyc);
    check(cyc == prog.size() + 2, $sformatf("ring program: %0d cycles", cyc));
    for (int j = 0; j < NPE; j++) begin
      host_read(j, 100, got);
      check(got == 16'(j), $sformatf("PE ring rotate PE%0d got %h", j, got));
      host_read(j, 101, got);
      check(got == 16'((j + NPE - 1) % NPE), $sformatf("rotate right PE%0d got %h", j, got));
      host_read(j, 102, got);
      e = (j == NPE - 1) ? 16'h55 : 7;
      check(got == 16'(e), $sformatf("CP ring right PE%0d got %h", j, got));
      host_read(j, 103, got);
      e = (j == 0) ? 16'h55 : ((j == NPE - 1) ? 7 : 7);
      check(got == 16'(e), $sformatf("CP ring left PE%0d got %h", j, got));
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ring_test();
    run_reduction(0, OP_ADD, 5, NPE, cyc);
    run_reduction(0, OP_MAX, 3, 11, cyc);
    run_reduction(1, OP_ADD, 24, NPE, cyc);
    run_reduction(1, OP_MAX, 45, 10, cyc);
    run_reduction(1, OP_MIN, 5, NPE, cyc);
    run_reduction(1, OP_XOR, 9, 12, cyc);
    run_reduction(2, OP_ADD, 5, NPE, cyc);
    run_reduction(2, OP_MAX, 3, NPE, cyc);
    run_reduction(2, OP_MUL, 4, 13, cyc);
    run_reduction(2, OP_ADD, NPE, NPE, cyc);
    run_case2(OP_ADD, 7, 3 * NPE + 5);
    run_case2(OP_MAX, 4, 2 * NPE);
    run_case2(OP_XOR, 3, 4 * NPE - 1);
    $display("mechanisms: pred_off=%0d taken_branch=%0d right_read=%0d left_read=%0d cp_read=%0d ring_pe=%0d ring_cp=%0d broken=%0d",
             n_pred_off, n_taken, n_right, n_left, n_cpread, n_mode[0], n_mode[1], n_mode[2]);
    check(n_pred_off > 0, "predication never disabled a PE");
    check(n_taken > 0, "no taken branch");
    check(n_right > 0, "no right-neighbour read");
    check(n_left > 0, "no left-neighbour read");
    check(n_cpread > 0, "CP never read PE0");
    check(n_mode[0] > 0, "PE-only ring never used");
    check(n_mode[1] > 0, "CP-in-ring never used");
    check(n_mode[2] > 0, "broken ring never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
