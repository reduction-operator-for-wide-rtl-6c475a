// tb_wide_simd_full: the wide-SIMD at its default size (128 PEs, 1 KB per PE).
//
// Runs the evaluation configuration N_Vect = 100, V_size = N_PE = 128 with
// summation for each of the three reduction programs, and a row projection of
// a 120 x 45 8-bit image (45 row sums of 120 pixels) with the pipelined and the
// diagonal-access programs. It also builds a cumulative histogram of a 120 x 45
// 8-bit image: each of the first 120 PEs holds the 64-bin partial histogram of
// its image column (bin = pixel / 4), the pipelined program merges the 120
// partial histograms into one in the CP, and a CP loop turns that into the
// cumulative histogram. Results are checked against a reference computed here
// and cycle counts against the count implied by each program.
module tb_wide_simd_full;
  import simd_pkg::*;
  import simd_asm_pkg::*;

  localparam int NPE = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic prog_we = 1'b0;
  logic [9:0] prog_addr = '0;
  instr_t prog_data = '0;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [7:0] host_sel = '0;
  logic [8:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wide_simd dut (.*);

  `include "simd_tb_util.svh"

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Partial histograms: bin k of PE j's column at word k of PE j; PEs 120..127
  // hold unrelated values. Merged histogram at CP word k, cumulative at 256+k.
  task automatic run_histogram();
    localparam int NBIN = 64, COLS = 120, ROWS = 45;
    int cyc, exp_cyc, acc;
    logic [7:0] px;
    logic [15:0] got;
    for (int k = 0; k < NBIN; k++)
      for (int j = 0; j < NPE; j++) vec_data[k][j] = (j < COLS) ? 16'd0 : 16'($urandom);
    for (int j = 0; j < COLS; j++)
      for (int r = 0; r < ROWS; r++) begin
        px = 8'($urandom);
        vec_data[px >> 2][j]++;
      end
    for (int k = 0; k < NBIN; k++)
      for (int j = 0; j < NPE; j++) host_write(j, k, vec_data[k][j]);
    exp_cyc = gen_pipelined(OP_ADD, NBIN, COLS, 0, 0);
    load_program();
    run_program(cyc);
    check(cyc == exp_cyc, $sformatf("histogram merge: %0d cycles, expected %0d", cyc, exp_cyc));
    check_results(OP_ADD, NBIN, COLS, 0, "histogram merge");
    $display("histogram merge (%0d bins, %0d partial histograms): %0d cycles", NBIN, COLS, cyc);
    exp_cyc = gen_prefix_cp(NBIN, 0, 256);
    load_program();
    run_program(cyc);
    check(cyc == exp_cyc, $sformatf("cumulative histogram: %0d cycles, expected %0d", cyc, exp_cyc));
    acc = 0;
    for (int k = 0; k < NBIN; k++) begin
      for (int j = 0; j < COLS; j++) acc += vec_data[k][j];
      host_read(NPE, 256 + k, got);
      check(got == 16'(acc), $sformatf("cumulative bin %0d: got %0d expected %0d", k, got, acc));
    end
    check(acc == COLS * ROWS, "cumulative histogram total");
    $display("cumulative histogram: %0d cycles", cyc);
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_reduction(0, OP_ADD, 100, 128, cyc);
    run_reduction(2, OP_ADD, 100, 128, cyc);
    run_reduction(1, OP_ADD, 100, 128, cyc);
    run_reduction(1, OP_ADD, 100, 65, cyc);
    run_reduction(1, OP_ADD, 45, 120, cyc, 16'h00FF);
    run_reduction(2, OP_ADD, 45, 120, cyc, 16'h00FF);
    run_histogram();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
