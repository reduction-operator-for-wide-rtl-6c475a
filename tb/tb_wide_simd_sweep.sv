// tb_wide_simd_sweep: running time against the number of vectors at the
// default size (128 PEs), V_size = 128 (and 65 for the pipelined program).
//
// For N_Vect = 1, 2, 4, ..., 256 it runs the straightforward, pipelined and
// diagonal-access programs (sum; diagonal access only up to N_Vect = V_size), checks every result and the exact cycle
// count, and prints a table of the measured cycles next to the running-time
// models published for the original processor (straightforward
// 10 + 12 N + 11/8 V N, pipelined 26 + 4 V + 19/8 N, diagonal access
// 12 + 11 N + log2(V/N) (37.5 + N) + V/2), which are printed for comparison
// only: this instruction set differs.
module tb_wide_simd_sweep;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_s, c_p, c_d, c_p65;
    real m_s, m_p, m_d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= 256; n *= 2) begin
      run_reduction(0, OP_ADD, n, 128, c_s);
      run_reduction(1, OP_ADD, n, 128, c_p);
      if (n <= 128) run_reduction(2, OP_ADD, n, 128, c_d);
      else c_d = 0;
      run_reduction(1, OP_ADD, n, 65, c_p65);
      m_s = 10.0 + 12.0 * n + 11.0 / 8.0 * 128 * n;
      m_p = 26.0 + 128 * 4.0 + n * 19.0 / 8.0;
      m_d = 12.0 + 11.0 * n + $ln(128.0 / n) / $ln(2.0) * (37.5 + n) + 64.0;
      $display("SWEEP N_Vect=%0d  straight %0d (model %0.0f)  pipelined %0d (model %0.0f)  diagonal %0d (model %0.0f)  pipelined V=65 %0d",
               n, c_s, m_s, c_p, m_p, c_d, m_d, c_p65);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
