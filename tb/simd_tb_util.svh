// Shared test-bench tasks for the wide_simd top: host access, program load,
// run-to-completion with cycle count, and reduction checks against a reference
// model computed here. Expects in the including module: clk, the DUT's host
// and program signals, `checks`, `failures`, localparam NPE.

task automatic host_write(input int sel, input int addr, input logic [15:0] data);
  @(negedge clk);
  host_en    = 1'b1;
  host_we    = 1'b1;
  host_sel   = $bits(host_sel)'(sel);
  host_addr  = $bits(host_addr)'(addr);
  host_wdata = data;
  @(negedge clk);
  host_en = 1'b0;
  host_we = 1'b0;
endtask

task automatic host_read(input int sel, input int addr, output logic [15:0] data);
  @(negedge clk);
  host_en   = 1'b1;
  host_we   = 1'b0;
  host_sel  = $bits(host_sel)'(sel);
  host_addr = $bits(host_addr)'(addr);
  @(negedge clk);
  data    = host_rdata;
  host_en = 1'b0;
endtask

task automatic load_program();
  for (int i = 0; i < simd_asm_pkg::prog.size(); i++) begin
    @(negedge clk);
    prog_we   = 1'b1;
    prog_addr = $bits(prog_addr)'(i);
    prog_data = simd_asm_pkg::prog[i];
  end
  @(negedge clk);
  prog_we = 1'b0;
endtask

// Pulse start and count clock edges until done.
task automatic run_program(output int cycles);
  @(negedge clk);
  start = 1'b1;
  @(negedge clk);
  start  = 1'b0;
  cycles = 0;
  while (!done) begin
    @(negedge clk);
    cycles++;
  end
endtask

function automatic void check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endfunction

// Fill vectors: element j of vector k at word base+k of PE j (PEs >= vsize get
// unrelated values that must not influence the result).
logic [15:0] vec_data [0:511][0:511];

task automatic fill_vectors(input int nvect, input int vsize, input int base, input int range_mask);
  for (int k = 0; k < nvect; k++)
    for (int j = 0; j < NPE; j++) begin
      vec_data[k][j] = 16'($urandom) & 16'(range_mask);
      host_write(j, base + k, vec_data[k][j]);
    end
endtask

task automatic check_results(input op_e cop, input int nvect, input int vsize,
                             input int res, input string tag);
  logic [15:0] exp_v, got;
  for (int k = 0; k < nvect; k++) begin
    exp_v = 16'(simd_asm_pkg::identity_of(cop));
    for (int j = 0; j < vsize; j++) exp_v = simd_asm_pkg::combine_ref(cop, exp_v, vec_data[k][j]);
    host_read(NPE, res + k, got);
    check(got == exp_v, $sformatf("%s vector %0d: got %h expected %h", tag, k, got, exp_v));
  end
endtask

// alg: 0 straightforward, 1 pipelined, 2 diagonal access
task automatic run_reduction(input int alg, input op_e cop, input int nvect,
                             input int vsize, output int cycles, input int mask = 16'hFFFF);
  int exp_cyc;
  string tag;
  fill_vectors(nvect, vsize, 0, (cop == OP_MUL) ? 16'h0003 : mask);
  case (alg)
    0: begin exp_cyc = simd_asm_pkg::gen_straight(cop, nvect, vsize, 0, 0);       tag = "straight"; end
    1: begin exp_cyc = simd_asm_pkg::gen_pipelined(cop, nvect, vsize, 0, 0);      tag = "pipelined"; end
    default: begin exp_cyc = simd_asm_pkg::gen_diagonal(cop, nvect, vsize, NPE, 0, 0); tag = "diagonal"; end
  endcase
  tag = $sformatf("%s %s Nvect=%0d Vsize=%0d", tag, cop.name(), nvect, vsize);
  load_program();
  run_program(cycles);
  check(cycles == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", tag, cycles, exp_cyc));
  check_results(cop, nvect, vsize, 0, tag);
  $display("%s: %0d cycles", tag, cycles);
endtask

// Case 2 (V_size > N_PE): wrapped layout, local fold in every PE, then the
// pipelined reduction over the folded words.
task automatic run_case2(input op_e cop, input int nvect, input int vsize);
  int rows, cyc, exp_cyc, e;
  logic [15:0] val, got;
  logic [15:0] exp_v [0:511];
  string tag;
  rows = (vsize + NPE - 1) / NPE;
  tag = $sformatf("case2 %s Nvect=%0d Vsize=%0d", cop.name(), nvect, vsize);
  for (int k = 0; k < nvect; k++) begin
    exp_v[k] = 16'(simd_asm_pkg::identity_of(cop));
    for (int r = 0; r < rows; r++)
      for (int j = 0; j < NPE; j++) begin
        e = r * NPE + j;
        val = 16'($urandom);
        if (cop == OP_MUL) val &= 16'h0003;
        if (e < vsize) exp_v[k] = simd_asm_pkg::combine_ref(cop, exp_v[k], val);
        host_write(j, k * rows + r, val);
      end
  end
  exp_cyc = simd_asm_pkg::gen_fold(cop, nvect, vsize, NPE, 0, 256);
  load_program();
  run_program(cyc);
  check(cyc == exp_cyc, $sformatf("%s fold: %0d cycles, expected %0d", tag, cyc, exp_cyc));
  $display("%s fold: %0d cycles", tag, cyc);
  exp_cyc = simd_asm_pkg::gen_pipelined(cop, nvect, NPE, 256, 0);
  load_program();
  run_program(cyc);
  check(cyc == exp_cyc, $sformatf("%s pipelined: %0d cycles, expected %0d", tag, cyc, exp_cyc));
  $display("%s pipelined: %0d cycles", tag, cyc);
  for (int k = 0; k < nvect; k++) begin
    host_read(NPE, k, got);
    check(got == exp_v[k], $sformatf("%s vector %0d: got %h expected %h", tag, k, got, exp_v[k]));
  end
endtask
