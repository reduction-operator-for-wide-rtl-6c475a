// pe_array: N_PE processing elements in lock-step, joined by the
// neighbourhood network.
//
// Every PE gets the same PE slot and valid bit in the same cycle; PE i is told
// its index i, which programs use (through PEID) to predicate or to compute
// per-PE addresses. The network carries each PE's operand to its neighbours and
// the end operands to the control processor (`cp_right` is PE0, `cp_left` is
// PE(N-1)). Host access reaches the DMEM of PE `host_pe`; `host_rdata` is that
// PE's memory output one cycle after a read.
module pe_array
  import simd_pkg::*;
#(
  parameter int unsigned N_PE  = 128,
  parameter int unsigned DEPTH = DMEM_DEPTH,
  localparam int unsigned ID_W = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  slot_t           instr,
  input  logic            instr_valid,
  // neighbourhood network ends
  input  word_t           cp_opnd,
  input  netmode_e        net_mode,
  input  word_t           boundary,
  output word_t           cp_right,
  output word_t           cp_left,
  // host access
  input  logic            host_en,
  input  logic            host_we,
  input  logic [ID_W-1:0] host_pe,
  input  logic [AW-1:0]   host_addr,
  input  word_t           host_wdata,
  output word_t           host_rdata
);

  word_t opnd     [N_PE];
  word_t left_in  [N_PE];
  word_t right_in [N_PE];
  word_t rdata    [N_PE];
  logic [ID_W-1:0] rsel_q;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    simd_pe #(.DEPTH(DEPTH), .ID_W(ID_W)) u_pe (
      .clk, .rst_n,
      .pe_id      (ID_W'(i)),
      .instr, .instr_valid,
      .nb_left    (left_in[i]),
      .nb_right   (right_in[i]),
      .nb_out     (opnd[i]),
      .host_en,
      .host_we    (host_we && host_pe == ID_W'(i)),
      .host_addr, .host_wdata,
      .host_rdata (rdata[i])
    );
  end

  nbr_network #(.N_PE(N_PE)) u_net (
    .pe_opnd (opnd),
    .cp_opnd,
    .mode    (net_mode),
    .boundary,
    .pe_left (left_in),
    .pe_right(right_in),
    .cp_right,
    .cp_left
  );

  always_ff @(posedge clk) rsel_q <= host_pe;
  assign host_rdata = rdata[rsel_q];

endmodule
