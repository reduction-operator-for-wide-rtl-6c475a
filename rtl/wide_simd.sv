// wide_simd: wide-SIMD processor with a minimal (neighbourhood) interconnect.
//
// A control processor (CP) runs the program and issues, every cycle, one
// instruction slot to an array of N_PE processing elements that execute it in
// lock-step, each on its own registers and private 1 KB data memory. The only
// path between PEs is the neighbourhood network: a ring in which each PE reads
// the operand of its left or right neighbour, one hop per instruction, and in
// which the CP either sits between the last and first PE, stays outside, or
// the ring is broken with a predefined value at both ends. There is no
// reduction hardware: reductions (straightforward, pipelined, diagonal access)
// are programs that move partial results toward the CP over the ring while
// predication switches individual PEs on and off.
//
// Interface: load the program through prog_*, and the data memories through
// host_* (host_sel 0..N_PE-1 selects a PE, host_sel == N_PE the CP), both while
// idle; pulse `start`; wait for `done`; read results back through host_*
// (read data one cycle after the request). N_PE = 128 and the 16-bit, 1 KB data
// memories are the design's numbers; the instruction set, register counts,
// program memory size and the host interface are this implementation's own.
module wide_simd
  import simd_pkg::*;
#(
  parameter int unsigned N_PE   = 128,
  parameter int unsigned DEPTH  = DMEM_DEPTH,
  parameter int unsigned IDEPTH = IMEM_DEPTH,
  localparam int unsigned SEL_W = $clog2(N_PE + 1),
  localparam int unsigned ID_W  = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned IAW   = $clog2(IDEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             prog_we,
  input  logic [IAW-1:0]   prog_addr,
  input  instr_t           prog_data,
  input  logic             host_en,
  input  logic             host_we,
  input  logic [SEL_W-1:0] host_sel,
  input  logic [AW-1:0]    host_addr,
  input  word_t            host_wdata,
  output word_t            host_rdata
);

  slot_t    pe_instr;
  logic     pe_valid;
  word_t    cp_opnd, cp_right, cp_left, boundary;
  netmode_e net_mode;
  word_t    cp_rdata, pe_rdata;
  logic     sel_cp, sel_cp_q;

  assign sel_cp = host_sel == SEL_W'(N_PE);

  simd_cp #(.IDEPTH(IDEPTH), .DEPTH(DEPTH)) u_cp (
    .clk, .rst_n, .start, .busy, .done,
    .prog_we, .prog_addr, .prog_data,
    .pe_instr, .pe_valid,
    .cp_opnd,
    .right_in  (cp_right),
    .left_in   (cp_left),
    .net_mode, .boundary,
    .host_en   (host_en && sel_cp),
    .host_we   (host_we && sel_cp),
    .host_addr, .host_wdata,
    .host_rdata(cp_rdata)
  );

  pe_array #(.N_PE(N_PE), .DEPTH(DEPTH)) u_array (
    .clk, .rst_n,
    .instr       (pe_instr),
    .instr_valid (pe_valid),
    .cp_opnd, .net_mode, .boundary,
    .cp_right, .cp_left,
    .host_en     (host_en && !busy),
    .host_we     (host_we && !sel_cp),
    .host_pe     (host_sel[ID_W-1:0]),
    .host_addr, .host_wdata,
    .host_rdata  (pe_rdata)
  );

  always_ff @(posedge clk) sel_cp_q <= sel_cp;
  assign host_rdata = sel_cp_q ? cp_rdata : pe_rdata;

endmodule
