// simd_dmem: private data memory of one processing element (also used for the
// control processor's data memory and, with a wider word, its program memory).
//
// Single port, synchronous: an access presented with `en` in one cycle writes
// at that clock edge (`we`=1) or delivers the addressed word on `rdata` in the
// next cycle (`we`=0). A write does not update `rdata`. Reads and writes use
// the same port, so one access per cycle, matching a PE that issues at most one
// memory operation per instruction. 16-bit words and 512 entries (1 KB) are the
// design's numbers; the contents are not reset.
module simd_dmem #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
