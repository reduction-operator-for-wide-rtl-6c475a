// nbr_network: the neighbourhood network joining the PEs in a ring.
//
// Each PE exposes one operand (`pe_opnd`); PE i reads the operand of PE i-1 as
// its left input and of PE i+1 as its right input, one hop per instruction.
// Only the two ends of the ring are configurable, at run time, by `mode`:
//   NET_RING_PE  PE0 and PE(N-1) are joined directly (CP outside the loop);
//   NET_RING_CP  the CP is in the loop: PE0's left and PE(N-1)'s right input
//                are the CP's operand;
//   NET_BROKEN   the loop is broken and both boundary inputs read `boundary`.
// The CP always reads PE0 as its right neighbour and PE(N-1) as its left one.
// Purely combinational: nearly every output is a wire from a neighbour's
// operand, since the network is point-to-point wiring by design, and the two
// end multiplexers are its only logic. A hop costs one instruction because
// each PE registers what it reads. The three end modes are the ones the
// design names; encoding them in a 2-bit `mode` and using one boundary value
// for both ends are this implementation's choices.
module nbr_network
  import simd_pkg::*;
#(
  parameter int unsigned N_PE = 128
) (
  input  word_t    pe_opnd  [N_PE],
  input  word_t    cp_opnd,
  input  netmode_e mode,
  input  word_t    boundary,
  output word_t    pe_left  [N_PE],
  output word_t    pe_right [N_PE],
  output word_t    cp_right,
  output word_t    cp_left
);

  always_comb begin
    for (int i = 1; i < N_PE; i++)     pe_left[i]  = pe_opnd[i-1];
    for (int i = 0; i < N_PE - 1; i++) pe_right[i] = pe_opnd[i+1];
    unique case (mode)
      NET_RING_PE: begin
        pe_left[0]       = pe_opnd[N_PE-1];
        pe_right[N_PE-1] = pe_opnd[0];
      end
      NET_RING_CP: begin
        pe_left[0]       = cp_opnd;
        pe_right[N_PE-1] = cp_opnd;
      end
      default: begin
        pe_left[0]       = boundary;
        pe_right[N_PE-1] = boundary;
      end
    endcase
  end

  assign cp_right = pe_opnd[0];
  assign cp_left  = pe_opnd[N_PE-1];

endmodule
