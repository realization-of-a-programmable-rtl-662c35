// 1-bit slice processor block of the rank-order filter.
//
// One rof_modifier_selector cell per window word, all sharing the slice
// output y of this bit plane. It turns the modified bits and select vector
// of bit plane i into those of bit plane i-1 (next less significant): words
// that still match the result so far load their raw next bit, the others
// keep propagating their deviating bit. Combinational.
//
// The structure (a mux, XNOR and AND per word, a common y) is the published
// slice, drawn there for 5 words; here it is sized by NWORDS, by default the
// 31-word maximum window.
module rof_bit_slice #(
  parameter int unsigned NWORDS = rof_pkg::MAX_WIN
) (
  input  logic [NWORDS-1:0] a_next,       // raw bits of the next lower plane
  input  logic [NWORDS-1:0] a_star,       // modified bits of this plane
  input  logic              y,            // slice output of this plane
  input  logic [NWORDS-1:0] s_in,         // select vector S(i)
  output logic [NWORDS-1:0] a_star_next,  // modified bits of the next plane
  output logic [NWORDS-1:0] s_out         // select vector S(i+1)
);
  for (genvar j = 0; j < NWORDS; j++) begin : g_word
    rof_modifier_selector u_cell (
      .a_next     (a_next[j]),
      .a_star     (a_star[j]),
      .y          (y),
      .s_in       (s_in[j]),
      .a_star_next(a_star_next[j]),
      .s_out      (s_out[j])
    );
  end
endmodule
