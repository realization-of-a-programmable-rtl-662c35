// Modifier/selector cell: one word, one bit plane of the rank-order filter.
//
// The slice output y (the bit of the r-th ranked word at this bit plane) is
// compared with the word's modified bit a_star by an XNOR. The result is
// ANDed with the select s_in from the previous plane to give s_out. s_out=1
// means the word still agrees with the result on every bit so far, so the
// word's raw bit of the next lower plane (a_next) is taken as its next
// modified bit. s_out=0 means the word has already been decided as larger or
// smaller than the result: its current modified bit keeps propagating
// downwards unchanged, and once s goes low it stays low.
//
// Gates, mux inputs (1 = raw next bit, 0 = propagated bit) and the select
// taken from the AND output follow the published gate-level schematic.
// Purely combinational; registers are in rof_pipeline_stage.
module rof_modifier_selector (
  input  logic a_next,       // raw bit a(j, i+1) of the next lower plane
  input  logic a_star,       // modified bit a*(j, i) of this plane
  input  logic y,            // slice output y(i)
  input  logic s_in,         // select S(i)
  output logic a_star_next,  // modified bit a*(j, i+1)
  output logic s_out         // select S(i+1)
);
  always_comb begin
    s_out       = s_in & ~(a_star ^ y);
    a_star_next = s_out ? a_next : a_star;
  end
endmodule
