// Window shift register of the rank-order filter.
//
// Holds the NWORDS most recent input samples. Each cycle with in_valid the
// window moves by one word: in_word enters at words[0] (the newest) and the
// oldest word falls off words[NWORDS-1]. A window of m words uses
// words[0..m-1]. win_valid is high for one cycle after each shift and marks
// a window to be filtered, so the register also serves as the first
// pipeline register in front of bit-plane stage 1.
//
// The filter's floorplan places a shift register bank in front of the first
// majority gate and slice; the sliding-window use, the newest-first order
// and the reset to all-zero words are this design's choices.
// Asynchronous active-low reset.
module rof_window_shift_reg #(
  parameter int unsigned NWORDS = rof_pkg::MAX_WIN,
  parameter int unsigned WORD_W = rof_pkg::WORD_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [WORD_W-1:0]              in_word,
  output logic                           win_valid,
  output logic [NWORDS-1:0][WORD_W-1:0]  words       // words[0] newest
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words     <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        words <= {words[NWORDS-2:0], in_word};
      end
    end
  end
endmodule
