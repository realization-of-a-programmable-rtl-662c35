// Program control block of the rank-order filter.
//
// Evaluates a pair of control words, window size m and rank r, presented
// together with prog_valid. When the pair is valid it is stored and the
// majority gates are programmed from it: the gate inputs of words 0..m-1
// are enabled and the threshold is m - r + 1, so each gate yields the bit of
// the r-th smallest word. When the pair is invalid the error flag is set and
// the current settings are kept.
//
// Validity: a window word of 00000 (a null window) is invalid, which is a
// 5-input NOR; a window of one word is valid and makes the filter an
// all-pass. A rank of 0 or a rank larger than the window size is invalid.
// The rank check against the window word that arrives with it, the clearing
// of the error flag by the next accepted pair, and the reset settings (a
// 31-word median filter, m=31, r=16) are this design's choices.
//
// Timing: the settings and err_flag change on the clock edge that samples
// prog_valid; outputs are registered. Asynchronous active-low reset.
module rof_program_control #(
  parameter int unsigned MAX_WIN = rof_pkg::MAX_WIN,
  parameter int unsigned CTRL_W  = rof_pkg::CTRL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_valid,     // control words presented
  input  logic [CTRL_W-1:0]  prog_win_size,  // window size word m
  input  logic [CTRL_W-1:0]  prog_rank,      // rank word r (r-th smallest)
  output logic [CTRL_W-1:0]  win_size,       // current window size
  output logic [CTRL_W-1:0]  rank,           // current rank
  output logic [MAX_WIN-1:0] enable,         // majority gate input enables
  output logic [CTRL_W-1:0]  threshold,      // majority threshold m - r + 1
  output logic               err_flag        // last control words rejected
);
  logic win_ok, rank_ok, accept;

  // Window size control logic: only the null window is invalid (a NOR of
  // the word's bits); sizes beyond MAX_WIN only exist if MAX_WIN < 2**CTRL_W-1.
  if (MAX_WIN < (2 ** CTRL_W) - 1) begin : g_win_limit
    assign win_ok = (|prog_win_size) && (32'(prog_win_size) <= MAX_WIN);
  end else begin : g_win_nor
    assign win_ok = |prog_win_size;
  end
  // Threshold control logic: rank 0 and ranks beyond the window are invalid.
  assign rank_ok = (|prog_rank) && (prog_rank <= prog_win_size);
  assign accept  = win_ok && rank_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_size <= CTRL_W'(rof_pkg::RESET_WIN > MAX_WIN ? MAX_WIN : rof_pkg::RESET_WIN);
      rank     <= CTRL_W'(rof_pkg::RESET_WIN > MAX_WIN ? (MAX_WIN + 1) / 2 : rof_pkg::RESET_RANK);
      err_flag <= 1'b0;
    end else if (prog_valid) begin
      if (accept) begin
        win_size <= prog_win_size;
        rank     <= prog_rank;
        err_flag <= 1'b0;
      end else begin
        err_flag <= 1'b1;
      end
    end
  end

  always_comb begin
    threshold = win_size - rank + CTRL_W'(1);
    for (int unsigned j = 0; j < MAX_WIN; j++) begin
      enable[j] = (j < 32'(win_size));
    end
  end
endmodule
