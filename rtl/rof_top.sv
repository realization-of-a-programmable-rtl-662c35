// Programmable rank-order filter, top level.
//
// Filters a stream of WORD_W-bit samples: for every accepted sample it
// outputs the r-th smallest of the m newest samples (r = (m+1)/2 gives the
// median, r = 1 the minimum, r = m the maximum, m = 1 passes samples
// through). m (1..MAX_WIN) and r (1..m) are programmed at run time through
// prog_valid / prog_win_size / prog_rank; an invalid pair raises err_flag and
// leaves the filter as it was.
//
// How it works: the window shift register holds the newest MAX_WIN samples.
// The window then passes through WORD_W pipeline stages, one per bit plane,
// MSB first. Each stage takes one threshold (majority) decision over the
// enabled words' modified bits to get one result bit, then updates the
// words: a word that differs from the result at this plane is already known
// to be larger or smaller, and from then on its deviating bit replaces all
// of its lower bits. The first stage starts from the raw MSBs with every
// select at 1.
//
// Timing: one result per clock at full input rate. out_valid/out_word follow
// in_valid/in_word by 9 clocks (1 in the shift register, 8 stage registers).
// New settings reach all stages at once, so the up to 8 windows in flight
// when the settings change are filtered with a mix of old and new settings.
// Word length, maximum window, control word width and the 8-stage bit-level
// pipeline follow the published architecture; the latency and the in-flight
// behaviour on reprogramming are this design's.
module rof_top #(
  parameter int unsigned WORD_W  = rof_pkg::WORD_W,
  parameter int unsigned MAX_WIN = rof_pkg::MAX_WIN,
  parameter int unsigned CTRL_W  = rof_pkg::CTRL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_word,
  input  logic              prog_valid,
  input  logic [CTRL_W-1:0] prog_win_size,
  input  logic [CTRL_W-1:0] prog_rank,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output logic              err_flag,
  output logic [CTRL_W-1:0] win_size,
  output logic [CTRL_W-1:0] rank
);
  localparam int unsigned CW = $clog2(MAX_WIN + 1);

  logic [MAX_WIN-1:0] enable;
  logic [CTRL_W-1:0]  threshold;

  rof_program_control #(.MAX_WIN(MAX_WIN), .CTRL_W(CTRL_W)) u_prog (
    .clk          (clk),
    .rst_n        (rst_n),
    .prog_valid   (prog_valid),
    .prog_win_size(prog_win_size),
    .prog_rank    (prog_rank),
    .win_size     (win_size),
    .rank         (rank),
    .enable       (enable),
    .threshold    (threshold),
    .err_flag     (err_flag)
  );

  // Stage s (0..WORD_W) state; index 0 is the shift register output.
  logic                           st_valid  [WORD_W+1];
  logic [MAX_WIN-1:0][WORD_W-1:0] st_words  [WORD_W+1];
  logic [MAX_WIN-1:0]             st_astar  [WORD_W+1];
  logic [MAX_WIN-1:0]             st_sel    [WORD_W+1];
  logic [WORD_W-1:0]              st_result [WORD_W+1];

  rof_window_shift_reg #(.NWORDS(MAX_WIN), .WORD_W(WORD_W)) u_window (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_word  (in_word),
    .win_valid(st_valid[0]),
    .words    (st_words[0])
  );

  // Plane WORD_W-1 starts from the raw MSBs, every word selecting.
  always_comb begin
    for (int unsigned j = 0; j < MAX_WIN; j++) st_astar[0][j] = st_words[0][j][WORD_W-1];
    st_sel[0]    = '1;
    st_result[0] = '0;
  end

  for (genvar s = 0; s < WORD_W; s++) begin : g_stage
    rof_pipeline_stage #(
      .NWORDS(MAX_WIN),
      .WORD_W(WORD_W),
      .BIT   (WORD_W - 1 - s)
    ) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .enable    (enable),
      .threshold (CW'(threshold)),
      .in_valid  (st_valid[s]),
      .in_words  (st_words[s]),
      .in_astar  (st_astar[s]),
      .in_sel    (st_sel[s]),
      .in_result (st_result[s]),
      .out_valid (st_valid[s+1]),
      .out_words (st_words[s+1]),
      .out_astar (st_astar[s+1]),
      .out_sel   (st_sel[s+1]),
      .out_result(st_result[s+1])
    );
  end

  assign out_valid = st_valid[WORD_W];
  assign out_word  = st_result[WORD_W];
endmodule
