// One bit-level pipeline stage of the rank-order filter.
//
// Stage for bit plane BIT (WORD_W-1 is the MSB, processed first). The
// majority gate decides the result bit y from the modified bits in_astar of
// the enabled window words; y is written into bit BIT of the result. The
// 1-bit slice then compares every word's modified bit with y and forms the
// modified bits and selects of plane BIT-1, loading raw bits from in_words
// for words that still match. The stage for plane 0 has no slice: its
// modified bits and selects are passed on unchanged (nothing reads them).
//
// Everything is registered at the stage output, so a window moves one stage
// per clock and a new window can enter every clock. The whole window words
// travel along (synthesis drops the bits no later stage reads). One majority
// gate beside one slice per stage follows the filter's floorplan; the
// register placement is this design's choice. Asynchronous active-low reset.
module rof_pipeline_stage #(
  parameter int unsigned NWORDS = rof_pkg::MAX_WIN,
  parameter int unsigned WORD_W = rof_pkg::WORD_W,
  parameter int unsigned BIT    = WORD_W - 1,
  localparam int unsigned CW    = $clog2(NWORDS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // programming of the majority gate
  input  logic [NWORDS-1:0]             enable,
  input  logic [CW-1:0]                 threshold,
  // state from the previous stage
  input  logic                          in_valid,
  input  logic [NWORDS-1:0][WORD_W-1:0] in_words,
  input  logic [NWORDS-1:0]             in_astar,   // modified bits of plane BIT
  input  logic [NWORDS-1:0]             in_sel,     // selects of plane BIT
  input  logic [WORD_W-1:0]             in_result,  // result bits above BIT
  // registered state for the next stage
  output logic                          out_valid,
  output logic [NWORDS-1:0][WORD_W-1:0] out_words,
  output logic [NWORDS-1:0]             out_astar,  // modified bits of plane BIT-1
  output logic [NWORDS-1:0]             out_sel,    // selects of plane BIT-1
  output logic [WORD_W-1:0]             out_result  // result bits down to BIT
);
  logic              y;
  logic [NWORDS-1:0] astar_nxt, sel_nxt;
  logic [WORD_W-1:0] result_nxt;

  rof_majority_gate #(.NIN(NWORDS)) u_ctl (
    .bits     (in_astar),
    .enable   (enable),
    .threshold(threshold),
    .y        (y)
  );

  if (BIT > 0) begin : g_slice
    logic [NWORDS-1:0] a_next;
    always_comb begin
      for (int unsigned j = 0; j < NWORDS; j++) a_next[j] = in_words[j][BIT-1];
    end
    rof_bit_slice #(.NWORDS(NWORDS)) u_slice (
      .a_next     (a_next),
      .a_star     (in_astar),
      .y          (y),
      .s_in       (in_sel),
      .a_star_next(astar_nxt),
      .s_out      (sel_nxt)
    );
  end else begin : g_last
    assign astar_nxt = in_astar;
    assign sel_nxt   = in_sel;
  end

  always_comb begin
    result_nxt      = in_result;
    result_nxt[BIT] = y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_words  <= '0;
      out_astar  <= '0;
      out_sel    <= '0;
      out_result <= '0;
    end else begin
      out_valid  <= in_valid;
      out_words  <= in_words;
      out_astar  <= astar_nxt;
      out_sel    <= sel_nxt;
      out_result <= result_nxt;
    end
  end
endmodule
