// elink_align: word alignment of one 2-bit 8b10b Elink.
//
// Two new bits arrive every clock; a 10-bit code word therefore ends either
// on the newest bit or on the bit before it. The block keeps the last 11
// bits and looks in both 10-bit windows for a comma (the 7-bit pattern
// 0011111 or 1100000 that begins K28.1, K28.5 and K28.7; in a valid stream
// it appears nowhere else unless K28.7 is used, which the HCC delimiters
// chosen here avoid). A comma fixes the word boundary; from then
// on a word is emitted each time ten more bits have arrived, i.e. every five
// clocks. A comma found where the current boundary expects it counts as a
// confirmation, and LOCK_COUNT of them in a row raise `locked`. A comma
// anywhere else moves the boundary at once and drops `locked`.
//
// The document names this Alignment stage and says the 2-bit streams must
// be aligned; the comma search, the lock rule and LOCK_COUNT are this
// design's choices.
//
// Timing: `word` is valid for one clock with `word_valid`, one clock after
// its last bit was at `din`.
module elink_align
  import hcc_if_pkg::*;
#(
  parameter int unsigned LOCK_COUNT = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] din,          // bit [1] earlier in time
  output logic [9:0] word,         // word[9] = first bit received
  output logic       word_valid,
  output logic       locked,
  output logic       realign       // pulse: boundary moved by a comma
);

  localparam int unsigned CW = $clog2(LOCK_COUNT + 1);

  logic [8:0]    hist;
  logic [10:0]   hist_nx;
  logic [3:0]    cnt, cnt2;          // bits received since the boundary
  logic [9:0]    w0, w1;
  logic          c0, c1;
  logic [CW-1:0] good;

  assign hist_nx = {hist, din};
  assign w0      = hist_nx[9:0];     // word ending at the newest bit
  assign w1      = hist_nx[10:1];    // word ending one bit earlier
  assign c0      = (w0[9:3] == COMMA_NEG) || (w0[9:3] == COMMA_POS);
  assign c1      = (w1[9:3] == COMMA_NEG) || (w1[9:3] == COMMA_POS);
  assign cnt2    = cnt + 4'd2;

  always_ff @(posedge clk) begin
    if (rst) begin
      hist       <= '0;
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      locked     <= 1'b0;
      good       <= '0;
      realign    <= 1'b0;
    end else begin
      hist       <= hist_nx[8:0];
      word_valid <= 1'b0;
      realign    <= 1'b0;
      if ((c0 && cnt2 == 4'd10) || (c1 && cnt2 == 4'd11)) begin
        // comma on the expected boundary
        word       <= c0 ? w0 : w1;
        word_valid <= 1'b1;
        cnt        <= c0 ? 4'd0 : 4'd1;
        if (good >= CW'(LOCK_COUNT - 1)) locked <= 1'b1;
        if (good < CW'(LOCK_COUNT)) good <= good + 1'b1;
      end else if (c0 || c1) begin
        // comma elsewhere: move the boundary to it
        word       <= c0 ? w0 : w1;
        word_valid <= 1'b1;
        cnt        <= c0 ? 4'd0 : 4'd1;
        good       <= CW'(1);
        locked     <= (LOCK_COUNT <= 1);
        realign    <= 1'b1;
      end else if (cnt2 >= 4'd10) begin
        word       <= (cnt2 == 4'd10) ? w0 : w1;
        word_valid <= 1'b1;
        cnt        <= cnt2 - 4'd10;
      end else begin
        cnt        <= cnt2;
      end
    end
  end

  // The boundary counter never reaches a full word.
  a_cnt_range: assert property (@(posedge clk) disable iff (rst) cnt < 4'd10);

endmodule
