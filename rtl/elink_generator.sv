// elink_generator: "Elink generator" stage of the HCC interface.
//
// Characters from the K-comma stage are queued in a small FIFO, encoded in
// 8b10b with their own running disparity (enc8b10b) and sent out as a 2-bit
// Elink, first bit of the code in bit [1], so that the Central Router sees
// an ordinary, word-regular FELIX 8b10b Elink. A new code word starts every
// five clocks; when the FIFO is empty at that moment an idle comma K28.5 is
// sent instead. Characters arriving at a full FIFO are dropped and counted.
//
// The document only names this stage. Re-encoding into a regular Elink, the
// FIFO (DEPTH, default 4: the aligner can deliver two words closer than five
// clocks apart when it moves its boundary), and comma filling are this
// design's choices.
//
// Timing: a character written while the FIFO is empty leaves on the Elink
// within six clocks.
module elink_generator
  import hcc_if_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  char_t       din,
  input  logic        din_valid,
  output logic [1:0]  elink,       // bit [1] earlier in time
  output logic        word_start,  // high in the first clock of a code word
  output logic        idle_fill,   // pulse: a comma filled an empty slot
  output logic [15:0] drop_count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  char_t       fifo [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   level;
  logic [2:0]    slot;            // clock within the current code word
  logic [9:0]    shreg, code;
  logic          rd, rd_nx, k_err;
  logic          load, pop, push;
  char_t         next_ch;

  assign load    = (slot == 3'd4);
  assign pop     = load && (level != '0);
  assign push    = din_valid && ((level != (AW+1)'(DEPTH)) || pop);
  assign next_ch = (level != '0) ? fifo[rp] : COMMA;

  enc8b10b u_enc (
    .din   (next_ch),
    .rd_in (rd),
    .code  (code),
    .rd_out(rd_nx),
    .k_err (k_err)
  );

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp         <= '0;
      rp         <= '0;
      level      <= '0;
      slot       <= 3'd4;
      shreg      <= '0;
      rd         <= 1'b0;
      idle_fill  <= 1'b0;
      drop_count <= '0;
      word_start <= 1'b0;
    end else begin
      idle_fill  <= 1'b0;
      word_start <= load;
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
      if (din_valid && !push && drop_count != '1) drop_count <= drop_count + 1'b1;
      if (load) begin
        shreg     <= code;
        rd        <= rd_nx;
        slot      <= 3'd0;
        idle_fill <= (level == '0);
      end else begin
        shreg <= {shreg[7:0], 2'b00};
        slot  <= slot + 3'd1;
      end
    end
  end

  assign elink = shreg[9:8];

  // Only valid characters reach the encoder: the K-comma stage sends data,
  // K28.1, K28.5 and K28.6 only.
  a_no_bad_k: assert property (@(posedge clk) disable iff (rst) load |-> !k_err);

endmodule
