// hcc_interface: HCC interface module of the FELIX firmware.
//
// The strip hybrid's Hybrid Controller Chip (HCC) speaks neither of FELIX's
// two Elink protocols (direct mode with zero idle, or plain 8b10b). This
// module sits between the GBT wrapper and the Central Router and translates
// in both directions:
//
//   downstream (commands, triggers): the 2-bit Elinks for L0_CMD and R3_L1
//     pass through hcc_bit_reverse, which inverts one bit so that FELIX's
//     zero idle becomes the HCC's 40 MHz clock train.
//   upstream (event and register data): the HCC's 4-bit Elink holds two
//     8b10b streams interleaved bit by bit. hcc_splitter swaps the middle two
//     bits to separate them; each 2-bit stream then goes through elink_align
//     (comma-based word alignment), kcomma_replace (decode, replace HCC
//     packet delimiters by FELIX ones, insert commas for bad words) and
//     elink_generator (re-encode as a regular FELIX 8b10b Elink).
//
// The chain of stages follows the document; every stage's inner workings,
// the register stages and the control-character choices are this design's.
// All Elinks run on the 40 MHz clock: 2 bits per clock is 80 Mb/s, the
// 4-bit HCC Elink 160 Mb/s. Reset is synchronous and active high.
//
// Interface: dn_* to and from the GBT wrapper and Central Router,
// up_in from the GBT wrapper, up_out to the Central Router (index 0 is
// stream A, the earlier bit of each interleaved pair; index 1 stream B).
// up_char/up_char_valid expose the characters being sent on up_out.
//
// Latency: downstream one clock. Upstream, the character of a code word
// appears on up_char three clocks after the word's last bit was at up_in
// (splitter, aligner, K-comma stage), and its first bit is on up_out within
// a further six.
module hcc_interface
  import hcc_if_pkg::*;
#(
  parameter int unsigned N_DN_ELINKS = 2,      // L0_CMD and R3_L1
  parameter logic [1:0]  DN_INV_MASK = 2'b10,
  parameter int unsigned LOCK_COUNT  = 3,
  parameter int unsigned FIFO_DEPTH  = 4,
  parameter logic [7:0]  HCC_SOP     = K28_0,
  parameter logic [7:0]  HCC_EOP     = K28_3,
  parameter logic [7:0]  FELIX_SOP   = K28_1,
  parameter logic [7:0]  FELIX_EOP   = K28_6
) (
  input  logic                        clk,
  input  logic                        rst,
  // downstream
  input  logic [N_DN_ELINKS-1:0][1:0] dn_in,      // from Central Router
  output logic [N_DN_ELINKS-1:0][1:0] dn_out,     // to GBT wrapper
  // upstream
  input  logic [3:0]                  up_in,      // from GBT wrapper
  output logic [1:0][1:0]             up_out,     // to Central Router
  output char_t [1:0]                 up_char,
  output logic [1:0]                  up_char_valid,
  output logic [1:0]                  up_word_start, // first clock of a word on up_out
  // status
  output logic [1:0]                  locked,
  output logic [1:0]                  realign,
  output logic [1:0]                  replaced,
  output logic [1:0]                  inserted,
  output logic [1:0]                  idle_fill,
  output logic [1:0][15:0]            err_count,
  output logic [1:0][15:0]            drop_count
);

  logic [1:0][1:0] split;
  logic [1:0][9:0] word;
  logic [1:0]      word_valid;
  char_t [1:0]     ch;
  logic [1:0]      ch_valid;

  hcc_bit_reverse #(
    .N_ELINKS(N_DN_ELINKS),
    .INV_MASK(DN_INV_MASK)
  ) u_bitrev (
    .clk   (clk),
    .rst   (rst),
    .dn_in (dn_in),
    .dn_out(dn_out)
  );

  hcc_splitter u_split (
    .clk    (clk),
    .rst    (rst),
    .up_in  (up_in),
    .elink_a(split[0]),
    .elink_b(split[1])
  );

  for (genvar s = 0; s < 2; s++) begin : g_stream
    elink_align #(.LOCK_COUNT(LOCK_COUNT)) u_align (
      .clk       (clk),
      .rst       (rst),
      .din       (split[s]),
      .word      (word[s]),
      .word_valid(word_valid[s]),
      .locked    (locked[s]),
      .realign   (realign[s])
    );

    kcomma_replace #(
      .HCC_SOP  (HCC_SOP),
      .HCC_EOP  (HCC_EOP),
      .FELIX_SOP(FELIX_SOP),
      .FELIX_EOP(FELIX_EOP)
    ) u_kcomma (
      .clk       (clk),
      .rst       (rst),
      .word      (word[s]),
      .word_valid(word_valid[s]),
      .locked    (locked[s]),
      .dout      (ch[s]),
      .dout_valid(ch_valid[s]),
      .replaced  (replaced[s]),
      .inserted  (inserted[s]),
      .err_count (err_count[s])
    );

    elink_generator #(.DEPTH(FIFO_DEPTH)) u_gen (
      .clk       (clk),
      .rst       (rst),
      .din       (ch[s]),
      .din_valid (ch_valid[s]),
      .elink     (up_out[s]),
      .word_start(up_word_start[s]),
      .idle_fill (idle_fill[s]),
      .drop_count(drop_count[s])
    );
  end

  assign up_char       = ch;
  assign up_char_valid = ch_valid;

endmodule
