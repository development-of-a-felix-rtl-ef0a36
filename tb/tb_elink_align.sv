// tb_elink_align: checks comma alignment of a 2-bit 8b10b Elink.
//
// A bit stream is built first: junk bits of random length, then commas and
// random characters encoded by enc8b10b, then a one-bit slip (one extra bit)
// and again commas and random characters. It is fed two bits per clock.
// Checked: `locked` rises only after LOCK_COUNT commas; while locked the
// emitted words are exactly the code words sent, in order; they come every
// five clocks (80 Mb/s per Elink at one 10-bit word per five 40 MHz
// clocks); the slip is followed by a realign pulse, a drop of `locked`, and
// relock on the new boundary.
module tb_elink_align;
  import hcc_if_pkg::*;

  localparam int LOCK_COUNT = 3;
  localparam int NCHARS     = 80;

  logic clk = 0, rst = 1;
  logic [1:0] din;
  logic [9:0] word;
  logic word_valid, locked, realign;

  char_t ein;
  logic erd = 0, erd_out, k_err;
  logic [9:0] ecode;

  bit bits[$];
  logic [9:0] sent[2][$];
  logic [9:0] got[2][$];
  int seg = 0;
  int checks = 0, failures = 0;
  int realigns = 0, last_valid = -1, cyc = 0, commas_before_lock = 0, n_locks = 0;
  bit was_locked = 0;

  enc8b10b gen (.din(ein), .rd_in(erd), .code(ecode), .rd_out(erd_out), .k_err(k_err));
  elink_align #(.LOCK_COUNT(LOCK_COUNT)) dut (
    .clk(clk), .rst(rst), .din(din), .word(word), .word_valid(word_valid),
    .locked(locked), .realign(realign));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic send(input int s, input bit k, input logic [7:0] d);
    ein = '{k: k, data: d}; #1;
    for (int b = 9; b >= 0; b--) bits.push_back(ecode[b]);
    sent[s].push_back(ecode);
    erd = erd_out; #1;
  endtask

  task automatic segment(input int s);
    for (int i = 0; i < 4; i++) send(s, 1, K28_5);
    for (int i = 0; i < NCHARS; i++) begin
      if (i % 10 == 9) send(s, 1, K28_5);
      else             send(s, 0, 8'($urandom));
    end
  endtask

  // Up to `tail` words at the end may differ: after the slip the old
  // boundary stays in use until the next comma shows the new one.
  function automatic bit in_order(input int s, input int tail);
    int j, n;
    if (got[s].size() < 4) return 0;
    for (j = 0; j + 3 < sent[s].size(); j++)
      if (sent[s][j] == got[s][0] && sent[s][j+1] == got[s][1] &&
          sent[s][j+2] == got[s][2] && sent[s][j+3] == got[s][3]) break;
    if (j + 3 >= sent[s].size()) return 0;
    n = 0;
    while (n < got[s].size() && j + n < sent[s].size() && sent[s][j+n] == got[s][n]) n++;
    return n >= got[s].size() - tail;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    cyc++;
    if (realign) realigns++;
    if (word_valid && !locked && (word[9:3] == COMMA_NEG || word[9:3] == COMMA_POS))
      commas_before_lock++;
    if (locked && !was_locked) begin
      // the comma that raises `locked` is the LOCK_COUNT-th on this boundary
      check(commas_before_lock == LOCK_COUNT - 1,
            $sformatf("locked after %0d commas", commas_before_lock + 1));
      n_locks++;
    end
    if (locked) commas_before_lock = 0;
    was_locked = locked;
    if (word_valid && locked) begin
      got[seg].push_back(word);
      if (last_valid >= 0 && !realign)
        check(cyc - last_valid == 5, $sformatf("word spacing %0d", cyc - last_valid));
      last_valid = cyc;
    end
    if (!locked) last_valid = -1;
  end

  initial begin
    int junk;
    junk = $urandom_range(1, 9);
    for (int i = 0; i < junk; i++) bits.push_back(1'($urandom));
    segment(0);
    bits.push_back(1'b1);   // slip
    segment(1);
    if (bits.size() % 2) bits.push_back(1'b0);
    din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    while (bits.size() > 0) begin
      din[1] = bits.pop_front();
      din[0] = bits.pop_front();
      @(negedge clk);
      #1;
      if (seg == 0 && got[0].size() > 10 && realign) seg = 1;
    end
    repeat (3) @(negedge clk);
    check(n_locks == 2, $sformatf("%0d lock events, want 2", n_locks));
    check(got[0].size() > NCHARS / 2, $sformatf("segment 0: %0d locked words", got[0].size()));
    check(got[1].size() > NCHARS / 2, $sformatf("segment 1: %0d locked words", got[1].size()));
    check(in_order(0, 10), "segment 0 words differ from those sent");
    check(in_order(1, 0), "segment 1 words differ from those sent");
    check(realigns >= 2, $sformatf("%0d realign pulses", realigns));
    check(locked, "locked at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
