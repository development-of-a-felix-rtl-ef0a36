// tb_elink_generator: checks re-encoding and serialization.
//
// Phase 1 sends data characters, numbered 0, 1, 2, ..., at random gaps of
// at least five clocks, mixed with FELIX delimiters; phase 2 sends a burst
// of one character per clock to overflow the FIFO. The Elink output is cut
// into code words at word_start, and each word decoded with dec8b10b.
// Checked: a word starts exactly every five clocks; every word decodes
// without code or disparity error (so the running disparity is carried
// across words); in phase 1 every character comes out, in order, and the
// slots without a character carry K28.5; in phase 2 the characters that
// come out are in order and their number plus drop_count equals the number
// sent.
module tb_elink_generator;
  import hcc_if_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 0, rst = 1;
  char_t din;
  logic din_valid = 0;
  logic [1:0] elink;
  logic word_start, idle_fill;
  logic [15:0] drop_count;

  logic [9:0] rx_code;
  logic rx_rd = 0, rx_rd_out, code_err, disp_err;
  char_t rx;

  int checks = 0, failures = 0;
  int cyc = 0, last_start = -1, slot = 0, fills = 0;
  logic [9:0] shift;
  char_t outq[$];

  elink_generator #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .din(din), .din_valid(din_valid), .elink(elink),
    .word_start(word_start), .idle_fill(idle_fill), .drop_count(drop_count));
  dec8b10b rx_dec (.code(rx_code), .rd_in(rx_rd), .dout(rx), .rd_out(rx_rd_out),
                   .code_err(code_err), .disp_err(disp_err));

  always #5 clk = ~clk;

  // The i-th character of phase 1.
  function automatic char_t phase1_char(input int i);
    char_t c;
    if (i % 17 == 5)       c = '{k: 1'b1, data: K28_1};
    else if (i % 17 == 11) c = '{k: 1'b1, data: K28_6};
    else                   c = '{k: 1'b0, data: 8'(i)};
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (idle_fill) fills++;
    if (word_start) begin
      if (last_start >= 0) check(cyc - last_start == 5, $sformatf("word period %0d", cyc - last_start));
      last_start = cyc;
      shift = {elink, 8'h00};
      slot  = 1;
    end else if (slot > 0) begin
      shift[9 - 2*slot -: 2] = elink;
      slot++;
      if (slot == 5) begin
        rx_code = shift; #1;
        if (last_start > 10) begin
          check(!code_err && !disp_err, $sformatf("bad word %b", rx_code));
          outq.push_back(rx);
        end
        rx_rd = rx_rd_out;
        slot = 0;
      end
    end
  end

  initial begin
    int n_sent, n_out, next;
    din = COMMA;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (12) @(negedge clk);
    // phase 1
    for (int i = 0; i < 100; i++) begin
      din = phase1_char(i);
      din_valid = 1;
      @(negedge clk) din_valid = 0;
      repeat ($urandom_range(4, 12)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    // outq now holds commas and the 100 characters in order
    next = 0;
    foreach (outq[i]) begin
      if (outq[i] == COMMA) continue;
      check(next < 100, "extra character");
      if (next < 100)
        check(outq[i] == phase1_char(next),
              $sformatf("character %0d: got %0d/%02h", next, outq[i].k, outq[i].data));
      next++;
    end
    check(next == 100, $sformatf("%0d of 100 characters came out", next));
    check(drop_count == 0, "no drops at the normal rate");
    check(fills > 50, $sformatf("%0d idle commas filled", fills));
    // phase 2: overflow
    outq.delete();
    n_sent = 0;
    for (int i = 0; i < 40; i++) begin
      din = '{k: 1'b0, data: 8'(i)};
      din_valid = 1;
      n_sent++;
      @(negedge clk);
    end
    din_valid = 0;
    repeat (60) @(negedge clk);
    n_out = 0; next = -1;
    foreach (outq[i]) begin
      if (outq[i].k) continue;
      check(int'(outq[i].data) > next, "burst characters out of order");
      next = int'(outq[i].data);
      n_out++;
    end
    check(drop_count > 0, "burst overflows the FIFO");
    check(n_out + int'(drop_count) == n_sent,
          $sformatf("out %0d + dropped %0d != sent %0d", n_out, drop_count, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
