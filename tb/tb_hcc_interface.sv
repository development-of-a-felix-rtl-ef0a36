// tb_hcc_interface: end-to-end test of the HCC interface at its default
// parameters.
//
// Upstream, the testbench plays the HCC: two 8b10b streams, A and B, each
// with its own random start offset, commas for alignment, then packets
// framed by the HCC delimiters (K28.0 ... K28.3) with idle commas between
// them. The two streams are interleaved bit by bit onto the 4-bit Elink.
// Stream A carries one invalid code word between two packets; stream B
// slips by one bit half-way through, forcing a realignment.
// The two 2-bit Elinks that leave toward the Central Router are cut into
// words at up_word_start, decoded, and split into packets at K28.1/K28.6;
// the packets must be the ones sent, byte for byte and in order.
//
// Downstream, random 2-bit patterns on L0_CMD and R3_L1 must come out one
// clock later with bit [1] inverted, and the all-zero idle as "10".
//
// Each mechanism is counted and must occur: stream split and alignment
// lock on both streams, realignment, delimiter replacement, comma insertion
// for a bad word, idle comma filling, downstream inversion of the idle.
// The output Elinks must carry a new code word every five clocks.
module tb_hcc_interface;
  import hcc_if_pkg::*;

  localparam int NPKT = 24;

  logic clk = 0, rst = 1;
  logic [1:0][1:0] dn_in, dn_out;
  logic [3:0] up_in;
  logic [1:0][1:0] up_out;
  char_t [1:0] up_char;
  logic [1:0] up_char_valid, up_word_start, locked, realign, replaced, inserted, idle_fill;
  logic [1:0][15:0] err_count, drop_count;

  hcc_interface dut (
    .clk(clk), .rst(rst), .dn_in(dn_in), .dn_out(dn_out), .up_in(up_in),
    .up_out(up_out), .up_char(up_char), .up_char_valid(up_char_valid),
    .up_word_start(up_word_start), .locked(locked), .realign(realign),
    .replaced(replaced), .inserted(inserted), .idle_fill(idle_fill),
    .err_count(err_count), .drop_count(drop_count));

  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;

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

  // ---------------- HCC side: build the two serial streams ----------------
  char_t ein [2];
  logic  erd [2];
  logic  erd_out [2];
  logic  k_err [2];
  logic [9:0] ecode [2];
  bit    bits [2][$];
  logic [7:0] pkts [2][$][$];   // expected packets per stream

  for (genvar s = 0; s < 2; s++) begin : g_enc
    enc8b10b u (.din(ein[s]), .rd_in(erd[s]), .code(ecode[s]), .rd_out(erd_out[s]), .k_err(k_err[s]));
  end

  task automatic tx(input int s, input bit k, input logic [7:0] d);
    ein[s] = '{k: k, data: d}; #1;
    for (int b = 9; b >= 0; b--) bits[s].push_back(ecode[s][b]);
    erd[s] = erd_out[s]; #1;
  endtask

  task automatic tx_packet(input int s);
    logic [7:0] p[$];
    int n;
    n = $urandom_range(1, 8);
    tx(s, 1, K28_0);
    for (int i = 0; i < n; i++) begin
      p.push_back(8'($urandom));
      tx(s, 0, p[$]);
    end
    tx(s, 1, K28_3);
    pkts[s].push_back(p);
    repeat ($urandom_range(1, 3)) tx(s, 1, K28_5);
  endtask

  // Running disparity after a word, from its own sub-blocks.
  function automatic logic rd_after(input logic [9:0] w, input logic rd);
    int n6, n4;
    logic mid;
    n6  = $countones(w[9:4]);
    n4  = $countones(w[3:0]);
    mid = (n6 == 4) ? 1'b1 : (n6 == 2) ? 1'b0 : rd;
    return (n4 == 3) ? 1'b1 : (n4 == 1) ? 1'b0 : mid;
  endfunction

  task automatic build();
    logic [9:0] bad;
    bad = 10'b1110111011;          // 6-bit sub-block is no code word
    for (int s = 0; s < 2; s++) begin
      erd[s] = 1'b0;
      repeat ($urandom_range(0, 9)) bits[s].push_back(1'($urandom));
      repeat (8) tx(s, 1, K28_5);
      for (int p = 0; p < NPKT; p++) begin
        if (p == NPKT / 2) begin
          if (s == 0) begin
            for (int b = 9; b >= 0; b--) bits[s].push_back(bad[b]);
            erd[s] = rd_after(bad, erd[s]);
            repeat (2) tx(s, 1, K28_5);
          end else begin
            bits[s].push_back(1'b1);  // one-bit slip
            repeat (6) tx(s, 1, K28_5);
          end
        end
        tx_packet(s);
      end
      repeat (20) tx(s, 1, K28_5);
    end
  endtask

  // ---------------- Central Router side: receive and parse ----------------
  char_t rx_ch [2];
  logic  rx_rd [2];
  logic  rx_rd_out [2];
  logic  rx_cerr [2];
  logic  rx_derr [2];
  logic [9:0] rx_code [2];

  for (genvar s = 0; s < 2; s++) begin : g_dec
    dec8b10b u (.code(rx_code[s]), .rd_in(rx_rd[s]), .dout(rx_ch[s]), .rd_out(rx_rd_out[s]),
                .code_err(rx_cerr[s]), .disp_err(rx_derr[s]));
  end

  int cyc = 0;
  int last_start [2] = '{-1, -1};
  int slot [2] = '{0, 0};
  logic [9:0] shreg [2];
  bit in_pkt [2];
  logic [7:0] cur [2][$];
  logic [7:0] got [2][$][$];
  int stray [2] = '{0, 0};
  int n_realign = 0, n_replaced = 0, n_inserted = 0, n_fill = 0, n_dn_idle = 0;
  int n_locked [2] = '{0, 0};
  int n_rx_err = 0;

  always @(negedge clk) if (!rst) begin
    cyc++;
    for (int s = 0; s < 2; s++) begin
      if (realign[s])   n_realign++;
      if (replaced[s])  n_replaced++;
      if (inserted[s] && locked[s]) n_inserted++;
      if (idle_fill[s]) n_fill++;
      if (locked[s])    n_locked[s]++;
      if (up_word_start[s]) begin
        if (last_start[s] >= 0)
          check(cyc - last_start[s] == 5, $sformatf("stream %0d word period %0d", s, cyc - last_start[s]));
        last_start[s] = cyc;
        shreg[s] = {up_out[s], 8'h00};
        slot[s] = 1;
      end else if (slot[s] > 0) begin
        shreg[s][9 - 2*slot[s] -: 2] = up_out[s];
        slot[s]++;
        if (slot[s] == 5) begin
          slot[s] = 0;
          rx_code[s] = shreg[s]; #1;
          if (cyc > 10) begin
            if (rx_cerr[s] || rx_derr[s]) n_rx_err++;
            if (rx_ch[s].k && rx_ch[s].data == K28_1) begin
              if (in_pkt[s]) stray[s]++;
              in_pkt[s] = 1; cur[s].delete();
            end else if (rx_ch[s].k && rx_ch[s].data == K28_6) begin
              if (in_pkt[s]) got[s].push_back(cur[s]); else stray[s]++;
              in_pkt[s] = 0;
            end else if (!rx_ch[s].k) begin
              if (in_pkt[s]) cur[s].push_back(rx_ch[s].data); else stray[s]++;
            end else if (rx_ch[s] != COMMA) stray[s]++;
          end
          rx_rd[s] = rx_rd_out[s];
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    logic [1:0][1:0] prev;
    build();
    rx_rd[0] = 0; rx_rd[1] = 0;
    dn_in = '0; up_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (bits[0].size() > 1 || bits[1].size() > 1) begin
      bit a1, a2, b1, b2;
      a1 = (bits[0].size() > 0) ? bits[0].pop_front() : 1'b0;
      a2 = (bits[0].size() > 0) ? bits[0].pop_front() : 1'b0;
      b1 = (bits[1].size() > 0) ? bits[1].pop_front() : 1'b0;
      b2 = (bits[1].size() > 0) ? bits[1].pop_front() : 1'b0;
      #1 up_in = {a1, b1, a2, b2};
      dn_in = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'b0000;
      prev = dn_in;
      @(negedge clk);
      check(dn_out[0] == {~prev[0][1], prev[0][0]} && dn_out[1] == {~prev[1][1], prev[1][0]},
            $sformatf("downstream %b -> %b", prev, dn_out));
      if (prev == '0 && dn_out == 4'b1010) n_dn_idle++;
    end
    repeat (30) @(negedge clk);

    for (int s = 0; s < 2; s++) begin
      check(got[s].size() == pkts[s].size(),
            $sformatf("stream %0d: %0d packets out, %0d sent", s, got[s].size(), pkts[s].size()));
      for (int p = 0; p < pkts[s].size() && p < got[s].size(); p++)
        check(got[s][p] == pkts[s][p], $sformatf("stream %0d packet %0d differs", s, p));
      check(stray[s] <= 2, $sformatf("stream %0d: %0d stray characters", s, stray[s]));
      check(n_locked[s] > 0, $sformatf("stream %0d never locked", s));
      check(drop_count[s] == 0, "no characters dropped");
    end
    check(n_rx_err == 0, $sformatf("%0d output words with 8b10b errors", n_rx_err));
    check(err_count[0] >= 1, "bad word on stream A counted");
    $display("mechanisms: realign=%0d replaced=%0d inserted=%0d idle_fill=%0d dn_idle=%0d locked=%0d/%0d",
             n_realign, n_replaced, n_inserted, n_fill, n_dn_idle, n_locked[0], n_locked[1]);
    check(n_realign > 0, "realignment never happened");
    // at most the first lock of each stream and the slip: no false commas
    check(n_realign <= 3, $sformatf("%0d realignments", n_realign));
    check(n_replaced >= 4 * NPKT, "delimiter replacement count");
    check(n_inserted > 0, "comma insertion for a bad word never happened");
    check(n_fill > 0, "idle comma filling never happened");
    check(n_dn_idle > 0, "downstream idle inversion never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
