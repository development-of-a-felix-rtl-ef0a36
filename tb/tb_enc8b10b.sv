// tb_enc8b10b: self-checking test of the 8b10b encoder.
//
// 1. Known code words from the 8b10b standard, in both disparities.
// 2. For every data character and every valid control character, in both
//    running disparities: the code's disparity is 0 or +-2 with the sign
//    the running disparity demands, rd_out follows, and only K28.1, K28.5
//    and K28.7 contain the 7-bit comma.
// 3. A long random character stream: no run of more than five equal bits
//    and a bounded running digital sum on the serial stream.
module tb_enc8b10b;
  import hcc_if_pkg::*;

  char_t      din;
  logic       rd_in, rd_out, k_err;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc8b10b dut (.din(din), .rd_in(rd_in), .code(code), .rd_out(rd_out), .k_err(k_err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic known(input bit k, input logic [7:0] d, input bit rd, input logic [9:0] exp);
    din = '{k: k, data: d}; rd_in = rd; #1;
    check(code == exp && !k_err, $sformatf("K=%0d %02h rd=%0d: got %b want %b", k, d, rd, code, exp));
  endtask

  function automatic bit valid_k(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  function automatic bit has_comma(input logic [9:0] c);
    return c[9:3] == 7'b0011111 || c[9:3] == 7'b1100000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, rds, maxrun, minrds, maxrds;
    logic last;
    // 1. standard code words
    known(1, 8'hBC, 0, 10'b0011111010);  // K28.5
    known(1, 8'hBC, 1, 10'b1100000101);
    known(1, 8'h3C, 0, 10'b0011111001);  // K28.1
    known(1, 8'hFC, 0, 10'b0011111000);  // K28.7
    known(1, 8'hFE, 0, 10'b0111101000);  // K30.7
    known(0, 8'h00, 0, 10'b1001110100);  // D0.0
    known(0, 8'h00, 1, 10'b0110001011);
    known(0, 8'hB5, 0, 10'b1010101010);  // D21.5
    known(0, 8'h4A, 1, 10'b0101010101);  // D10.2
    known(0, 8'hF1, 0, 10'b1000110111);  // D17.7, alternate form
    known(0, 8'hF1, 1, 10'b1000110001);  // D17.7, primary form at RD+
    known(0, 8'h07, 0, 10'b1110001011);  // D7.0 (RD- stays after 111000)
    known(0, 8'h63, 1, 10'b1100010011);  // D3.3

    // 2. exhaustive properties
    for (int rd = 0; rd < 2; rd++) begin
      for (int kk = 0; kk < 2; kk++) begin
        for (int v = 0; v < 256; v++) begin
          int ones, disp;
          if (kk == 1 && !valid_k(8'(v))) continue;
          din = '{k: 1'(kk), data: 8'(v)}; rd_in = 1'(rd); #1;
          ones = $countones(code);
          disp = 2 * ones - 10;
          check(!k_err, $sformatf("k_err for K=%0d %02h", kk, v));
          if (rd == 0) check(disp == 0 || disp == 2, $sformatf("disp %0d for %0d/%02h rd-", disp, kk, v));
          else         check(disp == 0 || disp == -2, $sformatf("disp %0d for %0d/%02h rd+", disp, kk, v));
          check(rd_out == ((disp == 0) ? 1'(rd) : ~1'(rd)), $sformatf("rd_out %0d/%02h", kk, v));
          check(has_comma(code) == (kk == 1 && v[4:0] == 28 && (v[7:5] == 1 || v[7:5] == 5 || v[7:5] == 7)),
                $sformatf("comma property %0d/%02h", kk, v));
        end
      end
    end
    din = '{k: 1'b1, data: 8'h00}; rd_in = 0; #1;
    check(k_err, "K0.0 must raise k_err");

    // 3. random stream
    rd_in = 0; run = 0; rds = 0; maxrun = 0; minrds = 0; maxrds = 0; last = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      logic [7:0] d;
      bit k;
      d = 8'($urandom);
      k = ($urandom_range(0, 7) == 0);
      if (k) d = {3'($urandom), 5'd28};
      din = '{k: k, data: d}; #1;
      for (int b = 9; b >= 0; b--) begin
        if (code[b] == last) run++; else run = 1;
        last = code[b];
        rds += code[b] ? 1 : -1;
        if (n > 0 && run > maxrun) maxrun = run;
        if (rds < minrds) minrds = rds;
        if (rds > maxrds) maxrds = rds;
      end
      rd_in = rd_out; #1;
    end
    check(maxrun <= 5, $sformatf("run length %0d", maxrun));
    check(maxrds - minrds <= 6, $sformatf("running digital sum spread %0d", maxrds - minrds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
