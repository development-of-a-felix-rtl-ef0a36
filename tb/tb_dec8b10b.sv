// tb_dec8b10b: self-checking test of the 8b10b decoder.
//
// 1. Known code words from the 8b10b standard decode to their characters.
// 2. Every data character and every valid control character, encoded in
//    both running disparities by enc8b10b (tested on its own against the
//    standard), decodes back without error and with the same rd_out.
// 3. Every unbalanced code word presented at the wrong running disparity
//    raises disp_err.
// 4. Sub-blocks with more than four or fewer than two ones in the 6-bit
//    part, or more than three or fewer than one in the 4-bit part, raise
//    code_err.
module tb_dec8b10b;
  import hcc_if_pkg::*;

  char_t      ein, dout;
  logic       erd, erd_out, k_err;
  logic [9:0] ecode, code;
  logic       rd_in, rd_out, code_err, disp_err;
  int checks = 0, failures = 0;

  enc8b10b ref_enc (.din(ein), .rd_in(erd), .code(ecode), .rd_out(erd_out), .k_err(k_err));
  dec8b10b dut (.code(code), .rd_in(rd_in), .dout(dout), .rd_out(rd_out),
                .code_err(code_err), .disp_err(disp_err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic known(input logic [9:0] c, input bit rd, input bit k, input logic [7:0] d);
    code = c; rd_in = rd; #1;
    check(dout.k == k && dout.data == d && !code_err && !disp_err,
          $sformatf("%b: got K=%0d %02h err=%0d%0d", c, dout.k, dout.data, code_err, disp_err));
  endtask

  function automatic bit valid_k(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known(10'b0011111010, 0, 1, 8'hBC);
    known(10'b1100000101, 1, 1, 8'hBC);
    known(10'b0011111001, 0, 1, 8'h3C);
    known(10'b1100000110, 1, 1, 8'h3C);
    known(10'b0011110110, 0, 1, 8'hDC);  // K28.6
    known(10'b0111101000, 0, 1, 8'hFE);  // K30.7
    known(10'b1001110100, 0, 0, 8'h00);
    known(10'b1010101010, 1, 0, 8'hB5);
    known(10'b1000110111, 0, 0, 8'hF1);

    for (int rd = 0; rd < 2; rd++)
      for (int kk = 0; kk < 2; kk++)
        for (int v = 0; v < 256; v++) begin
          if (kk == 1 && !valid_k(8'(v))) continue;
          ein = '{k: 1'(kk), data: 8'(v)}; erd = 1'(rd); #1;
          code = ecode; rd_in = 1'(rd); #1;
          check(dout == ein && !code_err && !disp_err && rd_out == erd_out,
                $sformatf("round trip %0d/%02h rd=%0d: got %0d/%02h err=%0d%0d", kk, v, rd,
                          dout.k, dout.data, code_err, disp_err));
          if ($countones(ecode) != 5) begin
            rd_in = ~1'(rd); #1;
            check(disp_err, $sformatf("no disp_err for %0d/%02h at wrong rd", kk, v));
          end
        end

    for (int c = 0; c < 1024; c++) begin
      logic [9:0] cc;
      int n6, n4;
      cc = 10'(c);
      n6 = $countones(cc[9:4]);
      n4 = $countones(cc[3:0]);
      if (n6 < 2 || n6 > 4 || n4 < 1 || n4 > 3) begin
        code = cc; rd_in = 1'($urandom); #1;
        check(code_err, $sformatf("no code_err for %b", cc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
