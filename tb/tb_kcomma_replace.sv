// tb_kcomma_replace: checks decoding, delimiter replacement and comma
// insertion.
//
// Random characters (data, HCC start/end-of-packet delimiters, idle
// commas, other K28 characters) are encoded by enc8b10b and presented as
// aligned words. The expected output is worked out here from the rules:
// HCC SOP (K28.0) -> K28.1, HCC EOP (K28.3) -> K28.6, other K -> K28.5,
// data unchanged, and K28.5 for every word while `locked` is low. Words with
// an invalid sub-block and words of the wrong disparity are injected and
// must come out as K28.5 and count in err_count. Output follows its word
// by exactly one clock.
module tb_kcomma_replace;
  import hcc_if_pkg::*;

  logic clk = 0, rst = 1;
  logic [9:0] word;
  logic word_valid = 0, locked = 0;
  char_t dout;
  logic dout_valid, replaced, inserted;
  logic [15:0] err_count;

  char_t ein;
  logic erd = 0, erd_out, k_err;
  logic [9:0] ecode;

  int checks = 0, failures = 0, n_rep = 0, n_ins = 0, n_err = 0;

  enc8b10b gen (.din(ein), .rd_in(erd), .code(ecode), .rd_out(erd_out), .k_err(k_err));
  kcomma_replace dut (
    .clk(clk), .rst(rst), .word(word), .word_valid(word_valid), .locked(locked),
    .dout(dout), .dout_valid(dout_valid), .replaced(replaced), .inserted(inserted),
    .err_count(err_count));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Present one word for one clock and check the character one clock later.
  task automatic present(input logic [9:0] w, input char_t exp, input string what);
    @(negedge clk);
    word = w; word_valid = 1;
    @(negedge clk);
    word_valid = 0;
    check(dout_valid && dout == exp,
          $sformatf("%s: got %0d/%02h want %0d/%02h", what, dout.k, dout.data, exp.k, exp.data));
    @(negedge clk);
    check(!dout_valid, "valid must last one clock");
  endtask

  // Running disparity after a word, as the 8b10b rules define it from the
  // word's own sub-blocks, whether the word was valid or not.
  function automatic logic rd_after(input logic [9:0] w, input logic rd);
    int n6, n4;
    logic mid;
    n6  = $countones(w[9:4]);
    n4  = $countones(w[3:0]);
    mid = (n6 == 4) ? 1'b1 : (n6 == 2) ? 1'b0 : rd;
    return (n4 == 3) ? 1'b1 : (n4 == 1) ? 1'b0 : mid;
  endfunction

  task automatic send_char(input char_t c);
    char_t exp;
    ein = c; #1;
    if (!locked)                           exp = COMMA;
    else if (c.k && c.data == K28_0)       exp = '{k: 1'b1, data: K28_1};
    else if (c.k && c.data == K28_3)       exp = '{k: 1'b1, data: K28_6};
    else if (c.k)                          exp = COMMA;
    else                                   exp = c;
    present(ecode, exp, $sformatf("char %0d/%02h", c.k, c.data));
    erd = erd_out;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (replaced) n_rep++;
    if (inserted) n_ins++;
  end

  initial begin
    word = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // not locked: everything becomes a comma
    for (int i = 0; i < 5; i++) send_char('{k: 1'b0, data: 8'($urandom)});
    locked = 1;
    for (int i = 0; i < 600; i++) begin
      int sel;
      sel = $urandom_range(0, 9);
      case (sel)
        0: send_char('{k: 1'b1, data: K28_0});
        1: send_char('{k: 1'b1, data: K28_3});
        2: send_char('{k: 1'b1, data: K28_5});
        3: send_char('{k: 1'b1, data: {3'($urandom), 5'd28}});
        4: begin
          // invalid 6-bit sub-block
          logic [9:0] bad;
          bad = {6'b111111, 4'($urandom)};
          present(bad, COMMA, "code error");
          n_err++;
          erd = rd_after(bad, erd);
        end
        5: begin
          // valid code word of the wrong disparity
          ein = '{k: 1'b0, data: 8'h00}; erd = ~erd; #1;
          present(ecode, COMMA, "disparity error");
          n_err++;
          erd = rd_after(ecode, ~erd);
        end
        default: send_char('{k: 1'b0, data: 8'($urandom)});
      endcase
    end
    check(err_count == 16'(n_err), $sformatf("err_count %0d want %0d", err_count, n_err));
    check(n_rep > 50, $sformatf("%0d delimiters replaced", n_rep));
    check(n_ins >= n_err + 5, $sformatf("%0d commas inserted", n_ins));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
