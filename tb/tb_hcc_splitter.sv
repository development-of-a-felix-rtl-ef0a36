// tb_hcc_splitter: checks the separation of the HCC's two interleaved
// streams. Two random bit streams A and B are interleaved bit by bit
// (A first) into a 4-bit Elink; the splitter's outputs, one clock later,
// must reproduce A on elink_a and B on elink_b, two bits per clock with the
// earlier bit in bit [1].
module tb_hcc_splitter;
  logic clk = 0, rst = 1;
  logic [3:0] up_in;
  logic [1:0] elink_a, elink_b, exp_a, exp_b;
  int checks = 0, failures = 0;

  hcc_splitter dut (.clk(clk), .rst(rst), .up_in(up_in), .elink_a(elink_a), .elink_b(elink_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a1, a2, b1, b2;
    up_in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a1 = 1'($urandom); a2 = 1'($urandom); b1 = 1'($urandom); b2 = 1'($urandom);
      // wire order in time: A1 B1 A2 B2, earliest in bit 3
      up_in[3] = a1; up_in[2] = b1; up_in[1] = a2; up_in[0] = b2;
      exp_a = {a1, a2}; exp_b = {b1, b2};
      @(posedge clk); #1;
      check(elink_a == exp_a && elink_b == exp_b,
            $sformatf("in %b: a %b/%b b %b/%b", up_in, elink_a, exp_a, elink_b, exp_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
