// tb_hcc_bit_reverse: checks the downstream bit inversion.
// After reset both Elinks must show the HCC idle "10"; afterwards each
// output must equal the input of the previous clock with bit [1] inverted,
// so FELIX's all-zero idle becomes a clock train. Random traffic is used.
module tb_hcc_bit_reverse;
  logic clk = 0, rst = 1;
  logic [1:0][1:0] dn_in, dn_out, prev;
  int checks = 0, failures = 0;

  hcc_bit_reverse dut (.clk(clk), .rst(rst), .dn_in(dn_in), .dn_out(dn_out));

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
    dn_in = '0;
    repeat (2) @(posedge clk);
    #1 check(dn_out[0] == 2'b10 && dn_out[1] == 2'b10, "idle pattern during reset");
    rst = 0;
    // idle: zeros in, clock train out
    repeat (4) @(posedge clk);
    #1 check(dn_out[0] == 2'b10 && dn_out[1] == 2'b10, "zero idle becomes clock train");
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      prev  = dn_in;
      dn_in = 4'($urandom);
      @(posedge clk); #1;
      check(dn_out[0] == {~dn_in[0][1], dn_in[0][0]} && dn_out[1] == {~dn_in[1][1], dn_in[1][0]},
            $sformatf("in %b out %b", dn_in, dn_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
