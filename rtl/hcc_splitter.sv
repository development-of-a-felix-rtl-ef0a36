// hcc_splitter: upstream "Splitter" stage of the HCC interface.
//
// The HCC sends two 8b10b streams, A and B, interleaved bit by bit on one
// 4-bit Elink: in each 40 MHz cycle the four bits are A(n) B(n) A(n+1)
// B(n+1), earliest on the left. Swapping the middle two bits gives
// A(n) A(n+1) B(n) B(n+1), so the upper half is a 2-bit Elink holding only
// stream A and the lower half one holding only stream B.
//
// The swap is what the document describes. That bit [3] is the earliest bit
// of the 4-bit Elink, and that each output Elink puts its earlier bit in
// bit [1], is this design's convention; one register stage is added.
//
// Timing: elink_a/elink_b follow up_in one clock later.
module hcc_splitter (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] up_in,     // 4-bit Elink from the GBT wrapper
  output logic [1:0] elink_a,   // stream A: {A(n), A(n+1)}
  output logic [1:0] elink_b    // stream B: {B(n), B(n+1)}
);

  logic [3:0] swapped;

  assign swapped = {up_in[3], up_in[1], up_in[2], up_in[0]};

  always_ff @(posedge clk) begin
    if (rst) {elink_a, elink_b} <= '0;
    else     {elink_a, elink_b} <= swapped;
  end

endmodule
