// hcc_bit_reverse: downstream ("Bit Reverse") stage of the HCC interface.
//
// The HCC's two command inputs, L0_CMD and R3_L1, each carry two
// time-multiplexed 40 Mb/s streams, and the HCC sees a 40 MHz clock train
// on both lines when nothing happens. FELIX, in direct mode, sends all zeros
// when idle. Inverting one bit of every 2-bit Elink turns FELIX's "00" idle
// into the "10" pattern, i.e. the clock train the HCC expects, and leaves
// triggers and commands intact (they are simply inverted back at the HCC).
//
// Following the document, bit [1] (the left column of its drawing) is the one
// inverted; INV_MASK lets another bit be chosen. Which two Elinks there are
// (N_ELINKS = 2: L0_CMD and R3_L1) and the single register stage on the
// path are this design's choices.
//
// Timing: dn_out follows dn_in one clock later. After reset dn_out holds the
// inverted idle pattern, so the HCC sees its clock train at once.
module hcc_bit_reverse #(
  parameter int unsigned N_ELINKS = 2,
  parameter logic [1:0]  INV_MASK = 2'b10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N_ELINKS-1:0][1:0] dn_in,   // from the Central Router
  output logic [N_ELINKS-1:0][1:0] dn_out   // to the GBT wrapper
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N_ELINKS); i++)
      dn_out[i] <= rst ? INV_MASK : (dn_in[i] ^ INV_MASK);
  end

endmodule
