// kcomma_replace: "K-comma insert/replace" stage of the HCC interface.
//
// Each aligned 10-bit word is decoded (dec8b10b, running disparity kept
// here). The HCC frames its packets with its own control characters, which
// the FELIX Central Router does not use, so they are replaced:
//   HCC start-of-packet HCC_SOP -> FELIX start-of-chunk FELIX_SOP
//   HCC end-of-packet   HCC_EOP -> FELIX end-of-chunk   FELIX_EOP
//   any other control character  -> idle comma K28.5
// and an idle comma is inserted in place of every word that cannot be
// passed on: words received while the aligner is not locked and words with
// a code or disparity error. Data characters pass unchanged.
//
// The document says the control commas of the two streams must be
// replaced; which K-characters are involved (HCC: K28.0/K28.3, FELIX:
// K28.1/K28.6) is this design's choice, set by parameters.
//
// Timing: one output character per input word, one clock later.
// err_count counts code and disparity errors seen while locked, and
// saturates.
module kcomma_replace
  import hcc_if_pkg::*;
#(
  parameter logic [7:0] HCC_SOP   = K28_0,
  parameter logic [7:0] HCC_EOP   = K28_3,
  parameter logic [7:0] FELIX_SOP = K28_1,
  parameter logic [7:0] FELIX_EOP = K28_6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  word,
  input  logic        word_valid,
  input  logic        locked,
  output char_t       dout,
  output logic        dout_valid,
  output logic        replaced,    // pulse: an HCC delimiter was replaced
  output logic        inserted,    // pulse: a comma was put in for a bad word
  output logic [15:0] err_count
);

  char_t dec;
  logic  rd, rd_nx, code_err, disp_err;

  dec8b10b u_dec (
    .code    (word),
    .rd_in   (rd),
    .dout    (dec),
    .rd_out  (rd_nx),
    .code_err(code_err),
    .disp_err(disp_err)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rd         <= 1'b0;
      dout       <= COMMA;
      dout_valid <= 1'b0;
      replaced   <= 1'b0;
      inserted   <= 1'b0;
      err_count  <= '0;
    end else begin
      dout_valid <= word_valid;
      replaced   <= 1'b0;
      inserted   <= 1'b0;
      if (word_valid) begin
        rd <= rd_nx;
        if (!locked || code_err || disp_err) begin
          dout     <= COMMA;
          inserted <= 1'b1;
          if (locked && (code_err || disp_err) && err_count != '1)
            err_count <= err_count + 1'b1;
        end else if (dec.k) begin
          if (dec.data == HCC_SOP) begin
            dout     <= '{k: 1'b1, data: FELIX_SOP};
            replaced <= 1'b1;
          end else if (dec.data == HCC_EOP) begin
            dout     <= '{k: 1'b1, data: FELIX_EOP};
            replaced <= 1'b1;
          end else begin
            dout     <= COMMA;
          end
        end else begin
          dout <= dec;
        end
      end
    end
  end

endmodule
