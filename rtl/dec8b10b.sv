// dec8b10b: combinational 8b10b decoder with error detection.
//
// The 10-bit code (code[9] = a, received first) is split into its 6-bit
// and 4-bit sub-blocks, which are looked up in the inverse tables of the
// 8b10b standard. The decoder reports:
//   code_err - a sub-block that is no valid code, or a 4-bit code that may
//              not follow the 6-bit code it comes after;
//   disp_err - a sub-block whose form does not match the running disparity.
// rd_in is the running disparity before the word (0: RD-, 1: RD+), rd_out
// the one after it; it follows the received code even after an error, so
// the caller simply registers it. Control characters K28.0-K28.7, K23.7,
// K27.7, K29.7 and K30.7 set dout.k.
//
// The document says only that the HCC data are 8b10b encoded; the tables
// are the standard ones. Run-length violations that span the two
// sub-blocks are not flagged (a design choice that keeps the logic small).
module dec8b10b
  import hcc_if_pkg::*;
(
  input  logic [9:0] code,
  input  logic       rd_in,
  output char_t      dout,
  output logic       rd_out,
  output logic       code_err,
  output logic       disp_err
);

  logic [5:0] s6;
  logic [3:0] s4;
  logic [4:0] x;
  logic [2:0] y;
  logic       six_ok, four_ok, k28, k_alt, rd_mid, d6_err, d4_err;
  int unsigned n6, n4;

  assign s6 = code[9:4];
  assign s4 = code[3:0];
  assign n6 = $countones(s6);
  assign n4 = $countones(s4);

  // 6b -> 5b
  always_comb begin
    x      = 5'd0;
    six_ok = 1'b0;
    k28    = 1'b0;
    unique case (s6)
      6'b000101: begin x = 5'd23; six_ok = 1'b1; end
      6'b000110: begin x = 5'd8; six_ok = 1'b1; end
      6'b000111: begin x = 5'd7; six_ok = 1'b1; end
      6'b001001: begin x = 5'd27; six_ok = 1'b1; end
      6'b001010: begin x = 5'd4; six_ok = 1'b1; end
      6'b001011: begin x = 5'd20; six_ok = 1'b1; end
      6'b001100: begin x = 5'd24; six_ok = 1'b1; end
      6'b001101: begin x = 5'd12; six_ok = 1'b1; end
      6'b001110: begin x = 5'd28; six_ok = 1'b1; end
      6'b010001: begin x = 5'd29; six_ok = 1'b1; end
      6'b010010: begin x = 5'd2; six_ok = 1'b1; end
      6'b010011: begin x = 5'd18; six_ok = 1'b1; end
      6'b010100: begin x = 5'd31; six_ok = 1'b1; end
      6'b010101: begin x = 5'd10; six_ok = 1'b1; end
      6'b010110: begin x = 5'd26; six_ok = 1'b1; end
      6'b010111: begin x = 5'd15; six_ok = 1'b1; end
      6'b011000: begin x = 5'd0; six_ok = 1'b1; end
      6'b011001: begin x = 5'd6; six_ok = 1'b1; end
      6'b011010: begin x = 5'd22; six_ok = 1'b1; end
      6'b011011: begin x = 5'd16; six_ok = 1'b1; end
      6'b011100: begin x = 5'd14; six_ok = 1'b1; end
      6'b011101: begin x = 5'd1; six_ok = 1'b1; end
      6'b011110: begin x = 5'd30; six_ok = 1'b1; end
      6'b100001: begin x = 5'd30; six_ok = 1'b1; end
      6'b100010: begin x = 5'd1; six_ok = 1'b1; end
      6'b100011: begin x = 5'd17; six_ok = 1'b1; end
      6'b100100: begin x = 5'd16; six_ok = 1'b1; end
      6'b100101: begin x = 5'd9; six_ok = 1'b1; end
      6'b100110: begin x = 5'd25; six_ok = 1'b1; end
      6'b100111: begin x = 5'd0; six_ok = 1'b1; end
      6'b101000: begin x = 5'd15; six_ok = 1'b1; end
      6'b101001: begin x = 5'd5; six_ok = 1'b1; end
      6'b101010: begin x = 5'd21; six_ok = 1'b1; end
      6'b101011: begin x = 5'd31; six_ok = 1'b1; end
      6'b101100: begin x = 5'd13; six_ok = 1'b1; end
      6'b101101: begin x = 5'd2; six_ok = 1'b1; end
      6'b101110: begin x = 5'd29; six_ok = 1'b1; end
      6'b110001: begin x = 5'd3; six_ok = 1'b1; end
      6'b110010: begin x = 5'd19; six_ok = 1'b1; end
      6'b110011: begin x = 5'd24; six_ok = 1'b1; end
      6'b110100: begin x = 5'd11; six_ok = 1'b1; end
      6'b110101: begin x = 5'd4; six_ok = 1'b1; end
      6'b110110: begin x = 5'd27; six_ok = 1'b1; end
      6'b111000: begin x = 5'd7; six_ok = 1'b1; end
      6'b111001: begin x = 5'd8; six_ok = 1'b1; end
      6'b111010: begin x = 5'd23; six_ok = 1'b1; end
      6'b001111, 6'b110000: begin x = 5'd28; six_ok = 1'b1; k28 = 1'b1; end
      default: ;
    endcase
  end

  // Disparity of the 6-bit sub-block: a +2 code must start at RD-, a -2
  // code at RD+, and the two forms of D.07 likewise.
  always_comb begin
    d6_err = 1'b0;
    if (n6 == 4 || s6 == 6'b111000) d6_err = rd_in;
    if (n6 == 2 || s6 == 6'b000111) d6_err = !rd_in;
  end
  assign rd_mid = (n6 == 4) ? 1'b1 : (n6 == 2) ? 1'b0 : rd_in;

  // 4b -> 3b
  always_comb begin
    y       = 3'd0;
    four_ok = 1'b1;
    k_alt   = 1'b0;
    if (k28) begin
      // K28 column: the balanced codes depend on the preceding 6-bit form.
      if (s6 == 6'b001111) begin
        unique case (s4)
          4'b0100: y = 3'd0;
          4'b1001: y = 3'd1;
          4'b0101: y = 3'd2;
          4'b0011: y = 3'd3;
          4'b0010: y = 3'd4;
          4'b1010: y = 3'd5;
          4'b0110: y = 3'd6;
          4'b1000: y = 3'd7;
          default: four_ok = 1'b0;
        endcase
      end else begin
        unique case (s4)
          4'b1011: y = 3'd0;
          4'b0110: y = 3'd1;
          4'b1010: y = 3'd2;
          4'b1100: y = 3'd3;
          4'b1101: y = 3'd4;
          4'b0101: y = 3'd5;
          4'b1001: y = 3'd6;
          4'b0111: y = 3'd7;
          default: four_ok = 1'b0;
        endcase
      end
    end else begin
      unique case (s4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        4'b1110, 4'b0001: y = 3'd7;
        4'b0111, 4'b1000: begin
          y = 3'd7;
          if (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30)
            k_alt = 1'b1;
          else if (!(x == 5'd17 || x == 5'd18 || x == 5'd20 ||
                     x == 5'd11 || x == 5'd13 || x == 5'd14))
            four_ok = 1'b0;
        end
        default: four_ok = 1'b0;
      endcase
    end
  end

  // Disparity of the 4-bit sub-block, judged against rd_mid. The K28
  // column was already matched to its 6-bit code above.
  always_comb begin
    d4_err = 1'b0;
    if (n4 == 3 || (s4 == 4'b1100 && !k28)) d4_err = rd_mid;
    if (n4 == 1 || (s4 == 4'b0011 && !k28)) d4_err = !rd_mid;
  end

  assign rd_out   = (n4 == 3) ? 1'b1 : (n4 == 1) ? 1'b0 : rd_mid;
  assign dout     = '{k: k28 || k_alt, data: {y, x}};
  assign code_err = !six_ok || !four_ok;
  assign disp_err = d6_err || d4_err;

endmodule
