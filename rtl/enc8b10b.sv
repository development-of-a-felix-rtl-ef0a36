// enc8b10b: combinational 8b10b encoder (Widmer-Franaszek code).
//
// The byte HGF EDCBA is split into a 5-bit part (EDCBA -> abcdei) and a
// 3-bit part (HGF -> fghj), each looked up in the standard tables. The
// running disparity rd_in (0: RD-, 1: RD+) selects between the two forms of
// the unbalanced sub-blocks; rd_out is the disparity after the code word,
// to be registered by the caller. The alternate D.x.A7 form is used where the
// standard demands it to avoid runs of five equal bits.
//
// Valid control characters are K28.0-K28.7, K23.7, K27.7, K29.7 and K30.7;
// any other K request raises k_err and is encoded as its data character.
//
// The document states only that the HCC and FELIX streams are 8b10b
// encoded; the tables are those of the 8b10b standard. Output bit order:
// code[9] = a (sent first) ... code[0] = j.
module enc8b10b
  import hcc_if_pkg::*;
(
  input  char_t       din,
  input  logic        rd_in,   // running disparity before: 0 = RD-, 1 = RD+
  output logic [9:0]  code,    // abcdei fghj, a in bit 9
  output logic        rd_out,  // running disparity after the code word
  output logic        k_err    // K requested for a character that has none
);

  logic [4:0] x;   // EDCBA
  logic [2:0] y;   // HGF
  logic       k28, k_alt, k_ok;
  logic [5:0] six_neg, six;   // RD- form of 6b code, chosen form
  logic       six_bal;        // 6b code has a single form
  logic       rd_mid;         // disparity after 6b sub-block
  logic [3:0] four_neg, four;
  logic       four_bal;       // 4b code has a single form
  logic       use_a7;

  assign x = din.data[4:0];
  assign y = din.data[7:5];

  assign k28   = din.k && (x == 5'd28);
  assign k_alt = din.k && (y == 3'd7) &&
                 (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
  assign k_ok  = k28 || k_alt;
  assign k_err = din.k && !k_ok;

  // 5b/6b, RD- column (the RD+ column is the complement where unbalanced).
  always_comb begin
    unique case (x)
      5'd0:  six_neg = 6'b100111;
      5'd1:  six_neg = 6'b011101;
      5'd2:  six_neg = 6'b101101;
      5'd3:  six_neg = 6'b110001;
      5'd4:  six_neg = 6'b110101;
      5'd5:  six_neg = 6'b101001;
      5'd6:  six_neg = 6'b011001;
      5'd7:  six_neg = 6'b111000;
      5'd8:  six_neg = 6'b111001;
      5'd9:  six_neg = 6'b100101;
      5'd10: six_neg = 6'b010101;
      5'd11: six_neg = 6'b110100;
      5'd12: six_neg = 6'b001101;
      5'd13: six_neg = 6'b101100;
      5'd14: six_neg = 6'b011100;
      5'd15: six_neg = 6'b010111;
      5'd16: six_neg = 6'b011011;
      5'd17: six_neg = 6'b100011;
      5'd18: six_neg = 6'b010011;
      5'd19: six_neg = 6'b110010;
      5'd20: six_neg = 6'b001011;
      5'd21: six_neg = 6'b101010;
      5'd22: six_neg = 6'b011010;
      5'd23: six_neg = 6'b111010;
      5'd24: six_neg = 6'b110011;
      5'd25: six_neg = 6'b100110;
      5'd26: six_neg = 6'b010110;
      5'd27: six_neg = 6'b110110;
      5'd28: six_neg = k28 ? 6'b001111 : 6'b001110;
      5'd29: six_neg = 6'b101110;
      5'd30: six_neg = 6'b011110;
      default: six_neg = 6'b101011;  // 31
    endcase
  end

  // D.07 is balanced but still has two forms; K28 is unbalanced.
  // six_bal marks codes with a single form; D.07 is balanced but has two.
  assign six_bal = ($countones(six_neg) == 3) && !(x == 5'd7 && !din.k);
  assign six     = (rd_in && (!six_bal)) ? ~six_neg : six_neg;
  assign rd_mid  = ($countones(six) == 3) ? rd_in : ~rd_in;

  assign use_a7 = !din.k && (y == 3'd7) &&
                  ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                   ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));

  // 3b/4b, RD- column. Control characters use the K column, in which the
  // balanced codes also change with disparity.
  always_comb begin
    four_bal = 1'b0;
    if (k_ok) begin
      unique case (y)
        3'd0: four_neg = 4'b1011;
        3'd1: four_neg = 4'b0110;
        3'd2: four_neg = 4'b1010;
        3'd3: four_neg = 4'b1100;
        3'd4: four_neg = 4'b1101;
        3'd5: four_neg = 4'b0101;
        3'd6: four_neg = 4'b1001;
        default: four_neg = 4'b0111;
      endcase
    end else begin
      unique case (y)
        3'd0: four_neg = 4'b1011;
        3'd1: begin four_neg = 4'b1001; four_bal = 1'b1; end
        3'd2: begin four_neg = 4'b0101; four_bal = 1'b1; end
        3'd3: four_neg = 4'b1100;
        3'd4: four_neg = 4'b1101;
        3'd5: begin four_neg = 4'b1010; four_bal = 1'b1; end
        3'd6: begin four_neg = 4'b0110; four_bal = 1'b1; end
        default: four_neg = use_a7 ? 4'b0111 : 4'b1110;
      endcase
    end
  end

  // "four_bal" marks codes that keep one form whatever the disparity.
  assign four   = (rd_mid && !four_bal) ? ~four_neg : four_neg;
  assign rd_out = ($countones(four) == 2) ? rd_mid : ~rd_mid;
  assign code   = {six, four};

endmodule
