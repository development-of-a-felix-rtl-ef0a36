// hcc_if_pkg: types and constants shared by the HCC interface module.
//
// The HCC interface sits between the GBT link and the Central Router of the
// FELIX firmware. All of its Elinks run on the 40 MHz bunch-crossing clock,
// so a 2-bit Elink carries 80 Mb/s and the HCC's 4-bit Elink 160 Mb/s.
// A 10-bit 8b10b code word therefore takes five clock cycles on a 2-bit Elink.
//
// Code-word bit order (this design's convention): code[9] is bit 'a' of the
// 8b10b code, the first one on the wire, and code[0] is bit 'j', the last.
// On a 2-bit Elink, bit [1] of a clock cycle is earlier in time than bit [0].
//
// Control characters: the design replaces the HCC's packet delimiters by the
// FELIX ones. The 8b10b standard fixes the code points; which K-characters
// the HCC and FELIX use for start and end of packet is this design's choice,
// held in parameters of kcomma_replace whose defaults are below.
package hcc_if_pkg;

  // One decoded 8b10b character.
  typedef struct packed {
    logic       k;      // 1: control (K) character
    logic [7:0] data;   // HGF EDCBA, H in bit 7
  } char_t;

  // K-characters (value of the 8-bit HGF EDCBA byte).
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] K28_1 = 8'h3C;
  localparam logic [7:0] K28_3 = 8'h7C;
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K28_6 = 8'hDC;

  // Idle comma of both the HCC and FELIX streams.
  localparam char_t COMMA = '{k: 1'b1, data: K28_5};

  // 7-bit comma patterns (bits a..g) of K28.1, K28.5 and K28.7.
  localparam logic [6:0] COMMA_NEG = 7'b0011111;  // RD- form
  localparam logic [6:0] COMMA_POS = 7'b1100000;  // RD+ form

endpackage
