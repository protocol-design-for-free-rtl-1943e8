// fso_pkg: shared constants, types and the 4B6B code of the FSO transceiving
// protocol.
//
// Every byte is sent as two 6-bit code words, high nibble first. The idle
// ("power-modify") word 111000 keeps the laser's average power constant and
// doubles as the receiver's word-alignment pattern; the 111000 value is the
// document's. The sixteen data code words and the two command words are this
// design's own choice, with one exception: nibble F is sent as 011101, the
// word seen on the line while a stream of 0xFF bytes is received. The data
// words are the fourteen 3-ones words that are not bit rotations of 111000,
// plus 011101 (F) and its complement 100010 (E). Because no data or command
// word is a rotation of 111000, a repeated word can never imitate the idle
// stream at a wrong bit phase.
package fso_pkg;

  typedef logic [5:0] code6_t;

  localparam code6_t CODE_IDLE     = 6'b111000;  // power-modify word
  localparam code6_t CODE_STOPREC  = 6'b001100;  // "stop sending me user data"
  localparam code6_t CODE_STARTREC = 6'b110011;  // "I can receive user data"

  // Selection of the register group (regcon[2:0]).
  typedef enum logic [2:0] {
    SEL_IDLE     = 3'd0,
    SEL_HIGH     = 3'd1,
    SEL_LOW      = 3'd2,
    SEL_STOPREC  = 3'd3,
    SEL_STARTREC = 3'd4
  } regsel_e;

  // Kind of a received 6-bit word.
  typedef enum logic [2:0] {
    W_DATA     = 3'd0,
    W_IDLE     = 3'd1,
    W_STOPREC  = 3'd2,
    W_STARTREC = 3'd3,
    W_INVALID  = 3'd4
  } wkind_e;

  function automatic code6_t enc4b6b(input logic [3:0] nib);
    case (nib)
      4'h0: enc4b6b = 6'b001011;
      4'h1: enc4b6b = 6'b001101;
      4'h2: enc4b6b = 6'b010011;
      4'h3: enc4b6b = 6'b010101;
      4'h4: enc4b6b = 6'b010110;
      4'h5: enc4b6b = 6'b011001;
      4'h6: enc4b6b = 6'b011010;
      4'h7: enc4b6b = 6'b100101;
      4'h8: enc4b6b = 6'b100110;
      4'h9: enc4b6b = 6'b101001;
      4'hA: enc4b6b = 6'b101010;
      4'hB: enc4b6b = 6'b101100;
      4'hC: enc4b6b = 6'b110010;
      4'hD: enc4b6b = 6'b110100;
      4'hE: enc4b6b = 6'b100010;
      default: enc4b6b = 6'b011101;  // 4'hF
    endcase
  endfunction

  typedef struct packed {
    wkind_e     kind;
    logic [3:0] nib;   // decoded nibble, valid when kind is W_DATA
  } dec_t;

  // Classifies a 6-bit word and decodes data words.
  function automatic dec_t dec6b4b(input code6_t w);
    wkind_e     kind;
    logic [3:0] nib;
    nib  = 4'h0;
    kind = W_DATA;
    case (w)
      6'b001011: nib = 4'h0;
      6'b001101: nib = 4'h1;
      6'b010011: nib = 4'h2;
      6'b010101: nib = 4'h3;
      6'b010110: nib = 4'h4;
      6'b011001: nib = 4'h5;
      6'b011010: nib = 4'h6;
      6'b100101: nib = 4'h7;
      6'b100110: nib = 4'h8;
      6'b101001: nib = 4'h9;
      6'b101010: nib = 4'hA;
      6'b101100: nib = 4'hB;
      6'b110010: nib = 4'hC;
      6'b110100: nib = 4'hD;
      6'b100010: nib = 4'hE;
      6'b011101: nib = 4'hF;
      CODE_IDLE:     kind = W_IDLE;
      CODE_STOPREC:  kind = W_STOPREC;
      CODE_STARTREC: kind = W_STARTREC;
      default:       kind = W_INVALID;
    endcase
    return '{kind: kind, nib: nib};
  endfunction

endpackage
