// register_group: the word the transmitter sends next.
//
// Holds the constant words of the protocol - the power-modify word 111000
// and the two command words - and, with the two data codes from the coder,
// puts the one selected by the output manager (con, the document's
// regcon[2:0]) into regout on a load strobe. The serializer takes regout at
// the next word boundary. When nothing else is selected the power-modify word
// goes out, so an idle link carries 111000 continuously, keeping the optical
// power balanced and giving the far receiver its alignment pattern. The
// 111000 value is the document's; the command values and the encoding of con
// are this design's (see fso_pkg).
module register_group
  import fso_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  code6_t  codregh,
  input  code6_t  codregl,
  input  regsel_e con,
  output code6_t  regout
);
  code6_t sel;

  always_comb begin
    unique case (con)
      SEL_HIGH:     sel = codregh;
      SEL_LOW:      sel = codregl;
      SEL_STOPREC:  sel = CODE_STOPREC;
      SEL_STARTREC: sel = CODE_STARTREC;
      default:      sel = CODE_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    regout <= CODE_IDLE;
    else if (load) regout <= sel;
  end
endmodule
