// spur_byte_extract: byte extractor of the lower data path.
//
// Selects one byte of a tagged 40-bit word and returns it zero-extended in a
// fixnum-tagged word.  sel 0..3 picks data byte 0 (least significant) to 3;
// sel 4 picks the 8-bit tag byte, which is how read_tag moves a tag into the
// data part.  Byte numbering is this design's choice.  Combinational.
module spur_byte_extract
  import spur_pkg::*;
(
  input  word40_t    a,
  input  logic [2:0] sel,
  output word40_t    y
);
  logic [7:0] b;
  always_comb begin
    unique case (sel)
      3'd0:    b = a.data[7:0];
      3'd1:    b = a.data[15:8];
      3'd2:    b = a.data[23:16];
      3'd3:    b = a.data[31:24];
      default: b = {a.gen, a.typ};
    endcase
    y      = '0;
    y.typ  = TAG_FIXNUM;
    y.data = {24'd0, b};
  end
endmodule
