// spur_byte_insert: byte inserter of the lower data path.
//
// Replaces one byte of a tagged 40-bit word with an 8-bit value.  sel 0..3
// replaces data byte 0..3, sel 4 replaces the tag byte (write_tag).  Byte
// numbering is this design's choice.  Combinational.
module spur_byte_insert
  import spur_pkg::*;
(
  input  word40_t    a,
  input  logic [7:0] b,
  input  logic [2:0] sel,
  output word40_t    y
);
  always_comb begin
    y = a;
    unique case (sel)
      3'd0:    y.data[7:0]   = b;
      3'd1:    y.data[15:8]  = b;
      3'd2:    y.data[23:16] = b;
      3'd3:    y.data[31:24] = b;
      default: {y.gen, y.typ} = b;
    endcase
  end
endmodule
