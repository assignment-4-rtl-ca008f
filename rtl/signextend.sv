// signextend: sign extension of a 16-bit immediate to a 32-bit word.
//
// Combinational: the upper 16 bits of fullword are copies of halfword[15],
// the lower 16 bits are halfword itself. Used for the offset field of lw, sw
// and beq. Follows the design's description exactly.
module signextend (
  input  logic [15:0] halfword,
  output logic [31:0] fullword
);

  always_comb fullword = {{16{halfword[15]}}, halfword};

endmodule
