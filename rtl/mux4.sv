// mux4: 4-to-1 multiplexer of W-bit words.
//
// Purely combinational: sel = 00, 01, 10, 11 routes ch1, ch2, ch3, ch4 to
// muxout. In the datapath it selects the ALU's second operand (B, 4,
// immediate, immediate << 2) and the next PC (ALU result, ALUOut, jump
// address, boot address). Channel order follows the design's description; the
// width parameter W (default 32) is this design's own generalisation.
module mux4 #(
  parameter int W = 32
) (
  input  logic [1:0]   sel,
  input  logic [W-1:0] ch1,
  input  logic [W-1:0] ch2,
  input  logic [W-1:0] ch3,
  input  logic [W-1:0] ch4,
  output logic [W-1:0] muxout
);

  always_comb begin
    unique case (sel)
      2'b00:   muxout = ch1;
      2'b01:   muxout = ch2;
      2'b10:   muxout = ch3;
      default: muxout = ch4;
    endcase
  end

endmodule
