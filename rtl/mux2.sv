// mux2: 2-to-1 multiplexer of W-bit words.
//
// Purely combinational: muxout follows ch1 when sel is 0 and ch2 when sel is
// 1, with no clock or latency. Channel naming (ch1 for select 0) follows the
// design's description; the width parameter W (default 32) is this design's
// own generalisation.
module mux2 #(
  parameter int W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] ch1,
  input  logic [W-1:0] ch2,
  output logic [W-1:0] muxout
);

  always_comb muxout = sel ? ch2 : ch1;

endmodule
