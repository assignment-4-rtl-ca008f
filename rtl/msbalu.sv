// msbalu: most-significant-bit slice of the ripple-carry word ALU.
//
// Like bitalu (AND, OR, sum or Less selected by operation, b inverted by
// Binvert) but, instead of a carry out, it produces two flags computed from
// its full adder whatever the operation:
//   overflow = carry into the MSB XOR carry out of the MSB (signed overflow of
//              a + b' + cin);
//   set      = the sign of the true result of a - b, i.e. sum XOR overflow,
//              which is routed to the Less input of bit 0 for slt.
// Combinational. Ports follow the design's description; the internals,
// including the overflow correction of set, are this design's own choice.
module msbalu (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic       Binvert,
  input  logic       Lessin,
  input  logic [1:0] operation,
  output logic       Qo,
  output logic       set,
  output logic       overflow
);

  logic bb, sum, cout;

  always_comb begin
    bb       = b ^ Binvert;
    sum      = a ^ bb ^ cin;
    cout     = (a & bb) | (a & cin) | (bb & cin);
    overflow = cin ^ cout;
    set      = sum ^ overflow;
    unique case (operation)
      2'b00:   Qo = a & bb;
      2'b01:   Qo = a | bb;
      2'b10:   Qo = sum;
      default: Qo = Lessin;
    endcase
  end

endmodule
