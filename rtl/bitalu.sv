// bitalu: one-bit slice of the ripple-carry word ALU.
//
// The b input is inverted when Binvert is set, so that a full adder with
// cin = 1 computes a - b. operation selects the slice output Qo:
// 00 a AND b', 01 a OR b', 10 the full-adder sum a + b' + cin, 11 the Less
// input (which carries the slt result into bit 0 and is 0 elsewhere). cout is
// the full-adder carry and is produced whatever the operation.
// Combinational. The slice's ports and operation encoding follow the design's
// description; its internals (the classic AND/OR/adder/Less selector) are this
// design's own, since the slice is only named there.
module bitalu (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic       Binvert,
  input  logic       Lessin,
  input  logic [1:0] operation,
  output logic       Qo,
  output logic       cout
);

  logic bb, sum;

  always_comb begin
    bb   = b ^ Binvert;
    sum  = a ^ bb ^ cin;
    cout = (a & bb) | (a & cin) | (bb & cin);
    unique case (operation)
      2'b00:   Qo = a & bb;
      2'b01:   Qo = a | bb;
      2'b10:   Qo = sum;
      default: Qo = Lessin;
    endcase
  end

endmodule
