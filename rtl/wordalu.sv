// wordalu: 32-bit ripple-carry ALU built from one-bit slices.
//
// Bits 0..30 are bitalu slices and bit 31 is an msbalu slice; the carry of
// each slice ripples into the next, and CarryIn enters bit 0. Operation
// (00 AND, 01 OR, 10 add, 11 set-on-less-than) and Binvert are broadcast to
// every slice; with Binvert = CarryIn = 1 the adders compute a - b. For slt
// the MSB slice's Set output (sign of a - b, corrected for overflow) is fed
// back to the Less input of bit 0, all other Less inputs being 0, so Result
// is 1 when a < b as signed numbers. Overflow comes from the MSB adder
// whatever the operation; Zero is the NOR of all Result bits.
// Combinational, no clock. The slice structure, ports and flag definitions
// follow the design's description; the overflow-corrected Set is this
// design's own choice (see msbalu).
module wordalu (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        Binvert,
  input  logic        CarryIn,
  input  logic [1:0]  Operation,
  output logic [31:0] Result,
  output logic        Overflow,
  output logic        Zero
);

  logic [31:0] c;     // c[i] is the carry into slice i
  logic        set;

  assign c[0] = CarryIn;

  bitalu bit0 (
    .a(a[0]), .b(b[0]), .cin(c[0]), .Binvert(Binvert), .Lessin(set),
    .operation(Operation), .Qo(Result[0]), .cout(c[1])
  );

  for (genvar i = 1; i < 31; i++) begin : g_bits
    bitalu slice (
      .a(a[i]), .b(b[i]), .cin(c[i]), .Binvert(Binvert), .Lessin(1'b0),
      .operation(Operation), .Qo(Result[i]), .cout(c[i+1])
    );
  end

  msbalu bit31 (
    .a(a[31]), .b(b[31]), .cin(c[31]), .Binvert(Binvert), .Lessin(1'b0),
    .operation(Operation), .Qo(Result[31]), .set(set), .overflow(Overflow)
  );

  assign Zero = ~|Result;

endmodule
