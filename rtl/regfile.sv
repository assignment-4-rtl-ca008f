// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// Reads are combinational: readdata1/readdata2 follow readreg1/readreg2
// immediately, without waiting for a clock edge. A write of writedata to
// register writereg happens on the rising clock edge while RegWrite is high.
// startup (asynchronous, active high) loads the predefined contents:
// register 0 = 0, register 16 ($s0) = 0x10000000 (base of the data segment),
// every other register = 0xFFFFFFFF.
// The predefined contents and the combinational reads follow the design's
// description. The edge-triggered write and the startup input that loads the
// contents are this design's own choices (the description shows a write
// without a clock-edge condition and contents set only at time zero).
// Register 0 is writable like the others, as in the description; the supported
// programs never write it.
module regfile
  import mips_pkg::*;
(
  input  logic        clock,
  input  logic        startup,
  input  logic [4:0]  readreg1,
  input  logic [4:0]  readreg2,
  input  logic [4:0]  writereg,
  input  logic [31:0] writedata,
  input  logic        RegWrite,
  output logic [31:0] readdata1,
  output logic [31:0] readdata2
);

  word_t rf [32];

  always_ff @(posedge clock or posedge startup) begin
    if (startup) begin
      for (int i = 0; i < 32; i++) rf[i] <= 32'hFFFF_FFFF;
      rf[0]  <= '0;
      rf[16] <= DATA_BASE;
    end else if (RegWrite) begin
      rf[writereg] <= writedata;
    end
  end

  assign readdata1 = rf[readreg1];
  assign readdata2 = rf[readreg2];

endmodule
