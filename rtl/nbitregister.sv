// nbitregister: N-bit register with load enable and asynchronous clear.
//
// On a rising clock edge with regload high the register takes win; it then
// holds that value until the next load or a clear. regclear is asynchronous
// and active high: while it is high the register reads all zeros. The output
// wout is the stored value. In the processor this one module serves as PC,
// IR, MDR, A, B, ALUOut and the stage register. Width, load and clear
// behaviour follow the design's description; the parameter name N is the
// width (default 32).
module nbitregister #(
  parameter int N = 32
) (
  input  logic         clock,
  input  logic         regload,
  input  logic         regclear,
  input  logic [N-1:0] win,
  output logic [N-1:0] wout
);

  always_ff @(posedge clock or posedge regclear) begin
    if (regclear)     wout <= '0;
    else if (regload) wout <= win;
  end

endmodule
