// alucontrol: ALU control unit.
//
// Combinational decode of the 2-bit ALUOp from the main control and the
// funct field (instruction bits [5:0]) into the ALU's Binvert and 2-bit
// Operation. The CarryIn of bit 0 equals Binvert and is wired so in the
// datapath.
//   ALUOp 00 (lw/sw, PC arithmetic): add       Binvert 0, Operation 10
//   ALUOp 01 (beq):                  subtract  Binvert 1, Operation 10
//   ALUOp 10 (R-type), by funct:
//     100000 add 0/10, 100010 sub 1/10, 100100 and 0/00, 100101 or 0/01,
//     101010 slt 1/11; any other funct: 0/00 (AND).
//   ALUOp 11 (unused): 0/00.
// The table follows the design's description, including the AND fallback for
// unknown codes.
module alucontrol
  import mips_pkg::*;
(
  input  logic [1:0] ALUOp,
  input  logic [5:0] funct,
  output logic       Binvert,
  output logic [1:0] Operation
);

  always_comb begin
    Binvert   = 1'b0;
    Operation = ALU_AND;
    unique case (ALUOp)
      ALUOP_ADD: Operation = ALU_ADD;
      ALUOP_SUB: begin Binvert = 1'b1; Operation = ALU_ADD; end
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD:  Operation = ALU_ADD;
          FN_SUB:  begin Binvert = 1'b1; Operation = ALU_ADD; end
          FN_AND:  Operation = ALU_AND;
          FN_OR:   Operation = ALU_OR;
          FN_SLT:  begin Binvert = 1'b1; Operation = ALU_LESS; end
          default: Operation = ALU_AND;
        endcase
      end
      default: ;
    endcase
  end

endmodule
