// maincontrol: stage-sequenced main control of the multicycle processor.
//
// Combinational. From the current stage (stagein, held in an external 3-bit
// stage register) and the opcode (instruction bits [31:26]) it produces every
// datapath control signal of the current clock cycle and the stage of the
// next cycle (stageout). Each instruction class walks the stages
//   000 boot    PC <= 0x00400000 (PCSource 11, PCWrite)
//   001 fetch   IR <= Mem[PC], PC <= PC + 4
//   010 decode  A, B <= registers; ALUOut <= PC + (signext(imm) << 2)
//   011 execute R-type: ALUOut <= A op B; lw/sw: ALUOut <= A + signext(imm);
//               beq: PC <= ALUOut if A == B (ends); j: PC <= jump address (ends)
//   100 memory  R-type: rd <= ALUOut (ends); lw: MDR <= Mem[ALUOut];
//               sw: Mem[ALUOut] <= B (ends)
//   101 write   lw: rt <= MDR (ends)
// so R-type and sw take 4 cycles, lw 5, beq and j 3. An opcode outside the
// subset in stage 011 or 100 sends the machine to the boot stage, which
// restarts the program; stage codes 110 and 111 do the same.
// The stage encoding, the control values of every stage and the restart on an
// unknown opcode follow the design's description. Signals the description
// leaves unassigned in a stage (don't-cares) are driven 0 here.
module maincontrol
  import mips_pkg::*;
(
  input  logic [2:0] stagein,
  input  logic [5:0] opcode,
  output logic       PCWriteCond,
  output logic       PCWrite,
  output logic [1:0] PCSource,
  output logic       MemRead,
  output logic       MemWrite,
  output logic       IorD,
  output logic       IRWrite,
  output logic [1:0] ALUOp,
  output logic [1:0] ALUSrcB,
  output logic       ALUSrcA,
  output logic       RegWrite,
  output logic       RegDst,
  output logic       MemtoReg,
  output logic [2:0] stageout
);

  always_comb begin
    PCWriteCond = 1'b0;
    PCWrite     = 1'b0;
    PCSource    = 2'b00;
    MemRead     = 1'b0;
    MemWrite    = 1'b0;
    IorD        = 1'b0;
    IRWrite     = 1'b0;
    ALUOp       = ALUOP_ADD;
    ALUSrcB     = 2'b00;
    ALUSrcA     = 1'b0;
    RegWrite    = 1'b0;
    RegDst      = 1'b0;
    MemtoReg    = 1'b0;
    stageout    = ST_BOOT;

    unique case (stagein)
      ST_BOOT: begin
        PCWrite  = 1'b1;
        PCSource = 2'b11;             // boot address
        stageout = ST_FETCH;
      end
      ST_FETCH: begin
        PCWrite  = 1'b1;              // PC <= PC + 4
        MemRead  = 1'b1;
        IRWrite  = 1'b1;
        ALUSrcB  = 2'b01;             // constant 4
        stageout = ST_DECODE;
      end
      ST_DECODE: begin
        ALUSrcB  = 2'b11;             // branch offset << 2
        stageout = ST_EXEC;
      end
      ST_EXEC: begin
        unique case (opcode)
          OP_RTYPE: begin
            ALUOp = ALUOP_FUNCT; ALUSrcA = 1'b1; stageout = ST_MEM;
          end
          OP_LW, OP_SW: begin
            ALUSrcB = 2'b10; ALUSrcA = 1'b1; stageout = ST_MEM;
          end
          OP_BEQ: begin
            PCWriteCond = 1'b1; PCSource = 2'b01;
            ALUOp = ALUOP_SUB; ALUSrcA = 1'b1; stageout = ST_FETCH;
          end
          OP_J: begin
            PCWrite = 1'b1; PCSource = 2'b10; stageout = ST_FETCH;
          end
          default: stageout = ST_BOOT;
        endcase
      end
      ST_MEM: begin
        unique case (opcode)
          OP_RTYPE: begin
            RegWrite = 1'b1; RegDst = 1'b1; stageout = ST_FETCH;
          end
          OP_LW: begin
            IorD = 1'b1; MemRead = 1'b1; stageout = ST_WB;
          end
          OP_SW: begin
            IorD = 1'b1; MemWrite = 1'b1; stageout = ST_FETCH;
          end
          default: stageout = ST_BOOT;
        endcase
      end
      ST_WB: begin
        if (opcode == OP_LW) begin
          MemtoReg = 1'b1; RegWrite = 1'b1;
        end
        stageout = ST_FETCH;
      end
      default: stageout = ST_BOOT;
    endcase
  end

endmodule
