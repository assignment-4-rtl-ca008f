// mips_multicycle: multicycle processor for a MIPS subset (add, sub, and, or,
// slt, lw, sw, beq, j) with its instruction/data memory.
//
// One ALU, one memory and one register file are shared over several clock
// cycles per instruction. Registers between the steps (PC, IR, MDR, A, B,
// ALUOut, all nbitregister) carry values from one cycle to the next, and a
// 3-bit stage register with the combinational maincontrol sequences the
// steps: boot (1 cycle after startup), then per instruction fetch, decode,
// execute, memory and write-back, taking 3 (beq, j), 4 (R-type, sw) or 5 (lw)
// cycles. The multiplexers choose:
//   memory address   IorD     : PC | ALUOut
//   write register   RegDst   : IR[20:16] | IR[15:11]
//   write data       MemtoReg : ALUOut | MDR
//   ALU operand a    ALUSrcA  : PC | A
//   ALU operand b    ALUSrcB  : B | 4 | signext(IR[15:0]) | signext << 2
//   next PC          PCSource : ALU result | ALUOut | jump address | BOOT_ADDR
// The jump address is {PC[31:28], IR[25:0], 2'b00}. The PC is written when
// PCWrite, or PCWriteCond and the ALU's Zero flag, is high. A, B, MDR and
// ALUOut load on every clock; IR loads on IRWrite. CarryIn of the ALU equals
// Binvert.
// Interface: clock and startup (asynchronous, active high; clears IR, MDR, A,
// B, ALUOut and the stage register, and loads the register file and memory
// contents). After startup falls the first rising edge is the boot cycle and
// the next starts the fetch of the instruction at BOOT_ADDR. The remaining
// ports expose internal state for observation. Concurrent assertions check
// three rules of the control table while the machine runs (no simultaneous
// memory read and write, IR loads only in fetch, no PCWrite with PCWriteCond).
// Structure, control and the boot stage follow the design's description. The
// memory enable is tied high as there; the 3-bit width of the stage register
// (a 32-bit register with 29 zero bits in the description) is this design's
// simplification.
module mips_multicycle
  import mips_pkg::*;
#(
  parameter word_t BOOT = BOOT_ADDR,
  parameter word_t DATA0 = 32'h0000_0019,
  parameter word_t DATA1 = 32'h0000_0037,
  parameter word_t PROGRAM [PROG_WORDS] = DEMO_PROGRAM
) (
  input  logic        clock,
  input  logic        startup,
  output logic [2:0]  stage,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] memaddress,
  output logic [31:0] memdatain,    // data read from memory
  output logic [31:0] memdataout,   // data presented for a memory write
  output logic        memread,
  output logic        memwrite,
  output logic        regwrite,
  output logic [4:0]  writereg,
  output logic [31:0] writedata,
  output logic [31:0] aout,
  output logic [31:0] bout,
  output logic [31:0] aluoutput,
  output logic [31:0] mdrout,
  output logic        pcload,
  output logic        zero,
  output logic        overflow
);

  // Control signals.
  logic       PCWriteCond, PCWrite, IorD, IRWrite, ALUSrcA, RegDst, MemtoReg;
  logic [1:0] PCSource, ALUOp, ALUSrcB;
  logic [2:0] next_stage;

  // Datapath nets.
  word_t readdata1, readdata2, signex, beqoffset, jaddr, pcin;
  word_t alu_a, alu_b, result;
  logic       Binvert;
  logic [1:0] Operation;

  // ---- state registers ----
  nbitregister #(.N(3)) statereg (
    .clock(clock), .regload(1'b1), .regclear(startup),
    .win(next_stage), .wout(stage)
  );

  nbitregister pc_reg (
    .clock(clock), .regload(pcload), .regclear(1'b0), .win(pcin), .wout(pc)
  );

  nbitregister ir_reg (
    .clock(clock), .regload(IRWrite), .regclear(startup),
    .win(memdatain), .wout(ir)
  );

  nbitregister mdr_reg (
    .clock(clock), .regload(1'b1), .regclear(startup),
    .win(memdatain), .wout(mdrout)
  );

  nbitregister a_reg (
    .clock(clock), .regload(1'b1), .regclear(startup),
    .win(readdata1), .wout(aout)
  );

  nbitregister b_reg (
    .clock(clock), .regload(1'b1), .regclear(startup),
    .win(readdata2), .wout(bout)
  );

  nbitregister aluout_reg (
    .clock(clock), .regload(1'b1), .regclear(startup),
    .win(result), .wout(aluoutput)
  );

  // ---- control ----
  maincontrol maincon (
    .stagein(stage), .opcode(ir[31:26]),
    .PCWriteCond(PCWriteCond), .PCWrite(PCWrite), .PCSource(PCSource),
    .MemRead(memread), .MemWrite(memwrite), .IorD(IorD), .IRWrite(IRWrite),
    .ALUOp(ALUOp), .ALUSrcB(ALUSrcB), .ALUSrcA(ALUSrcA),
    .RegWrite(regwrite), .RegDst(RegDst), .MemtoReg(MemtoReg),
    .stageout(next_stage)
  );

  alucontrol alucon (
    .ALUOp(ALUOp), .funct(ir[5:0]), .Binvert(Binvert), .Operation(Operation)
  );

  assign pcload = PCWrite | (PCWriteCond & zero);

  // ---- memory ----
  mux2 mx_iord (
    .sel(IorD), .ch1(pc), .ch2(aluoutput), .muxout(memaddress)
  );

  assign memdataout = bout;

  ch5mem #(.DATA0(DATA0), .DATA1(DATA1), .PROGRAM(PROGRAM)) mem (
    .clock(clock), .startup(startup), .enable(1'b1),
    .memaddress(memaddress), .memread(memread), .memwrite(memwrite),
    .datain(memdataout), .dataout(memdatain)
  );

  // ---- register file ----
  mux2 #(.W(5)) mx_regdst (
    .sel(RegDst), .ch1(ir[20:16]), .ch2(ir[15:11]), .muxout(writereg)
  );

  mux2 mx_memtoreg (
    .sel(MemtoReg), .ch1(aluoutput), .ch2(mdrout), .muxout(writedata)
  );

  regfile regs (
    .clock(clock), .startup(startup),
    .readreg1(ir[25:21]), .readreg2(ir[20:16]),
    .writereg(writereg), .writedata(writedata), .RegWrite(regwrite),
    .readdata1(readdata1), .readdata2(readdata2)
  );

  // ---- ALU and its operand selection ----
  signextend se (.halfword(ir[15:0]), .fullword(signex));
  assign beqoffset = {signex[29:0], 2'b00};

  mux2 mx_srca (
    .sel(ALUSrcA), .ch1(pc), .ch2(aout), .muxout(alu_a)
  );

  mux4 mx_srcb (
    .sel(ALUSrcB), .ch1(bout), .ch2(32'd4), .ch3(signex), .ch4(beqoffset),
    .muxout(alu_b)
  );

  wordalu alu (
    .a(alu_a), .b(alu_b), .Binvert(Binvert), .CarryIn(Binvert),
    .Operation(Operation), .Result(result), .Overflow(overflow), .Zero(zero)
  );

  // ---- next PC ----
  assign jaddr = {pc[31:28], ir[25:0], 2'b00};

  mux4 mx_srcpc (
    .sel(PCSource), .ch1(result), .ch2(aluoutput), .ch3(jaddr), .ch4(BOOT),
    .muxout(pcin)
  );

  // ---- rules of the control table ----
  // The single memory port never reads and writes in the same cycle, the IR
  // loads only in the fetch stage, and the unconditional and conditional PC
  // writes are never requested together.
  a_mem_port: assert property (@(posedge clock) disable iff (startup)
    !(memread && memwrite));
  a_ir_fetch: assert property (@(posedge clock) disable iff (startup)
    IRWrite |-> stage == ST_FETCH);
  a_pc_write: assert property (@(posedge clock) disable iff (startup)
    !(PCWrite && PCWriteCond));

endmodule
