// maincontrol_tb: checks every control output and the next stage of the
// main control, for every stage and every opcode, against the step table of
// the multicycle machine. Each expectation is written as a string of fields
//   PCWriteCond PCWrite IorD MemRead MemWrite MemtoReg IRWrite PCSource
//   ALUOp ALUSrcB ALUSrcA RegWrite RegDst stageout
// where 'x' marks a don't-care. Write enables (PC, memory, IR, registers)
// are never don't-cares: they must be 0 where the table does not assert them.
module maincontrol_tb;
  logic [2:0] stagein, stageout;
  logic [5:0] opcode;
  logic PCWriteCond, PCWrite, MemRead, MemWrite, IorD, IRWrite, ALUSrcA;
  logic RegWrite, RegDst, MemtoReg;
  logic [1:0] PCSource, ALUOp, ALUSrcB;
  int checks = 0, failures = 0;

  maincontrol dut (.stagein, .opcode, .PCWriteCond, .PCWrite, .PCSource,
                   .MemRead, .MemWrite, .IorD, .IRWrite, .ALUOp, .ALUSrcB,
                   .ALUSrcA, .RegWrite, .RegDst, .MemtoReg, .stageout);

  localparam string BOOT    = "0 1 x 0 0 x 0 11 xx xx x 0 x 001";
  localparam string FETCH   = "0 1 0 1 0 x 1 00 00 01 0 0 x 010";
  localparam string DECODE  = "0 0 x 0 0 x 0 xx 00 11 0 0 x 011";
  localparam string EX_R    = "0 0 x 0 0 x 0 xx 10 00 1 0 x 100";
  localparam string EX_MEM  = "0 0 x 0 0 x 0 xx 00 10 1 0 x 100";
  localparam string EX_BEQ  = "1 0 x 0 0 x 0 01 01 00 1 0 x 001";
  localparam string EX_J    = "0 1 x 0 0 x 0 10 xx xx x 0 x 001";
  localparam string MEM_R   = "0 0 x 0 0 0 0 xx xx xx x 1 1 001";
  localparam string MEM_LW  = "0 0 1 1 0 x 0 xx xx xx x 0 x 101";
  localparam string MEM_SW  = "0 0 1 0 1 x 0 xx xx xx x 0 x 001";
  localparam string WB_LW   = "0 0 x 0 0 1 0 xx xx xx x 1 0 001";
  localparam string WB_IDLE = "0 0 x 0 0 x 0 xx xx xx x 0 x 001";
  localparam string RESTART = "0 0 x 0 0 x 0 xx xx xx x 0 x 000";

  task automatic vec(input logic [2:0] st, input logic [5:0] op, input string exp);
    logic [18:0] got, want, care;
    int k;
    stagein = st; opcode = op;
    #1;
    got = {PCWriteCond, PCWrite, IorD, MemRead, MemWrite, MemtoReg, IRWrite,
           PCSource, ALUOp, ALUSrcB, ALUSrcA, RegWrite, RegDst, stageout};
    k = 18;
    want = '0; care = '0;
    for (int i = 0; i < exp.len(); i++) begin
      if (exp[i] == "0" || exp[i] == "1" || exp[i] == "x") begin
        want[k] = exp[i] == "1";
        care[k] = exp[i] != "x";
        k--;
      end
    end
    checks++;
    if (((got ^ want) & care) != 0) begin
      failures++;
      $display("FAIL stage=%b opcode=%b: got %b want %s", st, op, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 64; o++) begin
      logic [5:0] op;
      op = 6'(o);
      vec(3'b000, op, BOOT);
      vec(3'b001, op, FETCH);
      vec(3'b010, op, DECODE);
      case (op)
        6'b000000: begin vec(3'b011, op, EX_R);   vec(3'b100, op, MEM_R);   vec(3'b101, op, WB_IDLE); end
        6'b100011: begin vec(3'b011, op, EX_MEM); vec(3'b100, op, MEM_LW);  vec(3'b101, op, WB_LW);   end
        6'b101011: begin vec(3'b011, op, EX_MEM); vec(3'b100, op, MEM_SW);  vec(3'b101, op, WB_IDLE); end
        6'b000100: begin vec(3'b011, op, EX_BEQ); vec(3'b100, op, RESTART); vec(3'b101, op, WB_IDLE); end
        6'b000010: begin vec(3'b011, op, EX_J);   vec(3'b100, op, RESTART); vec(3'b101, op, WB_IDLE); end
        default:   begin vec(3'b011, op, RESTART); vec(3'b100, op, RESTART); vec(3'b101, op, WB_IDLE); end
      endcase
      vec(3'b110, op, RESTART);
      vec(3'b111, op, RESTART);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
