// alucontrol_tb: checks the ALU control decode against the control table:
// ALUOp 00 -> add (Binvert 0, Operation 10) and 01 -> subtract (1, 10)
// whatever the funct field; ALUOp 10 decodes add, sub, and, or, slt from
// funct; other funct codes and ALUOp 11 give AND (0, 00).
module alucontrol_tb;
  logic [1:0] ALUOp, Operation;
  logic [5:0] funct;
  logic       Binvert;
  int checks = 0, failures = 0;

  alucontrol dut (.ALUOp, .funct, .Binvert, .Operation);

  task automatic vec(input logic [1:0] op, input logic [5:0] f, input logic [2:0] exp);
    ALUOp = op; funct = f;
    #1;
    checks++;
    if ({Binvert, Operation} !== exp) begin
      failures++;
      $display("FAIL ALUOp=%b funct=%b: got %b%b exp %b", op, f, Binvert, Operation, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      vec(2'b00, 6'(f), 3'b010);
      vec(2'b01, 6'(f), 3'b110);
      vec(2'b11, 6'(f), 3'b000);
      case (f)
        6'h20:   vec(2'b10, 6'(f), 3'b010);   // add
        6'h22:   vec(2'b10, 6'(f), 3'b110);   // sub
        6'h24:   vec(2'b10, 6'(f), 3'b000);   // and
        6'h25:   vec(2'b10, 6'(f), 3'b001);   // or
        6'h2A:   vec(2'b10, 6'(f), 3'b111);   // slt
        default: vec(2'b10, 6'(f), 3'b000);
      endcase
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
