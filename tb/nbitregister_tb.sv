// nbitregister_tb: checks the register's load on the rising edge (only with
// regload high), that it holds without regload, and that regclear clears it
// at once, without waiting for a clock edge, and keeps it clear. Runs on the
// default 32-bit register and a 3-bit one (the width of the stage register).
module nbitregister_tb;
  logic        clock = 1'b0;
  logic        regload, regclear;
  logic [31:0] win, wout;
  logic [2:0]  win3, wout3;
  int checks = 0, failures = 0;

  nbitregister dut (.clock, .regload, .regclear, .win, .wout);
  nbitregister #(.N(3)) dut3 (.clock, .regload, .regclear, .win(win3), .wout(wout3));

  task automatic check(input logic [31:0] exp, input logic [2:0] exp3, input string what);
    checks++;
    if (wout !== exp || wout3 !== exp3) begin
      failures++;
      $display("FAIL %s: out=%h/%h exp=%h/%h", what, wout, wout3, exp, exp3);
    end
  endtask

  task automatic tick();
    #5 clock = 1'b1;
    #5 clock = 1'b0;
  endtask

  initial begin
    logic [31:0] model;
    logic [2:0]  model3;
    win = 32'hFF02_01A2; win3 = 3'b101; regload = 1'b0; regclear = 1'b0;
    #1 regclear = 1'b1;
    #1 check(32'h0, 3'h0, "cleared at start");
    regclear = 1'b0;
    tick(); check(32'h0, 3'h0, "no load without regload");
    regload = 1'b1;
    #2 check(32'h0, 3'h0, "no load before the edge");
    tick(); check(32'hFF02_01A2, 3'b101, "load on rising edge");
    regload = 1'b0; win = 32'h1234_5678; win3 = 3'b010;
    tick(); check(32'hFF02_01A2, 3'b101, "hold");
    regclear = 1'b1;
    #1 check(32'h0, 3'h0, "asynchronous clear");
    regload = 1'b1;
    tick(); check(32'h0, 3'h0, "clear wins over load");
    regclear = 1'b0;
    model = '0; model3 = '0;
    repeat (200) begin
      win = $urandom; win3 = 3'($urandom); regload = 1'($urandom);
      tick();
      if (regload) begin model = win; model3 = win3; end
      check(model, model3, "random load/hold");
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
