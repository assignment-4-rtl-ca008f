// regfile_tb: checks the register file's start-up contents (r0 = 0,
// r16 = 0x10000000, all others 0xFFFFFFFF), that both read ports follow
// their index at once without a clock edge, that a write takes effect only on
// the rising edge with RegWrite high, and random write/read traffic against a
// model array.
module regfile_tb;
  logic        clock = 1'b0;
  logic        startup, RegWrite;
  logic [4:0]  readreg1, readreg2, writereg;
  logic [31:0] writedata, readdata1, readdata2;
  int checks = 0, failures = 0;
  logic [31:0] model [32];

  regfile dut (.clock, .startup, .readreg1, .readreg2, .writereg, .writedata,
               .RegWrite, .readdata1, .readdata2);

  task automatic tick();
    #5 clock = 1'b1;
    #5 clock = 1'b0;
  endtask

  task automatic read_check(input logic [4:0] r1, input logic [4:0] r2, input string what);
    readreg1 = r1; readreg2 = r2;
    #1;
    checks += 2;
    if (readdata1 !== model[r1]) begin
      failures++;
      $display("FAIL %s: r%0d=%h exp %h", what, r1, readdata1, model[r1]);
    end
    if (readdata2 !== model[r2]) begin
      failures++;
      $display("FAIL %s: r%0d=%h exp %h", what, r2, readdata2, model[r2]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 32'hFFFF_FFFF;
    model[0] = 32'h0; model[16] = 32'h1000_0000;
    RegWrite = 1'b0; startup = 1'b0; writereg = 5'd1; writedata = 32'h01FF_AB00;
    #1 startup = 1'b1;
    #1 startup = 1'b0;
    for (int i = 0; i < 32; i += 2) read_check(5'(i), 5'(i + 1), "start-up contents");
    // A write needs RegWrite and a rising edge.
    tick();
    read_check(5'd0, 5'd1, "no write without RegWrite");
    RegWrite = 1'b1;
    #1 read_check(5'd0, 5'd1, "no write before the edge");
    tick();
    model[1] = 32'h01FF_AB00;
    read_check(5'd0, 5'd1, "write on the edge");
    read_check(5'd16, 5'd8, "other registers untouched");
    for (int i = 1; i <= 5; i++) begin
      writereg = 5'(i); writedata = 32'(i * 16);
      tick();
      model[i] = 32'(i * 16);
      read_check(5'(i - 1), 5'(i), "sequential writes");
    end
    repeat (300) begin
      RegWrite = 1'($urandom); writereg = 5'($urandom); writedata = $urandom;
      tick();
      if (RegWrite) model[writereg] = writedata;
      read_check(5'($urandom), 5'($urandom), "random traffic");
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
