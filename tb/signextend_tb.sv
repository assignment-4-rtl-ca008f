// signextend_tb: checks the sign extension of 16-bit immediates: 0x80AB must
// give 0xFFFF80AB and 0x4012 0x00004012, then random halfwords against the
// arithmetic value of the signed 16-bit number.
module signextend_tb;
  logic [15:0] halfword;
  logic [31:0] fullword;
  int checks = 0, failures = 0;

  signextend dut (.halfword, .fullword);

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (fullword !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", halfword, fullword, exp);
    end
  endtask

  initial begin
    halfword = 16'h80AB; check(32'hFFFF_80AB);
    halfword = 16'h4012; check(32'h0000_4012);
    halfword = 16'hFFFF; check(32'hFFFF_FFFF);
    halfword = 16'h7FFF; check(32'h0000_7FFF);
    repeat (300) begin
      int v;
      halfword = 16'($urandom);
      v = int'(halfword) - ((halfword >= 16'h8000) ? 65536 : 0);
      check(32'(v));
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
