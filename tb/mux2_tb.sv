// mux2_tb: checks that mux2 passes ch1 for sel 0 and ch2 for sel 1, with the
// output following input changes without any clock, on fixed and random words.
module mux2_tb;
  logic        sel;
  logic [31:0] ch1, ch2, muxout;
  int checks = 0, failures = 0;

  mux2 dut (.sel, .ch1, .ch2, .muxout);

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (muxout !== exp) begin
      failures++;
      $display("FAIL sel=%b ch1=%h ch2=%h out=%h exp=%h", sel, ch1, ch2, muxout, exp);
    end
  endtask

  initial begin
    ch1 = 32'h0AAA_00AA; ch2 = 32'h0B00_000B; sel = 1'b0; check(32'h0AAA_00AA);
    ch1 = 32'h1A1A_11AA; check(32'h1A1A_11AA);
    ch1 = 32'hA00A_00AA; check(32'hA00A_00AA);
    sel = 1'b1;          check(32'h0B00_000B);
    ch2 = 32'h0C00_000C; check(32'h0C00_000C);
    ch2 = 32'h0D00_000D; check(32'h0D00_000D);
    repeat (200) begin
      ch1 = $urandom; ch2 = $urandom; sel = 1'($urandom);
      check(sel ? ch2 : ch1);
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
