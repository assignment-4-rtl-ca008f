// mux4_tb: checks that mux4 routes ch1..ch4 for sel 00..11, following input
// changes without any clock, on fixed and random words.
module mux4_tb;
  logic [1:0]  sel;
  logic [31:0] ch1, ch2, ch3, ch4, muxout;
  int checks = 0, failures = 0;

  mux4 dut (.sel, .ch1, .ch2, .ch3, .ch4, .muxout);

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (muxout !== exp) begin
      failures++;
      $display("FAIL sel=%b out=%h exp=%h", sel, muxout, exp);
    end
  endtask

  initial begin
    ch1 = 32'h10A0_00AA; ch2 = 32'h20B0_000B; ch3 = 32'h30C0_000C; ch4 = 32'h40D0_000D;
    sel = 2'b00; check(32'h10A0_00AA);
    ch1 = 32'h1110_00AA; check(32'h1110_00AA);
    ch1 = 32'h1220_00AA; check(32'h1220_00AA);
    sel = 2'b01; check(32'h20B0_000B);
    sel = 2'b10; check(32'h30C0_000C);
    sel = 2'b11; check(32'h40D0_000D);
    repeat (400) begin
      logic [31:0] v [4];
      foreach (v[i]) v[i] = $urandom;
      ch1 = v[0]; ch2 = v[1]; ch3 = v[2]; ch4 = v[3]; sel = 2'($urandom);
      check(v[sel]);
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
