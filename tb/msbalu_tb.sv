// msbalu_tb: exhaustive check of the most-significant ALU slice over all 128
// input combinations. Overflow is worked out from signed 1-bit arithmetic on
// the sign bits (the carry into the MSB stands for the lower bits' sum), and
// Set is the sign of the exact result of a + b' + cin.
module msbalu_tb;
  logic a, b, cin, Binvert, Lessin, Qo, set, overflow;
  logic [1:0] operation;
  int checks = 0, failures = 0;

  msbalu dut (.a, .b, .cin, .Binvert, .Lessin, .operation, .Qo, .set, .overflow);

  initial begin
    for (int v = 0; v < 128; v++) begin
      int bb, total, sa, sb, exact;
      logic expq, expov, expset;
      {a, b, cin, Binvert, Lessin, operation} = 7'(v);
      #1;
      bb    = Binvert ? 1 - int'(b) : int'(b);
      total = int'(a) + bb + int'(cin);
      // In units of the MSB's weight the sign bits a and b' count -1 and the
      // carry from the lower bits +1; the lower bits add a non-negative
      // fraction. The word result fits only if this sum is -1 or 0.
      sa    = -int'(a);
      sb    = -bb;
      exact = sa + sb + int'(cin);
      expov  = (exact < -1) || (exact > 0);
      expset = exact < 0;
      case (operation)
        2'b00: expq = (a == 1'b1) && (bb == 1);
        2'b01: expq = (a == 1'b1) || (bb == 1);
        2'b10: expq = total % 2 == 1;
        default: expq = Lessin;
      endcase
      checks += 3;
      if (Qo !== expq)      begin failures++; $display("FAIL Qo v=%b", 7'(v)); end
      if (overflow !== expov) begin failures++; $display("FAIL overflow v=%b", 7'(v)); end
      if (set !== expset)   begin failures++; $display("FAIL set v=%b", 7'(v)); end
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
