// bitalu_tb: exhaustive check of the one-bit ALU slice over all 128 input
// combinations: AND / OR of a and the (optionally inverted) b, the full-adder
// sum and carry, and the pass-through of Less for operation 11.
module bitalu_tb;
  logic a, b, cin, Binvert, Lessin, Qo, cout;
  logic [1:0] operation;
  int checks = 0, failures = 0;

  bitalu dut (.a, .b, .cin, .Binvert, .Lessin, .operation, .Qo, .cout);

  initial begin
    for (int v = 0; v < 128; v++) begin
      int bb, total;
      logic expq;
      {a, b, cin, Binvert, Lessin, operation} = 7'(v);
      #1;
      bb    = Binvert ? 1 - int'(b) : int'(b);
      total = int'(a) + bb + int'(cin);
      case (operation)
        2'b00: expq = (a == 1'b1) && (bb == 1);
        2'b01: expq = (a == 1'b1) || (bb == 1);
        2'b10: expq = total % 2 == 1;
        default: expq = Lessin;
      endcase
      checks += 2;
      if (Qo !== expq) begin
        failures++;
        $display("FAIL Qo v=%b got %b exp %b", 7'(v), Qo, expq);
      end
      if (cout !== (total >= 2)) begin
        failures++;
        $display("FAIL cout v=%b", 7'(v));
      end
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
