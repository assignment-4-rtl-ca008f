// wordalu_tb: checks the 32-bit ALU on the worked examples of its operation
// (AND, OR, additions and subtractions with and without signed overflow, slt
// for a < b, a = b, a > b) and on random operands against SystemVerilog
// arithmetic: Result, Overflow (signed overflow of a + b' + CarryIn, whatever
// the operation) and Zero.
module wordalu_tb;
  logic [31:0] a, b, Result;
  logic        Binvert, CarryIn, Overflow, Zero;
  logic [1:0]  Operation;
  int checks = 0, failures = 0;

  wordalu dut (.a, .b, .Binvert, .CarryIn, .Operation, .Result, .Overflow, .Zero);

  // Applies one operation and compares with the given result and overflow.
  task automatic vec(input logic [1:0] op, input logic inv, input logic [31:0] x,
                     input logic [31:0] y, input logic [31:0] exp_r, input logic exp_ov);
    Operation = op; Binvert = inv; CarryIn = inv; a = x; b = y;
    #1;
    checks += 3;
    if (Result !== exp_r) begin
      failures++;
      $display("FAIL op=%b inv=%b a=%h b=%h: result %h exp %h", op, inv, x, y, Result, exp_r);
    end
    if (Overflow !== exp_ov) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h: overflow %b exp %b", op, x, y, Overflow, exp_ov);
    end
    if (Zero !== (exp_r == 0)) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h: zero %b", op, x, y, Zero);
    end
  endtask

  // Signed overflow of x + (inv ? ~y : y) + inv, worked out on 33-bit signed values.
  function automatic logic ovf(input logic [31:0] x, input logic [31:0] y, input logic inv);
    longint sx, sy, s;
    sx = longint'($signed(x));
    sy = inv ? -longint'($signed(y)) : longint'($signed(y));
    s  = sx + sy;
    return (s > 64'sd2147483647) || (s < -64'sd2147483648);
  endfunction

  initial begin
    vec(2'b00, 0, 32'h3ff0606a, 32'h5bc0a4f2, 32'h1bc02062, 1);
    vec(2'b01, 0, 32'h3ff0606a, 32'h5bc0a4f2, 32'h7ff0e4fa, 1);
    vec(2'b10, 0, 32'h3ff0606a, 32'h3fc0a4f2, 32'h7fb1055c, 0);
    vec(2'b10, 0, 32'h7ff0606a, 32'h3fc0a4f2, 32'hbfb1055c, 1);
    vec(2'b10, 0, 32'hc4653600, 32'hbba22b40, 32'h80076140, 0);
    vec(2'b10, 0, 32'h44653600, 32'hbba22b40, 32'h00076140, 0);
    vec(2'b10, 0, 32'hbba22b40, 32'h44653600, 32'h00076140, 0);
    vec(2'b10, 1, 32'h3ff0606a, 32'h3fc0a4f2, 32'h002fbb78, 0);
    vec(2'b10, 1, 32'h3ff0606a, 32'hfffec780, 32'h3ff198ea, 0);
    vec(2'b10, 1, 32'h7ff0606a, 32'hffc2f700, 32'h802d696a, 1);
    vec(2'b10, 1, 32'hffc2f700, 32'h7ff0606a, 32'h7fd29696, 1);
    vec(2'b11, 1, 32'd5,  32'd28, 32'd1, 0);
    vec(2'b11, 1, 32'd54, 32'd54, 32'd0, 0);
    vec(2'b11, 1, 32'd54, 32'd5,  32'd0, 0);
    vec(2'b11, 1, 32'hfffffddf, 32'hfffffed4, 32'd1, 0);
    // slt across the overflow boundary: large positive vs. large negative.
    vec(2'b11, 1, 32'h7fffffff, 32'h80000000, 32'd0, 1);
    vec(2'b11, 1, 32'h80000000, 32'h7fffffff, 32'd1, 1);
    vec(2'b10, 1, 32'h12345678, 32'h12345678, 32'd0, 0);
    repeat (2000) begin
      logic [31:0] x, y, r;
      logic [1:0]  op;
      logic        inv;
      x = $urandom; y = $urandom; op = 2'($urandom); inv = 1'($urandom);
      if ($urandom_range(3) == 0) y = x;                  // exercise Zero
      if (op == 2'b11) inv = 1'b1;                        // slt always subtracts
      case (op)
        2'b00: r = x & (inv ? ~y : y);
        2'b01: r = x | (inv ? ~y : y);
        2'b10: r = inv ? x - y : x + y;
        default: r = {31'b0, $signed(x) < $signed(y)};
      endcase
      vec(op, inv, x, y, r, ovf(x, y, inv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
