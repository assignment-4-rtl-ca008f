// ch5mem_tb: checks the unified memory. After startup the data words
// 0x10000000 and 0x10000004 must read 0x19 and 0x37 and the program segment
// the nine words of the preloaded program. It then checks that a write lands
// on the falling clock edge (not the rising one), that memread blocks a
// write, that reads are combinational and give 0 without memread or enable
// or for an unmapped address, that the program segment is writable too, and
// random traffic in both segments against a model.
module ch5mem_tb;
  logic        clock = 1'b0;
  logic        startup, enable, memread, memwrite;
  logic [31:0] memaddress, datain, dataout;
  int checks = 0, failures = 0;

  ch5mem dut (.clock, .startup, .enable, .memaddress, .memread, .memwrite,
              .datain, .dataout);

  localparam logic [31:0] PROG [9] = '{
    32'h8e080000, 32'h8e090004, 32'h0109502a, 32'h11400003, 32'h01285822,
    32'h08100007, 32'h01095822, 32'hae0b0008, 32'h8e080008
  };

  task automatic rd(input logic [31:0] addr, input logic [31:0] exp, input string what);
    memaddress = addr; memread = 1'b1; memwrite = 1'b0;
    #1;
    checks++;
    if (dataout !== exp) begin
      failures++;
      $display("FAIL %s: [%h]=%h exp %h", what, addr, dataout, exp);
    end
  endtask

  initial begin
    logic [31:0] mdl_d [64], mdl_p [64];
    enable = 1'b1; memread = 1'b0; memwrite = 1'b0; startup = 1'b0;
    memaddress = 32'h1000_0000; datain = 32'h0;
    #1 startup = 1'b1;
    #1 startup = 1'b0;
    rd(32'h1000_0000, 32'h19, "preloaded data 0");
    rd(32'h1000_0004, 32'h37, "preloaded data 1");
    foreach (PROG[i]) rd(32'h0040_0000 + 32'(4 * i), PROG[i], "preloaded program");
    rd(32'h0040_0002, PROG[0], "byte offset ignored");

    // Write: present it in the low clock phase, then go through a rising and
    // a falling edge.
    memread = 1'b0; memwrite = 1'b1; memaddress = 32'h1000_0000; datain = 32'h28;
    #2 clock = 1'b1;
    #2 memwrite = 1'b0;
    rd(32'h1000_0000, 32'h19, "no write on the rising edge");
    memread = 1'b0; memwrite = 1'b1;
    #2 clock = 1'b0;
    #1 memwrite = 1'b0;
    rd(32'h1000_0000, 32'h28, "write on the falling edge");

    // memread high blocks a write.
    memwrite = 1'b1; memread = 1'b1; datain = 32'hDEAD_BEEF;
    #2 clock = 1'b1; #2 clock = 1'b0; #1;
    rd(32'h1000_0000, 32'h28, "no write while reading");

    // Output is 0 when not reading, when disabled and for an unmapped address.
    memread = 1'b0; memwrite = 1'b0;
    #1 checks++; if (dataout !== 0) begin failures++; $display("FAIL no read"); end
    rd(32'h2000_0000, 32'h0, "unmapped address");
    enable = 1'b0;
    rd(32'h1000_0004, 32'h0, "disabled");
    enable = 1'b1;

    // Program segment write.
    memread = 1'b0; memwrite = 1'b1; memaddress = 32'h0040_0000; datain = 32'h0;
    #2 clock = 1'b1; #2 clock = 1'b0; #1;
    memwrite = 1'b0;
    rd(32'h0040_0000, 32'h0, "program segment rewritten");
    rd(32'h0040_0004, PROG[1], "neighbour unchanged");

    // Random traffic on the first 64 words of each segment.
    for (int i = 0; i < 64; i++) begin
      mdl_d[i] = $urandom; mdl_p[i] = $urandom;
      memread = 1'b0; memwrite = 1'b1; datain = mdl_d[i];
      memaddress = 32'h1000_0000 + 32'(4 * i);
      #2 clock = 1'b1; #2 clock = 1'b0; #1;
      datain = mdl_p[i]; memaddress = 32'h0040_0000 + 32'(4 * i);
      #2 clock = 1'b1; #2 clock = 1'b0; #1;
    end
    memwrite = 1'b0;
    repeat (200) begin
      int i;
      i = $urandom_range(63);
      rd(32'h1000_0000 + 32'(4 * i), mdl_d[i], "random data word");
      rd(32'h0040_0000 + 32'(4 * i), mdl_p[i], "random program word");
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
