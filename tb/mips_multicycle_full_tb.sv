// mips_multicycle_full_tb: one complete run of the processor exactly as
// configured by default (preloaded absolute-difference program, inputs 0x19
// and 0x37). A mips_checker reference model checks every fetch PC, register
// write, memory write and cycle count; at the end the word at 0x10000008 and
// $t0 must hold |0x19 - 0x37| = 0x1E, reached in 34 cycles (boot plus
// 5+5+4+3+4+3+4+5 for lw, lw, slt, beq, sub, j, sw, lw).
module mips_multicycle_full_tb;
  import mips_pkg::*;

  logic clock = 1'b0;
  logic startup = 1'b0;
  logic active = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clock = ~clock;

  logic [2:0]  stage;
  logic [31:0] pc, ir, memaddress, memdatain, memdataout, writedata;
  logic [31:0] aout, bout, aluoutput, mdrout;
  logic        memread, memwrite, regwrite, pcload, zero, overflow;
  logic [4:0]  writereg;

  mips_multicycle dut (
    .clock, .startup, .stage, .pc, .ir, .memaddress, .memdatain, .memdataout,
    .memread, .memwrite, .regwrite, .writereg, .writedata, .aout, .bout,
    .aluoutput, .mdrout, .pcload, .zero, .overflow
  );

  int   c_checks, c_fail, n_boot, n_add, n_sub, n_and, n_or, n_slt;
  int   n_lw, n_sw, n_bt, n_bn, n_j, n_rs, n_instr, n_cyc;
  logic c_done;

  mips_checker chk (
    .clock, .active, .stage, .pc, .regwrite, .writereg, .writedata,
    .memwrite, .memaddress, .memdataout,
    .checks(c_checks), .failures(c_fail), .done(c_done),
    .n_boot, .n_add, .n_sub, .n_and, .n_or, .n_slt, .n_lw, .n_sw,
    .n_beq_taken(n_bt), .n_beq_not(n_bn), .n_j, .n_restart(n_rs),
    .n_instr, .n_cycles(n_cyc)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1 startup = 1'b1;
    active = 1'b1;
    #6 startup = 1'b0;
    wait (c_done);
    checks   += c_checks;
    failures += c_fail;
    check(dut.mem.data_block[2] == 32'h0000_001E, "result at 0x10000008");
    check(dut.regs.rf[8] == 32'h0000_001E, "$t0 reloaded with the result");
    check(n_instr == 8, $sformatf("%0d instructions, expected 8", n_instr));
    check(n_cyc - 1 == 34, $sformatf("%0d cycles, expected 34", n_cyc - 1));
    check(n_boot == 1 && n_bn == 1 && n_j == 1 && n_sw == 1 && n_lw == 3,
          "instruction mix of the program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
