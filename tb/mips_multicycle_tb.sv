// mips_multicycle_tb: end-to-end test of the multicycle processor.
//
// Four processors run side by side, each checked instruction by instruction
// by a mips_checker reference model (PC, register and memory writes, cycles
// per instruction):
//   u_doc  the preloaded absolute-difference program with the default inputs
//          0x19 and 0x37: slt gives 1, the beq falls through, the j is taken;
//   u_rev  the same program with the inputs swapped: the beq is taken and,
//          as its offset of 3 lands on the sw at 0x0040001C, the routine
//          stores the start-up value of $t3 (0xFFFFFFFF);
//   u_neg  the same program with negative inputs 0xFFFFFF19 and 0xFFFFFF37;
//   u_mix  a program using add, and, or, a taken beq and an opcode outside
//          the subset, which must restart the program from the boot address.
// u_doc and u_neg must leave 0x1E at 0x10000008 and in $t0, and the
// default run must take 34 cycles from boot to the fetch after its last
// instruction (1 boot + 5+5+4+3+4+3+4+5). Each mechanism (boot, every R-type
// function, lw, sw, taken and untaken beq, j, restart, the conditional PC
// load) must occur at least once.
module mips_multicycle_tb;
  import mips_pkg::*;

  localparam word_t MIX_PROGRAM [PROG_WORDS] = '{
    32'h8e08_0000,   // lw   $t0, 0($s0)
    32'h8e09_0004,   // lw   $t1, 4($s0)
    32'h0109_5020,   // add  $t2, $t0, $t1
    32'h0109_5824,   // and  $t3, $t0, $t1
    32'h0109_6025,   // or   $t4, $t0, $t1
    32'hae0a_0008,   // sw   $t2, 8($s0)
    32'h1108_0001,   // beq  $t0, $t0, +1 (always taken)
    32'hae0b_000c,   // sw   $t3, 12($s0) (skipped)
    32'hfc00_0000    // opcode 111111: not in the subset, restarts
  };

  logic clock = 1'b0;
  logic startup = 1'b0;
  logic active = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clock = ~clock;

  // Observation ports of the four processors.
  typedef struct {
    logic [2:0]  stage;
    logic [31:0] pc, ir, memaddress, memdatain, memdataout, writedata;
    logic [31:0] aout, bout, aluoutput, mdrout;
    logic        memread, memwrite, regwrite, pcload, zero, overflow;
    logic [4:0]  writereg;
  } obs_t;

  obs_t o [4];
  int   c_checks [4], c_fail [4];
  logic c_done [4];
  int   n_boot [4], n_add [4], n_sub [4], n_and [4], n_or [4], n_slt [4];
  int   n_lw [4], n_sw [4], n_bt [4], n_bn [4], n_j [4], n_rs [4];
  int   n_instr [4], n_cyc [4];
  int   n_condload [4];
  word_t r_m2 [4];          // word at 0x10000008 when the run completed
  word_t r_rf [4][32];      // register file when the run completed

  `define MIPS_INST(I, NAME, D0, D1, PROG, MAXI)                              \
    mips_multicycle #(.DATA0(D0), .DATA1(D1), .PROGRAM(PROG)) NAME (           \
      .clock(clock), .startup(startup), .stage(o[I].stage), .pc(o[I].pc),     \
      .ir(o[I].ir), .memaddress(o[I].memaddress),                             \
      .memdatain(o[I].memdatain), .memdataout(o[I].memdataout),               \
      .memread(o[I].memread), .memwrite(o[I].memwrite),                       \
      .regwrite(o[I].regwrite), .writereg(o[I].writereg),                     \
      .writedata(o[I].writedata), .aout(o[I].aout), .bout(o[I].bout),         \
      .aluoutput(o[I].aluoutput), .mdrout(o[I].mdrout), .pcload(o[I].pcload), \
      .zero(o[I].zero), .overflow(o[I].overflow));                            \
    mips_checker #(.DATA0(D0), .DATA1(D1), .PROGRAM(PROG), .MAX_INSTR(MAXI))  \
    chk_``NAME (                                                              \
      .clock(clock), .active(active), .stage(o[I].stage), .pc(o[I].pc),       \
      .regwrite(o[I].regwrite), .writereg(o[I].writereg),                     \
      .writedata(o[I].writedata), .memwrite(o[I].memwrite),                   \
      .memaddress(o[I].memaddress), .memdataout(o[I].memdataout),             \
      .checks(c_checks[I]), .failures(c_fail[I]), .done(c_done[I]),           \
      .n_boot(n_boot[I]), .n_add(n_add[I]), .n_sub(n_sub[I]),                 \
      .n_and(n_and[I]), .n_or(n_or[I]), .n_slt(n_slt[I]), .n_lw(n_lw[I]),     \
      .n_sw(n_sw[I]), .n_beq_taken(n_bt[I]), .n_beq_not(n_bn[I]),             \
      .n_j(n_j[I]), .n_restart(n_rs[I]), .n_instr(n_instr[I]),                \
      .n_cycles(n_cyc[I]));                                                   \
    always @(negedge clock)                                                   \
      if (active && !c_done[I] && o[I].stage == ST_EXEC &&                    \
          o[I].ir[31:26] == OP_BEQ && o[I].pcload) n_condload[I]++;          \
    always @(posedge c_done[I]) begin                                         \
      r_m2[I] = NAME.mem.data_block[2];                                       \
      for (int k = 0; k < 32; k++) r_rf[I][k] = NAME.regs.rf[k];              \
    end

  `MIPS_INST(0, u_doc, 32'h0000_0019, 32'h0000_0037, DEMO_PROGRAM, 100)
  `MIPS_INST(1, u_rev, 32'h0000_0037, 32'h0000_0019, DEMO_PROGRAM, 100)
  `MIPS_INST(2, u_neg, 32'hFFFF_FF19, 32'hFFFF_FF37, DEMO_PROGRAM, 100)
  `MIPS_INST(3, u_mix, 32'h0000_0019, 32'h0000_0037, MIX_PROGRAM, 14)

  `undef MIPS_INST

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic need(input int n, input string what);
    check(n > 0, {"mechanism never happened: ", what});
    $display("  %-28s %0d", what, n);
  endtask

  function automatic int sum(input int v [4]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    foreach (n_condload[i]) n_condload[i] = 0;
    // startup spans the first rising edge; the next edge ends the boot cycle.
    #1 startup = 1'b1;
    active = 1'b1;
    #6 startup = 1'b0;
    wait (c_done[0] && c_done[1] && c_done[2] && c_done[3]);
    @(negedge clock);

    foreach (c_checks[i]) begin
      checks   += c_checks[i];
      failures += c_fail[i];
    end
    foreach (r_m2[i]) if (i != 1 && i != 3) begin
      check(r_m2[i] == 32'h0000_001E, $sformatf("run %0d: result at 0x10000008", i));
      check(r_rf[i][8] == 32'h0000_001E, $sformatf("run %0d: $t0 reloaded", i));
    end
    // The preloaded beq (offset 3) targets 0x0040001C, the store, so a taken
    // branch stores $t3 as it was at start-up.
    check(r_m2[1] == 32'hFFFF_FFFF, "u_rev: taken branch stores the start-up $t3");
    check(r_rf[1][11] == 32'hFFFF_FFFF, "u_rev: $t3 untouched");
    check(r_m2[3] == 32'h0000_0050, "u_mix: sum at 0x10000008");
    check(r_rf[3][10] == 32'h0000_0050, "u_mix: add result");
    check(r_rf[3][11] == 32'h0000_0011, "u_mix: and result");
    check(r_rf[3][12] == 32'h0000_003F, "u_mix: or result");
    check(n_instr[0] == 8 && n_cyc[0] == 34 + 1,
          $sformatf("u_doc ran %0d instructions in %0d cycles, expected 8 in 34",
                    n_instr[0], n_cyc[0] - 1));
    check(n_instr[1] == 6, "u_rev takes the branch and runs 6 instructions");
    check(n_instr[2] == 8, "u_neg falls through and runs 8 instructions");

    $display("mechanisms:");
    need(sum(n_boot), "boot");
    need(sum(n_add), "add");
    need(sum(n_sub), "sub");
    need(sum(n_and), "and");
    need(sum(n_or), "or");
    need(sum(n_slt), "slt");
    need(sum(n_lw), "lw");
    need(sum(n_sw), "sw");
    need(sum(n_bt), "beq taken");
    need(sum(n_bn), "beq not taken");
    need(sum(n_j), "j");
    need(sum(n_rs), "restart on unknown opcode");
    need(sum(n_condload), "PC load by PCWriteCond");
    check(n_boot[3] == 2, "u_mix booted twice");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
