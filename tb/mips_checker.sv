// mips_checker: instruction-level reference model that checks a running
// mips_multicycle from its observation ports.
//
// It keeps its own copy of the architectural state (32 registers, the data
// segment, the program) and executes one instruction each time the processor
// enters the fetch stage. Sampling on the falling clock edge, it checks
//   - the PC of every fetched instruction,
//   - every register write (index and value) and every memory write
//     (address and data) against the model, and that each expected write
//     happened exactly once,
//   - the number of cycles each instruction took: 3 for beq and j, 4 for
//     R-type and sw, 5 for lw, and 4 (fetch, decode, execute, boot) for an
//     opcode outside the subset, which restarts the program at BOOT.
// It counts which mechanisms occurred (boot, each R-type function, lw, sw,
// taken and untaken branches, jumps, restarts) and raises done once MAX_INSTR
// instructions have been checked or the model's PC leaves the program.
module mips_checker
  import mips_pkg::*;
#(
  parameter word_t BOOT = BOOT_ADDR,
  parameter word_t DATA0 = 32'h0000_0019,
  parameter word_t DATA1 = 32'h0000_0037,
  parameter word_t PROGRAM [PROG_WORDS] = DEMO_PROGRAM,
  parameter int    MAX_INSTR = 100
) (
  input  logic        clock,
  input  logic        active,
  input  logic [2:0]  stage,
  input  logic [31:0] pc,
  input  logic        regwrite,
  input  logic [4:0]  writereg,
  input  logic [31:0] writedata,
  input  logic        memwrite,
  input  logic [31:0] memaddress,
  input  logic [31:0] memdataout,
  output int          checks,
  output int          failures,
  output logic        done,
  output int          n_boot,
  output int          n_add, n_sub, n_and, n_or, n_slt,
  output int          n_lw, n_sw, n_beq_taken, n_beq_not, n_j, n_restart,
  output int          n_instr,
  output int          n_cycles
);

  word_t regs [32];
  word_t dmem [256];

  word_t m_pc;            // PC of the instruction being executed
  int    exp_cycles;      // cycles it should take
  int    cyc;             // cycles seen since its fetch
  logic  exp_rw, exp_mw;  // expected register / memory write
  logic [4:0] exp_rd;
  word_t exp_rv, exp_ma, exp_mv;
  int    seen_rw, seen_mw;
  logic  started;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%m FAIL @%0t pc=%h: %s", $time, m_pc, what);
    end
  endtask

  // Executes the instruction at m_pc in the model and sets the expectations.
  task automatic model_step();
    word_t instr, a, b, simm, v, next;
    int    idx;
    idx   = int'((m_pc - BOOT) >> 2);
    instr = PROGRAM[idx];
    a     = regs[instr[25:21]];
    b     = regs[instr[20:16]];
    simm  = {{16{instr[15]}}, instr[15:0]};
    next  = m_pc + 4;
    exp_rw = 1'b0; exp_mw = 1'b0;
    case (instr[31:26])
      OP_RTYPE: begin
        case (instr[5:0])
          FN_ADD:  begin v = a + b; n_add++; end
          FN_SUB:  begin v = a - b; n_sub++; end
          FN_OR:   begin v = a | b; n_or++;  end
          FN_SLT:  begin v = {31'b0, $signed(a) < $signed(b)}; n_slt++; end
          default: begin v = a & b; n_and++; end
        endcase
        exp_rw = 1'b1; exp_rd = instr[15:11]; exp_rv = v; exp_cycles = 4;
      end
      OP_LW: begin
        exp_rw = 1'b1; exp_rd = instr[20:16];
        exp_rv = dmem[8'((a + simm) >> 2)]; exp_cycles = 5; n_lw++;
      end
      OP_SW: begin
        exp_mw = 1'b1; exp_ma = a + simm; exp_mv = b; exp_cycles = 4; n_sw++;
      end
      OP_BEQ: begin
        if (a == b) begin next = m_pc + 4 + (simm << 2); n_beq_taken++; end
        else n_beq_not++;
        exp_cycles = 3;
      end
      OP_J: begin
        next = {next[31:28], instr[25:0], 2'b00}; exp_cycles = 3; n_j++;
      end
      default: begin next = BOOT; exp_cycles = 4; n_restart++; end
    endcase
    // Commit the model's own state.
    if (exp_rw) regs[exp_rd] = exp_rv;
    if (exp_mw && exp_ma[31:10] == SEG_DATA) dmem[exp_ma[9:2]] = exp_mv;
    m_pc = next;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; started = 1'b0;
    n_boot = 0; n_add = 0; n_sub = 0; n_and = 0; n_or = 0; n_slt = 0;
    n_lw = 0; n_sw = 0; n_beq_taken = 0; n_beq_not = 0; n_j = 0;
    n_restart = 0; n_instr = 0; n_cycles = 0; cyc = 0;
    seen_rw = 0; seen_mw = 0; exp_rw = 1'b0; exp_mw = 1'b0; exp_cycles = 0;
    for (int i = 0; i < 32; i++) regs[i] = 32'hFFFF_FFFF;
    regs[0] = '0; regs[16] = DATA_BASE;
    for (int i = 0; i < 256; i++) dmem[i] = '0;
    dmem[0] = DATA0; dmem[1] = DATA1;
    m_pc = BOOT;
  end

  always @(negedge clock) begin
    if (active && !done) begin
      n_cycles++;
      if (stage == ST_BOOT) n_boot++;
      if (started) cyc++;
      if (regwrite) begin
        seen_rw++;
        check(exp_rw && writereg == exp_rd && writedata == exp_rv,
              $sformatf("register write r%0d=%h, expected r%0d=%h (%0d)",
                        writereg, writedata, exp_rd, exp_rv, exp_rw));
      end
      if (memwrite) begin
        seen_mw++;
        check(exp_mw && memaddress == exp_ma && memdataout == exp_mv,
              $sformatf("memory write [%h]=%h, expected [%h]=%h",
                        memaddress, memdataout, exp_ma, exp_mv));
      end
      if (stage == ST_FETCH) begin
        if (started) begin
          // Close the previous instruction.
          check(cyc == exp_cycles,
                $sformatf("took %0d cycles, expected %0d", cyc, exp_cycles));
          check(seen_rw == int'(exp_rw), "register write count");
          check(seen_mw == int'(exp_mw), "memory write count");
          n_instr++;
        end
        started = 1'b1;
        cyc = 0; seen_rw = 0; seen_mw = 0;
        check(pc == m_pc, $sformatf("fetch PC %h, expected %h", pc, m_pc));
        if (n_instr >= MAX_INSTR || m_pc - BOOT >= 32'(4 * PROG_WORDS)) done = 1'b1;
        else model_step();
      end
    end
  end

endmodule
