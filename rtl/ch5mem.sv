// ch5mem: unified instruction/data memory of the multicycle processor.
//
// Two 256-word segments on a 32-bit byte address: the program segment at
// 0x00400000-0x004003FF and the data segment at 0x10000000-0x100003FF.
// Address bits [31:10] select the segment and bits [9:2] the word; the two
// low bits are ignored (word accesses only). Other addresses hit nothing.
//   Read:  combinational. While enable and memread are high, dataout is the
//          addressed word; otherwise (and for an unmapped address) it is 0.
//   Write: on the falling clock edge, when enable and memwrite are high and
//          memread is low, datain is stored at the addressed word. Writing on
//          the falling edge lets the processor present address and data from
//          registers updated on the preceding rising edge.
//   startup (asynchronous, active high) preloads PROGRAM into the first
//          words of the program segment and DATA0, DATA1 into data words 0
//          and 1 (0x10000000, 0x10000004). Other words are not initialised.
// The memory map, segment sizes, combinational read, falling-edge write, the
// read-over-write priority and the start-up preload follow the design's
// description. Returning 0 instead of a high-impedance bus when not reading
// is this design's own choice.
module ch5mem
  import mips_pkg::*;
#(
  parameter word_t DATA0 = 32'h0000_0019,
  parameter word_t DATA1 = 32'h0000_0037,
  parameter word_t PROGRAM [PROG_WORDS] = DEMO_PROGRAM
) (
  input  logic        clock,
  input  logic        startup,
  input  logic        enable,
  input  logic [31:0] memaddress,
  input  logic        memread,
  input  logic        memwrite,
  input  logic [31:0] datain,
  output logic [31:0] dataout
);

  localparam int WORDS = 256;

  word_t data_block    [WORDS];
  word_t program_block [WORDS];

  logic [7:0] index;
  logic       in_data, in_prog;

  assign index   = memaddress[9:2];
  assign in_data = memaddress[31:10] == SEG_DATA;
  assign in_prog = memaddress[31:10] == SEG_PROG;

  logic wr;
  assign wr = enable && memwrite && !memread;

  // One register per word: the preloaded words have an asynchronous load on
  // startup, the others are plain falling-edge storage.
  for (genvar i = 0; i < WORDS; i++) begin : g_word
    word_t pw, dw;
    logic  pwe, dwe;

    assign pwe = wr && in_prog && index == 8'(i);
    assign dwe = wr && in_data && index == 8'(i);
    assign program_block[i] = pw;
    assign data_block[i]    = dw;

    if (i < PROG_WORDS) begin : g_prog_init
      always_ff @(negedge clock or posedge startup)
        if (startup)  pw <= PROGRAM[i];
        else if (pwe) pw <= datain;
    end else begin : g_prog
      always_ff @(negedge clock)
        if (pwe) pw <= datain;
    end

    if (i < 2) begin : g_data_init
      always_ff @(negedge clock or posedge startup)
        if (startup)  dw <= (i == 0) ? DATA0 : DATA1;
        else if (dwe) dw <= datain;
    end else begin : g_data
      always_ff @(negedge clock)
        if (dwe) dw <= datain;
    end
  end

  always_comb begin
    dataout = '0;
    if (enable && memread) begin
      if (in_data)      dataout = data_block[index];
      else if (in_prog) dataout = program_block[index];
    end
  end

endmodule
