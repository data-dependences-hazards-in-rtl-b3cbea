// imem: instruction memory of stage 1 ("IM" in the datapath figures).
//
// WORDS x 32-bit array. The fetch port is combinational: the PC register
// addresses it and the instruction is captured by the IR at the next rising
// edge, as in the figures. PC bits [1:0] are ignored (instructions are word
// aligned) and the word index wraps modulo WORDS. A separate synchronous
// write port loads the program; the document does not say how the
// instruction memory is filled, so this port and the size are this design's
// choices.
module imem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = 64      // width of the fetch address (PC)
) (
  input  logic          clk,
  // fetch
  input  logic [AW-1:0] addr,
  output logic [31:0]   insn,
  // program load
  input  logic          wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_idx,
  input  logic [31:0]   wr_data
);

  localparam int unsigned IW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
  end

  assign insn = mem[addr[IW+1:2]];

endmodule
