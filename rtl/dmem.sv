// dmem: data memory of stage 4 ("DM" in the datapath figures).
//
// Byte-addressed array of BYTES bytes accessed one XLEN-bit doubleword at a
// time, little-endian, at any byte address (the document's example reads
// address 140, which is not a multiple of eight). Addresses wrap modulo
// BYTES. Reads are combinational: Addr comes from the stage-4 ALU result
// register and Dout is captured by the stage-5 register at the next edge.
// A write (we, from mwe4) stores Din at the rising clock edge. rd (from
// mrd4) is an input of the block as in the figures; the read port drives
// Dout whether or not it is set, and the write-back mux decides whether the
// value is used. Size, byte order and unaligned access are this design's
// choices; accesses are made in program order, so the memory itself causes
// no data hazards.
module dmem #(
  parameter int unsigned XLEN  = 64,
  parameter int unsigned BYTES = 4096
) (
  input  logic            clk,
  input  logic            we,
  input  logic            rd,
  input  logic [XLEN-1:0] addr,
  input  logic [XLEN-1:0] din,
  output logic [XLEN-1:0] dout
);

  localparam int unsigned BW = $clog2(BYTES);
  localparam int unsigned NB = XLEN / 8;

  logic [7:0]    mem [BYTES];
  logic [BW-1:0] base;

  assign base = addr[BW-1:0];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned i = 0; i < NB; i++) begin
        mem[BW'(base + BW'(i))] <= din[8*i +: 8];
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NB; i++) begin
      dout[8*i +: 8] = mem[BW'(base + BW'(i))];
    end
  end

  // the read-enable only qualifies whether Dout is consumed downstream
  logic unused_rd;
  assign unused_rd = rd;

endmodule
