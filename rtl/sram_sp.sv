// sram_sp: single-port synchronous RAM with a byte write mask.
//
// One access per cycle: when en is high the word at addr is read and, for
// every byte whose wstrb bit is set, written with wdata. The read data
// appears on rdata in the next cycle and holds until the next enabled
// access; a read in the same cycle as a write returns the old contents
// (read-before-write). The cache uses it for its tag and data arrays, one
// instance per way. The document gives the sizes of the cache arrays only;
// the port style, the read timing and the byte mask are this design's.
// Contents are not reset.
module sram_sp #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW = (WIDTH + 7) / 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  input  logic [BW-1:0]    wstrb,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  // Storage is padded to whole bytes; the pad bits are never read out.
  logic [8*BW-1:0] mem [DEPTH];
  logic [8*BW-1:0] wdata_pad;
  logic [8*BW-1:0] rdata_pad;

  assign wdata_pad = (8 * BW)'(wdata);
  assign rdata     = rdata_pad[WIDTH-1:0];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata_pad <= mem[addr];
      for (int b = 0; b < BW; b++) begin
        if (wstrb[b]) mem[addr][8*b +: 8] <= wdata_pad[8*b +: 8];
      end
    end
  end

endmodule
