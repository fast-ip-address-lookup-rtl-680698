// stage_sram: the embedded SRAM of one lookup stage.
//
// A single-port synchronous memory of 2^AW words of DW bits. The address and
// write data are sampled on the rising clock edge; a read returns the stored
// word on the following cycle through an output register, so the memory
// itself is one pipeline step (the lookup engines rely on this). A write
// cycle also reads the old word at that address (read-first); the engines
// never use read data of a write cycle. There is no reset: the contents are
// loaded through the write port by the routing update software.
//
// Defaults: 2^19 words of 16 bits (1 MB), the per-stage size for k = 4 and
// m = 15. Synchronous output and true random access follow the design; the
// read-first behaviour is this model's choice. In silicon it is a compiled
// SRAM macro; this array is its synthesizable/simulation equivalent.
module stage_sram #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
