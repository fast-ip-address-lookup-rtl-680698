// trie_stage: one pipeline stage of the k-multibit trie lookup pipeline.
//
// The stage receives a lookup as a tuple <is_pointer, result/pointer> (entry,
// M+1 bits, is_pointer in the msb) plus the part of the destination address
// that earlier stages have not consumed, left-aligned in a W-bit word. When
// is_pointer is set, the memory is read at {pointer, next k address bits}:
// the pointer selects a 2^k-entry chunk and the address bits select the entry
// in it. In parallel the incoming tuple and the address, shifted left by k,
// are stored in the pipeline register. On the next cycle the output
// multiplexer, controlled by the stored is_pointer bit, passes on either the
// memory word (the lookup is still walking the trie) or the stored tuple (a
// result was already found and is only forwarded), so every lookup leaves the
// last stage after the same number of cycles.
//
// A second multiplexer in front of the memory address lets the routing
// update software write the memory: when upd_we is high the memory address is
// upd_addr and upd_data is written. A lookup that needs the memory in that
// cycle would read the wrong word; the update scheduler guarantees that this
// never happens (checked by an assertion).
//
// Timing: one cycle from in_* to out_*; out_entry is the output multiplexer
// after the synchronous memory, as in the document's critical path of one
// memory access plus two multiplexers. Carrying the remaining address
// left-aligned in a fixed W-bit word (instead of a word that narrows by k per
// stage) and the valid bit are this design's choices; the zero bits shifted
// in are constant and vanish in synthesis.
module trie_stage #(
  parameter int unsigned W = 32,
  parameter int unsigned K = 4,
  parameter int unsigned M = 15
) (
  input  logic           clk,
  input  logic           rst_n,
  // lookup in
  input  logic           in_valid,
  input  logic [M:0]     in_entry,
  input  logic [W-1:0]   in_addr,
  // table write from the routing update software
  input  logic           upd_we,
  input  logic [M+K-1:0] upd_addr,
  input  logic [M:0]     upd_data,
  // lookup out
  output logic           out_valid,
  output logic [M:0]     out_entry,
  output logic [W-1:0]   out_addr
);

  logic [M+K-1:0] sram_addr;
  logic [M:0]     sram_q;
  logic [M:0]     entry_q;
  logic [W-1:0]   addr_q;
  logic           valid_q;

  // Update multiplexer: routing engine address or {pointer, address chunk}.
  assign sram_addr = upd_we ? upd_addr : {in_entry[M-1:0], in_addr[W-1 -: K]};

  stage_sram #(.AW(M + K), .DW(M + 1)) u_sram (
    .clk  (clk),
    .addr (sram_addr),
    .we   (upd_we),
    .wdata(upd_data),
    .rdata(sram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      entry_q <= '0;
      addr_q  <= '0;
    end else begin
      valid_q <= in_valid;
      entry_q <= in_entry;
      addr_q  <= in_addr << K;
    end
  end

  // Result/pointer multiplexer, selected by the stored is_pointer bit.
  assign out_entry = entry_q[M] ? sram_q : entry_q;
  assign out_addr  = addr_q;
  assign out_valid = valid_q;

  // A lookup that still follows a pointer must not meet a table write.
  a_no_update_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && in_entry[M] && upd_we));

endmodule
