// mux_stage: physical stage of the hardware-multiplexed lookup engine.
//
// It is the trie stage of the plain pipeline (memory, pipeline register,
// is_pointer-controlled output multiplexer) with one extra multiplexer in
// front that picks the incoming lookup from one of four sources: the
// previous stage (or a new lookup for stage 0), the stage's own output, the
// next stage, or the last stage (wrap-around, stage 0 only). The control part
// (mux_control) drives the select and the valid of the chosen source. Each
// lookup carries the index of the logical trie stage it is about to execute;
// the stage increments it, so the control can route it onward and recognise
// a finished lookup.
//
// The stride k is set at run time by kshift: k = KMAX >> kshift. The memory
// is read at ({pointer} << k) | next k address bits, so one memory of
// 2^(M+KMAX) words holds the chunks of every logical stage mapped to this
// physical stage; the routing software places them and sets the pointers to
// chunk indices within this memory. Table writes use the upd_* port as in
// the plain pipeline.
//
// Timing: one cycle from the selected input to out_*. The input multiplexer,
// the run-time stride and the tag are this design's realisation of the
// document's "extra multiplexer"; it lengthens the critical path by one
// multiplexer, as the document states.
module mux_stage
  import lookup_pkg::*;
#(
  parameter int unsigned W    = ADDR_W,
  parameter int unsigned KMAX = STRIDE,
  parameter int unsigned M    = PTR_W,
  parameter int unsigned LW   = 6,
  localparam int unsigned AW  = M + KMAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           kshift,
  // candidate inputs, indexed by mux_src_e
  input  logic [3:0][LW-1:0]   cand_l,
  input  logic [3:0][M:0]      cand_entry,
  input  logic [3:0][W-1:0]    cand_addr,
  input  mux_src_e             sel,
  input  logic                 in_valid,
  // table write
  input  logic                 upd_we,
  input  logic [AW-1:0]        upd_addr,
  input  logic [M:0]           upd_data,
  // output
  output logic                 out_valid,
  output logic [LW-1:0]        out_l,
  output logic [M:0]           out_entry,
  output logic [W-1:0]         out_addr
);

  logic [LW-1:0] in_l;
  logic [M:0]    in_entry;
  logic [W-1:0]  in_addr;
  logic [AW-1:0] lookup_idx;
  logic [AW-1:0] sram_addr;
  logic [M:0]    sram_q;
  logic          valid_q;
  logic [LW-1:0] l_q;
  logic [M:0]    entry_q;
  logic [W-1:0]  addr_q;
  int unsigned   k;

  // Input-selection multiplexer.
  assign in_l     = cand_l[sel];
  assign in_entry = cand_entry[sel];
  assign in_addr  = cand_addr[sel];

  assign k = KMAX >> kshift;

  always_comb begin
    lookup_idx = AW'(in_entry[M-1:0]);
    lookup_idx = (lookup_idx << k) | AW'(in_addr >> (W - k));
  end

  assign sram_addr = upd_we ? upd_addr : lookup_idx;

  stage_sram #(.AW(AW), .DW(M + 1)) u_sram (
    .clk  (clk),
    .addr (sram_addr),
    .we   (upd_we),
    .wdata(upd_data),
    .rdata(sram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      l_q     <= '0;
      entry_q <= '0;
      addr_q  <= '0;
    end else begin
      valid_q <= in_valid;
      l_q     <= in_l + LW'(1);
      entry_q <= in_entry;
      addr_q  <= in_addr << k;
    end
  end

  assign out_entry = entry_q[M] ? sram_q : entry_q;
  assign out_valid = valid_q;
  assign out_l     = l_q;
  assign out_addr  = addr_q;

endmodule
