// trie_pipeline: IP address lookup engine built as a direct pipeline of a
// k-multibit trie.
//
// W/k identical stages (trie_stage), each a memory with a small processing
// element, are chained; stage i resolves address bits [W-1-i*k -: k] of the
// destination address. Stage 0 is fed the tuple <1, 0>, so it reads entry
// {0, first k bits}: the first memory chunk is the trie root of 2^k entries.
// Each stage either follows a pointer into the next stage's memory or
// forwards an already found result, so the last stage always delivers a
// result exactly W/k cycles after the lookup was accepted. One lookup can be
// accepted every clock cycle and one result leaves every cycle.
//
// Interface:
//   lookup_valid/lookup_ready/lookup_addr : lookup request, accepted when
//     both valid and ready are high in a cycle;
//   result_valid/result : the M-bit result W/k cycles later;
//     result_is_pointer flags a table that ends in a pointer (malformed table);
//   upd_* : one update step per cycle (see update_scheduler); lookup_ready is
//     low during an update step.
// Stage count, entry format and latency follow the document; the valid
// signalling and the update step interface are this design's own.
module trie_pipeline
  import lookup_pkg::*;
#(
  parameter int unsigned W = ADDR_W,
  parameter int unsigned K = STRIDE,
  parameter int unsigned M = PTR_W,
  localparam int unsigned S  = W / K,
  localparam int unsigned AW = M + K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lookup_valid,
  output logic                 lookup_ready,
  input  logic [W-1:0]         lookup_addr,
  output logic                 result_valid,
  output logic [M-1:0]         result,
  output logic                 result_is_pointer,
  input  logic                 upd_valid,
  input  logic [S-1:0]         upd_we,
  input  logic [S-1:0][AW-1:0] upd_addr,
  input  logic [S-1:0][M:0]    upd_data
);

  logic [S-1:0]          st_we;
  logic [S-1:0][AW-1:0]  st_addr;
  logic [S-1:0][M:0]     st_data;

  logic [S:0]            v;
  logic [S:0][M:0]       e;
  logic [S:0][W-1:0]     a;

  update_scheduler #(.S(S), .AW(AW), .DW(M + 1)) u_upd (
    .clk, .rst_n, .upd_valid, .upd_we, .upd_addr, .upd_data,
    .lookup_ready, .st_we, .st_addr, .st_data
  );

  // The first stage gets only the address: <is_pointer = 1, pointer = 0>.
  assign v[0] = lookup_valid && lookup_ready;
  assign e[0] = {1'b1, {M{1'b0}}};
  assign a[0] = lookup_addr;

  for (genvar i = 0; i < S; i++) begin : g_stage
    trie_stage #(.W(W), .K(K), .M(M)) u_stage (
      .clk, .rst_n,
      .in_valid (v[i]),   .in_entry (e[i]),   .in_addr (a[i]),
      .upd_we   (st_we[i]), .upd_addr (st_addr[i]), .upd_data (st_data[i]),
      .out_valid(v[i+1]), .out_entry(e[i+1]), .out_addr(a[i+1])
    );
  end

  assign result_valid      = v[S];
  assign result            = e[S][M-1:0];
  assign result_is_pointer = e[S][M];

  initial assert (W % K == 0) else $error("W must be a multiple of K");

endmodule
