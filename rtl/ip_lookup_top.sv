// ip_lookup_top: IP address lookup subsystem.
//
// Two lookup engines built from the same k-multibit trie stages, each with
// its own ports:
//   pl_* : the plain pipeline (trie_pipeline), W/k = 8 stages of k = 4 bits,
//          one lookup accepted and one result delivered every cycle, result
//          8 cycles after acceptance; one 2^(m+k)-entry memory per stage.
//   mx_* : the hardware-multiplexed engine (mux_trie_engine), 8 physical
//          stages that run k = 4 (no multiplexing), k = 2 (R = 2) or k = 1
//          (R = 4) with mirroring, serial reuse or full loops, trading
//          throughput for room for larger routing tables.
// The routing update software, which builds the trie and computes the table
// writes, is outside; its write ports (*_upd_*) are brought out. All widths
// and sizes are the defaults of lookup_pkg: W = 32, k = 4, m = 15. Placing
// both engines side by side is this design's own arrangement.
module ip_lookup_top
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
  // plain pipeline
  input  logic                 pl_lookup_valid,
  output logic                 pl_lookup_ready,
  input  logic [W-1:0]         pl_lookup_addr,
  output logic                 pl_result_valid,
  output logic [M-1:0]         pl_result,
  output logic                 pl_result_is_pointer,
  input  logic                 pl_upd_valid,
  input  logic [S-1:0]         pl_upd_we,
  input  logic [S-1:0][AW-1:0] pl_upd_addr,
  input  logic [S-1:0][M:0]    pl_upd_data,
  // multiplexed engine
  input  mux_scheme_e          mx_cfg_scheme,
  input  logic [1:0]           mx_cfg_rshift,
  output mux_scheme_e          mx_act_scheme,
  output logic [1:0]           mx_act_rshift,
  output logic                 mx_idle,
  input  logic                 mx_lookup_valid,
  output logic                 mx_lookup_ready,
  input  logic [W-1:0]         mx_lookup_addr,
  output logic                 mx_result_valid,
  output logic [M-1:0]         mx_result,
  output logic                 mx_result_is_pointer,
  input  logic                 mx_upd_valid,
  output logic                 mx_upd_ready,
  input  logic [S-1:0]         mx_upd_we,
  input  logic [S-1:0][AW-1:0] mx_upd_addr,
  input  logic [S-1:0][M:0]    mx_upd_data
);

  trie_pipeline #(.W(W), .K(K), .M(M)) u_pipeline (
    .clk, .rst_n,
    .lookup_valid     (pl_lookup_valid),
    .lookup_ready     (pl_lookup_ready),
    .lookup_addr      (pl_lookup_addr),
    .result_valid     (pl_result_valid),
    .result           (pl_result),
    .result_is_pointer(pl_result_is_pointer),
    .upd_valid        (pl_upd_valid),
    .upd_we           (pl_upd_we),
    .upd_addr         (pl_upd_addr),
    .upd_data         (pl_upd_data)
  );

  mux_trie_engine #(.W(W), .KMAX(K), .M(M)) u_mux_engine (
    .clk, .rst_n,
    .cfg_scheme       (mx_cfg_scheme),
    .cfg_rshift       (mx_cfg_rshift),
    .act_scheme       (mx_act_scheme),
    .act_rshift       (mx_act_rshift),
    .idle             (mx_idle),
    .lookup_valid     (mx_lookup_valid),
    .lookup_ready     (mx_lookup_ready),
    .lookup_addr      (mx_lookup_addr),
    .result_valid     (mx_result_valid),
    .result           (mx_result),
    .result_is_pointer(mx_result_is_pointer),
    .upd_valid        (mx_upd_valid),
    .upd_ready        (mx_upd_ready),
    .upd_we           (mx_upd_we),
    .upd_addr         (mx_upd_addr),
    .upd_data         (mx_upd_data)
  );

endmodule
