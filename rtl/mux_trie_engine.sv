// mux_trie_engine: k-multibit trie lookup engine with hardware multiplexing.
//
// P physical stages (mux_stage) share the work of W/k logical trie stages,
// each physical stage running R = W/(k*P) of them, so that the memories of
// small logical stages are merged with those of big ones and the largest
// physical memory stays close to the average. The price is throughput: each
// physical stage is used R times per lookup, so on average one lookup per R
// cycles is accepted. The control part (mux_control) routes every lookup
// from stage to stage following the selected scheme (mirroring, double
// mirroring, serial reuse or full loops) and admits new lookups so that no
// two ever need the same stage in the same cycle.
//
// The stride is chosen at run time: k = KMAX >> cfg_rshift, R = 2**cfg_rshift.
// With the defaults (W = 32, KMAX = 4, P = 8) the same hardware runs k = 4
// without multiplexing (R = 1, one lookup per cycle, latency 8), k = 2 with
// R = 2 (16 logical stages) or k = 1 with R = 4 (32 logical stages), as
// routing tables grow. A new scheme or stride takes effect once the engine
// is empty (mux_control). W must equal KMAX * P.
//
// Interface: lookup_valid/ready/addr in; result_valid/result out (latency
// W/k cycles from acceptance); result_is_pointer flags a malformed table.
// Table writes: upd_valid with one optional write per physical stage,
// accepted when upd_ready is high; addresses are in the physical stage's own
// memory, where the routing software lays out the chunks of all logical
// stages mapped to it (chunk 0 of stage 0 is the root of the trie).
// The multiplexing schemes and the run-time change of k follow the
// document; the interface and the control rules are this design's own.
module mux_trie_engine
  import lookup_pkg::*;
#(
  parameter int unsigned W    = ADDR_W,
  parameter int unsigned KMAX = STRIDE,
  parameter int unsigned M    = PTR_W,
  localparam int unsigned P   = W / KMAX,
  localparam int unsigned LW  = $clog2(P * KMAX + 1),
  localparam int unsigned AW  = M + KMAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mux_scheme_e          cfg_scheme,
  input  logic [1:0]           cfg_rshift,
  output mux_scheme_e          act_scheme,
  output logic [1:0]           act_rshift,
  output logic                 idle,
  input  logic                 lookup_valid,
  output logic                 lookup_ready,
  input  logic [W-1:0]         lookup_addr,
  output logic                 result_valid,
  output logic [M-1:0]         result,
  output logic                 result_is_pointer,
  input  logic                 upd_valid,
  output logic                 upd_ready,
  input  logic [P-1:0]         upd_we,
  input  logic [P-1:0][AW-1:0] upd_addr,
  input  logic [P-1:0][M:0]    upd_data
);

  logic [P-1:0]          st_valid;
  logic [P-1:0][LW-1:0]  st_l;
  logic [P-1:0][M:0]     st_entry;
  logic [P-1:0][W-1:0]   st_addr;
  mux_src_e [P-1:0]      sel;
  logic [P-1:0]          st_in_valid;
  logic [P-1:0]          done_stage;
  logic                  done_valid;
  logic [M:0]            done_entry;

  mux_control #(.P(P), .RMAX(KMAX), .LW(LW)) u_ctrl (
    .clk, .rst_n,
    .cfg_scheme, .cfg_rshift, .act_scheme, .act_rshift,
    .req_valid (lookup_valid), .req_ready (lookup_ready),
    .upd_valid, .upd_we, .upd_ready,
    .st_valid, .st_l,
    .sel, .st_in_valid,
    .done_valid, .done_stage, .idle
  );

  for (genvar p = 0; p < P; p++) begin : g_stage
    logic [3:0][LW-1:0] c_l;
    logic [3:0][M:0]    c_entry;
    logic [3:0][W-1:0]  c_addr;

    always_comb begin
      c_l     = '0;
      c_entry = '0;
      c_addr  = '0;
      if (p == 0) begin
        c_l[SRC_PREV] = '0;  c_entry[SRC_PREV] = {1'b1, {M{1'b0}}};
        c_addr[SRC_PREV] = lookup_addr;
        c_l[SRC_WRAP] = st_l[P-1];  c_entry[SRC_WRAP] = st_entry[P-1];
        c_addr[SRC_WRAP] = st_addr[P-1];
      end else begin
        c_l[SRC_PREV] = st_l[(p+P-1)%P];  c_entry[SRC_PREV] = st_entry[(p+P-1)%P];
        c_addr[SRC_PREV] = st_addr[(p+P-1)%P];
      end
      c_l[SRC_SELF] = st_l[p];  c_entry[SRC_SELF] = st_entry[p];
      c_addr[SRC_SELF] = st_addr[p];
      if (p < P - 1) begin
        c_l[SRC_NEXT] = st_l[(p+1)%P];  c_entry[SRC_NEXT] = st_entry[(p+1)%P];
        c_addr[SRC_NEXT] = st_addr[(p+1)%P];
      end
    end

    mux_stage #(.W(W), .KMAX(KMAX), .M(M), .LW(LW)) u_stage (
      .clk, .rst_n,
      .kshift    (act_rshift),
      .cand_l    (c_l),
      .cand_entry(c_entry),
      .cand_addr (c_addr),
      .sel       (sel[p]),
      .in_valid  (st_in_valid[p]),
      .upd_we    (upd_valid && upd_ready && upd_we[p]),
      .upd_addr  (upd_addr[p]),
      .upd_data  (upd_data[p]),
      .out_valid (st_valid[p]),
      .out_l     (st_l[p]),
      .out_entry (st_entry[p]),
      .out_addr  (st_addr[p])
    );
  end

  // Result collector: at most one stage holds a finished lookup.
  always_comb begin
    done_entry = '0;
    for (int p = 0; p < P; p++)
      if (done_stage[p]) done_entry = done_entry | st_entry[p];
  end

  assign result_valid      = done_valid;
  assign result            = done_entry[M-1:0];
  assign result_is_pointer = done_entry[M];

  initial assert (W == KMAX * P && P >= 2) else $error("W must equal KMAX * P, P >= 2");

endmodule
