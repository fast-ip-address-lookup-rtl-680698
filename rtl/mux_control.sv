// mux_control: control part of the hardware-multiplexed lookup engine.
//
// P physical stages execute the W/k = P*R logical stages of the trie, R being
// the reuse factor (1, 2 or 4, R = 2**rshift). The scheme decides which
// physical stage runs logical stage l (lookup_pkg::phys_of):
//   mirroring    : p0..pP-1, then back pP-1..p0 (R = 4: double mirroring)
//   serial reuse : each physical stage runs R consecutive logical stages
//   full loops   : the lookup circles p0..pP-1 R times
// Every lookup in flight carries the index of its next logical stage. Each
// cycle the control looks at the outputs of the stages that may feed stage p
// (previous, own, next, and for p0 the last stage) and selects the one whose
// next logical stage belongs to p; a lookup whose index has reached P*R is
// finished and leaves the engine.
//
// New lookups are admitted with a reservation table: busy[p][j] says that
// physical stage p is taken j cycles from now. A lookup accepted now would use
// stage phys_of(l) in l cycles, so it is admitted only if none of those slots
// is taken; admitting it marks them. With requests waiting every cycle this
// gives the schedules of the document's scheduling tables (for example every
// second cycle for mirroring, bursts of P then a gap for full loops), and
// no two lookups ever meet in a stage.
//
// Mode switch: the scheme and rshift requested on cfg_* are adopted only when
// no lookup is in flight; until then no lookup is admitted. Table writes
// (upd_valid with a write enable per physical stage) have priority: while one
// waits no lookup is admitted, and it is accepted (upd_ready) in a cycle in
// which none of the stages it writes is reading for a lookup.
// The schemes and their schedules follow the document; the tag-based
// selection, the reservation table, the mode-switch rule and the update rule
// are this design's own.
module mux_control
  import lookup_pkg::*;
#(
  parameter int unsigned P     = 8,
  parameter int unsigned RMAX  = 4,
  parameter int unsigned LW    = 6,
  localparam int unsigned LMAX = P * RMAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requested configuration
  input  mux_scheme_e          cfg_scheme,
  input  logic [1:0]           cfg_rshift,
  // active configuration
  output mux_scheme_e          act_scheme,
  output logic [1:0]           act_rshift,
  // new lookup
  input  logic                 req_valid,
  output logic                 req_ready,
  // table update
  input  logic                 upd_valid,
  input  logic [P-1:0]         upd_we,
  output logic                 upd_ready,
  // stage outputs
  input  logic [P-1:0]         st_valid,
  input  logic [P-1:0][LW-1:0] st_l,
  // input multiplexer control
  output mux_src_e [P-1:0]     sel,
  output logic [P-1:0]         st_in_valid,
  // finished lookup: which stage holds it
  output logic                 done_valid,
  output logic [P-1:0]         done_stage,
  output logic                 idle
);

  logic [P-1:0][LMAX-1:0] busy;
  logic                   issue_ok;
  logic                   issue;
  logic                   cfg_pending;
  logic [LW-1:0]          l_count;

  assign l_count = LW'(P << act_rshift);

  // Is the output of stage s a lookup whose next logical stage runs on p?
  function automatic logic goes_to(int unsigned s, int unsigned p);
    return st_valid[s] && (st_l[s] < l_count) &&
           (phys_of(act_scheme, 32'(act_rshift), P, 32'(st_l[s])) == p);
  endfunction

  // Input-multiplexer selects.
  always_comb begin
    for (int p = 0; p < P; p++) begin
      sel[p]         = SRC_PREV;
      st_in_valid[p] = 1'b0;
      if (p == 0 && issue) begin
        sel[p] = SRC_PREV;  st_in_valid[p] = 1'b1;
      end else if (p > 0 && goes_to(p - 1, p)) begin
        sel[p] = SRC_PREV;  st_in_valid[p] = 1'b1;
      end else if (goes_to(p, p)) begin
        sel[p] = SRC_SELF;  st_in_valid[p] = 1'b1;
      end else if (p < P - 1 && goes_to(p + 1, p)) begin
        sel[p] = SRC_NEXT;  st_in_valid[p] = 1'b1;
      end else if (p == 0 && goes_to(P - 1, 0)) begin
        sel[p] = SRC_WRAP;  st_in_valid[p] = 1'b1;
      end
    end
  end

  // Finished lookups.
  always_comb begin
    for (int p = 0; p < P; p++)
      done_stage[p] = st_valid[p] && (st_l[p] == l_count);
    done_valid = |done_stage;
  end

  // Admission of a new lookup against the reservation table.
  always_comb begin
    issue_ok = 1'b1;
    for (int l = 0; l < LMAX; l++)
      if (l < int'(l_count) && busy[phys_of(act_scheme, 32'(act_rshift), P, l)][l])
        issue_ok = 1'b0;
  end

  assign cfg_pending = (cfg_scheme != act_scheme) || (cfg_rshift != act_rshift);
  assign req_ready   = issue_ok && !upd_valid && !cfg_pending;
  assign issue       = req_valid && req_ready;
  assign idle        = !(|st_valid) && !(|busy);

  // A table write goes ahead when no stage it writes reads for a lookup.
  always_comb begin
    upd_ready = 1'b1;
    for (int p = 0; p < P; p++)
      if (upd_we[p] && busy[p][0]) upd_ready = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= '0;
      act_scheme <= SCHEME_MIRROR;
      act_rshift <= '0;
    end else begin
      for (int p = 0; p < P; p++)
        for (int j = 0; j < LMAX; j++)
          busy[p][j] <= ((j + 1 < LMAX) ? busy[p][j+1] : 1'b0) |
                        (issue && (j + 1 < int'(l_count)) &&
                         (phys_of(act_scheme, 32'(act_rshift), P, j + 1) == p));
      if (cfg_pending && idle) begin
        act_scheme <= cfg_scheme;
        act_rshift <= cfg_rshift;
      end
    end
  end

  // Stage p is reading for a lookup exactly when the table said so.
  for (genvar p = 0; p < P; p++) begin : g_chk
    a_schedule: assert property (@(posedge clk) disable iff (!rst_n)
      st_in_valid[p] == (busy[p][0] || (p == 0 && issue)));
  end
  a_done_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(done_stage));
  // The requested reuse factor must not exceed what the engine is built for.
  a_cfg_range: assert property (@(posedge clk) disable iff (!rst_n)
    (1 << cfg_rshift) <= RMAX);

  initial assert ((1 << LW) > LMAX) else $error("LW too narrow for P * RMAX logical stages");

endmodule
