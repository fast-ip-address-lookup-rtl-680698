// mux_control_tb: checks the control part of the multiplexed engine against
// the scheduling tables for k = 4 with 2 and 4 logical stages per physical
// stage. Instance u4 has 4 physical stages (8 logical, R = 2: mirroring,
// 2 serial reuses, 2 full loops); instance u2 has 2 physical stages (R = 4:
// double mirroring, 4 serial reuses, 4 full loops). The physical stages are
// modelled in the testbench as registers that carry a task number and the
// logical-stage tag. With a request waiting in every cycle, the cycles in
// which tasks are admitted and the physical stage that runs each logical
// stage of each task must match the tables, every task must be reported
// done after 8 cycles, and a table write must wait while its stage is busy.
module mux_control_tb;
  import lookup_pkg::*;
  localparam int unsigned LW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // ---- two controls with testbench stage models ----
  mux_scheme_e cfg_scheme [2];
  logic [1:0]  cfg_rshift [2];
  mux_scheme_e act_scheme [2];
  logic [1:0]  act_rshift [2];
  logic        req_valid [2], req_ready [2], upd_valid [2], upd_ready [2];
  logic [3:0]  upd_we [2];
  logic        done_valid [2], idle [2];

  logic [3:0]          v4, inv4, done4;
  logic [3:0][LW-1:0]  l4;
  mux_src_e [3:0]      sel4;
  int                  id4 [4];
  logic [1:0]          v2, inv2, done2;
  logic [1:0][LW-1:0]  l2;
  mux_src_e [1:0]      sel2;
  int                  id2 [2];

  mux_control #(.P(4), .RMAX(2), .LW(LW)) u4 (
    .clk, .rst_n, .cfg_scheme(cfg_scheme[0]), .cfg_rshift(cfg_rshift[0]),
    .act_scheme(act_scheme[0]), .act_rshift(act_rshift[0]),
    .req_valid(req_valid[0]), .req_ready(req_ready[0]),
    .upd_valid(upd_valid[0]), .upd_we(upd_we[0]), .upd_ready(upd_ready[0]),
    .st_valid(v4), .st_l(l4), .sel(sel4), .st_in_valid(inv4),
    .done_valid(done_valid[0]), .done_stage(done4), .idle(idle[0]));

  mux_control #(.P(2), .RMAX(4), .LW(LW)) u2 (
    .clk, .rst_n, .cfg_scheme(cfg_scheme[1]), .cfg_rshift(cfg_rshift[1]),
    .act_scheme(act_scheme[1]), .act_rshift(act_rshift[1]),
    .req_valid(req_valid[1]), .req_ready(req_ready[1]),
    .upd_valid(upd_valid[1]), .upd_we(upd_we[1][1:0]), .upd_ready(upd_ready[1]),
    .st_valid(v2), .st_l(l2), .sel(sel2), .st_in_valid(inv2),
    .done_valid(done_valid[1]), .done_stage(done2), .idle(idle[1]));

  int next_id [2];
  // log: task id -> logical stage -> physical stage and cycle
  int log_p [2][int][8];
  longint log_c [2][int][8];
  longint issue_c [2][int];
  longint done_c [2][int];

  function automatic int src_stage(int p, mux_src_e s, int np);
    case (s)
      SRC_PREV: return p - 1;
      SRC_SELF: return p;
      SRC_NEXT: return p + 1;
      default:  return np - 1;
    endcase
  endfunction

  // Stage models: register the selected input, tag + 1.
  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      if (inv4[p]) begin
        automatic int id, l;
        if (p == 0 && sel4[p] == SRC_PREV) begin id = next_id[0]; l = 0; end
        else begin id = id4[src_stage(p, sel4[p], 4)]; l = l4[src_stage(p, sel4[p], 4)]; end
        log_p[0][id][l] = p;
        log_c[0][id][l] = cycle;
        id4[p] <= id;
        l4[p] <= LW'(l + 1);
      end
      if (done4[p]) done_c[0][id4[p]] = cycle;
    end
    for (int p = 0; p < 2; p++) begin
      if (inv2[p]) begin
        automatic int id, l;
        if (p == 0 && sel2[p] == SRC_PREV) begin id = next_id[1]; l = 0; end
        else begin id = id2[src_stage(p, sel2[p], 2)]; l = l2[src_stage(p, sel2[p], 2)]; end
        log_p[1][id][l] = p;
        log_c[1][id][l] = cycle;
        id2[p] <= id;
        l2[p] <= LW'(l + 1);
      end
      if (done2[p]) done_c[1][id2[p]] = cycle;
    end
    for (int u = 0; u < 2; u++)
      if (req_valid[u] && req_ready[u]) begin
        issue_c[u][next_id[u]] = cycle;
        next_id[u] <= next_id[u] + 1;
      end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin v4 <= '0; v2 <= '0; end
    else begin v4 <= inv4; v2 <= inv2; end

  // One scheme on one instance: tbl = physical stage of l0..l7 (from the
  // scheduling table), starts = admission cycles of the first tasks.
  task automatic run(int u, mux_scheme_e s, int rshift, int tbl[8], int starts[6]);
    int first;
    longint t0;
    cfg_scheme[u] = s;
    cfg_rshift[u] = 2'(rshift);
    @(negedge clk);
    while (act_scheme[u] != s || act_rshift[u] != 2'(rshift)) @(negedge clk);
    first = next_id[u];
    req_valid[u] = 1;
    repeat (40) @(negedge clk);
    req_valid[u] = 0;
    repeat (12) @(negedge clk);
    t0 = issue_c[u][first];
    for (int j = 0; j < 6; j++) begin
      check(issue_c[u].exists(first + j) && issue_c[u][first + j] - t0 == starts[j],
            $sformatf("inst %0d scheme %0d task %0d admitted at %0d, table says %0d",
                      u, s, j, issue_c[u][first + j] - t0, starts[j]));
      for (int l = 0; l < 8; l++) begin
        check(log_p[u][first + j][l] == tbl[l],
              $sformatf("inst %0d scheme %0d task %0d l%0d on p%0d, table says p%0d",
                        u, s, j, l, log_p[u][first + j][l], tbl[l]));
        check(log_c[u][first + j][l] == issue_c[u][first + j] + l, "stage cycle");
      end
      check(done_c[u].exists(first + j) && done_c[u][first + j] == issue_c[u][first + j] + 8,
            "done after 8 cycles");
    end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      cfg_scheme[u] = SCHEME_MIRROR; cfg_rshift[u] = 0;
      req_valid[u] = 0; upd_valid[u] = 0; upd_we[u] = '0;
      next_id[u] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Tables 2, 4, 6: 4 physical stages, 2 logical stages each
    run(0, SCHEME_MIRROR, 1, '{0,1,2,3,3,2,1,0}, '{0,2,4,6,8,10});
    run(0, SCHEME_SERIAL, 1, '{0,0,1,1,2,2,3,3}, '{0,2,4,6,8,10});
    run(0, SCHEME_LOOP,   1, '{0,1,2,3,0,1,2,3}, '{0,1,2,3,8,9});
    // Tables 3, 5, 7: 2 physical stages, 4 logical stages each
    run(1, SCHEME_MIRROR, 2, '{0,1,1,0,0,1,1,0}, '{0,2,8,10,16,18});
    run(1, SCHEME_SERIAL, 2, '{0,0,0,0,1,1,1,1}, '{0,4,8,12,16,20});
    run(1, SCHEME_LOOP,   2, '{0,1,0,1,0,1,0,1}, '{0,1,8,9,16,17});
    // A table write to a busy stage waits; with the engine idle it goes at once.
    req_valid[0] = 1;
    repeat (3) @(negedge clk);
    upd_valid[0] = 1;
    upd_we[0] = 4'b0100;
    #1;
    check(!req_ready[0], "no admission while a write waits");
    begin
      int waited = 0;
      while (!upd_ready[0]) begin @(negedge clk); #1; waited++; end
      check(waited > 0, "write to a busy stage did not wait");
    end
    @(negedge clk);
    upd_valid[0] = 0;
    req_valid[0] = 0;
    repeat (12) @(negedge clk);
    check(idle[0], "idle after drain");
    upd_valid[0] = 1;
    #1;
    check(upd_ready[0], "write to idle engine");
    @(negedge clk);
    upd_valid[0] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
