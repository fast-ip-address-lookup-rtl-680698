// ip_lookup_top_tb: end-to-end test of the lookup subsystem at its default
// size (W = 32, k = 4, m = 15; both engines, 8 stages of 2^19 x 16 bits).
//
// Plain pipeline: a random routing table is loaded through the update port,
// then a stream of one lookup per cycle is checked against a prefix-scanning
// longest-prefix match with a latency of exactly 8 cycles. Then the table is
// rewritten (same prefixes, new results) while lookups keep coming; lookups
// must stall during update steps and return the old or the new result.
// Multiplexed engine: the same kind of table is built for k = 4 (no
// multiplexing), k = 2 with mirroring and k = 1 with double mirroring; the
// engine is switched between these modes and each is loaded and streamed.
// The test counts each mechanism and fails if one never happened: results
// found in an early stage and forwarded, walks through all stages, update
// stalls of the pipeline, mode switches, lookups held back by the schedule
// of the multiplexed engine and table writes that had to wait for a stage.
module ip_lookup_top_tb;
  import lookup_pkg::*;
  import trie_model_pkg::*;

  localparam int unsigned W = ADDR_W, K = STRIDE, M = PTR_W, S = W / K, AW = M + K;

  logic clk = 0, rst_n = 0;
  logic pl_lookup_valid = 0, pl_lookup_ready;
  logic [W-1:0] pl_lookup_addr = '0;
  logic pl_result_valid, pl_result_is_pointer;
  logic [M-1:0] pl_result;
  logic pl_upd_valid = 0;
  logic [S-1:0] pl_upd_we = '0;
  logic [S-1:0][AW-1:0] pl_upd_addr = '0;
  logic [S-1:0][M:0] pl_upd_data = '0;
  mux_scheme_e mx_cfg_scheme = SCHEME_MIRROR, mx_act_scheme;
  logic [1:0] mx_cfg_rshift = 0, mx_act_rshift;
  logic mx_idle;
  logic mx_lookup_valid = 0, mx_lookup_ready;
  logic [W-1:0] mx_lookup_addr = '0;
  logic mx_result_valid, mx_result_is_pointer;
  logic [M-1:0] mx_result;
  logic mx_upd_valid = 0, mx_upd_ready;
  logic [S-1:0] mx_upd_we = '0;
  logic [S-1:0][AW-1:0] mx_upd_addr = '0;
  logic [S-1:0][M:0] mx_upd_data = '0;

  ip_lookup_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int unsigned exp_a[$], exp_b[$];
  longint      exp_c[$];
  int unsigned lat;
  int n_forwarded = 0, n_full_walk = 0, n_update_stall = 0, n_mode_switch = 0;
  int n_schedule_hold = 0, n_write_wait = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic collect(bit v, logic [M-1:0] r, bit isp);
    if (v) begin
      if (exp_a.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned ea = exp_a.pop_front();
        int unsigned eb = exp_b.pop_front();
        longint c = exp_c.pop_front();
        check(!isp && (r == ea || r == eb), $sformatf("result %0d expected %0d/%0d", r, ea, eb));
        check(cycle == c + lat, $sformatf("latency %0d expected %0d", cycle - c, lat));
      end
    end
  endtask

  // Logical stage at which the trie walk of address a ends.
  function automatic int unsigned walk_depth(trie_model m, addr_t a);
    for (int unsigned l = 0; l + 1 < m.L; l++)
      if (!m.has_longer(a >> (W - (l + 1) * m.K), (l + 1) * m.K)) return l;
    return m.L - 1;
  endfunction

  function automatic addr_t pick(trie_model m);
    if ($urandom_range(0, 3) == 0) return m.rand_addr();
    return m.addr_near($urandom_range(0, m.pv.size() - 1));
  endfunction

  // ---------------- plain pipeline ----------------
  task automatic pl_step(trie_model m, int unsigned s);
    pl_upd_valid = 1;
    for (int i = 0; i < S; i++) begin
      pl_upd_we[i] = s < m.wr_addr[i].size();
      pl_upd_addr[i] = pl_upd_we[i] ? AW'(m.wr_addr[i][s]) : '0;
      pl_upd_data[i] = pl_upd_we[i] ? (M+1)'(m.wr_data[i][s]) : '0;
    end
  endtask

  task automatic pl_issue(trie_model m, addr_t a, int unsigned ea, int unsigned eb);
    int unsigned d = walk_depth(m, a);
    if (d < S - 1) n_forwarded++; else n_full_walk++;
    pl_lookup_valid = 1;
    pl_lookup_addr = W'(a);
    exp_a.push_back(ea);
    exp_b.push_back(eb);
    exp_c.push_back(cycle);
  endtask

  task automatic run_pipeline();
    trie_model mo, mn;
    addr_t a;
    mo = new(W, K, M, S);
    mo.random_table(300, 1000);
    // two long prefixes so that some walks use every stage
    mo.add_prefix(128'hC0A80101, 32, 7);
    mo.add_prefix(128'h0A000001, 31, 9);
    mo.build();
    mn = new(W, K, M, S);
    for (int i = 0; i < mo.pv.size(); i++) mn.add_prefix(mo.pv[i], mo.plen[i], mo.pres[i] + 3000);
    mn.build();
    lat = S;
    for (int s = 0; s < mo.steps(); s++) begin pl_step(mo, s); @(negedge clk); end
    pl_upd_valid = 0;
    pl_upd_we = '0;
    repeat (S) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      a = (n % 50 == 0) ? 128'hC0A80101 : pick(mo);
      pl_issue(mo, a, mo.lpm(a), mo.lpm(a));
      @(negedge clk);
      collect(pl_result_valid, pl_result, pl_result_is_pointer);
    end
    // rewrite under traffic
    for (int s = 0; s < mn.steps(); s++) begin
      pl_step(mn, s);
      pl_lookup_valid = 1;
      #1;
      if (!pl_lookup_ready) n_update_stall++;
      check(!pl_lookup_ready, "lookup accepted in an update cycle");
      @(negedge clk);
      collect(pl_result_valid, pl_result, pl_result_is_pointer);
      pl_upd_valid = 0;
      pl_upd_we = '0;
      a = pick(mo);
      pl_issue(mo, a, mo.lpm(a), mn.lpm(a));
      @(negedge clk);
      collect(pl_result_valid, pl_result, pl_result_is_pointer);
    end
    pl_lookup_valid = 0;
    repeat (S) begin @(negedge clk); collect(pl_result_valid, pl_result, pl_result_is_pointer); end
    for (int n = 0; n < 1000; n++) begin
      a = pick(mn);
      pl_issue(mn, a, mn.lpm(a), mn.lpm(a));
      @(negedge clk);
      collect(pl_result_valid, pl_result, pl_result_is_pointer);
    end
    pl_lookup_valid = 0;
    repeat (S + 2) begin @(negedge clk); collect(pl_result_valid, pl_result, pl_result_is_pointer); end
    check(exp_a.size() == 0, "pipeline: missing results");
  endtask

  // ---------------- multiplexed engine ----------------
  function automatic int unsigned map_l(mux_scheme_e s, int unsigned r, int unsigned l);
    case (s)
      SCHEME_MIRROR: return ((l / S) % 2 == 0) ? (l % S) : (S - 1 - (l % S));
      SCHEME_SERIAL: return l / r;
      default:       return l % S;
    endcase
  endfunction

  task automatic run_mux(mux_scheme_e sch, int unsigned rshift, int unsigned nlook);
    trie_model m;
    int unsigned r = 1 << rshift, k = K >> rshift;
    int unsigned accepted = 0;
    addr_t a;
    bit have_a = 0, upd_go, wrote = 0;
    mx_cfg_scheme = sch;
    mx_cfg_rshift = 2'(rshift);
    @(negedge clk);
    while (mx_act_scheme != sch || mx_act_rshift != 2'(rshift)) @(negedge clk);
    n_mode_switch++;
    m = new(W, k, M, S);
    for (int i = 0; i < W / k; i++) m.set_phys(i, map_l(sch, r, i));
    m.random_table(150, 1000);
    m.build();
    lat = W / k;
    for (int s = 0; s < m.steps(); s++) begin
      mx_upd_valid = 1;
      for (int p = 0; p < S; p++) begin
        mx_upd_we[p] = s < m.wr_addr[p].size();
        mx_upd_addr[p] = mx_upd_we[p] ? AW'(m.wr_addr[p][s]) : '0;
        mx_upd_data[p] = mx_upd_we[p] ? (M+1)'(m.wr_data[p][s]) : '0;
      end
      #1;
      check(mx_upd_ready, "write refused with engine idle");
      @(negedge clk);
    end
    mx_upd_valid = 0;
    mx_upd_we = '0;
    while (accepted < nlook) begin
      if (!have_a) begin a = pick(m); have_a = 1; end
      if (accepted == 50 && !wrote) begin
        wrote = 1;
        mx_upd_valid = 1;
        mx_upd_we[m.phys[2]] = 1;
        mx_upd_addr[m.phys[2]] = AW'(m.wr_addr[m.phys[2]][0]);
        mx_upd_data[m.phys[2]] = (M+1)'(m.wr_data[m.phys[2]][0]);
      end
      mx_lookup_valid = 1;
      mx_lookup_addr = W'(a);
      #1;
      upd_go = mx_upd_valid && mx_upd_ready;
      if (mx_upd_valid && !mx_upd_ready) n_write_wait++;
      if (mx_lookup_ready) begin
        exp_a.push_back(m.lpm(a));
        exp_b.push_back(m.lpm(a));
        exp_c.push_back(cycle);
        accepted++;
        have_a = 0;
      end else if (!mx_upd_valid) n_schedule_hold++;
      @(negedge clk);
      if (upd_go) begin mx_upd_valid = 0; mx_upd_we = '0; end
      collect(mx_result_valid, mx_result, mx_result_is_pointer);
    end
    mx_lookup_valid = 0;
    repeat (lat + 2) begin @(negedge clk); collect(mx_result_valid, mx_result, mx_result_is_pointer); end
    check(exp_a.size() == 0, "mux engine: missing results");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_pipeline();
    run_mux(SCHEME_MIRROR, 0, 300);
    run_mux(SCHEME_MIRROR, 1, 300);
    run_mux(SCHEME_LOOP,   1, 300);
    run_mux(SCHEME_MIRROR, 2, 300);
    $display("forwarded %0d, full walks %0d, update stalls %0d, mode switches %0d, schedule holds %0d, write waits %0d",
             n_forwarded, n_full_walk, n_update_stall, n_mode_switch, n_schedule_hold, n_write_wait);
    check(n_forwarded > 0, "no forwarded result");
    check(n_full_walk > 0, "no walk through all stages");
    check(n_update_stall > 0, "no update stall");
    check(n_mode_switch == 4, "mode switches");
    check(n_schedule_hold > 0, "no schedule hold");
    check(n_write_wait > 0, "no table write wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
