// trie_pipeline_tb: self-checking test of the plain lookup pipeline at its
// default size (W = 32, k = 4, m = 15, 8 stages).
//
// A random routing table is turned into trie memory images by the reference
// model and loaded through the update port, one update step per cycle. Then
// back-to-back lookups (one per cycle) are compared with a prefix-scanning
// longest-prefix match, and each result must appear exactly W/k cycles after
// its lookup was accepted. Finally the same prefixes with new results are
// written while lookups keep coming: lookup_ready must be low in every update
// cycle, each lookup must return either the old or the new result, and every
// lookup after the last update step must return the new one.
module trie_pipeline_tb;
  import trie_model_pkg::*;

  localparam int unsigned W = 32, K = 4, M = 15, S = W / K, AW = M + K;

  logic clk = 0, rst_n = 0;
  logic lookup_valid = 0, lookup_ready;
  logic [W-1:0] lookup_addr = '0;
  logic result_valid, result_is_pointer;
  logic [M-1:0] result;
  logic upd_valid = 0;
  logic [S-1:0] upd_we = '0;
  logic [S-1:0][AW-1:0] upd_addr = '0;
  logic [S-1:0][M:0] upd_data = '0;

  trie_pipeline #(.W(W), .K(K), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results in issue order
  int unsigned exp_old[$], exp_new[$];
  longint      exp_cyc[$];
  int          stalled_updates = 0;

  trie_model mold, mnew;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Called at each negedge: check a result, if any.
  task automatic collect();
    if (result_valid) begin
      if (exp_old.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned eo = exp_old.pop_front();
        int unsigned en = exp_new.pop_front();
        longint      ec = exp_cyc.pop_front();
        check(!result_is_pointer && (result == eo || result == en),
              $sformatf("result %0d expected %0d/%0d", result, eo, en));
        check(cycle == ec + S, $sformatf("latency %0d", cycle - ec));
      end
    end
  endtask

  task automatic load_step(trie_model m, int unsigned s);
    upd_valid = 1;
    for (int i = 0; i < S; i++) begin
      upd_we[i] = s < m.wr_addr[i].size();
      upd_addr[i] = upd_we[i] ? AW'(m.wr_addr[i][s]) : '0;
      upd_data[i] = upd_we[i] ? (M+1)'(m.wr_data[i][s]) : '0;
    end
  endtask

  task automatic issue(addr_t a, int unsigned eo, int unsigned en);
    lookup_valid = 1;
    lookup_addr = W'(a);
    exp_old.push_back(eo);
    exp_new.push_back(en);
    exp_cyc.push_back(cycle);
  endtask

  function automatic addr_t pick_addr(trie_model m);
    if ($urandom_range(0, 3) == 0) return m.rand_addr();
    return m.addr_near($urandom_range(0, m.pv.size() - 1));
  endfunction

  initial begin
    addr_t a;
    int unsigned e;
    mold = new(W, K, M, S);
    mold.random_table(200, 1000);
    mold.build();
    mnew = new(W, K, M, S);
    for (int i = 0; i < mold.pv.size(); i++)
      mnew.add_prefix(mold.pv[i], mold.plen[i], mold.pres[i] + 2000);
    mnew.build();
    $display("table: %0d prefixes, %0d entries, %0d update steps",
             mold.pv.size(), mold.entries(), mold.steps());

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // initial load
    for (int s = 0; s < mold.steps(); s++) begin
      load_step(mold, s);
      @(negedge clk);
    end
    upd_valid = 0;
    upd_we = '0;
    repeat (S) @(negedge clk);

    // back-to-back lookups
    for (int n = 0; n < 3000; n++) begin
      a = pick_addr(mold);
      e = mold.lpm(a);
      check(lookup_ready, "ready without update");
      issue(a, e, e);
      @(negedge clk);
      collect();
    end
    lookup_valid = 0;
    repeat (S + 2) begin @(negedge clk); collect(); end

    // update under traffic: alternate update steps and lookups
    for (int s = 0; s < mnew.steps(); s++) begin
      load_step(mnew, s);
      lookup_valid = 1;   // offered but must not be taken
      @(negedge clk);
      collect();
      check(!lookup_ready || !upd_valid, "ready during update");
      stalled_updates++;
      upd_valid = 0;
      upd_we = '0;
      a = pick_addr(mold);
      issue(a, mold.lpm(a), mnew.lpm(a));
      @(negedge clk);
      collect();
      lookup_valid = 0;
    end
    repeat (S) begin @(negedge clk); collect(); end
    // after the update: new results only
    for (int n = 0; n < 1000; n++) begin
      a = pick_addr(mnew);
      e = mnew.lpm(a);
      issue(a, e, e);
      @(negedge clk);
      collect();
    end
    lookup_valid = 0;
    repeat (S + 2) begin @(negedge clk); collect(); end
    check(exp_old.size() == 0, "missing results");
    check(stalled_updates > 0, "no update under traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
