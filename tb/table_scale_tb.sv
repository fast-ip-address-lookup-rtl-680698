// table_scale_tb: a routing table of the size of the smallest evaluated
// backbone table (16416 prefixes) run on the full-size subsystem.
//
// The prefixes are synthetic: random values, 40 % of length 16, 30 % of
// length 24 and the rest uniform over 1..32. The table is built and loaded
// into the plain pipeline (k = 4) and into the multiplexed engine as k = 2
// with mirroring on 8 physical stages; for each the test checks that every
// chunk index fits the 15-bit pointer and every address fits the memory,
// prints the entries per stage, and compares 3000 lookups with a reference
// longest-prefix match (latency 8 and 16 cycles).
module table_scale_tb;
  import lookup_pkg::*;
  import trie_model_pkg::*;

  localparam int unsigned W = ADDR_W, K = STRIDE, M = PTR_W, S = W / K, AW = M + K;
  localparam int unsigned NPREFIX = 16416;

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

  int unsigned exp_r[$];
  longint exp_c[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic collect(bit v, logic [M-1:0] r, bit isp, int unsigned lat);
    if (v) begin
      if (exp_r.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned e = exp_r.pop_front();
        longint c = exp_c.pop_front();
        check(!isp && r == e, $sformatf("result %0d expected %0d", r, e));
        check(cycle == c + lat, "latency");
      end
    end
  endtask

  task automatic report(trie_model m, string name);
    string s = "";
    int unsigned mx = 0;
    for (int p = 0; p < S; p++) begin
      s = {s, $sformatf(" %0d", m.stage_entries(p))};
      foreach (m.wr_addr[p][i]) if (m.wr_addr[p][i] > mx) mx = m.wr_addr[p][i];
    end
    $display("%s: %0d entries, per physical stage:%s", name, m.entries(), s);
    check(m.max_chunk < (1 << M), "chunk index exceeds the pointer width");
    check(mx < (1 << AW), "address exceeds the memory");
  endtask

  function automatic addr_t pick(trie_model m);
    if ($urandom_range(0, 3) == 0) return m.rand_addr();
    return m.addr_near($urandom_range(0, m.pv.size() - 1));
  endfunction

  trie_model m4, m2;

  initial begin
    addr_t a;
    bit go;
    m4 = new(W, K, M, S);
    m4.random_table(NPREFIX, 30000);
    m4.build();
    report(m4, "k=4 plain pipeline");
    m2 = new(W, 2, M, S);
    for (int l = 0; l < W / 2; l++) m2.set_phys(l, (l < S) ? l : 2 * S - 1 - l);
    for (int i = 0; i < m4.pv.size(); i++) m2.add_prefix(m4.pv[i], m4.plen[i], m4.pres[i]);
    m2.build();
    report(m2, "k=2 mirroring, multiplexed engine");

    repeat (3) @(negedge clk);
    rst_n = 1;
    mx_cfg_rshift = 1;
    @(negedge clk);
    // load both engines in parallel
    for (int s = 0; s < m4.steps() || s < m2.steps(); s++) begin
      pl_upd_valid = s < m4.steps();
      mx_upd_valid = s < m2.steps();
      for (int i = 0; i < S; i++) begin
        pl_upd_we[i] = s < m4.wr_addr[i].size();
        pl_upd_addr[i] = pl_upd_we[i] ? AW'(m4.wr_addr[i][s]) : '0;
        pl_upd_data[i] = pl_upd_we[i] ? (M+1)'(m4.wr_data[i][s]) : '0;
        mx_upd_we[i] = s < m2.wr_addr[i].size();
        mx_upd_addr[i] = mx_upd_we[i] ? AW'(m2.wr_addr[i][s]) : '0;
        mx_upd_data[i] = mx_upd_we[i] ? (M+1)'(m2.wr_data[i][s]) : '0;
      end
      #1;
      if (mx_upd_valid) check(mx_upd_ready, "write refused while idle");
      @(negedge clk);
    end
    pl_upd_valid = 0; pl_upd_we = '0;
    mx_upd_valid = 0; mx_upd_we = '0;
    check(mx_act_rshift == 1, "k = 2 mode active");
    repeat (S) @(negedge clk);

    for (int n = 0; n < 3000; n++) begin
      a = pick(m4);
      pl_lookup_valid = 1;
      pl_lookup_addr = W'(a);
      exp_r.push_back(m4.lpm(a));
      exp_c.push_back(cycle);
      @(negedge clk);
      collect(pl_result_valid, pl_result, pl_result_is_pointer, S);
    end
    pl_lookup_valid = 0;
    repeat (S + 2) begin @(negedge clk); collect(pl_result_valid, pl_result, pl_result_is_pointer, S); end
    check(exp_r.size() == 0, "pipeline: missing results");

    for (int n = 0; n < 3000; ) begin
      a = pick(m2);
      mx_lookup_valid = 1;
      mx_lookup_addr = W'(a);
      #1;
      go = mx_lookup_ready;
      if (go) begin
        exp_r.push_back(m2.lpm(a));
        exp_c.push_back(cycle);
        n++;
      end
      @(negedge clk);
      collect(mx_result_valid, mx_result, mx_result_is_pointer, 2 * S);
    end
    mx_lookup_valid = 0;
    repeat (2 * S + 2) begin @(negedge clk); collect(mx_result_valid, mx_result, mx_result_is_pointer, 2 * S); end
    check(exp_r.size() == 0, "mux engine: missing results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
