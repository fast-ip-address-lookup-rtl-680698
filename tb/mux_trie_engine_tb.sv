// mux_trie_engine_tb: self-checking test of the hardware-multiplexed engine
// at its default size (W = 32, KMAX = 4, 8 physical stages).
//
// For each configuration - k = 4 without multiplexing; k = 2 with mirroring,
// serial reuse and full loops; k = 1 with double mirroring, serial reuse and
// full loops - the test requests the mode, waits until the engine has
// adopted it, builds the trie memory images for that stride and mapping of
// logical to physical stages, loads them, and streams lookups with a request
// every cycle. Each result is compared with a prefix-scanning longest-prefix
// match, must arrive exactly W/k cycles after acceptance, and over the
// stream the engine must accept one lookup per R cycles on average (full use
// of the physical stages). One table write is also offered while lookups
// are in flight and must wait for its stage to be free.
module mux_trie_engine_tb;
  import lookup_pkg::*;
  import trie_model_pkg::*;

  localparam int unsigned W = 32, KMAX = 4, M = 15, P = W / KMAX, AW = M + KMAX;

  logic clk = 0, rst_n = 0;
  mux_scheme_e cfg_scheme = SCHEME_MIRROR, act_scheme;
  logic [1:0] cfg_rshift = 0, act_rshift;
  logic idle;
  logic lookup_valid = 0, lookup_ready;
  logic [W-1:0] lookup_addr = '0;
  logic result_valid, result_is_pointer;
  logic [M-1:0] result;
  logic upd_valid = 0, upd_ready;
  logic [P-1:0] upd_we = '0;
  logic [P-1:0][AW-1:0] upd_addr = '0;
  logic [P-1:0][M:0] upd_data = '0;

  mux_trie_engine #(.W(W), .KMAX(KMAX), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int unsigned exp_res[$];
  longint      exp_cyc[$];
  int unsigned lat;
  int          mode_switches = 0, upd_waits = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic collect();
    if (result_valid) begin
      if (exp_res.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned e = exp_res.pop_front();
        longint c = exp_cyc.pop_front();
        check(!result_is_pointer && result == e,
              $sformatf("result %0d expected %0d", result, e));
        check(cycle == c + lat, $sformatf("latency %0d expected %0d", cycle - c, lat));
      end
    end
  endtask

  // Logical-to-physical mapping, written from the schedules of the schemes.
  function automatic int unsigned map_l(mux_scheme_e s, int unsigned r, int unsigned l);
    case (s)
      SCHEME_MIRROR: return ((l / P) % 2 == 0) ? (l % P) : (P - 1 - (l % P));
      SCHEME_SERIAL: return l / r;
      default:       return l % P;
    endcase
  endfunction

  task automatic run_mode(mux_scheme_e s, int unsigned rshift, int unsigned nlook);
    trie_model m;
    int unsigned r = 1 << rshift, k = KMAX >> rshift, l = W / k;
    int unsigned accepted = 0, offered = 0;
    longint first, last;
    addr_t a;
    bit upd_pending, upd_go;

    // mode switch
    cfg_scheme = s;
    cfg_rshift = 2'(rshift);
    @(negedge clk);
    while (act_scheme != s || act_rshift != 2'(rshift)) @(negedge clk);
    mode_switches++;
    check(idle, "mode adopted while busy");

    m = new(W, k, M, P);
    for (int i = 0; i < l; i++) m.set_phys(i, map_l(s, r, i));
    m.random_table(120, 1000);
    m.build();
    lat = l;
    // load, one step per cycle when accepted
    for (int st = 0; st < m.steps(); st++) begin
      upd_valid = 1;
      for (int p = 0; p < P; p++) begin
        upd_we[p] = st < m.wr_addr[p].size();
        upd_addr[p] = upd_we[p] ? AW'(m.wr_addr[p][st]) : '0;
        upd_data[p] = upd_we[p] ? (M+1)'(m.wr_data[p][st]) : '0;
      end
      @(negedge clk);
      while (!upd_ready) @(negedge clk);  // upd_ready was sampled true at the edge
    end
    upd_valid = 0;
    upd_we = '0;

    // streaming lookups; at lookup 40, offer a table write (the first entry of
    // the physical stage that runs logical stage 1, rewritten unchanged)
    upd_pending = 0;
    first = cycle;
    while (accepted < nlook) begin
      if (offered == accepted) begin
        if ($urandom_range(0, 3) == 0) a = m.rand_addr();
        else a = m.addr_near($urandom_range(0, m.pv.size() - 1));
        offered++;
      end
      if (accepted == 40 && !upd_pending) begin
        upd_pending = 1;
        upd_valid = 1;
        upd_we = '0;
        upd_we[m.phys[1]] = 1;
        upd_addr[m.phys[1]] = AW'(m.wr_addr[m.phys[1]][0]);
        upd_data[m.phys[1]] = (M+1)'(m.wr_data[m.phys[1]][0]);
      end
      lookup_valid = 1;
      lookup_addr = W'(a);
      #1;
      upd_go = upd_valid && upd_ready;
      if (upd_valid && !upd_ready) upd_waits++;
      if (lookup_ready) begin
        exp_res.push_back(m.lpm(a));
        exp_cyc.push_back(cycle);
        accepted++;
        last = cycle;
      end
      @(negedge clk);
      if (upd_go) begin
        upd_valid = 0;
        upd_we = '0;
      end
      collect();
    end
    lookup_valid = 0;
    repeat (l + 2) begin @(negedge clk); collect(); end
    check(exp_res.size() == 0, "missing results");
    // throughput: one lookup per R cycles, measured over the stream
    check((last - first) <= longint'(nlook * r + l + 2) &&
          (last - first) + longint'(l + 2) >= longint'(nlook * r) - longint'(r),
          $sformatf("throughput: %0d lookups in %0d cycles, R=%0d", nlook, last - first, r));
    $display("mode scheme=%0d k=%0d: %0d entries, %0d lookups in %0d cycles",
             s, k, m.entries(), nlook, last - first + 1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_mode(SCHEME_MIRROR, 0, 300);
    run_mode(SCHEME_MIRROR, 1, 300);
    run_mode(SCHEME_SERIAL, 1, 300);
    run_mode(SCHEME_LOOP,   1, 300);
    run_mode(SCHEME_MIRROR, 2, 300);
    run_mode(SCHEME_SERIAL, 2, 300);
    run_mode(SCHEME_LOOP,   2, 300);
    check(mode_switches == 7, "mode switches");
    check(upd_waits > 0, "table write never had to wait");
    $display("mode switches %0d, update waits %0d", mode_switches, upd_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
