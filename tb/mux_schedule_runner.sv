// mux_schedule_runner: testbench helper that runs a multiplexed engine with
// KMAX = W / P at stride k = 4 under all three schemes (mirroring, serial
// reuse, full loops). For each scheme it switches the engine, builds and
// loads the trie images for that mapping of logical to physical stages,
// prints the entries per physical stage, streams lookups and checks every
// result against a reference longest-prefix match, a latency of 8 cycles and
// an average rate of one lookup per R = KMAX / 4 cycles.
// It counts checks and failures and raises done when finished.
module mux_schedule_runner
  import lookup_pkg::*;
  import trie_model_pkg::*;
#(
  parameter int unsigned KMAX    = 8,
  parameter int unsigned M       = 12,
  parameter int unsigned NPREFIX = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned W = 32, P = W / KMAX, AW = M + KMAX, K = 4;
  localparam int unsigned RSHIFT = $clog2(KMAX / K), R = KMAX / K, L = W / K;

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

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int unsigned exp_r[$];
  longint exp_c[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL P=%0d %s", P, what); end
  endtask

  task automatic collect();
    if (result_valid) begin
      if (exp_r.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned e = exp_r.pop_front();
        longint c = exp_c.pop_front();
        check(!result_is_pointer && result == e, $sformatf("result %0d expected %0d", result, e));
        check(cycle == c + L, "latency");
      end
    end
  endtask

  function automatic int unsigned map_l(mux_scheme_e s, int unsigned l);
    case (s)
      SCHEME_MIRROR: return ((l / P) % 2 == 0) ? (l % P) : (P - 1 - (l % P));
      SCHEME_SERIAL: return l / R;
      default:       return l % P;
    endcase
  endfunction

  task automatic run(mux_scheme_e s, int unsigned nlook);
    trie_model m;
    string line = "";
    addr_t a;
    longint first = -1, last = 0;
    int unsigned n = 0;
    cfg_scheme = s;
    cfg_rshift = 2'(RSHIFT);
    @(negedge clk);
    while (act_scheme != s || act_rshift != 2'(RSHIFT)) @(negedge clk);
    m = new(W, K, M, P);
    for (int l = 0; l < L; l++) m.set_phys(l, map_l(s, l));
    m.random_table(NPREFIX, (1 << M) - 1);
    m.build();
    for (int p = 0; p < P; p++) line = {line, $sformatf(" %0d", m.stage_entries(p))};
    $display("P=%0d scheme=%0d k=4: entries per physical stage:%s", P, s, line);
    check(m.max_chunk < (1 << M), "chunk index exceeds the pointer width");
    for (int st = 0; st < m.steps(); st++) begin
      upd_valid = 1;
      for (int p = 0; p < P; p++) begin
        upd_we[p] = st < m.wr_addr[p].size();
        upd_addr[p] = upd_we[p] ? AW'(m.wr_addr[p][st]) : '0;
        upd_data[p] = upd_we[p] ? (M+1)'(m.wr_data[p][st]) : '0;
      end
      @(negedge clk);
    end
    upd_valid = 0;
    upd_we = '0;
    a = m.rand_addr();
    while (n < nlook) begin
      lookup_valid = 1;
      lookup_addr = W'(a);
      #1;
      if (lookup_ready) begin
        exp_r.push_back(m.lpm(a));
        exp_c.push_back(cycle);
        if (first < 0) first = cycle;
        last = cycle;
        n++;
        a = ($urandom_range(0, 3) == 0) ? m.rand_addr() : m.addr_near($urandom_range(0, m.pv.size() - 1));
      end
      @(negedge clk);
      collect();
    end
    lookup_valid = 0;
    repeat (L + 2) begin @(negedge clk); collect(); end
    check(exp_r.size() == 0, "missing results");
    check((last - first) <= longint'(nlook * R) && (last - first) + longint'(L) >= longint'((nlook - 1) * R),
          $sformatf("rate: %0d lookups in %0d cycles", nlook, last - first + 1));
  endtask

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    @(posedge rst_n);
    @(negedge clk);
    run(SCHEME_MIRROR, 200);
    run(SCHEME_SERIAL, 200);
    run(SCHEME_LOOP,   200);
    done = 1;
  end
endmodule
