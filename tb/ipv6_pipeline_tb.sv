// ipv6_pipeline_tb: the plain pipeline built for 128-bit IPv6 addresses
// (W = 128, k = 4: 32 stages, latency 32 cycles) with a table of 219
// prefixes, the size of the IPv6 table the design was evaluated with. The
// prefixes are synthetic: lengths drawn from 16, 24, 28, 32, 35, 48 and 64
// bits plus some of random length. The table is built and loaded, the
// largest stage is reported, and 2000 back-to-back lookups are compared with
// a reference longest-prefix match, each with a latency of exactly 32 cycles.
module ipv6_pipeline_tb;
  import trie_model_pkg::*;

  localparam int unsigned W = 128, K = 4, M = 15, S = W / K, AW = M + K;

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
  int unsigned exp_r[$];
  longint exp_c[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic collect();
    if (result_valid) begin
      if (exp_r.size() == 0) check(0, "unexpected result");
      else begin
        int unsigned e = exp_r.pop_front();
        longint c = exp_c.pop_front();
        check(!result_is_pointer && result == e, $sformatf("result %0d expected %0d", result, e));
        check(cycle == c + S, "latency");
      end
    end
  endtask

  trie_model m;

  initial begin
    addr_t a;
    int unsigned emax = 0;
    int unsigned lens[7] = '{16, 24, 28, 32, 35, 48, 64};
    m = new(W, K, M, S);
    for (int i = 0; i < 219; i++) begin
      int unsigned len = ($urandom_range(0, 5) == 0) ? $urandom_range(1, W) : lens[$urandom_range(0, 6)];
      m.add_prefix(m.rand_addr(), len, $urandom_range(1, 500));
    end
    m.build();
    for (int p = 0; p < S; p++) if (m.stage_entries(p) > emax) emax = m.stage_entries(p);
    $display("IPv6 table: 219 prefixes, %0d entries, largest stage %0d entries", m.entries(), emax);
    check(m.max_chunk < (1 << M), "chunk index exceeds the pointer width");

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < m.steps(); s++) begin
      upd_valid = 1;
      for (int i = 0; i < S; i++) begin
        upd_we[i] = s < m.wr_addr[i].size();
        upd_addr[i] = upd_we[i] ? AW'(m.wr_addr[i][s]) : '0;
        upd_data[i] = upd_we[i] ? (M+1)'(m.wr_data[i][s]) : '0;
      end
      @(negedge clk);
    end
    upd_valid = 0;
    upd_we = '0;
    repeat (S) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      a = ($urandom_range(0, 3) == 0) ? m.rand_addr() : m.addr_near($urandom_range(0, 218));
      lookup_valid = 1;
      lookup_addr = a;
      exp_r.push_back(m.lpm(a));
      exp_c.push_back(cycle);
      @(negedge clk);
      collect();
    end
    lookup_valid = 0;
    repeat (S + 2) begin @(negedge clk); collect(); end
    check(exp_r.size() == 0, "missing results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
