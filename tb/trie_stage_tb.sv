// trie_stage_tb: checks one trie stage (W = 32, k = 4, m = 15) against a
// model of the document's stage: for an incoming pointer the output one
// cycle later is the memory word at {pointer, next 4 address bits}; for an
// incoming result the output is the same result; the address always leaves
// shifted left by 4 and the valid bit is delayed by one cycle. The memory is
// first filled at random addresses through the update port.
module trie_stage_tb;
  localparam int unsigned W = 32, K = 4, M = 15;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [M:0] in_entry = '0;
  logic [W-1:0] in_addr = '0;
  logic upd_we = 0;
  logic [M+K-1:0] upd_addr = '0;
  logic [M:0] upd_data = '0;
  logic out_valid;
  logic [M:0] out_entry;
  logic [W-1:0] out_addr;
  trie_stage #(.W(W), .K(K), .M(M)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [M:0] mem [int];
  int unsigned keys[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [M:0] e_exp;
    logic [W-1:0] a_exp;
    logic v_exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      automatic int unsigned a = $urandom_range(0, 2**(M+K) - 1);
      upd_we = 1;
      upd_addr = (M+K)'(a);
      upd_data = (M+1)'($urandom());
      mem[a] = upd_data;
      keys.push_back(a);
      @(negedge clk);
    end
    upd_we = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int unsigned a = keys[$urandom_range(0, keys.size() - 1)];
      v_exp = $urandom_range(0, 3) != 0;
      in_valid = v_exp;
      in_addr = {K'(a), (W-K)'($urandom())};
      if ($urandom_range(0, 2) == 0) begin
        in_entry = {1'b0, M'($urandom())};  // result: forwarded
        e_exp = in_entry;
      end else begin
        in_entry = {1'b1, M'(a >> K)};      // pointer: memory read
        e_exp = mem[a];
      end
      a_exp = in_addr << K;
      @(negedge clk);
      check(out_valid == v_exp, "valid");
      check(out_entry == e_exp, $sformatf("entry %0h expected %0h", out_entry, e_exp));
      check(out_addr == a_exp, "address shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
