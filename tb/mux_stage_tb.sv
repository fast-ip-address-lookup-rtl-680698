// mux_stage_tb: checks one physical stage of the multiplexed engine
// (W = 32, KMAX = 4, m = 15). The low 4096 memory words are written with
// random entries; then each cycle a random stride (k = 4, 2, 1), a random
// input select and four random candidate lookups are applied. One cycle
// later the output must be the selected candidate advanced by one logical
// stage: tag + 1, address shifted left by k, and as entry either the memory
// word at (pointer << k) | next k address bits (for a pointer) or the
// candidate's own result (forwarded).
module mux_stage_tb;
  import lookup_pkg::*;
  localparam int unsigned W = 32, KMAX = 4, M = 15, LW = 6, AW = M + KMAX;
  logic clk = 0, rst_n = 0;
  logic [1:0] kshift = 0;
  logic [3:0][LW-1:0] cand_l = '0;
  logic [3:0][M:0] cand_entry = '0;
  logic [3:0][W-1:0] cand_addr = '0;
  mux_src_e sel = SRC_PREV;
  logic in_valid = 0;
  logic upd_we = 0;
  logic [AW-1:0] upd_addr = '0;
  logic [M:0] upd_data = '0;
  logic out_valid;
  logic [LW-1:0] out_l;
  logic [M:0] out_entry;
  logic [W-1:0] out_addr;
  mux_stage #(.W(W), .KMAX(KMAX), .M(M), .LW(LW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [M:0] mem [4096];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int unsigned k, idx, s;
    logic [M:0] e_exp;
    logic [W-1:0] a_exp;
    logic [LW-1:0] l_exp;
    logic v_exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      upd_we = 1;
      upd_addr = AW'(i);
      upd_data = (M+1)'($urandom());
      mem[i] = upd_data;
      @(negedge clk);
    end
    upd_we = 0;
    for (int n = 0; n < 3000; n++) begin
      kshift = 2'($urandom_range(0, 2));
      k = KMAX >> kshift;
      s = $urandom_range(0, 3);
      sel = mux_src_e'(s);
      v_exp = $urandom_range(0, 4) != 0;
      in_valid = v_exp;
      for (int c = 0; c < 4; c++) begin
        cand_l[c] = LW'($urandom_range(0, 30));
        cand_addr[c] = W'($urandom());
        cand_entry[c] = (M+1)'($urandom());
      end
      idx = $urandom_range(0, 4095);
      if ($urandom_range(0, 2) != 0) begin
        cand_entry[s] = {1'b1, M'(idx >> k)};
        cand_addr[s] = (W'(idx & ((1 << k) - 1)) << (W - k)) | (W'($urandom()) >> k);
        e_exp = mem[idx];
      end else begin
        cand_entry[s][M] = 1'b0;
        e_exp = cand_entry[s];
      end
      a_exp = cand_addr[s] << k;
      l_exp = cand_l[s] + 1;
      @(negedge clk);
      check(out_valid == v_exp, "valid");
      check(out_entry == e_exp, $sformatf("entry %0h expected %0h (k=%0d)", out_entry, e_exp, k));
      check(out_addr == a_exp, "address shift");
      check(out_l == l_exp, "tag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
