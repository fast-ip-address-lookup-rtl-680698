// update_scheduler_tb: checks that the write of stage i in an update step
// appears on stage i's write port exactly i cycles after the step, with its
// address and data, that no write appears otherwise, and that lookup_ready
// is low exactly in the cycles with a step. Steps with random enables are
// sent in random cycles (S = 8 stages, 19-bit address, 16-bit data).
module update_scheduler_tb;
  localparam int unsigned S = 8, AW = 19, DW = 16;
  logic clk = 0, rst_n = 0;
  logic upd_valid = 0;
  logic [S-1:0] upd_we = '0;
  logic [S-1:0][AW-1:0] upd_addr = '0;
  logic [S-1:0][DW-1:0] upd_data = '0;
  logic lookup_ready;
  logic [S-1:0] st_we;
  logic [S-1:0][AW-1:0] st_addr;
  logic [S-1:0][DW-1:0] st_data;
  update_scheduler #(.S(S), .AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // history of steps, index = cycle
  logic          h_v [int];
  logic [S-1:0]  h_we [int];
  logic [S-1:0][AW-1:0] h_a [int];
  logic [S-1:0][DW-1:0] h_d [int];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      upd_valid = (c < 1480) && ($urandom_range(0, 2) != 0);
      for (int i = 0; i < S; i++) begin
        upd_we[i] = $urandom_range(0, 1);
        upd_addr[i] = AW'($urandom());
        upd_data[i] = DW'($urandom());
      end
      h_v[c] = upd_valid; h_we[c] = upd_we; h_a[c] = upd_addr; h_d[c] = upd_data;
      #1;
      check(lookup_ready == !upd_valid, "lookup_ready");
      for (int i = 0; i < S; i++) begin
        automatic bit exp_we = (c >= i) && h_v[c - i] && h_we[c - i][i];
        check(st_we[i] == exp_we, $sformatf("we stage %0d cycle %0d", i, c));
        if (exp_we) begin
          check(st_addr[i] == h_a[c - i][i], "address");
          check(st_data[i] == h_d[c - i][i], "data");
        end
      end
      @(negedge clk);
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
