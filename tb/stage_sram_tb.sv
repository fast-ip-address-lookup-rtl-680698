// stage_sram_tb: checks the stage memory at its default size (2^19 x 16).
// Random words are written to random addresses and read back; a read must
// return the word one cycle after the address is presented, and a write
// cycle must return the old word (read-first). Expected contents are kept in
// an associative array.
module stage_sram_tb;
  localparam int unsigned AW = 19, DW = 16;
  logic clk = 0;
  logic [AW-1:0] addr = '0;
  logic we = 0;
  logic [DW-1:0] wdata = '0, rdata;
  stage_sram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [int];
  int unsigned addrs[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [DW-1:0] exp;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      automatic int unsigned a = (i % 4 == 0) ? (2**AW - 1 - i) : $urandom_range(0, 2**AW - 1);
      addr = AW'(a);
      we = 1;
      wdata = DW'($urandom());
      exp = ref_mem.exists(a) ? ref_mem[a] : 'x;
      @(negedge clk);
      if (ref_mem.exists(a)) check(rdata == exp, "read-first on write");
      ref_mem[a] = wdata;
      addrs.push_back(a);
    end
    we = 0;
    foreach (addrs[i]) begin
      addr = AW'(addrs[i]);
      @(negedge clk);
      check(rdata == ref_mem[addrs[i]], $sformatf("read %0h", addrs[i]));
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
