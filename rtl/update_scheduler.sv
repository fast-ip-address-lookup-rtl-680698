// update_scheduler: issues routing-table writes to the stages of the lookup
// pipeline in the same wave pattern as a lookup.
//
// The routing update software presents one update step per cycle
// (upd_valid): at most one write for every stage, each with its own enable,
// address and data. The scheduler delays the write for stage i by i cycles,
// so the step travels through the stages exactly like a lookup accepted in
// the same cycle would. While upd_valid is high, lookup_ready is low: the
// cycle that the update step occupies is not given to a lookup. Because a
// lookup accepted in cycle t reads stage i in cycle t+i and a step accepted
// in cycle u writes stage i in cycle u+i, with t != u, a lookup and a write
// never meet in a memory, and each lookup sees the table either before or
// after a whole update step. An update of at most 2^k writes per stage thus
// costs at most 2^k lookup cycles.
//
// The stage count S and the write bundle follow the document's description
// of pipelined updates; the step interface, the per-stage delay lines and
// the back-pressure signal are this design's own.
module update_scheduler #(
  parameter int unsigned S  = 8,
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  upd_valid,
  input  logic [S-1:0]          upd_we,
  input  logic [S-1:0][AW-1:0]  upd_addr,
  input  logic [S-1:0][DW-1:0]  upd_data,
  output logic                  lookup_ready,
  // per-stage write ports, stage i delayed by i cycles
  output logic [S-1:0]          st_we,
  output logic [S-1:0][AW-1:0]  st_addr,
  output logic [S-1:0][DW-1:0]  st_data
);

  assign lookup_ready = !upd_valid;

  // Stage 0 is written in the cycle of the step itself.
  assign st_we[0]   = upd_valid && upd_we[0];
  assign st_addr[0] = upd_addr[0];
  assign st_data[0] = upd_data[0];

  for (genvar i = 1; i < S; i++) begin : g_delay
    logic [i-1:0]          we_d;
    logic [AW-1:0]         addr_d [i];
    logic [DW-1:0]         data_d [i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        we_d <= '0;
      end else begin
        we_d[0] <= upd_valid && upd_we[i];
        for (int j = 1; j < i; j++) we_d[j] <= we_d[j-1];
      end
    end

    always_ff @(posedge clk) begin
      addr_d[0] <= upd_addr[i];
      data_d[0] <= upd_data[i];
      for (int j = 1; j < i; j++) begin
        addr_d[j] <= addr_d[j-1];
        data_d[j] <= data_d[j-1];
      end
    end

    assign st_we[i]   = we_d[i-1];
    assign st_addr[i] = addr_d[i-1];
    assign st_data[i] = data_d[i-1];
  end

endmodule
