// mm_collect: moves fitness results from the MLPs into the MEFIFO.
//
// Every evaluation unit offers its result on a valid/ready port. When the
// MEFIFO has room, the collector accepts one result per cycle, choosing
// round-robin from the unit after the one last served, and pushes it. A
// full MEFIFO holds the results in the units (stall). The source design
// only places results in the MEFIFO; the round-robin order is this
// design's choice.
module mm_collect
  import gpp_pkg::*;
#(
  parameter int unsigned N_MLP = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_MLP-1:0]      res_valid,
  input  me_entry_t [N_MLP-1:0] res,
  output logic [N_MLP-1:0]      res_ready,
  input  logic                  fifo_full,
  output logic                  fifo_wr,
  output me_entry_t             fifo_data,
  output logic                  stall       // a result waits on a full MEFIFO
);
  localparam int unsigned IW = (N_MLP > 1) ? $clog2(N_MLP) : 1;

  logic [IW-1:0] rr;     // first unit to consider
  logic [IW-1:0] pick;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned n = 0; n < N_MLP; n++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(rr) + n) % N_MLP);
      if (!found && res_valid[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
  end

  assign fifo_wr   = found && !fifo_full;
  assign fifo_data = res[pick];
  assign stall     = found && fifo_full;

  always_comb begin
    res_ready = '0;
    if (fifo_wr) res_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rr <= '0;
    else if (fifo_wr) rr <= (int'(pick) == N_MLP - 1) ? '0 : pick + 1'b1;
  end
endmodule
