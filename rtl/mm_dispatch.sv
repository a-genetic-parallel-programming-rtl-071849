// mm_dispatch: hands the child at the EMFIFO head to an idle MLP.
//
// When the EMFIFO holds a child and no hand-over is in progress, the
// dispatcher grants the head to the lowest-numbered idle evaluation unit
// and keeps that grant until the unit pops the entry; the pop is passed on
// to the FIFO. all_busy flags a cycle in which a child waits because every
// MLP is busy. The source design only says that a ready evaluation engine
// takes the next child; the fixed-priority choice is this design's.
module mm_dispatch #(
  parameter int unsigned N_MLP = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             head_valid,       // EMFIFO not empty
  output logic             head_pop,         // EMFIFO read enable
  input  logic [N_MLP-1:0] unit_idle,
  input  logic [N_MLP-1:0] unit_pop,
  output logic [N_MLP-1:0] unit_valid,
  output logic             all_busy
);
  localparam int unsigned IW = (N_MLP > 1) ? $clog2(N_MLP) : 1;

  logic          active;
  logic [IW-1:0] grant;
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = N_MLP - 1; i >= 0; i--) begin
      if (unit_idle[i]) begin
        found = 1'b1;
        pick  = IW'(i);
      end
    end
  end

  always_comb begin
    unit_valid = '0;
    if (active) unit_valid[grant] = head_valid;
  end

  assign head_pop = active && unit_pop[grant];
  assign all_busy = head_valid && !active && !found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      grant  <= '0;
    end else if (active) begin
      if (unit_pop[grant]) active <= 1'b0;
    end else if (head_valid && found) begin
      active <= 1'b1;
      grant  <= pick;
    end
  end

  // Only the granted unit may pop
  assert property (@(posedge clk) disable iff (!rst_n) (unit_pop & ~unit_valid) == '0);
endmodule
