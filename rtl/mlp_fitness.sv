// mlp_fitness: counts the unmatched training cases of one evaluation.
//
// In the design phase the raw fitness of a program is f_dp = U/T, where U
// is the number of unmatched training cases and T = 2^n_in * n_out the
// number of cases (one case per row and output). This unit compares each
// 64-bit output word of the MLP (R7..R0 of eight rows) with the matching
// word of the expected truth table, held in a small RAM written through
// exp_we/exp_addr/exp_wdata in the same byte layout, and adds the number of
// differing bits among R0..R(n_out-1) of rows that exist. With done it
// emits U (result_valid for one cycle) and clears the count. The division
// by T and the use of U for selection are left to the evolution engine.
// The fitness definition follows the source design; counting U next to
// the MLP, so that only U travels back to the engine, is this design's.
module mlp_fitness
  import gpp_pkg::*;
#(
  parameter int unsigned MAX_IN = 8
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // expected truth table
  input  logic                                    exp_we,
  input  logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] exp_addr,
  input  logic [BUS_W-1:0]                        exp_wdata,
  // problem size
  input  logic [$clog2(MAX_IN+1)-1:0]             n_in,
  input  logic [$clog2(OUT_REGS+1)-1:0]           n_out,
  // MLP output stream
  input  logic                                    word_valid,
  input  logic [BUS_W-1:0]                        word,
  input  logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] word_index,
  input  logic                                    done,
  // result
  output logic                                    result_valid,
  output logic [CNT_W-1:0]                        unmatched
);
  localparam int unsigned RWORDS = (1 << MAX_IN) / ROWS_PER_WORD;
  localparam int unsigned BW     = $clog2(ROWS_PER_WORD);

  logic [BUS_W-1:0] exp_ram [RWORDS];
  logic [BUS_W-1:0] diff;
  logic [CNT_W-1:0] acc, word_cnt;

  always_ff @(posedge clk) begin
    if (exp_we) exp_ram[exp_addr] <= exp_wdata;
  end

  // Bits that count: outputs below n_out, rows below 2^n_in
  always_comb begin
    diff = word ^ exp_ram[word_index];
    word_cnt = '0;
    for (int unsigned b = 0; b < ROWS_PER_WORD; b++) begin
      for (int unsigned o = 0; o < OUT_REGS; o++) begin
        if (o < n_out && ({word_index, BW'(b)} >> n_in) == '0 && diff[b*OUT_REGS+o])
          word_cnt = word_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      result_valid <= 1'b0;
      unmatched    <= '0;
    end else begin
      result_valid <= 1'b0;
      if (done) begin
        unmatched    <= acc + (word_valid ? word_cnt : '0);
        result_valid <= 1'b1;
        acc          <= '0;
      end else if (word_valid) begin
        acc <= acc + word_cnt;
      end
    end
  end
endmodule
