// gpplcs_top: fitness-evaluation hardware of the GPP logic circuit
// synthesizer.
//
// The synthesizer evolves LUT circuits as parallel programs for the
// Multi-Logic-Unit Processor (MLP); the hardware here evaluates those
// programs against a truth table. Two evaluators stand side by side, each
// with its own ports:
//   * the host-attached MLP (mlp_pilchard): one 4-LUT MLP behind a 64-bit
//     memory-mapped host bus, used by an evolution engine running on the
//     host PC, which reads back the raw outputs of every row;
//   * the multi-MLP evaluator (mmgpplcs): ten MLPs between an EMFIFO and a
//     MEFIFO, fed by an evolution engine that is not part of this RTL and
//     returning the unmatched-case count U of each child.
// Both run on one clock and one active-low asynchronous reset. See the two
// blocks for the timing and the address map.
module gpplcs_top
  import gpp_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned LMAX     = 25,
  parameter int unsigned MAX_IN   = 8,
  parameter int unsigned N_MLP    = 10,
  parameter int unsigned EM_DEPTH = 16,
  parameter int unsigned ME_DEPTH = 16,
  localparam int unsigned CHILD_W = ID_W + $clog2(LMAX+1) + LMAX * pi_width(K),
  localparam int unsigned RAW     = MAX_IN - $clog2(ROWS_PER_WORD)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host-attached MLP
  input  logic                          host_we,
  input  logic                          host_re,
  input  logic [HOST_AW-1:0]            host_addr,
  input  logic [BUS_W-1:0]              host_wdata,
  output logic [BUS_W-1:0]              host_rdata,
  output logic                          host_mlp_busy,
  // multi-MLP evaluator
  input  logic [$clog2(MAX_IN+1)-1:0]   n_in,
  input  logic [$clog2(OUT_REGS+1)-1:0] n_out,
  input  logic [NUM_REGS-NUM_VAR-1:0]   const_bits,
  input  logic                          exp_we,
  input  logic [RAW-1:0]                exp_addr,
  input  logic [BUS_W-1:0]              exp_wdata,
  input  logic                          em_wr,
  input  logic [CHILD_W-1:0]            em_data,
  output logic                          em_full,
  output logic [$clog2(EM_DEPTH+1)-1:0] em_count,
  input  logic                          me_rd,
  output me_entry_t                     me_data,
  output logic                          me_empty,
  output logic [$clog2(ME_DEPTH+1)-1:0] me_count,
  output logic [N_MLP-1:0]              mlp_busy,
  output logic                          all_busy,
  output logic                          me_stall
);
  mlp_pilchard #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) u_pilchard (
    .clk(clk), .rst_n(rst_n),
    .host_we(host_we), .host_re(host_re), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata), .busy(host_mlp_busy)
  );

  mmgpplcs #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN), .N_MLP(N_MLP),
             .EM_DEPTH(EM_DEPTH), .ME_DEPTH(ME_DEPTH)) u_mm (
    .clk(clk), .rst_n(rst_n),
    .n_in(n_in), .n_out(n_out), .const_bits(const_bits),
    .exp_we(exp_we), .exp_addr(exp_addr), .exp_wdata(exp_wdata),
    .em_wr(em_wr), .em_data(em_data), .em_full(em_full), .em_count(em_count),
    .me_rd(me_rd), .me_data(me_data), .me_empty(me_empty), .me_count(me_count),
    .mlp_busy(mlp_busy), .all_busy(all_busy), .me_stall(me_stall)
  );
endmodule
