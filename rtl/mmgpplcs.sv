// mmgpplcs: multi-MLP fitness evaluator placed between one evolution
// engine (EE) and N_MLP MLPs.
//
// Breeding a child is about ten times faster than evaluating it, so a
// single MLP would leave the EE idle most of the time, and the MLP would
// wait while the EE breeds. Here the EE pushes each new child into the
// EMFIFO and carries on breeding; any idle MLP takes the next child from
// the EMFIFO (mm_dispatch), evaluates it on the whole truth table and
// pushes {id, U} into the MEFIFO (mm_collect), from which the EE reads
// results in completion order, not in issue order, as results of
// different MLPs finish at different times. U is the number of unmatched
// training cases, so f_dp = U / (2^n_in * n_out).
//
// The problem configuration (n_in, n_out, const_bits) and the expected
// truth table (exp_*, eight rows per 64-bit word, byte b = R7..R0 of row
// 8w+b) are written once and shared by all MLPs; they must not change
// while children are in flight. EE-side ports follow the FIFO handshakes of
// gpp_fifo: push with em_wr when !em_full, pop with me_rd when !me_empty.
// One EE, ten MLPs and the two FIFOs follow the source design; the FIFO
// depths are this design's choice.
module mmgpplcs
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
  // configuration
  input  logic [$clog2(MAX_IN+1)-1:0]   n_in,
  input  logic [$clog2(OUT_REGS+1)-1:0] n_out,
  input  logic [NUM_REGS-NUM_VAR-1:0]   const_bits,
  input  logic                          exp_we,
  input  logic [RAW-1:0]                exp_addr,
  input  logic [BUS_W-1:0]              exp_wdata,
  // EE -> MLP
  input  logic                          em_wr,
  input  logic [CHILD_W-1:0]            em_data,
  output logic                          em_full,
  output logic [$clog2(EM_DEPTH+1)-1:0] em_count,
  // MLP -> EE
  input  logic                          me_rd,
  output me_entry_t                     me_data,
  output logic                          me_empty,
  output logic [$clog2(ME_DEPTH+1)-1:0] me_count,
  // status
  output logic [N_MLP-1:0]              mlp_busy,
  output logic                          all_busy,   // a child waits for a free MLP
  output logic                          me_stall    // a result waits for MEFIFO room
);
  logic                  em_empty, em_pop;
  logic [CHILD_W-1:0]    em_head;
  logic [N_MLP-1:0]      unit_idle, unit_pop, unit_valid, res_valid, res_ready;
  me_entry_t [N_MLP-1:0] res;
  logic                  me_full, me_wr;
  me_entry_t             me_wdata;

  gpp_fifo #(.WIDTH(CHILD_W), .DEPTH(EM_DEPTH)) u_emfifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(em_wr), .wr_data(em_data), .full(em_full),
    .rd_en(em_pop), .rd_data(em_head), .empty(em_empty), .count(em_count)
  );

  mm_dispatch #(.N_MLP(N_MLP)) u_dispatch (
    .clk(clk), .rst_n(rst_n),
    .head_valid(!em_empty), .head_pop(em_pop),
    .unit_idle(unit_idle), .unit_pop(unit_pop), .unit_valid(unit_valid),
    .all_busy(all_busy)
  );

  for (genvar i = 0; i < N_MLP; i++) begin : g_mlp
    mlp_eval_unit #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) u_unit (
      .clk(clk), .rst_n(rst_n),
      .n_in(n_in), .n_out(n_out), .const_bits(const_bits),
      .exp_we(exp_we), .exp_addr(exp_addr), .exp_wdata(exp_wdata),
      .child_valid(unit_valid[i]), .child(em_head), .child_pop(unit_pop[i]),
      .idle(unit_idle[i]),
      .res_valid(res_valid[i]), .res(res[i]), .res_ready(res_ready[i])
    );
  end

  assign mlp_busy = ~unit_idle;

  mm_collect #(.N_MLP(N_MLP)) u_collect (
    .clk(clk), .rst_n(rst_n),
    .res_valid(res_valid), .res(res), .res_ready(res_ready),
    .fifo_full(me_full), .fifo_wr(me_wr), .fifo_data(me_wdata), .stall(me_stall)
  );

  gpp_fifo #(.WIDTH($bits(me_entry_t)), .DEPTH(ME_DEPTH)) u_mefifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(me_wr), .wr_data(me_wdata), .full(me_full),
    .rd_en(me_rd), .rd_data(me_data), .empty(me_empty), .count(me_count)
  );
endmodule
