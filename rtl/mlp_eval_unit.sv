// mlp_eval_unit: one evaluation engine of the multi-MLP evaluator.
//
// The unit takes a child program from the head of the EMFIFO, copies its L
// parallel instructions into the program memory of its own MLP, one PI per
// cycle, and pops the FIFO entry with the last copy. It then starts the MLP
// on the whole truth table, lets mlp_fitness count the unmatched cases U,
// and offers {id, U} on a valid/ready result port until the collector
// takes it; only then does it report idle again.
//
// Child entry layout: {id, L, PI[LMAX-1] .. PI[0]}, PI i in bits
// [i*PIW +: PIW], and SI j of a PI in bits [j*SIW +: SIW]. Timing from the
// grant: one accept cycle, L load cycles, one start cycle, N(2L+1)+2 MLP cycles and one cycle
// to register the result. One MLP per unit and the EMFIFO/MEFIFO exchange
// follow the source design; the loading scheme and handshakes are this
// design's.
module mlp_eval_unit
  import gpp_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned LMAX   = 25,
  parameter int unsigned MAX_IN = 8,
  localparam int unsigned LW      = $clog2(LMAX+1),
  localparam int unsigned PIW     = pi_width(K),
  localparam int unsigned CHILD_W = ID_W + LW + LMAX * PIW,
  localparam int unsigned RAW     = MAX_IN - $clog2(ROWS_PER_WORD)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // problem configuration, shared by all units
  input  logic [$clog2(MAX_IN+1)-1:0]     n_in,
  input  logic [$clog2(OUT_REGS+1)-1:0]   n_out,
  input  logic [NUM_REGS-NUM_VAR-1:0]     const_bits,
  input  logic                            exp_we,
  input  logic [RAW-1:0]                  exp_addr,
  input  logic [BUS_W-1:0]                exp_wdata,
  // child from the EMFIFO head
  input  logic                            child_valid,
  input  logic [CHILD_W-1:0]              child,
  output logic                            child_pop,
  output logic                            idle,
  // result towards the MEFIFO
  output logic                            res_valid,
  output me_entry_t                       res,
  input  logic                            res_ready
);
  typedef enum logic [2:0] {EU_IDLE, EU_LOAD, EU_START, EU_RUN, EU_RESULT} eu_state_e;

  eu_state_e               state;
  logic [$clog2(LMAX)-1:0] ld_pi;
  logic [LW-1:0]           len_q;
  logic [ID_W-1:0]         id_q;
  logic [LW-1:0]           child_len;
  logic [ID_W-1:0]         child_id;
  logic                    last_load;

  logic                    core_busy, core_done, word_valid, fit_valid;
  logic [BUS_W-1:0]        word;
  logic [RAW-1:0]          word_index;
  logic [CNT_W-1:0]        unmatched;

  assign child_id  = child[CHILD_W-1 -: ID_W];
  assign child_len = child[LMAX*PIW +: LW];
  assign last_load = (child_len == '0) || (({1'b0, ld_pi} + 1'b1) >= (LW+1)'(child_len));
  assign child_pop = (state == EU_LOAD) && last_load;
  assign idle      = (state == EU_IDLE);
  assign res_valid = (state == EU_RESULT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= EU_IDLE;
      ld_pi <= '0;
      len_q <= '0;
      id_q  <= '0;
      res   <= '0;
    end else begin
      unique case (state)
        EU_IDLE: begin
          ld_pi <= '0;
          if (child_valid) state <= EU_LOAD;
        end
        EU_LOAD: begin
          ld_pi <= ld_pi + 1'b1;
          if (last_load) begin
            len_q <= child_len;
            id_q  <= child_id;
            state <= EU_START;
          end
        end
        EU_START: state <= EU_RUN;
        EU_RUN: begin
          if (fit_valid) begin
            res   <= '{id: id_q, unmatched: unmatched};
            state <= EU_RESULT;
          end
        end
        EU_RESULT: if (res_ready) state <= EU_IDLE;
        default: state <= EU_IDLE;
      endcase
    end
  end

  mlp_core #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) u_mlp (
    .clk        (clk),
    .rst_n      (rst_n),
    .prog_we    ((state == EU_LOAD) && (child_len != '0)),
    .prog_waddr (ld_pi),
    .prog_wsi_en({NUM_LOU{1'b1}}),
    .prog_wdata (child[ld_pi*PIW +: PIW]),
    .len        (len_q),
    .n_in       (n_in),
    .const_bits (const_bits),
    .start      (state == EU_START),
    .busy       (core_busy),
    .done       (core_done),
    .word_valid (word_valid),
    .word       (word),
    .word_index (word_index)
  );

  mlp_fitness #(.MAX_IN(MAX_IN)) u_fit (
    .clk         (clk),
    .rst_n       (rst_n),
    .exp_we      (exp_we),
    .exp_addr    (exp_addr),
    .exp_wdata   (exp_wdata),
    .n_in        (n_in),
    .n_out       (n_out),
    .word_valid  (word_valid),
    .word        (word),
    .word_index  (word_index),
    .done        (core_done),
    .result_valid(fit_valid),
    .unmatched   (unmatched)
  );

  // The child must stay at the FIFO head while it is being copied
  assert property (@(posedge clk) disable iff (!rst_n) (state == EU_LOAD) |-> child_valid);
  // The program memory is only written while the MLP is stopped
  assert property (@(posedge clk) disable iff (!rst_n) (state inside {EU_IDLE, EU_LOAD}) |-> !core_busy);
  // A result is held until the collector accepts it
  assert property (@(posedge clk) disable iff (!rst_n) (res_valid && !res_ready) |=> (res_valid && $stable(res)));
endmodule
