// mlp_cu: control unit of the MLP.
//
// On start the CU runs the stored program once for every training case
// (truth-table row) 0 .. 2^n_in-1. Each row begins with one ROW cycle, in
// which the outputs of the previous row are captured, the variable
// registers R0-R15 are cleared, the constant registers are loaded with the
// row's inputs and SIR0-15 receive PI[0]. Then every parallel instruction
// takes two cycles, SEL (operands into the IORs) and LUT (results into
// R0-R15); SIRs receive the next PI at the end of LUT. After the last row a
// FINAL cycle captures its outputs and flushes the output buffer, and done
// pulses one cycle later. A row therefore costs 2L+1 cycles and a whole
// program N(2L+1)+2 cycles from the start cycle to the done pulse.
//
// The two cycles per sub-instruction follow the source design; the
// per-row housekeeping cycle and the prefetch scheme are this design's
// choice. The program memory read is synchronous: prog_raddr issued in one
// cycle gives the word in the next, so the CU reads PI[pi+1] during SEL and
// PI[0] at all other times.
module mlp_cu
  import gpp_pkg::*;
#(
  parameter int unsigned LMAX   = 25,
  parameter int unsigned MAX_IN = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(LMAX+1)-1:0]     len,        // program length L, held while busy
  input  logic [$clog2(MAX_IN+1)-1:0]   n_in,       // inputs, 2^n_in rows
  output logic [$clog2(LMAX)-1:0]       prog_raddr,
  output logic                          sir_load,
  output logic                          sel_en,
  output logic                          lut_en,
  output logic                          row_init,   // clear R0-R15, load constants
  output logic [MAX_IN-1:0]             row,        // current row
  output logic                          capture,    // R0-R7 hold the result of cap_row
  output logic [MAX_IN-1:0]             cap_row,
  output logic                          flush,
  output logic                          busy,
  output logic                          done
);
  localparam int unsigned PW = $clog2(LMAX);

  cu_state_e           state;
  logic [PW-1:0]       pi;
  logic [MAX_IN:0]     row_cnt;     // one extra bit to reach 2^MAX_IN
  logic [MAX_IN:0]     nrows;
  logic                last_pi;
  logic                last_row;

  assign nrows    = (MAX_IN+1)'(1) << n_in;
  assign last_pi  = ({1'b0, pi} + 1'b1) >= (PW+1)'(len);
  assign last_row = (row_cnt + 1'b1) >= nrows;
  assign row      = row_cnt[MAX_IN-1:0];
  assign cap_row  = row_cnt[MAX_IN-1:0] - 1'b1;

  assign row_init = (state == CU_ROW);
  assign sel_en   = (state == CU_SEL);
  assign lut_en   = (state == CU_LUT);
  assign sir_load = (state == CU_ROW) || (state == CU_LUT);
  assign capture  = ((state == CU_ROW) && (row_cnt != '0)) || (state == CU_FINAL);
  assign flush    = (state == CU_FINAL);
  assign busy     = (state != CU_IDLE);

  always_comb begin
    prog_raddr = '0;
    if (state == CU_SEL && ({1'b0, pi} + 1'b1) < (PW+1)'(LMAX)) prog_raddr = pi + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= CU_IDLE;
      pi      <= '0;
      row_cnt <= '0;
      done    <= 1'b0;
    end else begin
      done <= (state == CU_FINAL);
      unique case (state)
        CU_IDLE: begin
          pi      <= '0;
          row_cnt <= '0;
          if (start) state <= CU_ROW;
        end
        CU_ROW: begin
          pi <= '0;
          if (len != '0)      state <= CU_SEL;
          else if (last_row)  state <= CU_FINAL;
          if (len == '0) row_cnt <= row_cnt + 1'b1;
        end
        CU_SEL: state <= CU_LUT;
        CU_LUT: begin
          if (!last_pi) begin
            pi    <= pi + 1'b1;
            state <= CU_SEL;
          end else if (!last_row) begin
            row_cnt <= row_cnt + 1'b1;
            state   <= CU_ROW;
          end else begin
            row_cnt <= row_cnt + 1'b1;
            state   <= CU_FINAL;
          end
        end
        CU_FINAL: state <= CU_IDLE;
        default:  state <= CU_IDLE;
      endcase
    end
  end

  // start is only honoured while idle
  assert property (@(posedge clk) disable iff (!rst_n) (state == CU_IDLE && start) |=> state == CU_ROW);
endmodule
