// mlp_outbuf: output buffer of the MLP.
//
// The host bus is 64 bits wide and programs write their outputs to R0-R7,
// so the buffer packs the eight output bits of eight consecutive training
// cases into one 64-bit word: byte b of word w holds R7..R0 of row 8w+b.
// A word is emitted (word_valid for one cycle, registered) when its last
// byte arrives or when flush marks the end of the program; bytes of rows
// that did not run read as zero. Packing eight cases per word follows the
// source design; the byte order is this design's choice.
module mlp_outbuf
  import gpp_pkg::*;
#(
  parameter int unsigned MAX_IN = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              capture,
  input  logic [MAX_IN-1:0]                 cap_row,
  input  logic [OUT_REGS-1:0]               outs,        // R7..R0
  input  logic                              flush,
  output logic                              word_valid,
  output logic [BUS_W-1:0]                  word,
  output logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] word_index
);
  localparam int unsigned BW = $clog2(ROWS_PER_WORD);

  logic [BUS_W-1:0] acc;
  logic             pending;   // acc holds at least one byte not yet emitted
  logic [BUS_W-1:0] acc_next;
  logic [BW-1:0]    slot;

  assign slot = cap_row[BW-1:0];

  always_comb begin
    acc_next = acc;
    if (capture) acc_next[slot*OUT_REGS +: OUT_REGS] = outs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      pending    <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
      word_index <= '0;
    end else begin
      word_valid <= 1'b0;
      if ((capture && slot == BW'(ROWS_PER_WORD-1)) || (flush && (pending || capture))) begin
        word_valid <= 1'b1;
        word       <= acc_next;
        word_index <= cap_row[MAX_IN-1:BW];
        acc        <= '0;
        pending    <= 1'b0;
      end else if (capture) begin
        acc     <= acc_next;
        pending <= 1'b1;
      end
    end
  end
endmodule
