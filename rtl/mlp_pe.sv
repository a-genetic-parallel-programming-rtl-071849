// mlp_pe: one processing element (logic unit) of the MLP.
//
// A PE executes the sub-instruction held in its sub-instruction register
// in two clock cycles. In the select cycle (sel_en) K multiplexers pick K
// bits out of the 32-bit register file, as named by the SI operand fields,
// and latch them into the internal operand register (IOR). In the lookup
// cycle (lut_en) the latched operands address the K-input LUT whose
// contents are the SI opcode, and the selected bit is written into this
// PE's own variable register Ri. A nop SI leaves Ri unchanged. clr forces
// Ri to 0, which the MLP does before each training case.
//
// The two-cycle select/lookup split with an IOR in between, and the
// ownership of Ri by PEi, follow the source design. Operand A is the most
// significant LUT address bit, matching the published function tables.
// Keeping Ri unchanged on nop is this design's reading of "no operation".
module mlp_pe
  import gpp_pkg::*;
#(
  parameter int unsigned K = 4  // LUT inputs (4 in the hardware MLP, 2 for 2-LUT programs)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [si_width(K)-1:0]  si,      // from SIRi
  input  logic [NUM_REGS-1:0]     regs,    // R31..R0
  input  logic                    sel_en,  // cycle 1: operands -> IOR
  input  logic                    lut_en,  // cycle 2: LUT -> Ri
  input  logic                    clr,     // Ri <= 0
  output logic                    ri
);
  localparam int unsigned LUTW = 1 << K;
  localparam int unsigned SIW  = si_width(K);

  logic [K-1:0]    ior;
  logic [K-1:0]    operands;
  logic [LUTW-1:0] lut;
  logic            nop;

  assign nop = si[SIW-1];
  assign lut = si[SIW-2 -: LUTW];

  // M1..MK: operand A (field nearest the opcode) drives the top address bit
  always_comb begin
    for (int unsigned m = 0; m < K; m++) begin
      operands[K-1-m] = regs[si[REG_AW*(K-m)-1 -: REG_AW]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ior <= '0;
      ri  <= 1'b0;
    end else begin
      if (sel_en) ior <= operands;
      if (clr) ri <= 1'b0;
      else if (lut_en && !nop) ri <= lut[ior];
    end
  end
endmodule
