// gpp_pkg: constants and types shared by the Multi-Logic-Unit Processor
// (MLP) and the multi-MLP evaluator.
//
// The MLP has 32 one-bit registers: R0-R15 are variable registers, each
// written only by its own logic unit (LoU), and R16-R31 are read-only
// constant registers that hold program inputs and logic constants. A
// sub-instruction (SI) for a K-input LUT is {opcode, operand A .. operand K}:
// the opcode is 2^K+1 bits, a nop flag in its top bit above the 2^K-bit LUT
// contents, and each operand is a 5-bit register number. For K=4 that is
// 17+4*5 = 37 bits, for K=2 it is 5+2*5 = 15 bits, as in the source
// encoding tables. Bit i of the LUT contents is the output for the input
// value i, where operand A is the most significant input bit.
package gpp_pkg;

  localparam int unsigned NUM_LOU   = 16;  // logic units per parallel instruction
  localparam int unsigned NUM_REGS  = 32;  // R0..R31
  localparam int unsigned NUM_VAR   = 16;  // R0..R15 variable registers
  localparam int unsigned REG_AW    = 5;   // operand field width
  localparam int unsigned OUT_REGS  = 8;   // R0..R7 returned per training case
  localparam int unsigned BUS_W     = 64;  // host data bus
  localparam int unsigned HOST_AW   = 14;  // host address bus
  localparam int unsigned ROWS_PER_WORD = BUS_W / OUT_REGS;  // 8 training cases per word

  localparam int unsigned ID_W      = 16;  // child tag carried through the evaluator
  localparam int unsigned CNT_W     = 12;  // unmatched-case counter, up to 2^8 rows x 8 outputs

  // Width of one SI and of one parallel instruction for a K-input LUT MLP.
  function automatic int unsigned si_width(int unsigned k);
    return (1 << k) + 1 + REG_AW * k;
  endfunction

  function automatic int unsigned pi_width(int unsigned k);
    return NUM_LOU * si_width(k);
  endfunction

  // Control-unit states
  typedef enum logic [2:0] {
    CU_IDLE  = 3'd0,   // waiting for start
    CU_ROW   = 3'd1,   // capture previous case, clear R0-R15, load constants
    CU_SEL   = 3'd2,   // PE cycle 1: operand muxes -> IOR
    CU_LUT   = 3'd3,   // PE cycle 2: LUT lookup -> Ri
    CU_FINAL = 3'd4    // capture the last case and flush the output buffer
  } cu_state_e;

  // Entry of the MLP-to-EE FIFO (MEFIFO)
  typedef struct packed {
    logic [ID_W-1:0]  id;         // tag of the evaluated child
    logic [CNT_W-1:0] unmatched;  // U, number of unmatched training cases
  } me_entry_t;

endpackage
