// mlp_core: the Multi-Logic-Unit Processor (MLP).
//
// The MLP is a MIMD register machine that evaluates an evolved parallel
// program on every row of a truth table. It has 16 logic units (PE0-PE15),
// each owning one variable register (R0-R15), and 16 read-only constant
// registers (R16-R31). A program is a sequence of L parallel instructions
// (PIs), each made of 16 sub-instructions (SIs), one per PE; SIj is loaded
// into sub-instruction register SIRj and executed by PEj in two cycles, so
// all 16 SIs of a PI run concurrently and read the register values left by
// the previous PI.
//
// For each row the control unit clears R0-R15, loads the constant
// registers and runs the whole program; R0-R7 are then packed by the
// output buffer, eight rows per 64-bit word. Inputs are placed at the top
// of the constant registers: R31 holds row bit 0, R30 row bit 1, and so on
// up to R(32-n_in), so the first-named input is the row's most significant
// bit. Constant registers below the inputs take their value from
// const_bits (bit j for R16+j). Timing: 2L+1 cycles per row, see mlp_cu.
//
// Ports: a program write port (one PI word with per-SI enables), the
// configuration len/n_in/const_bits (held stable while busy), start/busy/
// done, and the output word stream. K=4 gives the 4-LUT MLP of the
// hardware implementation, K=2 the 2-LUT MLP; the register organisation,
// SI format and two-cycle PE follow the source design, while the input
// bit order and the constant-register loading scheme are this design's.
module mlp_core
  import gpp_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned LMAX   = 25,
  parameter int unsigned MAX_IN = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // program memory write port
  input  logic                            prog_we,
  input  logic [$clog2(LMAX)-1:0]         prog_waddr,
  input  logic [NUM_LOU-1:0]              prog_wsi_en,
  input  logic [NUM_LOU*si_width(K)-1:0]  prog_wdata,
  // configuration
  input  logic [$clog2(LMAX+1)-1:0]       len,
  input  logic [$clog2(MAX_IN+1)-1:0]     n_in,
  input  logic [NUM_REGS-NUM_VAR-1:0]     const_bits,
  // control
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  // results, eight rows per word
  output logic                            word_valid,
  output logic [BUS_W-1:0]                word,
  output logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] word_index
);
  localparam int unsigned SIW  = si_width(K);
  localparam int unsigned NCON = NUM_REGS - NUM_VAR;

  logic [NUM_LOU*SIW-1:0]  prog_q;
  logic [NUM_LOU*SIW-1:0]  sir;        // SIR0..SIR15
  logic [NUM_VAR-1:0]      vregs;      // R0..R15
  logic [NCON-1:0]         cregs;      // R16..R31
  logic [NUM_REGS-1:0]     regs;

  logic [$clog2(LMAX)-1:0] prog_raddr;
  logic sir_load, sel_en, lut_en, row_init, capture, flush;
  logic [MAX_IN-1:0] row, cap_row;

  assign regs = {cregs, vregs};

  mlp_progmem #(.K(K), .LMAX(LMAX)) u_progmem (
    .clk   (clk),
    .we    (prog_we),
    .waddr (prog_waddr),
    .wsi_en(prog_wsi_en),
    .wdata (prog_wdata),
    .raddr (prog_raddr),
    .q     (prog_q)
  );

  mlp_cu #(.LMAX(LMAX), .MAX_IN(MAX_IN)) u_cu (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .len       (len),
    .n_in      (n_in),
    .prog_raddr(prog_raddr),
    .sir_load  (sir_load),
    .sel_en    (sel_en),
    .lut_en    (lut_en),
    .row_init  (row_init),
    .row       (row),
    .capture   (capture),
    .cap_row   (cap_row),
    .flush     (flush),
    .busy      (busy),
    .done      (done)
  );

  // Sub-instruction registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sir <= '0;
    else if (sir_load) sir <= prog_q;
  end

  // Constant registers: inputs from the row index at the top, constants below
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cregs <= '0;
    end else if (row_init) begin
      for (int unsigned j = 0; j < NCON; j++) begin
        if ((NCON - 1 - j) < n_in && (NCON - 1 - j) < MAX_IN)
          cregs[j] <= row[(NCON-1-j) % MAX_IN];
        else
          cregs[j] <= const_bits[j];
      end
    end
  end

  for (genvar i = 0; i < NUM_LOU; i++) begin : g_pe
    mlp_pe #(.K(K)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .si    (sir[i*SIW +: SIW]),
      .regs  (regs),
      .sel_en(sel_en),
      .lut_en(lut_en),
      .clr   (row_init),
      .ri    (vregs[i])
    );
  end

  mlp_outbuf #(.MAX_IN(MAX_IN)) u_outbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .capture   (capture),
    .cap_row   (cap_row),
    .outs      (vregs[OUT_REGS-1:0]),
    .flush     (flush),
    .word_valid(word_valid),
    .word      (word),
    .word_index(word_index)
  );

  // The program must not change while it runs
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !prog_we);
endmodule
