// mlp_pilchard: the hardware-assisted MLP as a host-attached accelerator.
//
// The evolution engine runs as software on the host PC and uses this
// accelerator for fitness evaluation: it writes a child program and the
// truth-table configuration over the 64-bit host bus, starts the MLP, and
// reads the program outputs of all rows back in bursts of eight rows per
// word (see mlp_host_if for the address map). One evaluation takes
// N(2L+1)+2 cycles for N rows and L parallel instructions (see mlp_cu).
// The partitioning into a 4-LUT MLP core behind a 64-bit host interface
// follows the source design, which runs it at 100 MHz.
module mlp_pilchard
  import gpp_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned LMAX   = 25,
  parameter int unsigned MAX_IN = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_we,
  input  logic               host_re,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [BUS_W-1:0]   host_wdata,
  output logic [BUS_W-1:0]   host_rdata,
  output logic               busy        // evaluation in progress
);
  localparam int unsigned SIW = si_width(K);

  logic                        prog_we;
  logic [$clog2(LMAX)-1:0]     prog_waddr;
  logic [NUM_LOU-1:0]          prog_wsi_en;
  logic [NUM_LOU*SIW-1:0]      prog_wdata;
  logic [$clog2(LMAX+1)-1:0]   len;
  logic [$clog2(MAX_IN+1)-1:0] n_in;
  logic [NUM_REGS-NUM_VAR-1:0] const_bits;
  logic                        start, done, word_valid;
  logic [BUS_W-1:0]            word;
  logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] word_index;

  mlp_host_if #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) u_host_if (
    .clk(clk), .rst_n(rst_n),
    .host_we(host_we), .host_re(host_re), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .prog_we(prog_we), .prog_waddr(prog_waddr), .prog_wsi_en(prog_wsi_en),
    .prog_wdata(prog_wdata), .len(len), .n_in(n_in), .const_bits(const_bits),
    .start(start), .busy(busy), .done(done),
    .word_valid(word_valid), .word(word), .word_index(word_index)
  );

  mlp_core #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) u_mlp (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_waddr(prog_waddr), .prog_wsi_en(prog_wsi_en),
    .prog_wdata(prog_wdata), .len(len), .n_in(n_in), .const_bits(const_bits),
    .start(start), .busy(busy), .done(done),
    .word_valid(word_valid), .word(word), .word_index(word_index)
  );
endmodule
