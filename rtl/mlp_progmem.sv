// mlp_progmem: program memory of the MLP, one parallel instruction (PI)
// per word.
//
// A word holds the 16 sub-instructions of one PI, SI j in bits
// [j*SIW +: SIW]. The write port has a per-SI write enable so that a host
// can write one SI per bus cycle while a loader can write a whole PI in one
// cycle. The read port is synchronous, as in an FPGA block RAM: q shows the
// word addressed in the previous cycle. The source design keeps the program
// in one block RAM; the word organisation and the per-SI enables are this
// design's choice.
module mlp_progmem
  import gpp_pkg::*;
#(
  parameter int unsigned K    = 4,
  parameter int unsigned LMAX = 25
) (
  input  logic                            clk,
  input  logic                            we,
  input  logic [$clog2(LMAX)-1:0]         waddr,
  input  logic [NUM_LOU-1:0]              wsi_en,
  input  logic [NUM_LOU*si_width(K)-1:0]  wdata,
  input  logic [$clog2(LMAX)-1:0]         raddr,
  output logic [NUM_LOU*si_width(K)-1:0]  q
);
  localparam int unsigned SIW = si_width(K);

  logic [NUM_LOU*SIW-1:0] mem [LMAX];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned j = 0; j < NUM_LOU; j++) begin
        if (wsi_en[j]) mem[waddr][j*SIW +: SIW] <= wdata[j*SIW +: SIW];
      end
    end
    q <= mem[raddr];
  end
endmodule
