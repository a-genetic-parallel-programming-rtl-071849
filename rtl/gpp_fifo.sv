// gpp_fifo: synchronous first-in first-out buffer.
//
// Used twice between the evolution engine (EE) and the MLPs: the EMFIFO
// carries children from the EE to the MLPs and the MEFIFO carries fitness
// results back, so that neither side waits for the other. The head entry
// is visible on rd_data while not empty; rd_en pops it, wr_en pushes
// wr_data. A push while full and a pop while empty are ignored (and flagged
// by assertions). The two FIFOs follow the source design; their depth and
// this handshake are this design's choice.
module gpp_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("gpp_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("gpp_fifo: pop while empty");
endmodule
