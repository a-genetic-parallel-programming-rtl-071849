// mlp_host_if: host-bus interface of the hardware MLP.
//
// The host PC reaches the MLP through a memory-mapped 64-bit data bus with a
// 14-bit word address (a DIMM-slot board). Through it the host writes the
// program one sub-instruction per bus write, writes the configuration,
// starts an evaluation, polls the status, and reads back the program
// outputs in burst mode: the MLP returns R0-R7 of eight truth-table rows per
// 64-bit word, so a table of N rows is read in N/8 consecutive reads.
//
// Address map (word addresses; this map is this design's choice):
//   0x0000-0x1FFF  write  SI: addr[8:4] = PI index, addr[3:0] = SI index,
//                         wdata[SIW-1:0] = sub-instruction
//   0x2000         r/w    CONFIG: [5:0] L, [11:8] n_in, [31:16] const_bits
//   0x2001         write  CTRL: any write starts an evaluation when idle
//                  read   STATUS: bit 0 busy, bit 1 done (set by the end of
//                         an evaluation, cleared by the next start)
//   0x3000+w       read   RESULT word w, byte b = R7..R0 of row 8w+b
// An SI write is passed to the program memory in the same cycle: the SI
// from the low data bits is copied onto all 16 lanes, the address picks
// the PI and the one lane whose write enable is raised, so prog_waddr and
// prog_wdata are wired straight from the bus.
// Reads return data on host_rdata in the cycle after host_re. The bus
// width, the address width and the burst read of eight rows per word
// follow the source design.
module mlp_host_if
  import gpp_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned LMAX   = 25,
  parameter int unsigned MAX_IN = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // host bus
  input  logic                            host_we,
  input  logic                            host_re,
  input  logic [HOST_AW-1:0]              host_addr,
  input  logic [BUS_W-1:0]                host_wdata,
  output logic [BUS_W-1:0]                host_rdata,
  // to the MLP
  output logic                            prog_we,
  output logic [$clog2(LMAX)-1:0]         prog_waddr,
  output logic [NUM_LOU-1:0]              prog_wsi_en,
  output logic [NUM_LOU*si_width(K)-1:0]  prog_wdata,
  output logic [$clog2(LMAX+1)-1:0]       len,
  output logic [$clog2(MAX_IN+1)-1:0]     n_in,
  output logic [NUM_REGS-NUM_VAR-1:0]     const_bits,
  output logic                            start,
  input  logic                            busy,
  input  logic                            done,
  input  logic                            word_valid,
  input  logic [BUS_W-1:0]                word,
  input  logic [MAX_IN-$clog2(ROWS_PER_WORD)-1:0] word_index
);
  localparam int unsigned SIW   = si_width(K);
  localparam int unsigned LW    = $clog2(LMAX+1);
  localparam int unsigned NW    = $clog2(MAX_IN+1);
  localparam int unsigned RWORDS = (1 << MAX_IN) / ROWS_PER_WORD;
  localparam int unsigned RAW   = MAX_IN - $clog2(ROWS_PER_WORD);

  localparam logic [HOST_AW-1:0] A_CONFIG = 14'h2000;
  localparam logic [HOST_AW-1:0] A_CTRL   = 14'h2001;

  logic             sel_prog, sel_res;
  logic             done_flag;
  logic [BUS_W-1:0] res_ram [RWORDS];

  assign sel_prog = (host_addr[13] == 1'b0);
  assign sel_res  = (host_addr[13:12] == 2'b11);

  // Program writes: the SI is replicated on every lane, one lane enabled
  assign prog_we     = host_we && sel_prog && !busy;
  assign prog_waddr  = host_addr[4 +: $clog2(LMAX)];
  assign prog_wdata  = {NUM_LOU{host_wdata[SIW-1:0]}};
  always_comb begin
    prog_wsi_en = '0;
    prog_wsi_en[host_addr[3:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len        <= '0;
      n_in       <= '0;
      const_bits <= '0;
      start      <= 1'b0;
      done_flag  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (host_we && host_addr == A_CONFIG && !busy) begin
        len        <= host_wdata[LW-1:0];
        n_in       <= host_wdata[8 +: NW];
        const_bits <= host_wdata[16 +: (NUM_REGS-NUM_VAR)];
      end
      if (host_we && host_addr == A_CTRL && !busy && !start) begin
        start     <= 1'b1;
        done_flag <= 1'b0;
      end else if (done) begin
        done_flag <= 1'b1;
      end
    end
  end

  // Result RAM, filled by the output buffer, read in bursts by the host
  always_ff @(posedge clk) begin
    if (word_valid) res_ram[word_index] <= word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rdata <= '0;
    end else if (host_re) begin
      if (sel_res)
        host_rdata <= res_ram[host_addr[RAW-1:0]];
      else if (host_addr == A_CONFIG)
        host_rdata <= BUS_W'({const_bits, 4'b0000, 4'(n_in), 2'b00, 6'(len)});
      else if (host_addr == A_CTRL)
        host_rdata <= BUS_W'({done_flag, busy});
      else
        host_rdata <= '0;
    end
  end
endmodule
