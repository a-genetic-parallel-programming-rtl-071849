// tb_mlp_pilchard: the host-attached MLP end to end over the 64-bit bus.
// For random 4-LUT programs the host writes every SI, the configuration and
// CTRL, polls STATUS until done, and reads the outputs in a burst of N/8
// words; results are checked against the tb_gpp_pkg interpreter and the
// busy time against N(2L+1)+1 cycles.
module tb_mlp_pilchard;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int SIW = si_width(K);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_re = 0;
  logic [13:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic busy;
  int checks = 0, failures = 0, busy_cycles = 0;
  prog_t prog;

  always #5 clk = ~clk;

  mlp_pilchard dut (.*);

  always @(posedge clk) if (busy) busy_cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic bus_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk); host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int l, ni;
      logic [15:0] cb;
      logic [63:0] d;
      l = (t == 0) ? LMAX : $urandom_range(LMAX, 1);
      ni = (t == 1) ? 8 : $urandom_range(7, 5);
      cb = 16'($urandom);
      for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = rand_si(K);
      for (int p = 0; p < l; p++)
        for (int j = 0; j < 16; j++) bus_write(14'(p * 16 + j), prog[p][j]);
      bus_write(14'h2000, {32'h0, cb, 4'h0, 4'(ni), 2'b00, 6'(l)});
      busy_cycles = 0;
      bus_write(14'h2001, 64'h1);
      do bus_read(14'h2001, d); while (d[1] == 1'b0);
      checks++;
      if (busy_cycles != (1 << ni) * (2 * l + 1) + 1) begin
        failures++; $display("busy %0d cycles, expected %0d", busy_cycles, (1 << ni) * (2 * l + 1) + 1);
      end
      for (int w = 0; w < (1 << ni) / 8; w++) begin
        bus_read(14'(14'h3000 + w), d);
        for (int b = 0; b < 8; b++) begin
          logic [7:0] exp;
          exp = ref_row(K, prog, l, ni, cb, w * 8 + b);
          checks++;
          if (d[b*8 +: 8] !== exp) begin
            failures++;
            if (failures < 10) $display("row %0d: %h expected %h", w * 8 + b, d[b*8 +: 8], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
