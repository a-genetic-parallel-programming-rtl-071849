// tb_mlp_host_if: host interface on its own. Checks SI writes (PI, lane,
// data, blocked while busy), CONFIG write and read-back, the start pulse
// (one cycle, refused while busy), the done flag in STATUS, and a burst
// read of result words filled through the output-word port, both as single
// reads and as a burst of 32 back-to-back reads (one word per cycle).
module tb_mlp_host_if;
  import gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int MAX_IN = 8;
  localparam int SIW = si_width(K);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_re = 0;
  logic [13:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic prog_we;
  logic [4:0] prog_waddr;
  logic [15:0] prog_wsi_en;
  logic [NUM_LOU*SIW-1:0] prog_wdata;
  logic [4:0] len;
  logic [3:0] n_in;
  logic [15:0] const_bits;
  logic start, busy = 0, done = 0, word_valid = 0;
  logic [63:0] word = '0;
  logic [4:0] word_index = '0;
  int checks = 0, failures = 0;
  int nstart = 0;

  always #5 clk = ~clk;

  mlp_host_if #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) dut (.*);

  always @(posedge clk) if (start) nstart++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    #1;
  endtask

  task automatic bus_idle();
    @(negedge clk); host_we = 0; host_re = 0;
  endtask

  task automatic bus_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk); host_we = 0; host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask

  initial begin
    logic [63:0] d;
    logic [63:0] words [32];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // SI writes
    for (int t = 0; t < 200; t++) begin
      int p, j;
      logic [63:0] v;
      p = $urandom_range(LMAX - 1, 0); j = $urandom_range(15, 0);
      v = {$urandom, $urandom};
      bus_write(14'(p * 16 + j), v);
      chk("prog_we", prog_we === 1'b1);
      chk("prog_waddr", int'(prog_waddr) == p);
      chk("lane", prog_wsi_en == (16'h1 << j));
      chk("data", prog_wdata[j*SIW +: SIW] == v[SIW-1:0]);
    end
    busy = 1;
    bus_write(14'h0003, 64'h1);
    chk("no program write while busy", prog_we === 1'b0);
    busy = 0;
    bus_idle();

    // CONFIG
    bus_write(14'h2000, {32'h0, 16'hBEEF, 4'h0, 4'd6, 2'b00, 6'd17});
    bus_idle();
    chk("len", len == 5'd17);
    chk("n_in", n_in == 4'd6);
    chk("const_bits", const_bits == 16'hBEEF);
    bus_read(14'h2000, d);
    chk("config read-back", d == {32'h0, 16'hBEEF, 4'h0, 4'd6, 2'b00, 6'd17});

    // start pulse
    nstart = 0;
    bus_write(14'h2001, 64'h1);
    bus_idle();
    @(negedge clk);
    chk("one start pulse", nstart == 1);
    busy = 1;
    bus_write(14'h2001, 64'h1);
    bus_idle();
    @(negedge clk);
    chk("no start while busy", nstart == 1);
    bus_read(14'h2001, d);
    chk("status busy, not done", d[1:0] == 2'b01);

    // results arrive, then done
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      word_valid = 1; word_index = 5'(w); word = {$urandom, $urandom}; words[w] = word;
    end
    @(negedge clk); word_valid = 0; done = 1;
    @(negedge clk); done = 0; busy = 0;
    bus_read(14'h2001, d);
    chk("status done", d[1:0] == 2'b10);
    for (int w = 0; w < 32; w++) begin
      bus_read(14'(14'h3000 + w), d);
      chk("result word", d == words[w]);
    end
    // Burst: one read strobe per cycle, so 256 rows take 32 bus cycles
    @(negedge clk); host_re = 1; host_addr = 14'h3000;
    for (int w = 1; w <= 32; w++) begin
      @(negedge clk);
      chk("burst word", host_rdata == words[w - 1]);
      if (w < 32) host_addr = 14'(14'h3000 + w);
      else host_re = 0;
    end
    bus_write(14'h2001, 64'h1);
    bus_idle();
    bus_read(14'h2001, d);
    chk("done cleared by start", d[1] == 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
