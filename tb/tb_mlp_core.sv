// tb_mlp_core: self-checking testbench of the MLP core (4-LUT by default).
//
// 1. A one-SI program with LUT contents 0xF6E0 on R27..R30 is checked
//    against the 16-row table published for that function.
// 2. Random programs of random length on 5, 6 and 8 inputs are checked row
//    by row against the tb_gpp_pkg interpreter.
// Every run also checks the cycle count from start to done, N(2L+1)+2.
module tb_mlp_core;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int MAX_IN = 8;
  localparam int SIW = si_width(K);

  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [$clog2(LMAX)-1:0] prog_waddr = '0;
  logic [NUM_LOU-1:0] prog_wsi_en = '0;
  logic [NUM_LOU*SIW-1:0] prog_wdata = '0;
  logic [$clog2(LMAX+1)-1:0] len = '0;
  logic [$clog2(MAX_IN+1)-1:0] n_in = '0;
  logic [15:0] const_bits = '0;
  logic start = 0, busy, done, word_valid;
  logic [63:0] word;
  logic [MAX_IN-4:0] word_index;

  int checks = 0, failures = 0;
  logic [63:0] got [32];
  prog_t prog;

  always #5 clk = ~clk;

  mlp_core #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) dut (.*);

  always @(posedge clk) if (word_valid) got[word_index] <= word;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_prog(int l);
    for (int p = 0; p < l; p++) begin
      @(negedge clk);
      prog_we = 1; prog_waddr = p[$clog2(LMAX)-1:0]; prog_wsi_en = '1;
      for (int j = 0; j < 16; j++) prog_wdata[j*SIW +: SIW] = prog[p][j][SIW-1:0];
    end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic run(int l, int ni, logic [15:0] cb, output int cycles);
    len = l[$clog2(LMAX+1)-1:0]; n_in = ni[3:0]; const_bits = cb;
    for (int w = 0; w < 32; w++) got[w] = '0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  task automatic check_all(int l, int ni, logic [15:0] cb);
    for (int row = 0; row < (1 << ni); row++) begin
      logic [7:0] exp = ref_row(K, prog, l, ni, cb, row);
      logic [7:0] g = got[row / 8][(row % 8) * 8 +: 8];
      checks++;
      if (g !== exp) begin
        failures++;
        if (failures < 10) $display("row %0d: got %h expected %h (L=%0d n_in=%0d)", row, g, exp, l, ni);
      end
    end
  endtask

  initial begin
    int cyc;
    int ops[4];
    logic [15:0] fig_out;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Published 4-LUT example: outputs for inputs 0000..1111
    fig_out = 16'b1111_0110_1110_0000;  // bit i = output for input value i
    for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = nop_si(K);
    ops = '{27, 28, 29, 30};
    prog[0][0] = make_si(K, 1'b0, 64'hF6E0, ops);
    load_prog(1);
    run(1, 5, 16'h0, cyc);
    checks++;
    if (cyc != 32 * 3 + 2) begin failures++; $display("cycle count %0d", cyc); end
    for (int row = 0; row < 32; row++) begin
      checks++;
      if (got[row / 8][(row % 8) * 8] !== fig_out[(row >> 1) & 15]) begin
        failures++; $display("F6E0 row %0d wrong", row);
      end
    end

    // 2. Random programs
    for (int t = 0; t < 12; t++) begin
      int l, ni;
      logic [15:0] cb;
      l = (t == 0) ? LMAX : $urandom_range(LMAX, 1);
      ni = (t % 3 == 0) ? 8 : ((t % 3 == 1) ? 5 : 6);
      cb = 16'($urandom);
      for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = rand_si(K);
      load_prog(l);
      run(l, ni, cb, cyc);
      checks++;
      if (cyc != (1 << ni) * (2 * l + 1) + 2) begin
        failures++; $display("cycle count %0d, expected %0d", cyc, (1 << ni) * (2 * l + 1) + 2);
      end
      check_all(l, ni, cb);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
