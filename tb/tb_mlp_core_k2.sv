// tb_mlp_core_k2: the MLP core built for 2-input LUTs (K=2).
//
// Runs the published three-PI 1-bit full adder (inputs Cin, A, B in
// R29..R31, constants 0 in R16-R21 and 1 in R22-R28, Cout in R0, S in R1)
// and checks Cout and S against arithmetic on the row index. Then runs
// random 2-LUT programs against the tb_gpp_pkg interpreter, with the cycle
// count N(2L+1)+2 checked each time.
module tb_mlp_core_k2;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 2;
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
    repeat (300000) @(posedge clk);
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

  function automatic si_t si2(int f, int a, int b);
    int ops[4];
    ops = '{a, b, 0, 0};
    return make_si(K, 1'b0, 64'(f), ops);
  endfunction

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Published full adder
    for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = nop_si(K);
    prog[0][4]  = si2(4'h9, 29, 30);   // r04 = XNOR(Cin, A)
    prog[1][0]  = si2(4'h8, 4, 30);    // r00 = r04 AND A
    prog[1][14] = si2(4'h2, 4, 31);    // r14 = !r04 AND B
    prog[2][0]  = si2(4'h6, 14, 0);    // r00 = r14 XOR r00
    prog[2][1]  = si2(4'h9, 31, 4);    // r01 = XNOR(B, r04)
    load_prog(3);
    run(3, 3, 16'h1FC0, cyc);
    checks++;
    if (cyc != 8 * 7 + 2) begin failures++; $display("cycle count %0d", cyc); end
    for (int row = 0; row < 8; row++) begin
      int cin, a, b, sum;
      logic [7:0] g;
      cin = (row >> 2) & 1; a = (row >> 1) & 1; b = row & 1;
      sum = cin + a + b;
      g = got[0][row * 8 +: 8];
      checks++;
      if (g[0] !== sum[1] || g[1] !== sum[0]) begin
        failures++; $display("full adder row %0d: Cout=%b S=%b", row, g[0], g[1]);
      end
    end

    // Random 2-LUT programs
    for (int t = 0; t < 10; t++) begin
      int l, ni;
      logic [15:0] cb;
      l = $urandom_range(LMAX, 1);
      ni = $urandom_range(7, 3);
      cb = 16'($urandom);
      for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = rand_si(K);
      load_prog(l);
      run(l, ni, cb, cyc);
      checks++;
      if (cyc != (1 << ni) * (2 * l + 1) + 2) begin failures++; $display("cycle count %0d", cyc); end
      for (int row = 0; row < (1 << ni); row++) begin
        logic [7:0] exp;
        exp = ref_row(K, prog, l, ni, cb, row);
        checks++;
        if (got[row / 8][(row % 8) * 8 +: 8] !== exp) begin
          failures++;
          if (failures < 10) $display("row %0d mismatch", row);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
