// tb_mlp_eval_unit: one evaluation unit. Presents children (random
// programs, plus one program that computes the target exactly, so U=0) as
// a FIFO head would, checks that the unit pops each child once, reports
// {id, U} with U equal to the interpreter's count, holds the result while
// res_ready is low, and takes 1 + L + 1 + N(2L+1)+2 + 1 cycles from the grant
// to the result.
module tb_mlp_eval_unit;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int MAX_IN = 8;
  localparam int SIW = si_width(K);
  localparam int PIW = pi_width(K);
  localparam int CHILD_W = ID_W + 5 + LMAX * PIW;

  logic clk = 0, rst_n = 0;
  logic [3:0] n_in = '0, n_out = '0;
  logic [15:0] const_bits = '0;
  logic exp_we = 0;
  logic [4:0] exp_addr = '0;
  logic [63:0] exp_wdata = '0;
  logic child_valid = 0, child_pop, idle, res_valid, res_ready = 0;
  logic [CHILD_W-1:0] child = '0;
  me_entry_t res;
  int checks = 0, failures = 0;
  prog_t prog;
  table_t expt;

  always #5 clk = ~clk;

  mlp_eval_unit #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ops[4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int l, ni, no, u, cyc, pops;
      logic [15:0] cb;
      ni = $urandom_range(7, 5);
      no = $urandom_range(8, 1);
      cb = 16'($urandom);
      for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = rand_si(K);
      l = $urandom_range(LMAX, 1);
      for (int r = 0; r < 256; r++) expt[r] = 8'($urandom);
      if (t == 0) begin
        // R0 = XOR of the four lowest row bits, all else nop: target equals it
        for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = nop_si(K);
        ops = '{28, 29, 30, 31};
        prog[0][0] = make_si(K, 1'b0, 64'h6996, ops);
        l = 1; no = 1;
        for (int r = 0; r < 256; r++) expt[r] = {7'($urandom), ^r[3:0]};
      end
      u = ref_unmatched(K, prog, l, ni, no, cb, expt);
      n_in = 4'(ni); n_out = 4'(no); const_bits = cb;
      for (int w = 0; w < 32; w++) begin
        @(negedge clk); exp_we = 1; exp_addr = 5'(w); exp_wdata = table_word(expt, w);
      end
      @(negedge clk); exp_we = 0;
      child = '0;
      child[CHILD_W-1 -: ID_W] = ID_W'(100 + t);
      child[LMAX*PIW +: 5] = 5'(l);
      for (int p = 0; p < LMAX; p++)
        for (int j = 0; j < 16; j++) child[p*PIW + j*SIW +: SIW] = prog[p][j][SIW-1:0];
      chk("idle before", idle === 1'b1);
      child_valid = 1;
      cyc = 0; pops = 0;
      while (!res_valid && cyc < 100000) begin
        @(posedge clk);
        if (child_pop) pops++;
        #1;
        if (child_pop === 1'b0 && pops == 1) child_valid = 0;
        cyc++;
      end
      chk("one pop", pops == 1);
      chk("latency", cyc == 1 + l + 1 + (1 << ni) * (2 * l + 1) + 2 + 1);
      if (cyc != 1 + l + 1 + (1 << ni) * (2 * l + 1) + 2 + 1) $display("latency %0d", cyc);
      repeat (3) @(negedge clk);
      chk("result held", res_valid === 1'b1);
      chk("id", res.id == ID_W'(100 + t));
      chk("U", int'(res.unmatched) == u);
      if (int'(res.unmatched) != u) $display("U=%0d expected %0d", res.unmatched, u);
      if (t == 0) chk("correct program scores U=0", res.unmatched == '0);
      res_ready = 1;
      @(negedge clk); res_ready = 0;
      @(negedge clk);
      chk("idle after", idle === 1'b1 && res_valid === 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
