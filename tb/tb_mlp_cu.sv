// tb_mlp_cu: control unit. For random program lengths (including 0) and
// input counts, checks the number of select, lookup and row cycles, that
// rows are captured once each and in order, that the program memory is
// read at PI+1 during each select cycle, and that done comes N(2L+1)+2
// cycles after start.
module tb_mlp_cu;
  import gpp_pkg::*;

  localparam int LMAX = 25;
  localparam int MAX_IN = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] len = '0;
  logic [3:0] n_in = '0;
  logic [4:0] prog_raddr;
  logic sir_load, sel_en, lut_en, row_init, capture, flush, busy, done;
  logic [MAX_IN-1:0] row, cap_row;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_cu #(.LMAX(LMAX), .MAX_IN(MAX_IN)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d (L=%0d n_in=%0d)", what, got, exp, len, n_in);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int l, ni, n, cyc, nsel, nlut, nrow, ncap, nflush, pi, bad_addr, bad_cap;
      l = (t == 0) ? 0 : ((t == 1) ? LMAX : $urandom_range(LMAX, 1));
      ni = $urandom_range(MAX_IN, 3);
      n = 1 << ni;
      len = 5'(l); n_in = 4'(ni);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; nsel = 0; nlut = 0; nrow = 0; ncap = 0; nflush = 0; pi = 0;
      bad_addr = 0; bad_cap = 0;
      while (!done && cyc < 100000) begin
        if (row_init) pi = 0;
        if (sel_en) begin
          nsel++;
          if (int'(prog_raddr) != ((pi + 1 < LMAX) ? pi + 1 : 0)) bad_addr++;
        end
        if (lut_en) begin nlut++; pi++; end
        if (row_init) nrow++;
        if (capture) begin
          if (int'(cap_row) != ncap) bad_cap++;
          ncap++;
        end
        if (flush) nflush++;
        @(negedge clk);
        cyc++;
      end
      expect_eq("cycles", cyc, n * (2 * l + 1) + 2);
      expect_eq("select cycles", nsel, n * l);
      expect_eq("lookup cycles", nlut, n * l);
      expect_eq("row cycles", nrow, n);
      expect_eq("captures", ncap, n);
      expect_eq("flushes", nflush, 1);
      expect_eq("bad read addresses", bad_addr, 0);
      expect_eq("out-of-order captures", bad_cap, 0);
      @(negedge clk);
      expect_eq("idle after done", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
