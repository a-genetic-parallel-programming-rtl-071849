// tb_mlp_fitness: unmatched-case counter. Loads a random expected table,
// feeds random output words for random n_in/n_out (with the last word
// arriving together with done, as the MLP delivers it) and checks U
// against a bit-by-bit count.
module tb_mlp_fitness;
  import gpp_pkg::*;

  localparam int MAX_IN = 8;

  logic clk = 0, rst_n = 0;
  logic exp_we = 0;
  logic [4:0] exp_addr = '0;
  logic [63:0] exp_wdata = '0;
  logic [3:0] n_in = '0, n_out = '0;
  logic word_valid = 0, done = 0;
  logic [63:0] word = '0;
  logic [4:0] word_index = '0;
  logic result_valid;
  logic [CNT_W-1:0] unmatched;
  logic [63:0] table_q [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_fitness #(.MAX_IN(MAX_IN)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int ni, no, nw, expect_u;
      ni = $urandom_range(8, 3);
      no = $urandom_range(8, 1);
      nw = ((1 << ni) + 7) / 8;
      for (int w = 0; w < 32; w++) begin
        @(negedge clk);
        exp_we = 1; exp_addr = 5'(w); exp_wdata = {$urandom, $urandom}; table_q[w] = exp_wdata;
      end
      @(negedge clk); exp_we = 0;
      n_in = 4'(ni); n_out = 4'(no);
      expect_u = 0;
      for (int w = 0; w < nw; w++) begin
        logic [63:0] v;
        // mostly-correct words so that small and large U both occur
        v = table_q[w] ^ (($urandom_range(3, 0) == 0) ? {$urandom, $urandom} : 64'(1) << $urandom_range(63, 0));
        if (t == 0) v = table_q[w];
        for (int b = 0; b < 8; b++)
          for (int o = 0; o < no; o++)
            if (w * 8 + b < (1 << ni) && v[b*8+o] != table_q[w][b*8+o]) expect_u++;
        @(negedge clk);
        word_valid = 1; word = v; word_index = 5'(w); done = (w == nw - 1);
        @(negedge clk);
        word_valid = 0; done = 0;
      end

      checks++;
      if (!result_valid || int'(unmatched) != expect_u) begin
        failures++; $display("t=%0d U=%0d expected %0d valid=%b", t, unmatched, expect_u, result_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
