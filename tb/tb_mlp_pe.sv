// tb_mlp_pe: processing element. Random SIs and register values; checks
// that Ri takes LUT[operands] two cycles after selection (operands sampled
// in the select cycle, not later), that nop keeps Ri and that clr clears it.
module tb_mlp_pe;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int SIW = si_width(K);

  logic clk = 0, rst_n = 0;
  logic [SIW-1:0] si = '0;
  logic [31:0] regs = '0;
  logic sel_en = 0, lut_en = 0, clr = 0;
  logic ri;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_pe #(.K(K)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp, prev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int t = 0; t < 2000; t++) begin
      si_t s;
      int idx;
      s = rand_si(K);
      si = s[SIW-1:0];
      regs = $urandom;
      idx = 0;
      for (int m = 0; m < K; m++) idx = idx * 2 + int'(regs[int'((s >> (5 * (K - 1 - m))) & 64'd31)]);
      exp = s[SIW-1] ? prev : s[5 * K + idx];
      sel_en = 1;
      @(negedge clk);
      sel_en = 0; lut_en = 1;
      regs = ~regs;               // operands must come from the IOR
      @(negedge clk);
      lut_en = 0;
      checks++;
      if (ri !== exp) begin failures++; if (failures < 10) $display("t=%0d ri=%b exp=%b", t, ri, exp); end
      prev = ri;
      if (t % 97 == 0) begin
        clr = 1; @(negedge clk); clr = 0;
        checks++;
        if (ri !== 1'b0) failures++;
        prev = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
