// tb_mlp_outbuf: output buffer. Captures random bytes for 2^n rows (with
// idle gaps) and checks each emitted word, its index, and that a table of
// fewer than eight rows is flushed with zero padding.
module tb_mlp_outbuf;
  import gpp_pkg::*;

  localparam int MAX_IN = 8;

  logic clk = 0, rst_n = 0, capture = 0, flush = 0;
  logic [MAX_IN-1:0] cap_row = '0;
  logic [7:0] outs = '0;
  logic word_valid;
  logic [63:0] word;
  logic [4:0] word_index;
  logic [7:0] bytes [256];
  int nwords = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_outbuf #(.MAX_IN(MAX_IN)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && word_valid) begin
    nwords++;
    for (int b = 0; b < 8; b++) begin
      int r;
      r = int'(word_index) * 8 + b;
      checks++;
      if (word[b*8 +: 8] !== bytes[r]) begin
        failures++; $display("row %0d got %h expected %h", r, word[b*8 +: 8], bytes[r]);
      end
    end
  end

  task automatic run(int nrows);
    for (int r = 0; r < 256; r++) bytes[r] = 8'h00;
    nwords = 0;
    for (int r = 0; r < nrows; r++) begin
      @(negedge clk);
      capture = 1; cap_row = 8'(r); outs = 8'($urandom); bytes[r] = outs;
      flush = (r == nrows - 1);
      @(negedge clk);
      capture = 0; flush = 0;
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    checks++;
    if (nwords != (nrows + 7) / 8) begin failures++; $display("%0d words for %0d rows", nwords, nrows); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(256);
    run(32);
    run(4);
    run(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
