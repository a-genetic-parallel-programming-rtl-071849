// tb_gpp_fifo: FIFO. Random pushes and pops (never past full or empty)
// against a queue model; checks order, data, count, full and empty, and
// that full is actually reached.
module tb_gpp_fifo;
  localparam int W = 20;
  localparam int D = 16;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [4:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, saw_full = 0;

  always #5 clk = ~clk;

  gpp_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int bias;
      bias = ((t / 500) % 2 == 0) ? 3 : 1;   // alternate filling and draining
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || full != (model.size() == D) || empty != (model.size() == 0)) begin
        failures++; $display("flags: count=%0d model=%0d", count, model.size());
      end
      if (full) saw_full++;
      if (!empty) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("data %h expected %h", rd_data, model[0]); end
      end
      wr_en = !full && ($urandom_range(3, 0) < bias);
      rd_en = !empty && ($urandom_range(3, 0) >= bias);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
