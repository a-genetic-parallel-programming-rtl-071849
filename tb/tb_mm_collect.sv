// tb_mm_collect: result collector with four units offering results at
// random times and a MEFIFO model that is full at random times. Checks
// that a result is taken only with a push and only from a valid unit,
// that service is round-robin (no unit waits while another is served
// twice), that stall is raised exactly when a result waits on a full FIFO,
// and that every result reaches the FIFO once and unchanged.
module tb_mm_collect;
  import gpp_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] res_valid = '0, res_ready;
  me_entry_t [N-1:0] res;
  logic fifo_full = 0, fifo_wr, stall;
  me_entry_t fifo_data;
  int checks = 0, failures = 0, sent = 0, recv = 0, nstall = 0;
  int waits [N];   // services of other units while unit i waited

  always #5 clk = ~clk;

  mm_collect #(.N_MLP(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (!$onehot0(res_ready) || (res_ready & ~res_valid) != '0 || (fifo_wr != |res_ready)) begin
      failures++; $display("bad ready/push");
    end
    checks++;
    if (stall != (|res_valid && fifo_full)) begin failures++; $display("bad stall"); end
    if (stall) nstall++;
    if (fifo_wr) begin
      for (int i = 0; i < N; i++) if (res_ready[i]) begin
        checks++;
        if (fifo_data != res[i]) begin failures++; $display("data"); end
        waits[i] = 0;
      end else if (res_valid[i]) begin
        waits[i]++;
        checks++;
        if (waits[i] >= N) begin failures++; $display("unit %0d starved", i); end
      end
      recv++;
    end
  end

  // unit and FIFO models
  int next_id = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (res_valid[i] && res_ready[i]) begin
        res_valid[i] <= 1'b0;
        sent++;
      end else if (!res_valid[i] && $urandom_range(9, 0) < 4) begin
        res_valid[i] <= 1'b1;
        res[i] <= '{id: ID_W'(next_id), unmatched: CNT_W'($urandom)};
        next_id++;
      end
    end
    fifo_full <= ($urandom_range(9, 0) < 3);
  end

  initial begin
    for (int i = 0; i < N; i++) waits[i] = 0;
    res = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5000) @(negedge clk);
    checks++;
    if (sent != recv) begin failures++; $display("sent %0d received %0d", sent, recv); end
    checks++;
    if (nstall == 0) begin failures++; $display("no stall seen"); end
    $display("results %0d, stall cycles %0d", recv, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
