// tb_mm_dispatch: dispatcher with four modelled evaluation units that take
// a random time to load and to evaluate. Checks that at most one unit is
// offered the FIFO head, that a new grant goes to the lowest idle unit,
// that the FIFO pops exactly when the granted unit pops, that all_busy is
// only raised with no idle unit, and that every child is taken once.
module tb_mm_dispatch;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic head_valid, head_pop, all_busy;
  logic [N-1:0] unit_idle, unit_pop, unit_valid;
  int busy_left [N];
  int load_left [N];
  int checks = 0, failures = 0;
  int pending = 0, taken = 0, pushed = 0, nall_busy = 0;
  int served [N];
  logic [N-1:0] prev_valid = '0, prev_idle = '1;

  always #5 clk = ~clk;

  mm_dispatch #(.N_MLP(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unit models: idle -> (offered) load for a few cycles, pop -> busy -> idle
  always_comb begin
    for (int i = 0; i < N; i++) begin
      unit_idle[i] = (busy_left[i] == 0 && load_left[i] == 0);
      unit_pop[i]  = (load_left[i] == 1);
    end
  end

  assign head_valid = pending > 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (!$onehot0(unit_valid)) begin failures++; $display("several units offered"); end
      for (int i = 0; i < N; i++) begin
        if (unit_valid[i] && !prev_valid[i]) begin
          int lowest;
          lowest = -1;
          for (int m = N - 1; m >= 0; m--) if (prev_idle[m]) lowest = m;
          checks++;
          if (i != lowest) begin failures++; $display("grant to %0d, lowest idle %0d", i, lowest); end
        end
      end
      checks++;
      if (head_pop != |(unit_pop & unit_valid)) begin failures++; $display("pop mismatch"); end
      if (all_busy) begin
        nall_busy++;
        checks++;
        if (unit_idle != '0) begin failures++; $display("all_busy with an idle unit"); end
      end
      if (head_pop) begin pending--; taken++; end
      if ($urandom_range(9, 0) < 3) begin pending++; pushed++; end
      for (int i = 0; i < N; i++) begin
        if (load_left[i] > 0) begin
          load_left[i]--;
          if (load_left[i] == 0) begin busy_left[i] = $urandom_range(40, 5); served[i]++; end
        end else if (busy_left[i] > 0) busy_left[i]--;
        else if (unit_valid[i]) load_left[i] = $urandom_range(4, 1);
      end
      prev_valid <= unit_valid;
      prev_idle  <= unit_idle;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin busy_left[i] = 0; load_left[i] = 0; served[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5000) @(negedge clk);
    checks++;
    if (taken + pending != pushed) begin failures++; $display("children lost"); end
    checks++;
    if (nall_busy == 0) begin failures++; $display("all_busy never seen"); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] == 0) begin failures++; $display("unit %0d never served", i); end
    end
    $display("all_busy cycles %0d, children taken %0d", nall_busy, taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
