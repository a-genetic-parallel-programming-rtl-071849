// tb_mmgpplcs: multi-MLP evaluator with three MLPs and shallow FIFOs, so
// that every flow-control case occurs. A modelled evolution engine pushes
// children (random programs of random length, and every fifth child a
// program that exactly computes the target, U=0) as fast as the EMFIFO
// allows, and reads the MEFIFO slowly. Each result must come back once,
// with the interpreter's U. Counted and required: EMFIFO full, all MLPs
// busy while a child waits, MEFIFO full holding a result, completion out
// of issue order, and a correct program found.
module tb_mmgpplcs;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int MAX_IN = 8;
  localparam int N_MLP = 3;
  localparam int SIW = si_width(K);
  localparam int PIW = pi_width(K);
  localparam int CHILD_W = ID_W + 5 + LMAX * PIW;
  localparam int NCHILD = 30;
  localparam int NI = 5, NO = 3;

  logic clk = 0, rst_n = 0;
  logic [3:0] n_in = 4'(NI), n_out = 4'(NO);
  logic [15:0] const_bits = 16'h00FF;
  logic exp_we = 0;
  logic [4:0] exp_addr = '0;
  logic [63:0] exp_wdata = '0;
  logic em_wr = 0, em_full, me_rd = 0, me_empty, all_busy, me_stall;
  logic [CHILD_W-1:0] em_data = '0;
  logic [2:0] em_count;
  logic [1:0] me_count;
  me_entry_t me_data;
  logic [N_MLP-1:0] mlp_busy;

  int checks = 0, failures = 0;
  int exp_u [NCHILD];
  bit seen [NCHILD];
  int n_em_full = 0, n_all_busy = 0, n_me_stall = 0, n_ooo = 0, n_correct = 0, n_all_mlp = 0;
  int last_id = -1, received = 0;
  prog_t prog;
  table_t expt;

  always #5 clk = ~clk;

  mmgpplcs #(.K(K), .LMAX(LMAX), .MAX_IN(MAX_IN), .N_MLP(N_MLP), .EM_DEPTH(4), .ME_DEPTH(2)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (em_full) n_em_full++;
    if (all_busy) n_all_busy++;
    if (me_stall) n_me_stall++;
    if (&mlp_busy) n_all_mlp++;
  end

  // EE model, result side: pop slowly, check each result
  initial begin
    @(posedge rst_n);
    while (received < NCHILD) begin
      @(negedge clk);
      me_rd = 0;
      if (!me_empty && $urandom_range(299, 0) == 0) begin
        int id;
        id = int'(me_data.id);
        checks++;
        if (id >= NCHILD || seen[id]) begin failures++; $display("unexpected id %0d", id); end
        else begin
          seen[id] = 1;
          if (int'(me_data.unmatched) != exp_u[id]) begin
            failures++; $display("id %0d U=%0d expected %0d", id, me_data.unmatched, exp_u[id]);
          end
          if (me_data.unmatched == '0) n_correct++;
          if (id < last_id) n_ooo++;
          last_id = id;
        end
        received++;
        me_rd = 1;
      end
    end
    @(negedge clk); me_rd = 0;
    repeat (5) @(negedge clk);
    checks++; if (n_em_full == 0)  begin failures++; $display("EMFIFO never full"); end
    checks++; if (n_all_busy == 0) begin failures++; $display("never all MLPs busy with a child waiting"); end
    checks++; if (n_me_stall == 0) begin failures++; $display("MEFIFO never stalled a result"); end
    checks++; if (n_ooo == 0)      begin failures++; $display("no out-of-order completion"); end
    checks++; if (n_correct == 0)  begin failures++; $display("no correct program"); end
    checks++; if (n_all_mlp == 0)  begin failures++; $display("MLPs never all busy"); end
    $display("EMFIFO full %0d, all busy %0d, MEFIFO stall %0d, out of order %0d, correct %0d",
             n_em_full, n_all_busy, n_me_stall, n_ooo, n_correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // EE model, child side
  initial begin
    int ops[4];
    // target: R0 = parity of the row, R1 = row bit 0, R2 = 0 (only NO outputs count)
    for (int r = 0; r < 256; r++) expt[r] = {5'($urandom), 1'b0, r[0], ^r[NI-1:0]};
    for (int i = 0; i < NCHILD; i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 32; w++) begin
      @(negedge clk); exp_we = 1; exp_addr = 5'(w); exp_wdata = table_word(expt, w);
    end
    @(negedge clk); exp_we = 0;
    for (int c = 0; c < NCHILD; c++) begin
      int l;
      for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = rand_si(K);
      l = (c % 2 == 0) ? $urandom_range(LMAX, 15) : $urandom_range(3, 1);
      if (c % 5 == 0) begin
        // exact solution in two PIs: R4 = xor(R27..R30), R0 = xor(R4, R31), R1 = R31,
        // R2 = 0; R24 holds constant 0
        for (int p = 0; p < LMAX; p++) for (int j = 0; j < 16; j++) prog[p][j] = nop_si(K);
        ops = '{27, 28, 29, 30}; prog[0][4] = make_si(K, 1'b0, 64'h6996, ops);
        ops = '{24, 24, 4, 31};  prog[1][0] = make_si(K, 1'b0, 64'h0006, ops);
        ops = '{24, 24, 24, 31}; prog[1][1] = make_si(K, 1'b0, 64'h0002, ops);
        ops = '{24, 24, 24, 24}; prog[1][2] = make_si(K, 1'b0, 64'h0000, ops);
        l = 2;
      end
      exp_u[c] = ref_unmatched(K, prog, l, NI, NO, const_bits, expt);
      em_data = '0;
      em_data[CHILD_W-1 -: ID_W] = ID_W'(c);
      em_data[LMAX*PIW +: 5] = 5'(l);
      for (int p = 0; p < LMAX; p++)
        for (int j = 0; j < 16; j++) em_data[p*PIW + j*SIW +: SIW] = prog[p][j][SIW-1:0];
      @(negedge clk);
      while (em_full) @(negedge clk);
      em_wr = 1;
      @(negedge clk);
      em_wr = 0;
    end
  end
endmodule
