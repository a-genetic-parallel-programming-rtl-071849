// tb_gpplcs_top: the whole design at its default size (4-LUT MLPs, 25 PIs,
// 8-input tables, ten MLPs, 16-entry FIFOs), end to end, on the 6-input
// multiplexer problem (two address and four data inputs, one output).
//
// Host side: the host writes a hand-built three-SI multiplexer program and
// a random 25-PI program to the host-attached MLP, runs each, reads the 64
// rows back in a burst of eight words and checks them against the
// interpreter (and, for the multiplexer, against the target table).
// Evaluator side, at the same time: a modelled evolution engine pushes 48
// children (random programs and, every sixth, the multiplexer solution) as
// fast as the EMFIFO takes them and drains the MEFIFO slowly. Every U is
// checked against the interpreter. Counted and required at least once:
// EMFIFO full, a child waiting with all ten MLPs busy, a result held by a
// full MEFIFO, out-of-order completion, a correct program (U=0) and a
// host-side run.
module tb_gpplcs_top;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int SIW = si_width(K);
  localparam int PIW = pi_width(K);
  localparam int CHILD_W = ID_W + 5 + LMAX * PIW;
  localparam int NCHILD = 48;
  localparam int NI = 6, NO = 1;

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_re = 0;
  logic [13:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic host_mlp_busy;
  logic [3:0] n_in = 4'(NI), n_out = 4'(NO);
  logic [15:0] const_bits = 16'h00F0;   // R20-R23 = 1, R16-R19 and R24-R25 = 0
  logic exp_we = 0;
  logic [4:0] exp_addr = '0;
  logic [63:0] exp_wdata = '0;
  logic em_wr = 0, em_full, me_rd = 0, me_empty, all_busy, me_stall;
  logic [CHILD_W-1:0] em_data = '0;
  logic [4:0] em_count, me_count;
  me_entry_t me_data;
  logic [9:0] mlp_busy;

  int checks = 0, failures = 0;
  int exp_u [NCHILD];
  bit seen [NCHILD];
  int n_em_full = 0, n_all_busy = 0, n_me_stall = 0, n_ooo = 0, n_correct = 0, n_all_mlp = 0;
  int n_host_runs = 0;
  int last_id = -1, received = 0;
  bit host_done = 0;
  table_t expt;

  always #5 clk = ~clk;

  gpplcs_top dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
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

  // Row r of the problem: {a1, a0, d3, d2, d1, d0}; output d[a]
  function automatic logic mux6(int r);
    return r[(r >> 4) & 3];
  endfunction

  // LUT contents of a 4-input function given as a 16-entry truth vector
  function automatic logic [63:0] lut_of(logic [15:0] v);
    return 64'(v);
  endfunction

  function automatic prog_t mux_prog();
    prog_t p;
    int ops[4];
    logic [15:0] v4, v5, v0;
    for (int i = 0; i < LMAX; i++) for (int j = 0; j < 16; j++) p[i][j] = nop_si(K);
    // index bits {A,B,C,D}; D is tied to constant 0 (R24)
    for (int idx = 0; idx < 16; idx++) begin
      v4[idx] = idx[3] ? idx[2] : idx[1];   // A=a0, B=d1, C=d0 -> a0 ? d1 : d0
      v5[idx] = idx[3] ? idx[2] : idx[1];   // A=a0, B=d3, C=d2 -> a0 ? d3 : d2
      v0[idx] = idx[3] ? idx[2] : idx[1];   // A=a1, B=R5, C=R4 -> a1 ? R5 : R4
    end
    ops = '{27, 30, 31, 24}; p[0][4] = make_si(K, 1'b0, lut_of(v4), ops);
    ops = '{27, 28, 29, 24}; p[0][5] = make_si(K, 1'b0, lut_of(v5), ops);
    ops = '{26, 5, 4, 24};   p[1][0] = make_si(K, 1'b0, lut_of(v0), ops);
    return p;
  endfunction

  // ---------------- host-attached MLP ----------------
  task automatic bus_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic bus_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk); host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask

  task automatic host_run(input prog_t p, int l, bit is_mux);
    logic [63:0] d;
    for (int i = 0; i < l; i++)
      for (int j = 0; j < 16; j++) bus_write(14'(i * 16 + j), p[i][j]);
    bus_write(14'h2000, {32'h0, const_bits, 4'h0, 4'(NI), 2'b00, 6'(l)});
    bus_write(14'h2001, 64'h1);
    do bus_read(14'h2001, d); while (d[1] == 1'b0);
    for (int w = 0; w < 8; w++) begin
      bus_read(14'(14'h3000 + w), d);
      for (int b = 0; b < 8; b++) begin
        logic [7:0] e;
        e = ref_row(K, p, l, NI, const_bits, w * 8 + b);
        checks++;
        if (d[b*8 +: 8] !== e) begin failures++; $display("host row %0d: %h vs %h", w * 8 + b, d[b*8 +: 8], e); end
        if (is_mux) begin
          checks++;
          if (d[b*8] !== mux6(w * 8 + b)) begin failures++; $display("host mux row %0d wrong", w * 8 + b); end
        end
      end
    end
    n_host_runs++;
  endtask

  initial begin
    prog_t p;
    @(posedge rst_n);
    repeat (50) @(negedge clk);
    host_run(mux_prog(), 2, 1'b1);
    for (int i = 0; i < LMAX; i++) for (int j = 0; j < 16; j++) p[i][j] = rand_si(K);
    host_run(p, LMAX, 1'b0);
    host_done = 1;
  end

  // ---------------- evaluator: result side ----------------
  initial begin
    @(posedge rst_n);
    while (received < NCHILD) begin
      @(negedge clk);
      me_rd = 0;
      if (!me_empty && $urandom_range(199, 0) == 0) begin
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
    wait (host_done);
    repeat (5) @(negedge clk);
    checks++; if (n_em_full == 0)   begin failures++; $display("EMFIFO never full"); end
    checks++; if (n_all_busy == 0)  begin failures++; $display("no child waited on busy MLPs"); end
    checks++; if (n_me_stall == 0)  begin failures++; $display("MEFIFO never held back a result"); end
    checks++; if (n_ooo == 0)       begin failures++; $display("no out-of-order completion"); end
    checks++; if (n_correct == 0)   begin failures++; $display("no correct program"); end
    checks++; if (n_all_mlp == 0)   begin failures++; $display("ten MLPs never busy together"); end
    checks++; if (n_host_runs != 2) begin failures++; $display("host runs %0d", n_host_runs); end
    $display("EMFIFO full %0d, waiting on busy MLPs %0d, MEFIFO stall %0d, out of order %0d, correct %0d, all MLPs busy %0d, host runs %0d",
             n_em_full, n_all_busy, n_me_stall, n_ooo, n_correct, n_all_mlp, n_host_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- evaluator: child side ----------------
  initial begin
    prog_t p;
    for (int r = 0; r < 256; r++) expt[r] = {7'($urandom), mux6(r)};
    for (int i = 0; i < NCHILD; i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 32; w++) begin
      @(negedge clk); exp_we = 1; exp_addr = 5'(w); exp_wdata = table_word(expt, w);
    end
    @(negedge clk); exp_we = 0;
    for (int c = 0; c < NCHILD; c++) begin
      int l;
      for (int i = 0; i < LMAX; i++) for (int j = 0; j < 16; j++) p[i][j] = rand_si(K);
      l = (c % 2 == 0) ? $urandom_range(LMAX, 15) : $urandom_range(4, 1);
      if (c % 6 == 0) begin p = mux_prog(); l = 2; end
      exp_u[c] = ref_unmatched(K, p, l, NI, NO, const_bits, expt);
      em_data = '0;
      em_data[CHILD_W-1 -: ID_W] = ID_W'(c);
      em_data[LMAX*PIW +: 5] = 5'(l);
      for (int i = 0; i < LMAX; i++)
        for (int j = 0; j < 16; j++) em_data[i*PIW + j*SIW +: SIW] = p[i][j][SIW-1:0];
      @(negedge clk);
      while (em_full) @(negedge clk);
      em_wr = 1;
      @(negedge clk);
      em_wr = 0;
    end
  end
endmodule
