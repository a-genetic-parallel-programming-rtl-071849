// tb_gpplcs_workloads: the benchmark circuit problems run through the whole
// design at its default size.
//
// Problems, as {n_in, n_out} truth tables built here from their arithmetic
// definitions (the first input of each is the most significant row bit):
//   MUX  6/1  4-to-1 multiplexer {a1,a0,d3..d0}, output d[a]
//   ADD  5/3  2-bit full adder {a1,a0,b1,b0,cin}, output a+b+cin
//   CMP  6/3  3-bit comparator {a2..a0,b2..b0}, outputs {a>b, a==b, a<b}
//   PRI  6/4  6-bit priority selector: index of the lowest set bit in
//             bits [2:0], all-zero flag in bit 3
//   MAJ  7/1  7-input majority
//   BCD  8/7  two BCD digits {tens, ones} to binary, 10*tens+ones (7 bits)
//   MUL  6/6  3-bit by 3-bit multiplier
//   OCN  6/3  6-bit one's counter
// For each problem the host-attached MLP runs one random program. Its busy
// time must be N(2L+1)+1 cycles for N = 2^n_in rows. The ceil(N/8) output
// words are checked against the interpreter in tb_gpp_pkg, and U, counted
// here from the read-back words, against the interpreter's count. The
// ten-MLP evaluator is then configured for the same problem. It evaluates
// twelve random children of random length, and every returned U is checked.
module tb_gpplcs_workloads;
  import gpp_pkg::*;
  import tb_gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int SIW = si_width(K);
  localparam int PIW = pi_width(K);
  localparam int CHILD_W = ID_W + 5 + LMAX * PIW;
  localparam int NPROB = 8;
  localparam int NCHILD = 12;

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_re = 0;
  logic [13:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic host_mlp_busy;
  logic [3:0] n_in = '0, n_out = '0;
  logic [15:0] const_bits = 16'h00F0;   // R20-R23 = 1, R16-R19 = 0
  logic exp_we = 0;
  logic [4:0] exp_addr = '0;
  logic [63:0] exp_wdata = '0;
  logic em_wr = 0, em_full, me_rd = 0, me_empty, all_busy, me_stall;
  logic [CHILD_W-1:0] em_data = '0;
  logic [4:0] em_count, me_count;
  me_entry_t me_data;
  logic [9:0] mlp_busy;

  int checks = 0, failures = 0;
  int busy_cycles = 0;
  table_t expt;

  always #5 clk = ~clk;

  gpplcs_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (host_mlp_busy) busy_cycles++;

  function automatic int popc(int v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += (v >> i) & 1;
    return c;
  endfunction

  // Expected R7..R0 of row r of problem p
  function automatic logic [7:0] target(int p, int r);
    int a, b;
    case (p)
      0: return 8'((r >> ((r >> 4) & 3)) & 1);
      1: return 8'(((r >> 3) & 3) + ((r >> 1) & 3) + (r & 1));
      2: begin
        a = (r >> 3) & 7; b = r & 7;
        return {5'b0, a > b, a == b, a < b};
      end
      3: begin
        for (int i = 0; i < 6; i++) if (r[i]) return 8'(i);
        return 8'h08;
      end
      4: return 8'(popc(r, 7) >= 4);
      5: return 8'((10 * ((r >> 4) & 15) + (r & 15)) & 127);
      6: return 8'(((r >> 3) & 7) * (r & 7));
      default: return 8'(popc(r, 6));
    endcase
  endfunction

  function automatic int prob_in(int p);
    int t[NPROB] = '{6, 5, 6, 6, 7, 8, 6, 6};
    return t[p];
  endfunction

  function automatic int prob_out(int p);
    int t[NPROB] = '{1, 3, 3, 4, 1, 7, 6, 3};
    return t[p];
  endfunction

  task automatic bus_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic bus_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk); host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask

  function automatic prog_t rand_prog();
    prog_t p;
    for (int i = 0; i < LMAX; i++) for (int j = 0; j < 16; j++) p[i][j] = rand_si(K);
    return p;
  endfunction

  // One host-side evaluation of a random program on problem p
  task automatic host_eval(int p);
    prog_t pr;
    logic [63:0] d;
    int l, ni, no, rows, u;
    ni = prob_in(p); no = prob_out(p); rows = 1 << ni;
    pr = rand_prog();
    l = $urandom_range(LMAX, 1);
    for (int i = 0; i < l; i++)
      for (int j = 0; j < 16; j++) bus_write(14'(i * 16 + j), pr[i][j]);
    bus_write(14'h2000, {32'h0, const_bits, 4'h0, 4'(ni), 2'b00, 6'(l)});
    busy_cycles = 0;
    bus_write(14'h2001, 64'h1);
    do bus_read(14'h2001, d); while (d[1] == 1'b0);
    checks++;
    if (busy_cycles != rows * (2 * l + 1) + 1) begin
      failures++; $display("problem %0d: busy %0d cycles, expected %0d", p, busy_cycles, rows * (2 * l + 1) + 1);
    end
    u = 0;
    for (int w = 0; w < (rows + 7) / 8; w++) begin
      bus_read(14'(14'h3000 + w), d);
      for (int b = 0; b < 8; b++) begin
        logic [7:0] e, t;
        e = ref_row(K, pr, l, ni, const_bits, w * 8 + b);
        t = target(p, w * 8 + b);
        checks++;
        if (d[b*8 +: 8] !== e) begin failures++; $display("problem %0d row %0d: %h vs %h", p, w * 8 + b, d[b*8 +: 8], e); end
        for (int o = 0; o < no; o++) if (d[b*8 + o] != t[o]) u++;
      end
    end
    checks++;
    if (u != ref_unmatched(K, pr, l, ni, no, const_bits, expt)) begin
      failures++; $display("problem %0d: host U %0d", p, u);
    end
  endtask

  // Twelve children of problem p through the ten-MLP evaluator
  task automatic mm_eval(int p);
    prog_t pr;
    int exp_u[NCHILD];
    bit seen[NCHILD];
    int got, ni, no;
    ni = prob_in(p); no = prob_out(p);
    n_in = 4'(ni); n_out = 4'(no);
    for (int w = 0; w < 32; w++) begin
      @(negedge clk); exp_we = 1; exp_addr = 5'(w); exp_wdata = table_word(expt, w);
    end
    @(negedge clk); exp_we = 0;
    for (int c = 0; c < NCHILD; c++) seen[c] = 0;
    got = 0;
    fork
      for (int c = 0; c < NCHILD; c++) begin
        int l;
        pr = rand_prog();
        l = $urandom_range(LMAX, 1);
        exp_u[c] = ref_unmatched(K, pr, l, ni, no, const_bits, expt);
        em_data = '0;
        em_data[CHILD_W-1 -: ID_W] = ID_W'(p * 256 + c);
        em_data[LMAX*PIW +: 5] = 5'(l);
        for (int i = 0; i < LMAX; i++)
          for (int j = 0; j < 16; j++) em_data[i*PIW + j*SIW +: SIW] = pr[i][j][SIW-1:0];
        @(negedge clk);
        while (em_full) @(negedge clk);
        em_wr = 1;
        @(negedge clk);
        em_wr = 0;
      end
      while (got < NCHILD) begin
        @(negedge clk);
        me_rd = 0;
        if (!me_empty) begin
          int id;
          id = int'(me_data.id) - p * 256;
          checks++;
          if (id < 0 || id >= NCHILD || seen[id]) begin failures++; $display("problem %0d: unexpected id %0d", p, me_data.id); end
          else begin
            seen[id] = 1;
            if (int'(me_data.unmatched) != exp_u[id]) begin
              failures++; $display("problem %0d child %0d: U=%0d expected %0d", p, id, me_data.unmatched, exp_u[id]);
            end
          end
          got++;
          me_rd = 1;
        end
      end
    join
    @(negedge clk); me_rd = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int p = 0; p < NPROB; p++) begin
      for (int r = 0; r < 256; r++) expt[r] = (r < (1 << prob_in(p))) ? target(p, r) : 8'h00;
      host_eval(p);
      mm_eval(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
