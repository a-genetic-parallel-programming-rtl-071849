// tb_gpp_pkg: reference model of MLP program execution for the testbenches.
//
// Programs are kept as prog[pi][si], each SI right-aligned in 64 bits with
// the same field layout as the RTL: {nop, lut[2^K-1:0], opA, .., opK}.
// ref_row() runs a program on one truth-table row the way the MLP defines
// it (all SIs of a PI read the registers left by the previous PI, nop
// keeps the register) and returns R7..R0. It is written independently of
// the RTL, as a plain sequential interpreter.
package tb_gpp_pkg;

  localparam int LMAX_TB = 25;

  typedef logic [63:0] si_t;
  typedef si_t prog_t [LMAX_TB][16];

  function automatic int siw(int k);
    return (1 << k) + 1 + 5 * k;
  endfunction

  // Build an SI: ops[0] is operand A
  function automatic si_t make_si(int k, bit nop, logic [63:0] lut, int ops[4]);
    si_t s = '0;
    for (int m = 0; m < k; m++) s |= si_t'(32'(ops[m]) & 32'd31) << (5 * (k - 1 - m));
    for (int b = 0; b < (1 << k); b++) s[5 * k + b] = lut[b];
    s[5 * k + (1 << k)] = nop;
    return s;
  endfunction

  function automatic si_t nop_si(int k);
    int ops[4] = '{0, 0, 0, 0};
    return make_si(k, 1'b1, '0, ops);
  endfunction

  function automatic si_t rand_si(int k);
    int ops[4];
    logic [63:0] lut;
    for (int m = 0; m < 4; m++) ops[m] = $urandom_range(31, 0);
    lut = {$urandom, $urandom};
    return make_si(k, ($urandom_range(3, 0) == 0), lut, ops);
  endfunction

  function automatic logic [7:0] ref_row(int k, input prog_t prog, int len,
                                          int n_in, logic [15:0] const_bits, int row);
    logic [31:0] r, nr;
    r = '0;
    for (int j = 0; j < 16; j++) r[16 + j] = const_bits[j];
    for (int b = 0; b < n_in; b++) r[31 - b] = row[b];
    for (int p = 0; p < len; p++) begin
      nr = r;
      for (int j = 0; j < 16; j++) begin
        si_t s = prog[p][j];
        if (!s[5 * k + (1 << k)]) begin
          int idx = 0;
          for (int m = 0; m < k; m++) begin
            int op = int'((s >> (5 * (k - 1 - m))) & 64'd31);
            idx = idx * 2 + int'(r[op]);
          end
          nr[j] = s[5 * k + idx];
        end
      end
      r = nr;
    end
    return r[7:0];
  endfunction

  typedef logic [7:0] table_t [256];

  // Number of unmatched training cases U of a program against a table of
  // expected outputs (one byte R7..R0 per row, n_out low bits significant)
  function automatic int ref_unmatched(int k, input prog_t prog, int len, int n_in, int n_out,
                                       logic [15:0] const_bits, input table_t expt);
    int u = 0;
    for (int row = 0; row < (1 << n_in); row++) begin
      logic [7:0] o;
      o = ref_row(k, prog, len, n_in, const_bits, row);
      for (int b = 0; b < n_out; b++) if (o[b] != expt[row][b]) u++;
    end
    return u;
  endfunction

  // Expected-table word w as written to the evaluator (byte b = row 8w+b)
  function automatic logic [63:0] table_word(input table_t expt, int w);
    logic [63:0] v;
    for (int b = 0; b < 8; b++) v[b*8 +: 8] = expt[w * 8 + b];
    return v;
  endfunction

endpackage
