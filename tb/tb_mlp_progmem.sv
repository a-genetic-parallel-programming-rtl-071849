// tb_mlp_progmem: program memory. Writes random PIs with random per-SI
// enables, keeps a model, and checks every read one cycle after its
// address.
module tb_mlp_progmem;
  import gpp_pkg::*;

  localparam int K = 4;
  localparam int LMAX = 25;
  localparam int W = NUM_LOU * si_width(K);
  localparam int SIW = si_width(K);

  logic clk = 0;
  logic we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [NUM_LOU-1:0] wsi_en = '0;
  logic [W-1:0] wdata = '0, q;
  logic [W-1:0] model [LMAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mlp_progmem #(.K(K), .LMAX(LMAX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < LMAX; a++) begin
      we = 1; waddr = a[4:0]; wsi_en = '1; wdata = rnd(); model[a] = wdata;
      @(negedge clk);
    end
    for (int t = 0; t < 3000; t++) begin
      logic [4:0] ra;
      we = 1'($urandom_range(1, 0));
      waddr = 5'($urandom_range(LMAX - 1, 0));
      wsi_en = 16'($urandom);
      wdata = rnd();
      ra = 5'($urandom_range(LMAX - 1, 0));
      raddr = ra;
      @(negedge clk);
      // read returns the word as it was before this cycle's write
      checks++;
      if (q !== model[ra]) begin failures++; if (failures < 5) $display("addr %0d mismatch", ra); end
      if (we) for (int j = 0; j < NUM_LOU; j++)
        if (wsi_en[j]) model[waddr][j*SIW +: SIW] = wdata[j*SIW +: SIW];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
