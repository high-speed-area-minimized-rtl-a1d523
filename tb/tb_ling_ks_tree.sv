// Self-checking testbench of ling_ks_tree, at N = 32 with and without the
// top block's path and at N = 16 and 64. The inputs are arbitrary (g, p)
// words, not only those an adder would produce. The reference computes
// the Ling pseudo-carries serially over the odd bits,
//   H_n = (g_n | g_{n-1}) | (p_{n-1} & p_{n-2}) & H_{n-2},  H_{-1} = 0,
// then expects C = p_n & H_n for blocks in the lower half of the word
// (where the tree ends in &1 cells), H_n itself in the upper half, and
// H_{N-1} on h_top.
module tb_ling_ks_tree;
  int checks = 0;
  int failures = 0;

  logic [31:0] g32, p32;
  logic [6:0]  c32a, c32b;
  logic        h32a, h32b;
  logic [15:0] g16, p16;
  logic [2:0]  c16;
  logic        h16;
  logic [63:0] g64, p64;
  logic [14:0] c64;
  logic        h64;

  ling_ks_tree                          u32a (.g(g32), .p(p32), .c4(c32a), .h_top(h32a));
  ling_ks_tree #(.N(32), .GEN_TOP(1'b0)) u32b (.g(g32), .p(p32), .c4(c32b), .h_top(h32b));
  ling_ks_tree #(.N(16))                u16  (.g(g16), .p(p16), .c4(c16),  .h_top(h16));
  ling_ks_tree #(.N(64))                u64  (.g(g64), .p(p64), .c4(c64),  .h_top(h64));

  // Serial Ling carries of a width-n word; returns expected c4 and H_{n-1}.
  function automatic void ref_tree(input int n, input logic [63:0] g, input logic [63:0] p,
                                   output logic [15:0] c4, output logic htop);
    logic [63:0] h;
    logic pm1, pm2;
    h = '0;
    c4 = '0;
    for (int i = 1; i < n; i += 2) begin
      pm2 = (i >= 2) ? p[i-2] : 1'b0;
      pm1 = p[i-1];
      h[i] = g[i] | g[i-1] | (pm1 & pm2 & ((i >= 3) ? h[i-2] : 1'b0));
    end
    for (int k = 0; k < n / 4 - 1; k++)
      c4[k] = (k < n / 8) ? (p[4*k+3] & h[4*k+3]) : h[4*k+3];
    htop = h[n-1];
  endfunction

  task automatic cmp(input string tag, input logic [15:0] got, input logic [15:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", tag, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] ec;
    logic        eh;
    for (int v = 0; v < 3000; v++) begin
      g32 = $urandom; p32 = $urandom | ((v % 2 == 1) ? 32'hffff_ffff : 32'h0);
      if (v % 4 == 2) p32 = ~32'(1 << ($urandom % 32));
      g16 = 16'($urandom); p16 = 16'($urandom) | ((v % 2 == 1) ? 16'hffff : 16'h0);
      g64 = {$urandom, $urandom}; p64 = {$urandom, $urandom} | ((v % 2 == 1) ? '1 : '0);
      if (v % 4 == 2) g64 = g64 & 64'({$urandom, $urandom} & {$urandom, $urandom});
      #1;
      ref_tree(32, 64'(g32), 64'(p32), ec, eh);
      cmp("N32 c4", 16'(c32a), ec);
      cmp("N32 h_top", 16'(h32a), 16'(eh));
      cmp("N32 notop c4", 16'(c32b), ec);
      cmp("N32 notop h_top", 16'(h32b), 16'h0);
      ref_tree(16, 64'(g16), 64'(p16), ec, eh);
      cmp("N16 c4", 16'(c16), ec);
      cmp("N16 h_top", 16'(h16), 16'(eh));
      ref_tree(64, g64, p64, ec, eh);
      cmp("N64 c4", 16'(c64), ec);
      cmp("N64 h_top", 16'(h64), 16'(eh));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
