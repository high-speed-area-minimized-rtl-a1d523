// End-to-end self-checking testbench of hpcl_adder_top at its default
// size (N = 32, PART = 8), with no parameter overrides.
// The fixed-width adder is checked against a + b + cin; the
// reconfigurable adder against a reference that adds each piece of the
// word on its own, in all eight partition schemes (32; 24+8; 16+16;
// 16+8+8; 8+24; 8+16+8; 8+8+16; 8x8). It also counts how often each
// mechanism of the design was exercised and fails if one never was:
//   cin_ripple  carry-in travelling through every block to the carry-out
//   cout        carry-out of the fixed-width adder set
//   cut_carry   a cut that actually stopped a carry of 1 at a boundary
//   seg_cin     a piece started with carry-in 1 from cin_b
//   through     an uncut boundary passing a carry of 1 across
//   and1_fix    at a block top in the lower half, H = 1 but C = 0: the
//               &1 cell's conversion changed the block carry
//   and2_fix    the same in the upper half, where the &2 cells act
//   mode[k]     each of the eight partition schemes
module tb_hpcl_adder_top;
  localparam int N    = 32;
  localparam int PART = 8;
  localparam int NB   = N / PART - 1;

  logic [N-1:0]  a, b, sum, ra, rb, rsum, esum;
  logic          cin, cout, rcin;
  logic [NB-1:0] brk, cin_b;
  logic [NB:0]   rcout, ecout, bcarry;
  logic [N:0]    efix;

  int checks = 0;
  int failures = 0;
  int n_and1_fix = 0, n_and2_fix = 0;
  int n_cin_ripple = 0, n_cout = 0, n_cut_carry = 0, n_seg_cin = 0, n_through = 0;
  int n_mode [1 << NB];

  hpcl_adder_top dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .ra(ra), .rb(rb), .rcin(rcin), .brk(brk), .cin_b(cin_b), .rsum(rsum), .rcout(rcout)
  );

  // Piece-wise reference; bcarry[i] is the carry an uncut word would pass
  // across boundary i.
  task automatic reference();
    logic c;
    c = rcin;
    for (int n = 0; n < N; n++) begin
      if (n > 0 && n % PART == 0) begin
        bcarry[n/PART-1] = c;
        if (brk[n/PART-1]) c = cin_b[n/PART-1];
      end
      esum[n] = ra[n] ^ rb[n] ^ c;
      c = (ra[n] & rb[n]) | (ra[n] & c) | (rb[n] & c);
      if ((n + 1) % PART == 0) ecout[(n+1)/PART-1] = c;
    end
  endtask

  task automatic step(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc,
                      input logic [NB-1:0] vbrk, input logic [NB-1:0] vcb);
    a = va; b = vb; cin = vc;
    ra = va; rb = vb; rcin = vc; brk = vbrk; cin_b = vcb | ~vbrk;
    #1;
    efix = {1'b0, va} + {1'b0, vb} + {{N{1'b0}}, vc};
    reference();
    checks++;
    if ({cout, sum} !== efix) begin
      failures++;
      if (failures < 10) $display("FAIL fixed a=%h b=%h cin=%b got %b_%h", va, vb, vc, cout, sum);
    end
    checks++;
    if (rsum !== esum || rcout !== ecout) begin
      failures++;
      if (failures < 10)
        $display("FAIL reconf a=%h b=%h cin=%b brk=%b cin_b=%b got %h/%b expected %h/%b",
                 va, vb, vc, vbrk, cin_b, rsum, rcout, esum, ecout);
    end
    if (vc && (va ^ vb) == '1) n_cin_ripple++;
    count_ling(va, vb, vc);
    if (cout) n_cout++;
    n_mode[vbrk]++;
    for (int i = 0; i < NB; i++) begin
      if (brk[i] && bcarry[i]) n_cut_carry++;
      if (brk[i] && cin_b[i]) n_seg_cin++;
      if (!brk[i] && bcarry[i]) n_through++;
    end
  endtask

  // Carries of the fixed-width add; H_n = C_n | C_{n-1} differs from C_n
  // exactly when C_n = 0 and C_{n-1} = 1.
  task automatic count_ling(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    logic [N-1:0] c;
    logic cc;
    cc = vc;
    for (int n = 0; n < N; n++) begin
      cc = (va[n] & vb[n]) | (va[n] & cc) | (vb[n] & cc);
      c[n] = cc;
    end
    for (int k = 1; k < N / 4; k++) begin
      if (!c[4*k-1] && c[4*k-2]) begin
        if (k <= N / 8) n_and1_fix++;
        else n_and2_fix++;
      end
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-12s %0d", what, count);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [N-1:0] x;
    foreach (n_mode[i]) n_mode[i] = 0;
    for (int m = 0; m < (1 << NB); m++) begin
      step('1, '0, 1'b1, NB'(m), '0);           // carry runs through everything
      step('1, '0, 1'b1, NB'(m), '1);
      step(32'h00ff_ff80, 32'h0000_0080, 1'b0, NB'(m), '0);
      for (int v = 0; v < 200; v++) begin
        x = $urandom;
        step(x, (v % 2 == 1) ? ~x ^ ($urandom & $urandom & $urandom) : $urandom, 1'($urandom),
             NB'(m), NB'($urandom));
      end
    end
    $display("mechanisms exercised:");
    need("cin_ripple", n_cin_ripple);
    need("cout", n_cout);
    need("and1_fix", n_and1_fix);
    need("and2_fix", n_and2_fix);
    need("cut_carry", n_cut_carry);
    need("seg_cin", n_seg_cin);
    need("through", n_through);
    foreach (n_mode[i]) need($sformatf("mode brk=%b", NB'(i)), n_mode[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
