// Test helper: drives one hpcl_adder_r (width N, partition size PART)
// through every break pattern and NVEC random vectors, and compares sum
// and the chunk carry-outs with a bit-serial reference. The reference
// restarts the carry at every cut boundary from that piece's carry-in,
// exactly what independent narrower adders would do. cin_b is 1 wherever
// there is no cut, as the adder requires; elsewhere it is random.
module adder_r_chk #(
  parameter int unsigned N    = 32,
  parameter int unsigned PART = 8,
  parameter int unsigned NVEC = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NB = N / PART - 1;

  logic [N-1:0]    a, b, sum, esum;
  logic            cin;
  logic [NB-1:0]   brk, cin_b;
  logic [NB:0]     cout, ecout;

  hpcl_adder_r #(.N(N), .PART(PART)) dut (
    .a(a), .b(b), .cin(cin), .brk(brk), .cin_b(cin_b), .sum(sum), .cout(cout)
  );

  function automatic logic [N-1:0] rnd();
    logic [((N + 31) / 32) * 32 - 1:0] w;
    for (int i = 0; i < N; i += 32) w[i +: 32] = $urandom;
    return w[N-1:0];
  endfunction

  task automatic reference();
    logic c;
    c = cin;
    for (int n = 0; n < N; n++) begin
      if (n > 0 && n % PART == 0 && brk[n/PART-1]) c = cin_b[n/PART-1];
      esum[n] = a[n] ^ b[n] ^ c;
      c = (a[n] & b[n]) | (a[n] & c) | (b[n] & c);
      if ((n + 1) % PART == 0) ecout[(n+1)/PART-1] = c;
    end
  endtask

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc,
                       input logic [NB-1:0] vbrk, input logic [NB-1:0] vcb);
    a = va; b = vb; cin = vc; brk = vbrk; cin_b = vcb | ~vbrk;
    #1;
    reference();
    checks++;
    if (sum !== esum || cout !== ecout) begin
      failures++;
      if (failures < 10)
        $display("N=%0d PART=%0d FAIL a=%h b=%h cin=%b brk=%b cin_b=%b got %h/%b expected %h/%b",
                 N, PART, va, vb, vc, vbrk, cin_b, sum, cout, esum, ecout);
    end
  endtask

  initial begin
    logic [N-1:0] ra;
    done = 0; checks = 0; failures = 0;
    for (int bp = 0; bp < (1 << NB) && bp < 4096; bp++) begin
      for (int cb = 0; cb < 4; cb++) begin
        apply('1, '0, cb[0], NB'(bp), {NB{cb[1]}});   // all propagate
        apply('1, '1, cb[0], NB'(bp), {NB{cb[1]}});   // all generate
        apply('0, '0, cb[0], NB'(bp), {NB{cb[1]}});
      end
      for (int v = 0; v < 20; v++) begin
        ra = rnd();
        apply(ra, (v % 2 == 1) ? ~ra : rnd(), 1'($urandom), NB'(bp), NB'($urandom));
      end
    end
    for (int v = 0; v < NVEC; v++) begin
      ra = rnd();
      apply(ra, (v % 3 == 0) ? ~ra ^ (rnd() & rnd() & rnd()) : rnd(), 1'($urandom),
            NB'($urandom), NB'($urandom));
    end
    done = 1;
  end
endmodule
