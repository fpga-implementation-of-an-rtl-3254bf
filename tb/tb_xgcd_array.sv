// tb_xgcd_array -- end-to-end test of the systolic rational-reduction array at
// its default size (N = 8, nine processors), over every pair of 8-bit operands.
//
// For each pair (a, b) the bench starts the array and waits for done. It checks:
//   * against number theory: t*a + w*b = 0, |t| = b/g, |w| = a/g with
//     g = gcd(a, b) from Euclid's algorithm, and a_out = +/- g/2^e (e = the
//     common power of two), all as N+1-bit two's complement values;
//   * against a sequential model of the plus-minus algorithm (cofactors kept
//     modulo 2^(N+1), tag lengths tracked as integers): the exact a_out, t_out,
//     w_out and the latency 2K+N clocks from start to done, K being the number
//     of commands the model issues;
//   * on every eighth pair, that sign_a has settled to the sign of a_out N+1
//     clocks after done.
// Since outputs and latency must match the model exactly, the model's command
// trace is the array's. From it the bench counts how often each command (B, C,
// S, plus, minus) is issued, how often P1 passes on the carry variants (plus
// with carry 0, minus with borrow 1 into bit 3), and how often the tags make the
// array run shift-b steps after b has become zero; a mechanism that never occurs
// is a failure.
module tb_xgcd_array;
  localparam int unsigned N = 8;
  localparam int unsigned W = N + 1;
  localparam longint MASK = (longint'(1) << W) - 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] a_in = '0, b_in = '0;
  logic         busy, done, sign_a;
  logic [N:0]   a_out, t_out, w_out;

  int checks = 0, failures = 0;
  int n_b = 0, n_c = 0, n_s = 0, n_plus = 0, n_minus = 0;
  int n_plus0 = 0, n_minus1 = 0, n_tail = 0;

  xgcd_array dut (
    .clk, .rst_n, .start, .a_in, .b_in,
    .busy, .done, .a_out, .t_out, .w_out, .sign_a
  );

  always #5ns clk = ~clk;

  function automatic longint sx(logic [N:0] x);  // sign-extend N+1 bits
    return longint'(signed'({{(64-W){x[N]}}, x}));
  endfunction

  function automatic longint gcd(longint x, longint y);
    while (y != 0) begin
      longint r = x % y;
      x = y;
      y = r;
    end
    return x;
  endfunction

  function automatic int bitlen(longint x);
    int l = 0;
    while (x != 0) begin
      x = x >> 1;
      l++;
    end
    return l;
  endfunction

  function automatic int max0(int x);
    return (x < 0) ? 0 : x;
  endfunction

  // Sequential plus-minus algorithm with cofactors and tag lengths.
  task automatic model(input longint a0, input longint b0,
                       output longint ra, output longint rt, output longint rw,
                       output int k, output int tail);
    longint a = a0, b = b0, u = 1, v = 0, t = 0, w = 1, nu, nv, nt, nw, na, nb;
    int la = bitlen(a0), lb = bitlen(b0), nla, nlb;
    k = 0;
    tail = 0;
    while (!(b == 0 && lb == 0)) begin
      if (b == 0) tail++;
      nu = u; nv = v; nt = t; nw = w; na = a; nb = b; nla = la; nlb = lb;
      unique case ({a[0], b[0]})
        2'b00: begin
          n_b++;
          na = a >>> 1; nb = b >>> 1; nla = max0(la - 1); nlb = max0(lb - 1);
        end
        2'b01: begin
          n_c++;
          na = b; nb = a >>> 1; nla = lb; nlb = max0(la - 1);
          nu = 2 * t; nv = 2 * w; nt = u; nw = v;
        end
        2'b10: begin
          n_s++;
          nb = b >>> 1; nlb = max0(lb - 1);
          nu = 2 * u; nv = 2 * v;
        end
        default: begin
          na = b; nla = lb; nlb = (la > lb) ? la : lb;
          nu = 2 * t; nv = 2 * w;
          if (a[1] != b[1]) begin
            n_plus++;
            if (((a & 7) + (b & 7)) < 8) n_plus0++;
            nb = (a + b) >>> 1; nt = u + t; nw = v + w;
          end else begin
            n_minus++;
            if (((a & 7) - (b & 7)) < 0) n_minus1++;
            nb = (a - b) >>> 1; nt = u - t; nw = v - w;
          end
        end
      endcase
      a = na; b = nb; la = nla; lb = nlb;
      u = nu & MASK; v = nv & MASK; t = nt & MASK; w = nw & MASK;
      k++;
    end
    ra = a & MASK;
    rt = t;
    rw = w;
  endtask

  task automatic check(input bit cond, input string what, input longint a0, input longint b0);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d a_out=%0d t=%0d w=%0d", what, a0, b0,
                 sx(a_out), sx(t_out), sx(w_out));
    end
  endtask

  task automatic run_case(input longint a0, input longint b0, input bit check_sign);
    longint ra, rt, rw, g, gt, ts, ws;
    int k, tail, cyc, e;
    model(a0, b0, ra, rt, rw, k, tail);
    n_tail += (tail > 0) ? 1 : 0;
    @(negedge clk);
    a_in = N'(a0);
    b_in = N'(b0);
    start = 1'b1;
    @(posedge clk);
    #1ns start = 1'b0;
    cyc = 0;
    while (!done && cyc < 20 * W + 20) begin
      @(posedge clk);
      #1ns cyc++;
    end
    check(done, "done", a0, b0);
    check(cyc == 2 * k + N, $sformatf("latency %0d, expected %0d", cyc, 2 * k + N), a0, b0);
    check(!busy, "busy after done", a0, b0);
    // model
    check(longint'(a_out) == ra && longint'(t_out) == rt && longint'(w_out) == rw,
          "model mismatch", a0, b0);
    // number theory
    ts = sx(t_out);
    ws = sx(w_out);
    g = gcd(a0, b0);
    check(ts * a0 + ws * b0 == 0, "t*a + w*b != 0", a0, b0);
    if (g != 0) begin
      check((ts == b0 / g || ts == -(b0 / g)) && (ws == a0 / g || ws == -(a0 / g)),
            "fraction not reduced", a0, b0);
      e = 0;
      gt = g;
      while (gt % 2 == 0 && a0 % (longint'(2) << e) == 0 && b0 % (longint'(2) << e) == 0) begin
        gt = gt / 2;
        e++;
      end
      // with b = 0 the array stops at once and a_out is a itself
      if (b0 != 0)
        check(sx(a_out) == gt || sx(a_out) == -gt, "a_out is not +/- g/2^e", a0, b0);
      else
        check(sx(a_out) == a0, "a_out is not a", a0, b0);
    end
    if (check_sign) begin
      repeat (N + 1) @(posedge clk);
      #1ns check(sign_a == a_out[N], "sign_a", a0, b0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst_n = 1'b1;
    for (longint a = 0; a < (1 << N); a++)
      for (longint b = 0; b < (1 << N); b++)
        run_case(a, b, ((a ^ b) & 7) == 0);
    $display("commands: B=%0d C=%0d S=%0d plus=%0d minus=%0d; at P1 plus/c0=%0d minus/b1=%0d; tail runs=%0d",
             n_b, n_c, n_s, n_plus, n_minus, n_plus0, n_minus1, n_tail);
    checks += 8;
    if (n_b == 0) failures++;
    if (n_c == 0) failures++;
    if (n_s == 0) failures++;
    if (n_plus == 0) failures++;
    if (n_minus == 0) failures++;
    if (n_plus0 == 0) failures++;
    if (n_minus1 == 0) failures++;
    if (n_tail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
