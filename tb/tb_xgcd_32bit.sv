// tb_xgcd_32bit -- the array built for 32-bit operands (33 processors), run on
// random operand pairs, to measure the time to a reduced fraction at this
// operand length.
//
// Operands are drawn with random lengths of 1..32 bits plus a set of full
// 32-bit pairs, and a share of pairs is given a common factor so that large
// gcds occur. For each pair the bench checks t*a + w*b = 0, |t| = b/g and
// |w| = a/g with g from Euclid's algorithm, and that the latency from start to
// done has the form 2K+N with K at most 4*(N+1) commands. It prints the mean
// latency in clocks over the full-length pairs and its value in microseconds at
// a 25 MHz clock.
module tb_xgcd_32bit;

  localparam int unsigned N = 32;
  localparam int unsigned W = N + 1;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] a_in = '0, b_in = '0;
  logic         busy, done, sign_a;
  logic [N:0]   a_out, t_out, w_out;

  int checks = 0, failures = 0;
  longint full_cycles = 0;
  int full_runs = 0, max_cyc = 0;

  xgcd_array #(.N(N)) dut (
    .clk, .rst_n, .start, .a_in, .b_in,
    .busy, .done, .a_out, .t_out, .w_out, .sign_a
  );

  always #5ns clk = ~clk;

  function automatic longint sx(logic [N:0] x);
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

  task automatic check(input bit cond, input string what, input longint a0, input longint b0);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d t=%0d w=%0d", what, a0, b0, sx(t_out), sx(w_out));
    end
  endtask

  task automatic run_case(input longint a0, input longint b0, output int cyc);
    longint g, ts, ws;
    @(negedge clk);
    a_in = N'(a0);
    b_in = N'(b0);
    start = 1'b1;
    @(posedge clk);
    #1ns start = 1'b0;
    cyc = 0;
    while (!done && cyc < 10 * W + 20) begin
      @(posedge clk);
      #1ns cyc++;
    end
    check(done, "done", a0, b0);
    check(cyc >= N && (cyc - N) % 2 == 0 && cyc <= 8 * W + N,
          $sformatf("latency %0d", cyc), a0, b0);
    ts = sx(t_out);
    ws = sx(w_out);
    g = gcd(a0, b0);
    check(ts * a0 + ws * b0 == 0, "t*a + w*b != 0", a0, b0);
    if (g != 0)
      check((ts == b0 / g || ts == -(b0 / g)) && (ws == a0 / g || ws == -(a0 / g)),
            "fraction not reduced", a0, b0);
  endtask

  function automatic longint rnd(int bits);
    longint x = {$urandom, $urandom};
    return (bits >= 64) ? x : x & ((longint'(1) << bits) - 1);
  endfunction

  initial begin
    int cyc;
    longint a, b, f;
    repeat (3) @(posedge clk);
    #1ns rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      a = rnd($urandom_range(1, N));
      b = rnd($urandom_range(1, N));
      if (i % 4 == 0) begin
        f = rnd($urandom_range(1, 12)) | 1;
        a = (a >> 12) * f;
        b = (b >> 12) * f;
      end
      run_case(a, b, cyc);
    end
    for (int i = 0; i < 2000; i++) begin
      a = rnd(N) | (longint'(1) << (N - 1));
      b = rnd(N) | (longint'(1) << (N - 1));
      run_case(a, b, cyc);
      full_cycles += longint'(cyc);
      full_runs++;
      if (cyc > max_cyc) max_cyc = cyc;
    end
    $display("32-bit operands: mean latency %0.1f clocks (%0.2f us at 25 MHz), max %0d clocks",
             real'(full_cycles) / full_runs, real'(full_cycles) / full_runs / 25.0, max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
