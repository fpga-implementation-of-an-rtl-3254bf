// xgcd_long_runner -- test driver for one array of long operands, used by
// tb_xgcd_long. It owns its own clock-driven xgcd_array of width N, feeds it
// CASES random operand pairs (random lengths, every fourth pair with a common
// factor of up to 64 bits) and checks with wide integer arithmetic:
// t*a + w*b = 0, |t| = b/g and |w| = a/g with g from Euclid's algorithm, and a
// latency of the form 2K+N clocks. It reports its counts on its ports and
// raises finished when it is through; it also reports the mean latency of the
// full-length pairs.
module xgcd_long_runner #(
  parameter int unsigned N     = 128,
  parameter int unsigned CASES = 50
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int unsigned WW = 2 * N + 8;   // wide enough for t*a
  typedef logic signed [WW-1:0] wide_t;

  logic         start = 1'b0;
  logic [N-1:0] a_in = '0, b_in = '0;
  logic         busy, done, sign_a;
  logic [N:0]   a_out, t_out, w_out;

  xgcd_array #(.N(N)) dut (
    .clk, .rst_n, .start, .a_in, .b_in,
    .busy, .done, .a_out, .t_out, .w_out, .sign_a
  );

  function automatic wide_t gcd(wide_t x, wide_t y);
    while (y != 0) begin
      wide_t r = x % y;
      x = y;
      y = r;
    end
    return x;
  endfunction

  function automatic wide_t absw(wide_t x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic logic [N-1:0] rnd(int bits);
    logic [N-1:0] x;
    for (int i = 0; i < N; i += 32) x[i +: 32] = $urandom;  // N is a multiple of 32
    return (bits >= int'(N)) ? x : x & ((N'(1) << bits) - 1'b1);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s: a=%h b=%h", N, what, a_in, b_in);
    end
  endtask

  initial begin
    automatic longint full_cyc = 0;
    automatic int full_runs = 0;
    int cyc;
    wide_t a, b, t, w, g;
    logic [N-1:0] x, y, f;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    for (int i = 0; i < CASES; i++) begin
      if (i < CASES / 2) begin
        x = rnd(N); y = rnd(N);
        x[N-1] = 1'b1; y[N-1] = 1'b1;
      end else begin
        x = rnd($urandom_range(1, N)); y = rnd($urandom_range(1, N));
        if (i % 4 == 0) begin
          f = rnd($urandom_range(1, 64)) | N'(1);
          x = (x >> 64) * f;
          y = (y >> 64) * f;
        end
      end
      @(negedge clk);
      a_in = x;
      b_in = y;
      start = 1'b1;
      @(posedge clk);
      #1ns start = 1'b0;
      cyc = 0;
      while (!done && cyc < 10 * (N + 1) + 20) begin
        @(posedge clk);
        #1ns cyc++;
      end
      check(done, "done");
      check(cyc >= int'(N) && (cyc - int'(N)) % 2 == 0, $sformatf("latency %0d", cyc));
      a = wide_t'(a_in);
      b = wide_t'(b_in);
      t = wide_t'(signed'(t_out));
      w = wide_t'(signed'(w_out));
      g = gcd(a, b);
      check(t * a + w * b == 0, "t*a + w*b != 0");
      if (g != 0)
        check(absw(t) * g == b && absw(w) * g == a, "fraction not reduced");
      if (i < CASES / 2) begin
        full_cyc += longint'(cyc);
        full_runs++;
      end
    end
    $display("N=%0d: mean latency %0.1f clocks over %0d full-length pairs",
             N, real'(full_cyc) / full_runs, full_runs);
    finished = 1'b1;
  end

endmodule
