// xgcd_array -- systolic array that reduces a rational number a/b with the
// extended plus-minus binary GCD algorithm, without any division.
//
// The array has N+1 identical-looking one-bit processors, P0 (xgcd_cell0) on
// the right holding the least significant bits and P1..PN (xgcd_cell) to its
// left; PN holds the sign. Operands are loaded in parallel, one bit of each
// into each processor. P0 issues a command every second clock; commands and
// cofactor carries travel leftwards one processor per clock while operand bits
// are read from the left neighbour, so no signal is broadcast. Besides a and b
// the array keeps the cofactors u, v, t, w with
//     u*a0 + v*b0 = a*2^k,   t*a0 + w*b0 = b*2^k
// after k steps (a0, b0 the inputs). When b reaches 0, a0/b0 = -w/t with t and
// w coprime, i.e. -w/t is the reduced fraction.
//
// Control (a choice of this design): start loads a_in and b_in (unsigned,
// zero-extended to N+1 bits), computes their tags and sets busy. Once P0 has
// seen b = 0 (fin) the last command still has to travel to PN; done rises
// N-1 clocks after fin, when every cofactor bit is final, and busy falls.
// From the start edge to the edge that raises done there are 2K+N clocks, K the
// number of commands P0 issued. Outputs hold their values until the next start.
//
// Outputs (two's complement, N+1 bits):
//   t_out, w_out  final cofactors; the reduced fraction is (-w_out)/t_out, with
//                 t_out = +/- b_in/g and w_out = -/+ a_in/g, g = gcd(a_in, b_in)
//   a_out         final a, equal to +/- g/2^e where e counts the shift-both
//                 steps (the common power of two of the inputs)
//   sign_a        sign of a as propagated to P0 by the sign wave; it settles up to
//                 N clocks after done
// Inputs with a_in = b_in = 0 end at once with t = 0, w = 1.
module xgcd_array
  import xgcd_pkg::*;
#(
  parameter int unsigned N = 8   // operand bits; N+1 processors
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic         busy,
  output logic         done,
  output logic [N:0]   a_out,
  output logic [N:0]   t_out,
  output logic [N:0]   w_out,
  output logic         sign_a
);

  if (N < 2) begin : g_check
    $error("xgcd_array: N must be at least 2");
  end

  localparam int unsigned CW = $clog2(N + 1);

  logic [N:0] a_ext, b_ext, ta_init, tb_init;
  cmd_link_t  cmd [0:N];   // cmd[i]: what processor i sends to its left
  opd_link_t  opd [1:N];   // opd[i]: what processor i sends to its right
  logic       fin;
  logic [CW-1:0] drain;

  // Tag of bit i: bits i..N all equal (the value fits in i+1 signed bits).
  always_comb begin
    a_ext = {1'b0, a_in};
    b_ext = {1'b0, b_in};
    ta_init[N] = 1'b1;
    tb_init[N] = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      ta_init[i] = ta_init[i+1] & (a_ext[i] == a_ext[i+1]);
      tb_init[i] = tb_init[i+1] & (b_ext[i] == b_ext[i+1]);
    end
  end

  xgcd_cell0 u_p0 (
    .clk, .rst_n,
    .load      (start),
    .load_a    (a_ext[0]),
    .load_b    (b_ext[0]),
    .load_ta   (ta_init[0]),
    .load_tb   (tb_init[0]),
    .run       (busy),
    .from_left (opd[1]),
    .to_left   (cmd[0]),
    .fin       (fin),
    .a_o       (a_out[0]),
    .sa_o      (sign_a),
    .t_o       (t_out[0]),
    .w_o       (w_out[0])
  );

  for (genvar i = 1; i <= N; i++) begin : g_cell
    xgcd_cell u_pi (
      .clk, .rst_n,
      .load       (start),
      .load_a     (a_ext[i]),
      .load_b     (b_ext[i]),
      .load_ta    (ta_init[i]),
      .load_tb    (tb_init[i]),
      .from_right (cmd[i-1]),
      .from_left  (opd[(i == N) ? N : i + 1]),  // PN sees its own bits
      .to_left    (cmd[i]),
      .to_right   (opd[i]),
      .t_o        (t_out[i]),
      .w_o        (w_out[i])
    );
    assign a_out[i] = opd[i].a;
  end

  // Drain: the last command reaches PN's wait cycle N-1 clocks after fin.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      drain <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      done  <= 1'b0;
      drain <= '0;
    end else if (busy && fin) begin
      if (drain == CW'(N - 2)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        drain <= drain + 1'b1;
      end
    end
  end

endmodule
