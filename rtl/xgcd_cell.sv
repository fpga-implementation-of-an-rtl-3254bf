// xgcd_cell -- one generic processor P_i (i = 1..N) of the systolic extended
// plus-minus GCD array.
//
// The cell holds bit i of the operands a and b, of the four cofactors u, v, t, w
// and sixteen one-bit registers in all: the command s (three bits, s2 doubling
// as the operand carry), a, b, their tags ta, tb, the sign wave sa, the
// cofactor bits u, v, t, w, the cofactor carries ct, cw and the shift bits
// u', v'.
//
// Commands arrive from the right neighbour one cycle after it executed them and
// are always followed by a wait (W) cycle:
//   * Active cycle (command X arrives): the cell executes X on its operand bits,
//     reading the still unchanged bits of its left neighbour (a[+], b[+]):
//     B shifts a and b right, C moves b into a and a[+] into b, S shifts b right,
//     plus/minus moves b into a and puts bit i+1 of a +/- b into b, the carry or
//     borrow coming in s2 of the command and leaving in the cell's own s2.
//     The cell then holds X and passes it to its left neighbour.
//   * Wait cycle (W arrives): the cell applies X to its cofactor bits. A doubling
//     takes the old bit of the right neighbour, which that neighbour parked in u'
//     or v' on its own wait cycle one clock earlier; t := u +/- t and
//     w := v +/- w ripple their carries ct, cw leftwards the same way.
//     The cell then holds W and passes it on.
// The tag rule tb := ta & tb after plus/minus keeps the tags sound: a tag of 1
// at bit i promises that bits i..N are all equal to the sign.
//
// Interface: from_right/to_left carry the command, u', v', ct, cw leftwards;
// from_left/to_right carry a, b, ta, tb, sa rightwards (see xgcd_pkg). load
// (synchronous) sets the operand bits and tags and clears the cofactors; the
// leftmost cell is fed its own to_right as from_left, which sign-extends.
// An assertion checks that a command never arrives while the previous one
// still awaits its wait cycle.
// The processor algorithm follows the published one; the reset, the load port
// and the explicit hand-off of W in the wait cycle are choices of this design.
module xgcd_cell
  import xgcd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,       // parallel load of the operand bit
  input  logic      load_a,
  input  logic      load_b,
  input  logic      load_ta,
  input  logic      load_tb,
  input  cmd_link_t from_right,
  input  opd_link_t from_left,
  output cmd_link_t to_left,
  output opd_link_t to_right,
  output logic      t_o,        // bit i of cofactor t
  output logic      w_o         // bit i of cofactor w
);

  state_e s;
  logic   a, b, ta, tb, sa;
  logic   u, v, t, w, ct, cw, up, vp;

  // operand bit i+1 of a +/- b, with carry/borrow from the right
  logic   opd_sum, opd_cout;
  // cofactor t := u +/- t, w := v +/- w
  logic   t_sum, t_cout, w_sum, w_cout;

  always_comb begin
    opd_sum = from_left.a ^ from_left.b ^ from_right.s[1];
    if (is_minus(from_right.s))
      opd_cout = (~from_left.a & (from_left.b | from_right.s[1])) |
                 (from_left.b & from_right.s[1]);
    else
      opd_cout = (from_left.a & from_left.b) |
                 (from_right.s[1] & (from_left.a | from_left.b));

    t_sum = u ^ t ^ from_right.ct;
    w_sum = v ^ w ^ from_right.cw;
    if (is_minus(s)) begin
      t_cout = (~u & (t | from_right.ct)) | (t & from_right.ct);
      w_cout = (~v & (w | from_right.cw)) | (w & from_right.cw);
    end else begin
      t_cout = (u & t) | (from_right.ct & (u | t));
      w_cout = (v & w) | (from_right.cw & (v | w));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= ST_W;
      a  <= 1'b0; b  <= 1'b0; ta <= 1'b1; tb <= 1'b1; sa <= 1'b0;
      u  <= 1'b0; v  <= 1'b0; t  <= 1'b0; w  <= 1'b0;
      ct <= 1'b0; cw <= 1'b0; up <= 1'b0; vp <= 1'b0;
    end else if (load) begin
      s  <= ST_W;
      a  <= load_a; b  <= load_b; ta <= load_ta; tb <= load_tb; sa <= 1'b0;
      u  <= 1'b0; v  <= 1'b0; t  <= 1'b0; w  <= 1'b0;
      ct <= 1'b0; cw <= 1'b0; up <= 1'b0; vp <= 1'b0;
    end else begin
      // sign of a: taken where the tag of a starts, else passed on
      sa <= from_left.ta ? from_left.a : from_left.sa;

      if (from_right.s == ST_W) begin
        // wait cycle: cofactor update for the command held in s
        unique case (s)
          ST_C: begin
            u <= from_right.up; t <= u; up <= t;
            v <= from_right.vp; w <= v; vp <= w;
          end
          ST_S: begin
            u <= from_right.up; up <= u;
            v <= from_right.vp; vp <= v;
          end
          ST_PLUS0, ST_PLUS1, ST_MINUS0, ST_MINUS1: begin
            u <= from_right.up; up <= t; t <= t_sum; ct <= t_cout;
            v <= from_right.vp; vp <= w; w <= w_sum; cw <= w_cout;
          end
          default: ;  // W, B: cofactors unchanged
        endcase
        s <= ST_W;
      end else begin
        // active cycle: execute the arriving command on the operand bits.
        // Rhythm of the array: the previous command has had its wait cycle.
        a_cmd_after_wait: assert (s == ST_W)
          else $error("xgcd_cell: command arrived while the previous one is pending");
        s <= from_right.s;
        unique case (from_right.s)
          ST_B: begin
            a <= from_left.a; b <= from_left.b;
            ta <= from_left.ta; tb <= from_left.tb;
          end
          ST_C: begin
            a <= b; ta <= tb;
            b <= from_left.a; tb <= from_left.ta;
          end
          ST_S: begin
            b <= from_left.b; tb <= from_left.tb;
          end
          default: begin  // plus / minus
            a  <= b; ta <= tb;
            b  <= opd_sum;
            tb <= ta & tb;
            s  <= pm_state(from_right.s[0], opd_cout);
          end
        endcase
      end
    end
  end

  assign to_left  = '{s: s, up: up, vp: vp, ct: ct, cw: cw};
  assign to_right = '{a: a, b: b, ta: ta, tb: tb, sa: sa};
  assign t_o = t;
  assign w_o = w;

endmodule
