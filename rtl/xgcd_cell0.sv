// xgcd_cell0 -- the rightmost processor P0 of the systolic extended plus-minus
// GCD array. It holds bit 0 of a, b and of the cofactors u, v, t, w, and it is
// the only cell that decides what the array does.
//
// P0 alternates between two kinds of cycles:
//   * Decision cycle (s = W): from a[0], b[0] and the neighbour's a[1], b[1] it
//     picks the next command and executes it on its own bits:
//       a0=0 b0=0 -> B (shift both)       a0=0 b0=1 -> C (interchange, shift b)
//       a0=1 b0=0 -> S (shift b)          a0=1 b0=1 -> minus if a[1] = b[1],
//                                                      plus otherwise
//     For plus it sends carry 1 into bit 2 (1+1 and a1+b1+1 both carry), for
//     minus borrow 0; bit 0 of the new b is then always 0.
//     If b[0] = 0 and its tag is 1, b is zero: the algorithm has ended, fin is
//     set and no further command is issued.
//   * Wait cycle (s /= W): P0 applies the command it just issued to its cofactor
//     bits (a doubling shifts in 0, the t and w adders have no carry in) and
//     returns to W. The wait cycle lets the left neighbour execute the command
//     before P0 reads its bits again.
// So P0 issues one command every second clock.
//
// Interface: load (synchronous) sets the operand bits and tags and the cofactors
// to u = 1, v = 0, t = 0, w = 1; run enables command issue; fin is registered
// and stays set until the next load. to_left/from_left as in xgcd_cell.
// The decision table and cofactor updates follow the published processor
// algorithm. The run/fin handshake, the reset, and applying the tag rule
// a, ta := b, tb; tb := ta & tb on plus/minus here as in the other cells are
// choices of this design.
module xgcd_cell0
  import xgcd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  logic      load_a,
  input  logic      load_b,
  input  logic      load_ta,
  input  logic      load_tb,
  input  logic      run,        // allow P0 to issue commands
  input  opd_link_t from_left,
  output cmd_link_t to_left,
  output logic      fin,        // b reached zero; no more commands
  output logic      a_o,        // bit 0 of a
  output logic      sa_o,       // sign of a as it reached P0
  output logic      t_o,
  output logic      w_o
);

  state_e s;
  logic   a, b, ta, tb, sa;
  logic   u, v, t, w, ct, cw, up, vp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= ST_W; fin <= 1'b0;
      a  <= 1'b0; b  <= 1'b0; ta <= 1'b1; tb <= 1'b1; sa <= 1'b0;
      u  <= 1'b1; v  <= 1'b0; t  <= 1'b0; w  <= 1'b1;
      ct <= 1'b0; cw <= 1'b0; up <= 1'b0; vp <= 1'b0;
    end else if (load) begin
      s  <= ST_W; fin <= 1'b0;
      a  <= load_a; b  <= load_b; ta <= load_ta; tb <= load_tb; sa <= 1'b0;
      u  <= 1'b1; v  <= 1'b0; t  <= 1'b0; w  <= 1'b1;
      ct <= 1'b0; cw <= 1'b0; up <= 1'b0; vp <= 1'b0;
    end else begin
      sa <= from_left.ta ? from_left.a : from_left.sa;

      if (s != ST_W) begin
        // wait cycle: cofactor update, 0 shifted in, no carry in
        unique case (s)
          ST_C: begin
            u <= 1'b0; t <= u; up <= t;
            v <= 1'b0; w <= v; vp <= w;
          end
          ST_S: begin
            u <= 1'b0; up <= u;
            v <= 1'b0; vp <= v;
          end
          ST_PLUS0, ST_PLUS1: begin
            u <= 1'b0; up <= t; t <= u ^ t; ct <= u & t;
            v <= 1'b0; vp <= w; w <= v ^ w; cw <= v & w;
          end
          ST_MINUS0, ST_MINUS1: begin
            u <= 1'b0; up <= t; t <= u ^ t; ct <= ~u & t;
            v <= 1'b0; vp <= w; w <= v ^ w; cw <= ~v & w;
          end
          default: ;  // B: cofactors unchanged
        endcase
        s <= ST_W;
      end else if (run && !fin) begin
        if (!b && tb) begin
          fin <= 1'b1;                       // b = 0: done
        end else begin
          unique case ({a, b})
            2'b00: begin                       // shift both
              s  <= ST_B;
              a  <= from_left.a;  b  <= from_left.b;
              ta <= from_left.ta; tb <= from_left.tb;
            end
            2'b01: begin                       // interchange, shift b
              s  <= ST_C;
              a  <= b;            ta <= tb;
              b  <= from_left.a;  tb <= from_left.ta;
            end
            2'b10: begin                       // shift b
              s  <= ST_S;
              b  <= from_left.b;  tb <= from_left.tb;
            end
            default: begin                     // plus or minus
              s  <= (from_left.a == from_left.b) ? pm_state(1'b1, 1'b0)
                                                 : pm_state(1'b0, 1'b1);
              a  <= b;  ta <= tb;
              b  <= 1'b0;
              tb <= ta & tb;
            end
          endcase
        end
      end
    end
  end

  assign to_left = '{s: s, up: up, vp: vp, ct: ct, cw: cw};
  assign a_o  = a;
  assign sa_o = sa;
  assign t_o  = t;
  assign w_o  = w;

endmodule
