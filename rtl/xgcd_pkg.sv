// xgcd_pkg -- shared types of the systolic extended plus-minus GCD array.
//
// Each processor keeps its command (state) in three one-bit registers
// s1, s2, s3. The seven commands of the algorithm -- wait (W), shift both (B),
// interchange and shift b (C), shift b (S), plus (P) and minus (M) -- are
// packed into these three bits such that, for plus and minus, s2 doubles as the
// carry (plus) or borrow (minus) that ripples leftwards together with the
// command. The exact bit patterns are a choice of this design.
//
// Two link structs describe what travels between neighbouring processors:
//   cmd_link_t  right-to-left: command with its carry, cofactor shift bits u', v'
//               and cofactor carries ct, cw
//   opd_link_t  left-to-right: operand bits a, b, their tags ta, tb and the
//               sign-of-a wave sa
package xgcd_pkg;

  // {s1, s2, s3}. s1 = 1 marks plus/minus, s3 selects minus, s2 is the carry.
  typedef enum logic [2:0] {
    ST_W      = 3'b000,  // wait: cofactor update of the previous command
    ST_B      = 3'b001,  // shift both a and b
    ST_C      = 3'b010,  // interchange a and b, shift b
    ST_S      = 3'b011,  // shift b
    ST_PLUS0  = 3'b100,  // plus, carry 0 into this bit
    ST_MINUS0 = 3'b101,  // minus, borrow 0 into this bit
    ST_PLUS1  = 3'b110,  // plus, carry 1
    ST_MINUS1 = 3'b111   // minus, borrow 1
  } state_e;

  typedef struct packed {
    state_e s;    // command and its operand carry (s2)
    logic   up;   // u': old bit shifted into the left neighbour's u
    logic   vp;   // v': old bit shifted into the left neighbour's v
    logic   ct;   // carry/borrow of t := u +/- t
    logic   cw;   // carry/borrow of w := v +/- w
  } cmd_link_t;

  typedef struct packed {
    logic a;
    logic b;
    logic ta;     // 1: this bit and all above equal the sign of a
    logic tb;     // same for b
    logic sa;     // sign of a, travelling rightwards
  } opd_link_t;

  function automatic logic is_minus(state_e s);
    return (s == ST_MINUS0) || (s == ST_MINUS1);
  endfunction

  // Plus/minus command with carry c folded into s2.
  function automatic state_e pm_state(logic minus, logic c);
    return state_e'({1'b1, c, minus});
  endfunction

endpackage
