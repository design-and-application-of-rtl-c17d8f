// Shared types and functions of the ternary logic family.
//
// A ternary signal (trit) takes the levels 0, 1 and 2, which stand for the
// voltages GND, 1/3 VDD and 2/3 VDD and, in the multiplier, for the digits of
// the radix-2 positive-digit set {0, 1, 2}. In RTL a trit is a two-bit enum;
// the code 2'b11 is never produced and every consumer reads it as 2.
// The functions are the Yoeli-Rosenfeld operators used throughout: the three
// inverters (simple, negative, positive), min (ternary AND), max (ternary OR)
// and the literals X^a. A literal is two-state: 1 here means level 2.
package tern_pkg;

  typedef enum logic [1:0] {
    T0 = 2'd0,
    T1 = 2'd1,
    T2 = 2'd2
  } trit_t;

  // Kind of dynamic gate: preset level and the family of its output.
  //   GATE_N: negative gate, preset to 0 (PMOS logic block)
  //   GATE_P: positive gate, preset to 2 (NMOS logic block)
  //   GATE_S: simple gate, preset to 1
  typedef enum logic [1:0] {
    GATE_N = 2'd0,
    GATE_P = 2'd1,
    GATE_S = 2'd2
  } gate_kind_t;

  // The six two-state literals of one ternary variable (Table of literals).
  typedef struct packed {
    logic l0;   // X^0
    logic l1;   // X^1
    logic l2;   // X^2
    logic l01;  // X^01
    logic l12;  // X^12
    logic l02;  // X^02
  } literals_t;

  // Any code above 2 is treated as 2.
  function automatic trit_t tnorm(input logic [1:0] x);
    return (x >= 2'd2) ? T2 : trit_t'(x);
  endfunction

  // Simple ternary inverter: 2 - x.
  function automatic trit_t sti(input trit_t x);
    case (tnorm(x))
      T0:      return T2;
      T1:      return T1;
      default: return T0;
    endcase
  endfunction

  // Negative ternary inverter: 2 only for input 0.
  function automatic trit_t nti(input trit_t x);
    return (tnorm(x) == T0) ? T2 : T0;
  endfunction

  // Positive ternary inverter: 0 only for input 2.
  function automatic trit_t pti(input trit_t x);
    return (tnorm(x) == T2) ? T0 : T2;
  endfunction

  function automatic trit_t tmin(input trit_t x, input trit_t y);
    return (tnorm(x) < tnorm(y)) ? tnorm(x) : tnorm(y);
  endfunction

  function automatic trit_t tmax(input trit_t x, input trit_t y);
    return (tnorm(x) > tnorm(y)) ? tnorm(x) : tnorm(y);
  endfunction

  // Inverter of the given kind.
  function automatic trit_t tinv(input gate_kind_t k, input trit_t x);
    case (k)
      GATE_N:  return nti(x);
      GATE_P:  return pti(x);
      default: return sti(x);
    endcase
  endfunction

  // Level a dynamic gate of the given kind holds during its preset phase.
  function automatic trit_t preset_level(input gate_kind_t k);
    case (k)
      GATE_N:  return T0;
      GATE_P:  return T2;
      default: return T1;
    endcase
  endfunction

  function automatic literals_t literals(input trit_t x);
    literals_t l;
    trit_t     v;
    v     = tnorm(x);
    l.l0  = (v == T0);
    l.l1  = (v == T1);
    l.l2  = (v == T2);
    l.l01 = (v != T2);
    l.l12 = (v != T0);
    l.l02 = (v != T1);
    return l;
  endfunction

  // Two-state value as a trit: 1 -> level 2, 0 -> level 0.
  function automatic trit_t b2t(input logic b);
    return b ? T2 : T0;
  endfunction

endpackage
