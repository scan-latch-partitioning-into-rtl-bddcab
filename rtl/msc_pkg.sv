// msc_pkg: types shared by the multiple-scan-chain (MSC) test architecture.
//
// The architecture splits the scan latches of a full-scan circuit into k
// ordinary scan chains SC0..SC(k-1) and one extra scan chain (ESC). While a
// chain SCj shifts, the tester holds the primary inputs at an "extra test
// vector" EVj chosen so that every gate fed by a latch of SCj sees a
// controlling value on an input driven from the primary inputs; the shifting
// latches then cause no transitions in the combinational logic. ESC holds
// the latches for which no such vector exists and shifts while the vector's
// own primary-input part is applied.
//
// Contents:
//   msc_phase_e  what the test sequencer is doing in a given cycle
//   gate_e       two-input gate function, used where a gate's type is a
//                parameter of an example circuit
//   gate_eval    evaluates a gate_e
package msc_pkg;

  typedef enum logic [1:0] {
    PH_IDLE      = 2'd0,  // waiting for a test vector
    PH_SHIFT_SC  = 2'd1,  // shifting an ordinary chain SCj, EVj on the inputs
    PH_SHIFT_ESC = 2'd2,  // shifting the extra chain, vector inputs applied
    PH_CAPTURE   = 2'd3   // whole vector applied, response loaded
  } msc_phase_e;

  typedef enum logic [1:0] {
    G_AND  = 2'd0,
    G_OR   = 2'd1,
    G_NAND = 2'd2,
    G_NOR  = 2'd3
  } gate_e;

  function automatic logic gate_eval(gate_e g, logic a, logic b);
    unique case (g)
      G_AND:   return a & b;
      G_OR:    return a | b;
      G_NAND:  return ~(a & b);
      default: return ~(a | b);
    endcase
  endfunction

endpackage
