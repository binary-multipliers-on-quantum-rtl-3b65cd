// qca_pkg: the QCA primitive gate set as functions.
//
// Quantum-dot cellular automata offer two logic primitives: the inverter
// and the three-input majority gate. A majority gate with one input tied to
// 0 is an AND gate, with one input tied to 1 an OR gate; together with the
// inverter this set is universal. The multipliers in this library express
// all of their logic through these two functions so that the RTL mirrors
// the gate structure of the QCA layouts. Purely combinational.
package qca_pkg;

  // Three-input majority vote.
  function automatic logic maj3(input logic x, input logic y, input logic z);
    return (x & y) | (x & z) | (y & z);
  endfunction

  // Inverter.
  function automatic logic inv(input logic x);
    return ~x;
  endfunction

  // Two-input AND formed by a majority gate with its third input fixed at 0.
  function automatic logic and2(input logic x, input logic y);
    return maj3(x, y, 1'b0);
  endfunction

endpackage
