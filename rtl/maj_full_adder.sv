// maj_full_adder: one-bit full adder made only of majority gates and
// inverters, the logic both multiplier cells are built on.
//
// carry = MAJ(x, y, z)
// sum   = MAJ(NOT carry, z, MAJ(x, y, NOT z))
//
// Three majority gates and two inverters. The QCA layouts use a minimal
// majority-logic full adder; the exact published formulation is not
// reproduced here, and this is the standard three-gate form. Any input may
// serve as the carry-in. Purely combinational: the clock-cycle delays of the
// QCA cells are modelled by registers in the cells that instantiate it.
module maj_full_adder
  import qca_pkg::*;
(
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic carry
);

  always_comb begin
    carry = maj3(x, y, z);
    sum   = maj3(inv(carry), z, maj3(x, y, inv(z)));
  end

endmodule
