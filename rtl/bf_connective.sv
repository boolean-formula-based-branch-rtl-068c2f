// Programmable Boolean connective, the building block of the formula tree.
//
// Computes AND of the two data inputs when the control input is 0 and OR when
// it is 1. That function equals the carry-out of a full adder (the majority of
// ctrl, a and b), and it is built, as in the source circuit, from four
// two-input NANDs: three first-level NANDs on the pairs (ctrl,a), (ctrl,b) and
// (a,b), and a three-input NAND that combines them. Purely combinational.
//
// Ports: ctrl - 0 = AND, 1 = OR; a, b - data inputs (history bits or outputs
// of lower connectives); y - result.
module bf_connective (
  input  logic ctrl,
  input  logic a,
  input  logic b,
  output logic y
);

  logic n_ca, n_cb, n_ab;

  always_comb begin
    n_ca = ~(ctrl & a);
    n_cb = ~(ctrl & b);
    n_ab = ~(a & b);
    y    = ~(n_ca & n_cb & n_ab);
  end

endmodule
