// full_adder: one-bit full adder cell.
//
// Sum = A xor B xor Cin, Cout = majority(A, B, Cin). Every adder of the
// computation core is a ripple of this cell: the 10-bit adders of the
// three-term adder, the 13-bit final adder of each multiplier and the 3:2
// compressors of the multipliers' Wallace trees. The original cell is a
// 16-transistor pass-gate/transmission-gate circuit; only its logic function
// is modelled here. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;  // propagate: a xor b selects which signal reaches the outputs
  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = p ? cin : a;   // a == b when p is 0, so either one is the carry
  end
endmodule
