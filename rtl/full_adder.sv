// full_adder: one-bit full adder, the cell the ripple-carry adders are built from.
//
// sum  = a xor b xor cin
// cout = majority(a, b, cin)
// Purely combinational. The function is the standard full adder; the gate
// network (two XORs for the sum, three ANDs into an OR for the carry) is the
// usual one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic axb;
  always_comb begin
    axb  = a ^ b;
    sum  = axb ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
