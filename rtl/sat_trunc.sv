// sat_trunc: saturate a signed IW-bit word to OW bits (OW <= IW).
//
// If the bits above bit OW-1 are all copies of bit OW-1 the value fits and is
// passed through; otherwise the output clamps to the largest positive or most
// negative OW-bit value, by the sign of the input, and sat is raised.
// Used on the filter output and the error so that an out-of-range sum does
// not wrap around and push the weights the wrong way. Purely combinational.
module sat_trunc #(
  parameter int unsigned IW = 22,
  parameter int unsigned OW = 16
) (
  input  logic [IW-1:0] a,
  output logic [OW-1:0] y,
  output logic          sat
);
  logic [IW-OW:0] top;
  always_comb begin
    top = a[IW-1:OW-1];
    sat = !((&top) || !(|top));
    if (!sat)            y = a[OW-1:0];
    else if (a[IW-1])    y = {1'b1, {(OW-1){1'b0}}};
    else                 y = {1'b0, {(OW-1){1'b1}}};
  end
endmodule
