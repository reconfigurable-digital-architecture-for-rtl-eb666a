// adapto_fa: 1-bit full adder, the computing element of every ADAPTO logic
// block.
//
// r = x ^ y ^ cin, cout = majority(x, y, cin), exactly the truth table the
// design is built on. The original cell is a pass-transistor full adder; here
// it is written as its logic function. Purely combinational.
module adapto_fa (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic r,
  output logic cout
);
  always_comb begin
    r    = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end
endmodule
