// sd_full_adder: one-bit full adder, the basic cell of the add/subtract
// array. s = a ^ b ^ cin, cout = majority(a, b, cin). The document
// builds it from transistors in a 90 nm library; only its logic
// function is modelled here.
module sd_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
