// decrement_2: two-bit decrementer, Y = A - 1 modulo 4, built from one XNOR2 and one
// inverter as in the published gate diagram: the high output bit is (A1 xnor A0) and the
// low output bit is (not A0).  Truth table: 00->11, 01->00, 10->01, 11->10.
// In the return-address stack it turns the write pointer into the read pointer.
// Purely combinational.
module decrement_2 (
  input  logic [1:0] a,   // a[1] = input A (MSB), a[0] = input B (LSB)
  output logic [1:0] y    // y[1] = output Y (MSB), y[0] = output X (LSB)
);
  assign y[1] = ~(a[1] ^ a[0]);
  assign y[0] = ~a[0];
endmodule
