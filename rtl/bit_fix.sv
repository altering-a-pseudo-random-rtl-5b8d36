// bit_fix: the gates that alter the pseudo-random bit stream.
//
// An AND gate clears the LFSR serial bit while fix-to-0 is high and an OR
// gate sets it while fix-to-1 is high; otherwise the bit passes unchanged.
// The generation logic is built so both controls are never high together;
// should that happen, fix-to-1 wins (the OR gate follows the AND gate). The
// enclosing generator asserts that it does not happen.
//
// Interface: din, fix0, fix1, dout. Purely combinational.
module bit_fix (
  input  logic din,
  input  logic fix0,
  input  logic fix1,
  output logic dout
);

  assign dout = (din & ~fix0) | fix1;

endmodule
