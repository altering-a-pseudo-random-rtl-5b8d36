// bfsg_example_ref: reference data of the 5-stage / 12-cell / 12-pattern
// example, for the testbenches.
//
// START[k] is the LFSR state before pattern k, PAT[k] the unaltered pattern
// (bit 0 = first bit shifted in), ALT[k] the pattern after bit fixing and
// DROPS[k] whether the unaltered pattern detects faults for the first time.
// CUBE_CARE/CUBE_VAL are the four test cubes for the faults the pseudo-random
// patterns miss (care bit 1 = specified). The example's second Sequence ID
// bit alters only the pattern starting at 01110, which then still differs
// from cube 3 (000XX1XXXX00) in the cube's 6th position, so CUBE_AT lists no
// pattern for that cube; the altered pattern itself is checked through ALT.
package bfsg_example_ref;

  localparam int NPAT = 12;

  localparam logic [4:0] START [NPAT] = '{
    5'b01011, 5'b11010, 5'b11000, 5'b00001, 5'b11100, 5'b01110,
    5'b01001, 5'b00011, 5'b00101, 5'b10011, 5'b11011, 5'b00100};

  localparam logic [11:0] PAT [NPAT] = '{
    12'b010000101011, 12'b111110011010, 12'b010111011000, 12'b110100100001,
    12'b110001111100, 12'b000010101110, 12'b111001101001, 12'b011101100011,
    12'b010010000101, 12'b000111110011, 12'b001010111011, 12'b100110100100};

  localparam logic [11:0] ALT [NPAT] = '{
    12'b010000101011, 12'b111110011010, 12'b010111011000, 12'b111100100000,
    12'b110001111100, 12'b000010101100, 12'b111001101001, 12'b011101100010,
    12'b011010000100, 12'b000111110011, 12'b001010111011, 12'b101110100100};

  localparam bit DROPS [NPAT] = '{1, 1, 1, 0, 1, 0, 0, 0, 0, 1, 0, 0};

  // cubes 111X00XXXX00, 101X10XXXX0X, 000XX1XXXX00, 01XX01XXXX10
  localparam logic [11:0] CUBE_CARE [4] = '{
    12'b111011000011, 12'b111011000010, 12'b111001000011, 12'b110011000011};
  localparam logic [11:0] CUBE_VAL  [4] = '{
    12'b111000000000, 12'b101010000000, 12'b000001000000, 12'b010001000010};

  // Which pattern each cube ends up in (-1: none with the example's logic).
  localparam int CUBE_AT [4] = '{3, 11, -1, 7};

  function automatic bit cube_hit(logic [11:0] pat, int c);
    return ((pat ^ CUBE_VAL[c]) & CUBE_CARE[c]) == '0;
  endfunction

endpackage
