// Shared constants of the Mitchell approximate logarithmic multiplier.
//
// DEFAULT_N is the operand width of the headline configuration (32 bits,
// the width used both for the power comparison and for the 10.22 fixed-point
// CNN evaluation). All blocks take their width parameter from here so that
// the whole multiplier is resized from one place. Widths must be powers of
// two: the normalising shift amount n-1-k is then simply the bitwise
// inverse of k.
package mitchell_pkg;

  parameter int unsigned DEFAULT_N = 32;

endpackage
