// ant_pkg: constants and helpers shared by the ANT multiplier blocks.
//
// The reference configuration is a 12x12-bit unsigned multiplier (N = 12) whose
// error-correction replica works on the six most significant bits of each operand
// (N/2 = 6). ANT_TH is the detection threshold Th = max |yo - yr| taken over every
// possible input pair, where yo is the exact product and yr the output of the
// compensated fixed-width replica. It was obtained by exhaustive evaluation of all
// 2^24 operand pairs for N = 12; it is a property of the replica, so it must be
// recomputed if N changes. The largest error is reached with all operand bits set
// (yo - yr = 455553); the most negative error is -364544.
package ant_pkg;

  // Operand width of the main multiplier.
  localparam int unsigned ANT_N = 12;

  // Detection threshold for ANT_N = 12 (see header).
  localparam int unsigned ANT_TH = 455553;

  // One-bit full adder: returns {carry, sum}.
  function automatic logic [1:0] full_add(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

endpackage
