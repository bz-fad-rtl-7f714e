// bzfad_pkg: sizes shared by the BZ-FAD multiplier and its Hot Block ring
// counter.
//
// K_DEFAULT is the operand width of the multiplier that is evaluated and
// compared with other multipliers (16 bits). RC_BLOCK_DEFAULT is the number
// of flip-flops per clock-gated block of the ring counter; 4 is the block
// size drawn in the ring-counter figure and the one that gave the largest
// power saving. Both are the published numbers, not choices of this design.
package bzfad_pkg;

  localparam int unsigned K_DEFAULT        = 16;
  localparam int unsigned RC_BLOCK_DEFAULT = 4;

  // Number of clock-gated blocks a ring counter of `width` bits splits
  // into; the leftmost block is shorter when `block` does not divide it.
  function automatic int unsigned rc_num_blocks(int unsigned width,
                                                int unsigned block);
    return (width + block - 1) / block;
  endfunction

endpackage
