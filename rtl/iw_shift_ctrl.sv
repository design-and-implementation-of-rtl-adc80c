// iw_shift_ctrl: decides how the window's FIFO moves in a cycle.
//
// The window is organised in blocks of four rows, matching the four
// instructions decoded per cycle. A block is free when none of its rows
// still needs the window: each row is empty, already issued, or a branch
// whose prediction was found correct. Each cycle the lowest free block is
// squeezed out: it and every block above it load the block above them
// (block 0 loads the newly decoded instructions), while the blocks below
// stay put. So the rows keep program order from the oldest at the bottom to
// the youngest at the top. With no free block the window is full and the
// new block must wait (space_o low).
//
// Purely combinational. The source design only says that new instructions
// shift in at the top while old ones shift out; this compaction rule is
// this design's own.
module iw_shift_ctrl
  import iw_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         done_i,      // row holds nothing to issue
  output logic [N/BLOCK-1:0]   shift_en_o,  // block b loads block b-1
  output logic                 space_o      // a new block enters row 0..3
);

  localparam int unsigned NBLK = N / BLOCK;

  logic [NBLK-1:0] free;

  always_comb begin
    for (int b = 0; b < NBLK; b++) free[b] = &done_i[b*BLOCK +: BLOCK];
    // block b shifts if it or any block below it is free
    for (int b = NBLK - 1; b >= 0; b--) begin
      if (b == NBLK - 1) shift_en_o[b] = free[b];
      else               shift_en_o[b] = free[b] | shift_en_o[b+1];
    end
    space_o = shift_en_o[0];
  end

endmodule
