// iw_cam_row: one row of the four-port tag CAM.
//
// Each source field of a window row stores the tag of the instruction that
// will produce its operand. Up to NPORT result tags are searched against it
// at once (one per write-back port or per announced result); each search
// port has its own match line. In the source design a match line is charged
// by a weak pull-up and pulled down by any mismatching bit; here it is an
// equality compare, qualified by the search port's valid bit.
//
// Purely combinational.
module iw_cam_row
  import iw_pkg::*;
#(
  parameter int unsigned NPORT = 4
) (
  input  logic [TAG_W-1:0] tag_i,          // stored tag
  input  tagbus_t          key_i [NPORT],  // search tags
  output logic [NPORT-1:0] match_o         // one match line per port
);

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      match_o[p] = key_i[p].valid && (key_i[p].tag == tag_i);
    end
  end

endmodule
