// iw_op_field: opcode and destination-tag columns of the window.
//
// Each row stores the opcode and the destination tag of its instruction.
// The columns shift with the rest of the window (a new block of four enters
// rows 0..3) and are never written otherwise. Each of the five issue slots
// (ports 1, 2, 3, 4a, 4b) has a read port selected by a one-hot read line
// from the scheduler, so port 4 can deliver a control transfer and a load in
// the same cycle.
//
// Reads are combinational; the shift happens at the rising clock edge. The
// columns are those of the source design's row layout; five read ports are
// this design's choice.
module iw_op_field
  import iw_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N/BLOCK-1:0]  shift_en_i,
  input  logic [OPC_W-1:0]    in_op_i   [BLOCK],
  input  logic [TAG_W-1:0]    in_dest_i [BLOCK],
  input  logic [N-1:0]        grant_i   [N_SLOT],  // read line per slot
  output logic [OPC_W-1:0]    op_o      [N_SLOT],
  output logic [TAG_W-1:0]    dest_o    [N_SLOT]
);

  logic [OPC_W-1:0] op_q   [N];
  logic [TAG_W-1:0] dest_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) begin
        op_q[e]   <= '0;
        dest_q[e] <= '0;
      end
    end else begin
      for (int e = 0; e < N; e++) begin
        if (shift_en_i[e / BLOCK]) begin
          op_q[e]   <= (e < BLOCK) ? in_op_i[e]   : op_q[e - BLOCK];
          dest_q[e] <= (e < BLOCK) ? in_dest_i[e] : dest_q[e - BLOCK];
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SLOT; s++) begin
      op_o[s]   = '0;
      dest_o[s] = '0;
      for (int e = 0; e < N; e++) begin
        if (grant_i[s][e]) begin
          op_o[s]   = op_o[s]   | op_q[e];
          dest_o[s] = dest_o[s] | dest_q[e];
        end
      end
    end
  end

endmodule
