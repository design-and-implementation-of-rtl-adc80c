// iw_wb_ctrl: write-back policy and result-tag announcement.
//
// Results return on four write-back ports. ALU results and load results
// (on a cache hit) come back one cycle after issue, each on the port of the
// issue port it left on (ALU1 -> 1, ALU2 -> 2, ALU3 -> 3, load -> 4). The
// multiplier shares issue port 2 but needs two cycles and has no write-back
// port of its own. In the cycle after a multiply has issued the controller
// looks at issue port 3: if no ALU instruction issues there, write-back
// port 3 is free next cycle and the product takes it; otherwise the product
// takes port 4, and a load result due on port 4 in that cycle is held back
// one cycle. While a held load waits, no new load is issued (ld_hold_o).
//
// So that consumers can be scheduled in time to catch a result on the
// bypass, every result tag is announced (ann_o) one cycle before its data
// appears on its write-back port; the window's source fields set their
// ready bits from these announcements. plan_o is the registered copy: the
// tags the functional units must deliver on each write-back port in the
// current cycle.
//
// Inputs are this cycle's issues (already cleared for false issues);
// ann_o and ld_hold_o are combinational, plan_o is registered. The port
// 3/port 4 rule for the product and the one-cycle hold of the load follow
// the source design; fixed issue-to-write-back port mapping and the load
// hold are this design's choices.
module iw_wb_ctrl
  import iw_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  tagbus_t  alu_i [3],     // ALU issues on ports 1..3
  input  tagbus_t  mul_i,         // multiply issued on port 2
  input  tagbus_t  ld_i,          // load issued on port 4b
  output tagbus_t  ann_o  [N_WB], // results due on each port next cycle
  output tagbus_t  plan_o [N_WB], // results due on each port this cycle
  output logic     ld_hold_o,     // a held load owns port 4 next cycle
  output logic     mul_p4_o,      // the product is routed to port 4
  output logic     ld_block_o     // a load result is held back a cycle
);

  tagbus_t mul_q;    // multiply issued last cycle
  tagbus_t ldb_q;    // load result held back
  tagbus_t plan_q [N_WB];
  tagbus_t ld_src;

  always_comb begin
    ann_o[0] = alu_i[0];
    ann_o[1] = alu_i[1];
    mul_p4_o = mul_q.valid && alu_i[2].valid;
    ann_o[2] = alu_i[2].valid ? alu_i[2] : mul_q;
    ld_src   = ldb_q.valid ? ldb_q : ld_i;
    ann_o[3] = mul_p4_o ? mul_q : ld_src;
    ld_block_o = mul_p4_o && ld_src.valid;
    ld_hold_o  = ldb_q.valid;
    for (int w = 0; w < N_WB; w++) plan_o[w] = plan_q[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mul_q <= '0;
      ldb_q <= '0;
      for (int w = 0; w < N_WB; w++) plan_q[w] <= '0;
    end else begin
      mul_q <= mul_i;
      ldb_q <= mul_p4_o ? ld_src : '0;
      for (int w = 0; w < N_WB; w++) plan_q[w] <= ann_o[w];
    end
  end

  // The scheduler must not issue a load while a held one waits.
  a_no_load_while_held: assert property (@(posedge clk) disable iff (!rst_n)
    ldb_q.valid |-> !ld_i.valid);

endmodule
