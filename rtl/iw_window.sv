// iw_window: centralized instruction window of a four-way superscalar
// processor (top level).
//
// Up to four decoded instructions per cycle enter the top of a 32-row FIFO
// together with their source tags, ready bits and operands from the reorder
// buffer. Each row holds everything needed to execute the instruction, so an
// issued instruction leaves with its opcode and operands directly to a
// functional unit. Every cycle the scheduler picks, oldest first, up to five
// ready instructions: three ALU instructions on ports 1-3, of which port 2
// may instead carry a multiply and port 3 a store, a control transfer on
// port 4a and a load on port 4b. Out-of-order issue, in-order stores and
// loads that bypass each other only within store boundaries follow from the
// scheduling rules (iw_scheduler).
//
// Results are announced one cycle before they return (iw_wb_ctrl), so a
// dependent instruction issues in the cycle its operand appears on a
// write-back bus and receives it through the bypass muxes (full 4x4
// bypassing, iw_src_control/iw_src_data). Loads are assumed to hit; if the
// load unit reports a miss on write-back port 4 in the cycle the data was
// due, every consumer loses its ready bit and a consumer issued in that
// cycle is marked operand_invalid on its slot and stays in the window.
// A conditional branch is checked inside the window when its condition
// value arrives: a correct prediction retires it silently, a wrong one
// invalidates all younger rows and sends the branch to port 4a.
//
// Interface and timing (one clock cycle = one four-phase cycle of the source
// design):
//   in_i / in_ready_o : a block of four instructions in program order (in_i[0]
//                       first), taken at a rising edge when in_ready_o is high;
//                       entries with valid low are empty.
//   iss_o             : registered; selected in cycle t, visible in t+1.
//   plan_o            : tags the functional units must return on each
//                       write-back port in this cycle.
//   wb_i              : results of this cycle (tag, data; miss on port 4).
//   mul_avail_i       : the multiplier can accept a multiply this cycle.
// Single-cycle ALU and load operations: issue in t, on iss_o in t+1, result
// on wb_i in t+1, a dependent selected in t+1 and issued in t+2.
module iw_window
  import iw_pkg::*;
#(
  parameter int unsigned N = N_ENTRIES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  inst_t    in_i   [BLOCK],
  output logic     in_ready_o,
  input  logic     mul_avail_i,
  input  wb_t      wb_i   [N_WB],
  output issue_t   iss_o  [N_SLOT],
  output tagbus_t  plan_o [N_WB]
);

  localparam int unsigned NBLK = N / BLOCK;

  logic [NBLK-1:0] shift_en;
  logic            space;
  logic [N-1:0]    grant [N_SLOT];
  logic [N-1:0]    grant1 [N_RD];   // read lines of the src1 fields
  logic [N-1:0]    grant2 [N_RD];   // read lines of the src2 fields
  logic [N-1:0]    issue_any, false_row, done;
  logic [N-1:0]    valid, issued;
  itype_t          itype [N];
  logic            p2_mul, p3_store, kill_any, ld_hold;
  logic            mul_p4, ld_block;

  logic [N-1:0]    rdy1, rdy2, issued1, issued2, present1, present2;
  logic [N-1:0]    false1, false2, mispred, br_ok, unused_mp2, unused_ok2;
  logic [N-1:0]    lsb1, lsb2;
  logic [N_WB-1:0] wr1 [N];
  logic [N_WB-1:0] wr2 [N];
  logic [N_WB-1:0] in_wr1 [BLOCK];
  logic [N_WB-1:0] in_wr2 [BLOCK];
  logic [N_WB-1:0] byp1 [N_RD];
  logic [N_WB-1:0] byp2 [N_RD];
  logic [DATA_W-1:0] op1 [N_RD];
  logic [DATA_W-1:0] op2 [N_RD];
  logic [OPC_W-1:0]  opc [N_SLOT];
  logic [TAG_W-1:0]  dst [N_SLOT];

  src_in_t         in1 [BLOCK];
  src_in_t         in2 [BLOCK];
  logic [DATA_W-1:0] in_d1 [BLOCK];
  logic [DATA_W-1:0] in_d2 [BLOCK];
  logic [OPC_W-1:0]  in_op [BLOCK];
  logic [TAG_W-1:0]  in_dst [BLOCK];
  logic [BLOCK-1:0]  in_valid;
  itype_t            in_type [BLOCK];

  tagbus_t         ann [N_WB];
  tagbus_t         alu_iss [3];
  tagbus_t         mul_iss, ld_iss;
  logic [N_SLOT-1:0] slot_false;

  issue_t          iss_d [N_SLOT];
  issue_t          iss_q [N_SLOT];

  // ---- new block -------------------------------------------------------
  // Within a block the first instruction in program order is the oldest,
  // so it enters the lowest of the four new rows (row BLOCK-1).
  always_comb begin
    for (int k = 0; k < BLOCK; k++) begin
      int r;
      r = BLOCK - 1 - k;
      in1[r].tag    = in_i[k].src1.tag;
      in1[r].ready  = in_i[k].src1.ready;
      in1[r].branch = in_i[k].itype.cntrl;
      in1[r].pred   = in_i[k].pred;
      in2[r].tag    = in_i[k].src2.tag;
      in2[r].ready  = in_i[k].src2.ready;
      in2[r].branch = 1'b0;
      in2[r].pred   = 1'b0;
      in_d1[r]      = in_i[k].src1.data;
      in_d2[r]      = in_i[k].src2.data;
      in_op[r]      = in_i[k].opcode;
      in_dst[r]     = in_i[k].dest;
      in_valid[r]   = in_i[k].valid;
      in_type[r]    = in_i[k].itype;
    end
  end

  assign in_ready_o = space && !kill_any;

  // ---- FIFO movement ---------------------------------------------------
  assign issued = issued1 | issued2;
  assign done   = ~valid | issued | br_ok;

  iw_shift_ctrl #(.N(N)) u_shift (.done_i(done), .shift_en_o(shift_en), .space_o(space));

  // ---- read lines ------------------------------------------------------
  always_comb begin
    for (int s = 0; s < 3; s++) begin
      grant1[s] = grant[s];
      grant2[s] = grant[s];
    end
    grant1[3] = grant[SLOT_P4A];  // control transfer reads src1 only
    grant2[3] = grant[SLOT_P4B];  // load reads src2 only
    issue_any = '0;
    for (int s = 0; s < N_SLOT; s++) issue_any = issue_any | grant[s];
  end

  assign false_row = false1 | false2;

  // ---- fields ----------------------------------------------------------
  iw_src_control #(.N(N), .IS_SRC1(1'b1)) u_src1_ctl (
    .clk, .rst_n, .shift_en_i(shift_en), .in_i(in1), .ann_i(ann), .wb_i,
    .grant_i(grant1), .issue_any_i(issue_any), .false_row_i(false_row),
    .data_lsb_i(lsb1), .rdy_o(rdy1), .issued_o(issued1), .present_o(present1),
    .wr_o(wr1), .in_wr_o(in_wr1), .byp_o(byp1), .false_o(false1),
    .mispred_o(mispred), .br_ok_o(br_ok));

  iw_src_data #(.N(N)) u_src1_data (
    .clk, .rst_n, .shift_en_i(shift_en), .in_data_i(in_d1), .wr_i(wr1),
    .in_wr_i(in_wr1), .wb_i, .grant_i(grant1), .byp_i(byp1), .op_o(op1),
    .lsb_o(lsb1));

  iw_op_field #(.N(N)) u_op (
    .clk, .rst_n, .shift_en_i(shift_en), .in_op_i(in_op), .in_dest_i(in_dst),
    .grant_i(grant), .op_o(opc), .dest_o(dst));

  iw_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .shift_en_i(shift_en), .in_valid_i(in_valid),
    .in_type_i(in_type), .rdy1_i(rdy1), .rdy2_i(rdy2), .issued_i(issued),
    .mispred_i(mispred), .mul_ok_i(mul_avail_i), .ld_hold_i(ld_hold),
    .grant_o(grant), .valid_o(valid), .type_o(itype), .p2_mul_o(p2_mul),
    .p3_store_o(p3_store), .kill_any_o(kill_any));

  iw_src_data #(.N(N)) u_src2_data (
    .clk, .rst_n, .shift_en_i(shift_en), .in_data_i(in_d2), .wr_i(wr2),
    .in_wr_i(in_wr2), .wb_i, .grant_i(grant2), .byp_i(byp2), .op_o(op2),
    .lsb_o(lsb2));

  iw_src_control #(.N(N), .IS_SRC1(1'b0)) u_src2_ctl (
    .clk, .rst_n, .shift_en_i(shift_en), .in_i(in2), .ann_i(ann), .wb_i,
    .grant_i(grant2), .issue_any_i(issue_any), .false_row_i(false_row),
    .data_lsb_i(lsb2), .rdy_o(rdy2), .issued_o(issued2), .present_o(present2),
    .wr_o(wr2), .in_wr_o(in_wr2), .byp_o(byp2), .false_o(false2),
    .mispred_o(unused_mp2), .br_ok_o(unused_ok2));

  // ---- write-back policy -----------------------------------------------
  always_comb begin
    for (int s = 0; s < N_SLOT; s++) slot_false[s] = |(grant[s] & false_row);
    alu_iss[0].valid = |grant[SLOT_P1] && !slot_false[SLOT_P1];
    alu_iss[0].tag   = dst[SLOT_P1];
    alu_iss[1].valid = |grant[SLOT_P2] && !p2_mul && !slot_false[SLOT_P2];
    alu_iss[1].tag   = dst[SLOT_P2];
    alu_iss[2].valid = |grant[SLOT_P3] && !p3_store && !slot_false[SLOT_P3];
    alu_iss[2].tag   = dst[SLOT_P3];
    mul_iss.valid    = p2_mul && !slot_false[SLOT_P2];
    mul_iss.tag      = dst[SLOT_P2];
    ld_iss.valid     = |grant[SLOT_P4B] && !slot_false[SLOT_P4B];
    ld_iss.tag       = dst[SLOT_P4B];
  end

  iw_wb_ctrl u_wb (
    .clk, .rst_n, .alu_i(alu_iss), .mul_i(mul_iss), .ld_i(ld_iss),
    .ann_o(ann), .plan_o, .ld_hold_o(ld_hold), .mul_p4_o(mul_p4),
    .ld_block_o(ld_block));

  // ---- issue registers -------------------------------------------------
  always_comb begin
    for (int s = 0; s < N_SLOT; s++) begin
      iss_d[s].valid           = |grant[s];
      iss_d[s].operand_invalid = slot_false[s];
      iss_d[s].itype           = '0;
      for (int e = 0; e < N; e++) if (grant[s][e]) iss_d[s].itype = itype[e];
      iss_d[s].opcode          = opc[s];
      iss_d[s].dest            = dst[s];
    end
    for (int s = 0; s < 3; s++) begin
      iss_d[s].src1 = op1[s];
      iss_d[s].src2 = op2[s];
    end
    iss_d[SLOT_P4A].src1 = op1[3];
    iss_d[SLOT_P4A].src2 = '0;
    iss_d[SLOT_P4B].src1 = '0;
    iss_d[SLOT_P4B].src2 = op2[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SLOT; s++) iss_q[s] <= '0;
    end else begin
      for (int s = 0; s < N_SLOT; s++) iss_q[s] <= iss_d[s];
    end
  end

  assign iss_o = iss_q;

endmodule
