// iw_src_control: control part of one source-operand field (src1 or src2)
// for every row of the window.
//
// Per row it keeps the source tag, a ready bit, a data-present bit, the
// issued bit of this field, and, in the src1 field, the branch and
// prediction bits of a conditional branch. Every cycle it:
//   * compares the source tags with the result tags announced one cycle
//     ahead of their data (ann_i) and sets ready on a match, so a consumer
//     can be scheduled in the cycle its operand arrives;
//   * compares them with the results on the write-back ports (wb_i) and
//     raises the write lines (wr_o) of rows still waiting for that value;
//   * on a load miss (write-back port 4 with miss set), clears ready in every
//     row waiting for that load, and flags rows being issued in this very
//     cycle as falsely issued (false_o); their issued bits stay clear;
//   * forms the 4x4 bypass controls: for each of the field's four read
//     slots, which write-back port holds the operand of the granted row;
//   * in the src1 field, checks a branch as soon as its condition is stored:
//     the condition LSB is XORed with the prediction bit. A correct
//     prediction keeps the branch from ever looking ready; a wrong one is
//     reported (mispred_o) and made ready so it issues to the
//     control-transfer port.
//
// All updates are computed at the rows' current positions and then the
// whole field shifts by one block where shift_en_i says so; the new block
// of four enters row 0..3 after being matched the same way. State changes on
// the rising clock edge; all outputs are combinational from state and
// inputs of the current cycle.
//
// The tag CAM, the ready and issued bits, the branch check by XOR in the
// src1 field, the false-issue reset and the 16 bypass signals follow the
// source design. The exact cycle alignment (announce one cycle before the
// data) and the write-once data-present bit are this design's choices.
module iw_src_control
  import iw_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter bit          IS_SRC1 = 1'b1  // 1: src1 field, with branch check
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N/BLOCK-1:0]  shift_en_i,          // block b loads block b-1
  input  src_in_t             in_i       [BLOCK],  // new block (rows 0..3)
  input  tagbus_t             ann_i      [N_WB],   // results due next cycle
  input  wb_t                 wb_i       [N_WB],   // results this cycle
  input  logic [N-1:0]        grant_i    [N_RD],   // read lines of this field
  input  logic [N-1:0]        issue_any_i,         // row granted on any slot
  input  logic [N-1:0]        false_row_i,         // row falsely issued
  input  logic [N-1:0]        data_lsb_i,          // LSB of stored operand
  output logic [N-1:0]        rdy_o,               // ready, to the scheduler
  output logic [N-1:0]        issued_o,
  output logic [N-1:0]        present_o,           // operand stored
  output logic [N_WB-1:0]     wr_o       [N],      // write lines per row
  output logic [N_WB-1:0]     in_wr_o    [BLOCK],  // write lines of new rows
  output logic [N_WB-1:0]     byp_o      [N_RD],   // bypass control per slot
  output logic [N-1:0]        false_o,             // granted on a missed load
  output logic [N-1:0]        mispred_o,           // branch mispredicted
  output logic [N-1:0]        br_ok_o              // branch predicted right
);

  localparam int unsigned NBLK = N / BLOCK;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             ready;
    logic             present;
    logic             issued;
    logic             branch;
    logic             pred;
  } row_t;

  row_t row_q [N];
  row_t upd   [N];      // rows after this cycle's updates, before shifting
  row_t in_upd[BLOCK];  // new rows after matching

  tagbus_t wb_key [N_WB];
  logic [N_WB-1:0] ann_m [N];
  logic [N_WB-1:0] wb_m  [N];
  logic [N_WB-1:0] in_ann_m [BLOCK];
  logic [N_WB-1:0] in_wb_m  [BLOCK];
  logic [N-1:0]    miss_m;

  always_comb begin
    for (int w = 0; w < N_WB; w++) begin
      wb_key[w].valid = wb_i[w].valid;
      wb_key[w].tag   = wb_i[w].tag;
    end
  end

  // Tag CAM: two search sets per row (announced tags, arriving results).
  for (genvar e = 0; e < N; e++) begin : g_cam
    iw_cam_row #(.NPORT(N_WB)) u_ann (.tag_i(row_q[e].tag), .key_i(ann_i),  .match_o(ann_m[e]));
    iw_cam_row #(.NPORT(N_WB)) u_wb  (.tag_i(row_q[e].tag), .key_i(wb_key), .match_o(wb_m[e]));
  end
  for (genvar e = 0; e < BLOCK; e++) begin : g_cam_in
    iw_cam_row #(.NPORT(N_WB)) u_ann (.tag_i(in_i[e].tag), .key_i(ann_i),  .match_o(in_ann_m[e]));
    iw_cam_row #(.NPORT(N_WB)) u_wb  (.tag_i(in_i[e].tag), .key_i(wb_key), .match_o(in_wb_m[e]));
  end

  // Match lines of existing rows.
  always_comb begin
    for (int e = 0; e < N; e++) begin
      for (int w = 0; w < N_WB; w++) begin
        // a result is written once, into rows still waiting for it
        wr_o[e][w] = wb_m[e][w] && !(w == WB_LOAD && wb_i[w].miss) && !row_q[e].present;
      end
      miss_m[e]  = wb_m[e][WB_LOAD] && wb_i[WB_LOAD].miss && !row_q[e].present;
      false_o[e] = issue_any_i[e] && miss_m[e];
    end
  end

  // Next state of existing rows at their current position.
  always_comb begin
    for (int e = 0; e < N; e++) begin
      upd[e]         = row_q[e];
      upd[e].present = row_q[e].present || (|wr_o[e]);
      upd[e].ready   = (row_q[e].ready || (|ann_m[e]) || (|wr_o[e])) && !miss_m[e];
      upd[e].issued  = !false_row_i[e] && (row_q[e].issued || issue_any_i[e]);
    end
  end

  // New rows: matched against the same announced and arriving results.
  always_comb begin
    for (int e = 0; e < BLOCK; e++) begin
      logic wr_any, miss_in;
      for (int w = 0; w < N_WB; w++) begin
        in_wr_o[e][w] = in_wb_m[e][w] && !(w == WB_LOAD && wb_i[w].miss) && !in_i[e].ready;
      end
      wr_any  = |in_wr_o[e];
      miss_in = in_wb_m[e][WB_LOAD] && wb_i[WB_LOAD].miss && !in_i[e].ready;
      in_upd[e].tag     = in_i[e].tag;
      in_upd[e].present = in_i[e].ready || wr_any;
      in_upd[e].ready   = (in_i[e].ready || (|in_ann_m[e]) || wr_any) && !miss_in;
      in_upd[e].issued  = 1'b0;
      in_upd[e].branch  = IS_SRC1 && in_i[e].branch;
      in_upd[e].pred    = IS_SRC1 && in_i[e].pred;
    end
  end

  // Storage with block shift.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) row_q[e] <= '0;
    end else begin
      for (int e = 0; e < N; e++) begin
        if (shift_en_i[e / BLOCK]) begin
          row_q[e] <= (e < BLOCK) ? in_upd[e] : upd[e - BLOCK];
        end else begin
          row_q[e] <= upd[e];
        end
      end
    end
  end

  // Bypass control: slot s takes its operand from write-back port w when
  // the row it reads is being written from port w in this cycle.
  always_comb begin
    for (int s = 0; s < N_RD; s++) begin
      byp_o[s] = '0;
      for (int e = 0; e < N; e++) begin
        if (grant_i[s][e]) byp_o[s] = byp_o[s] | wr_o[e];
      end
    end
  end

  // Branch check and ready to the scheduler.
  always_comb begin
    for (int e = 0; e < N; e++) begin
      logic wrong;
      wrong        = data_lsb_i[e] ^ row_q[e].pred;
      mispred_o[e] = IS_SRC1 && row_q[e].branch && row_q[e].present && wrong;
      br_ok_o[e]   = IS_SRC1 && row_q[e].branch && row_q[e].present && !wrong;
      rdy_o[e]     = row_q[e].branch ? mispred_o[e] : row_q[e].ready;
      issued_o[e]  = row_q[e].issued;
      present_o[e] = row_q[e].present;
    end
  end

  // A row may only be handed to a slot if its operand is stored or arrives
  // now; anything else would mean a ready bit was set without a result.
  for (genvar s = 0; s < N_RD; s++) begin : g_chk_slot
    for (genvar e = 0; e < N; e++) begin : g_chk_row
      a_operand_available: assert property (@(posedge clk) disable iff (!rst_n)
        grant_i[s][e] |-> (row_q[e].present || (|wr_o[e]) || miss_m[e]))
        else $error("row %0d read on slot %0d without its operand", e, s);
    end
  end

endmodule
