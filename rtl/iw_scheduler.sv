// iw_scheduler: instruction scheduler of the window.
//
// It stores, per row, a valid bit and five instruction-type bits (ALU, MUL,
// LOAD, STORE, CNTRL) that shift with the window, and each cycle selects,
// oldest first, the rows issued on the five issue slots:
//   port 1  : oldest ready ALU instruction (first ALU sweep);
//   port 2  : oldest of the remaining ready ALU instructions (second sweep)
//             and the ready MUL instructions, MUL only while the multiplier
//             reports itself available (mul_ok_i);
//   port 3  : oldest of the remaining ready ALU instructions (third sweep)
//             and the eligible STORE; ALU3 and the store unit share one
//             lookup array, so a store may take the port from the third ALU;
//   port 4a : oldest ready control transfer;
//   port 4b : oldest eligible LOAD.
// Stores leave in program order: only the oldest pending (not yet issued)
// store may go, and only if no older load is pending. A load may go only
// if no older store is pending; between stores loads issue out of order.
// Pending stores and loads are found by lookup arrays regardless of their
// operands being ready. A load also waits while a blocked load result owns
// the load write-back port (ld_hold_i).
// A row is ready when both source-control fields say so (the src1 field
// already hides correctly predicted branches). A branch found mispredicted
// and not yet issued invalidates every younger row above it at once; those
// rows are not selected in the same cycle, and a new block is refused
// (kill_any_o) until the branch has issued.
//
// Every search is one iw_lookup_array. Selection is combinational from the
// stored state; the read lines (grant_o) go to the data and control fields.
// The port assignment, the three serial ALU sweeps, the store/load rules and
// the shared port-3 lookup follow the source design; sharing port 2 between
// MUL and ALU2 by age is this design's reading of it.
module iw_scheduler
  import iw_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N/BLOCK-1:0]  shift_en_i,
  input  logic [BLOCK-1:0]    in_valid_i,
  input  itype_t              in_type_i [BLOCK],
  input  logic [N-1:0]        rdy1_i,
  input  logic [N-1:0]        rdy2_i,
  input  logic [N-1:0]        issued_i,
  input  logic [N-1:0]        mispred_i,
  input  logic                mul_ok_i,
  input  logic                ld_hold_i,
  output logic [N-1:0]        grant_o   [N_SLOT],
  output logic [N-1:0]        valid_o,             // valid, after kills
  output itype_t              type_o    [N],
  output logic                p2_mul_o,            // port 2 carries a MUL
  output logic                p3_store_o,          // port 3 carries a STORE
  output logic                kill_any_o
);

  logic [N-1:0] valid_q;
  itype_t       type_q [N];

  logic [N-1:0] is_alu, is_mul, is_ld, is_st, is_br;
  logic [N-1:0] mp, kill, pend, rdy;
  logic [N-1:0] alu_r, mul_r, st_pend, ld_pend, br_r;
  logic [N-1:0] st_oldest, st_older, ld_oldest, ld_older;
  logic [N-1:0] st_e, ld_e;
  logic [N-1:0] req2, req3;
  logic [N-1:0] mp_oldest;

  always_comb begin
    for (int e = 0; e < N; e++) begin
      is_alu[e] = type_q[e].alu;
      is_mul[e] = type_q[e].mul;
      is_ld[e]  = type_q[e].load;
      is_st[e]  = type_q[e].store;
      is_br[e]  = type_q[e].cntrl;
    end
  end

  // Mispredicted branches kill every younger row.
  assign mp = valid_q & ~issued_i & mispred_i;
  iw_lookup_array #(.N(N)) u_la_kill (.req_i(mp), .grant_o(mp_oldest), .older_o(kill));

  assign valid_o    = valid_q & ~kill;
  assign kill_any_o = |mp;
  assign pend       = valid_o & ~issued_i;
  assign rdy        = rdy1_i & rdy2_i;

  assign alu_r   = pend & rdy & is_alu;
  assign mul_r   = pend & rdy & is_mul & {N{mul_ok_i}};
  assign br_r    = pend & rdy & is_br;
  assign st_pend = pend & is_st;
  assign ld_pend = pend & is_ld;

  // Pending store and load searches (operands not required).
  iw_lookup_array #(.N(N)) u_la_st (.req_i(st_pend), .grant_o(st_oldest), .older_o(st_older));
  iw_lookup_array #(.N(N)) u_la_ld (.req_i(ld_pend), .grant_o(ld_oldest), .older_o(ld_older));

  assign st_e = st_oldest & rdy & ~ld_older;
  assign ld_e = ld_pend & rdy & ~st_older & {N{~ld_hold_i}};

  // Three serial ALU sweeps; MUL joins the second, STORE the third.
  iw_lookup_array #(.N(N)) u_la_alu1 (.req_i(alu_r), .grant_o(grant_o[SLOT_P1]), .older_o());
  assign req2 = (alu_r & ~grant_o[SLOT_P1]) | mul_r;
  iw_lookup_array #(.N(N)) u_la_alu2 (.req_i(req2), .grant_o(grant_o[SLOT_P2]), .older_o());
  assign req3 = (alu_r & ~grant_o[SLOT_P1] & ~grant_o[SLOT_P2]) | st_e;
  iw_lookup_array #(.N(N)) u_la_alu3 (.req_i(req3), .grant_o(grant_o[SLOT_P3]), .older_o());
  iw_lookup_array #(.N(N)) u_la_br   (.req_i(br_r), .grant_o(grant_o[SLOT_P4A]), .older_o());
  iw_lookup_array #(.N(N)) u_la_ldi  (.req_i(ld_e), .grant_o(grant_o[SLOT_P4B]), .older_o());

  assign p2_mul_o   = |(grant_o[SLOT_P2] & is_mul);
  assign p3_store_o = |(grant_o[SLOT_P3] & is_st);

  always_comb begin
    for (int e = 0; e < N; e++) type_o[e] = type_q[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int e = 0; e < N; e++) type_q[e] <= '0;
    end else begin
      for (int e = 0; e < N; e++) begin
        if (shift_en_i[e / BLOCK]) begin
          if (e < BLOCK) begin
            valid_q[e] <= in_valid_i[e] && !kill_any_o;
            type_q[e]  <= in_type_i[e];
          end else begin
            valid_q[e] <= valid_o[e - BLOCK];
            type_q[e]  <= type_q[e - BLOCK];
          end
        end else begin
          valid_q[e] <= valid_o[e];
        end
      end
    end
  end

  // Each slot reads at most one row.
  for (genvar s = 0; s < N_SLOT; s++) begin : g_onehot
    a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_o[s]));
  end

endmodule
