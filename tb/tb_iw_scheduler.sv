// tb_iw_scheduler: fills the scheduler with random blocks of instruction
// types, drives random ready/issued/mispredict bits and checks the five read
// lines each cycle against a reference written as plain scans from the
// oldest row: three ALU sweeps (MUL joining the second, the eligible store
// the third), in-order stores, loads within store boundaries, branches,
// and invalidation of rows younger than a mispredicted branch.
`timescale 1ns/1ps
module tb_iw_scheduler;
  import iw_pkg::*;
  localparam int N = 32;
  localparam int NBLK = N / BLOCK;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NBLK-1:0] shift_en;
  logic [BLOCK-1:0] in_valid;
  itype_t in_type [BLOCK];
  logic [N-1:0] rdy1, rdy2, issued, mispred, valid;
  logic mul_ok, ld_hold, p2_mul, p3_store, kill_any;
  logic [N-1:0] grant [N_SLOT];
  itype_t type_o [N];
  int checks = 0, failures = 0;
  int n_mul2 = 0, n_st3 = 0, n_kill = 0, n_alu3 = 0, n_ldblk = 0;

  iw_scheduler #(.N(N)) dut (.clk, .rst_n, .shift_en_i(shift_en), .in_valid_i(in_valid),
    .in_type_i(in_type), .rdy1_i(rdy1), .rdy2_i(rdy2), .issued_i(issued), .mispred_i(mispred),
    .mul_ok_i(mul_ok), .ld_hold_i(ld_hold), .grant_o(grant), .valid_o(valid), .type_o(type_o),
    .p2_mul_o(p2_mul), .p3_store_o(p3_store), .kill_any_o(kill_any));

  always #5 clk = ~clk;

  logic   m_valid [N];
  itype_t m_type  [N];

  function automatic itype_t rtype();
    itype_t r;
    int x;
    r = '0;
    x = $urandom % 100;
    if (x < 40) r.alu = 1; else if (x < 55) r.mul = 1; else if (x < 72) r.load = 1;
    else if (x < 88) r.store = 1; else r.cntrl = 1;
    return r;
  endfunction

  function automatic int oldest(logic [N-1:0] r);
    for (int i = N - 1; i >= 0; i--) if (r[i]) return i;
    return -1;
  endfunction

  task automatic expect_grant(int s, int row);
    logic [N-1:0] e;
    e = '0;
    if (row >= 0) e[row] = 1'b1;
    checks++;
    if (grant[s] !== e) begin
      failures++;
      if (failures < 10) $display("FAIL slot %0d grant %h exp %h", s, grant[s], e);
    end
  endtask

  initial begin
    for (int e = 0; e < N; e++) begin m_valid[e] = 0; m_type[e] = '0; end
    shift_en = '0; in_valid = '0; in_type = '{default: '0};
    rdy1 = '0; rdy2 = '0; issued = '0; mispred = '0; mul_ok = 1; ld_hold = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [N-1:0] v, pend, rdy, alu, mul, st, ld, br, g;
      int g1, g2, g3, g4a, g4b, ost, mp;
      @(negedge clk);
      rdy1 = $urandom | $urandom;
      rdy2 = $urandom | $urandom;
      issued = $urandom & $urandom;
      mispred = ((c % 9) == 0) ? ($urandom & $urandom & $urandom) : '0;
      mul_ok = ($urandom % 4) != 0;
      ld_hold = ($urandom % 5) == 0;
      shift_en = '0;
      if (c % 3 == 0) begin
        int b;
        b = $urandom % NBLK;
        for (int k = 0; k <= b; k++) shift_en[k] = 1'b1;
      end
      for (int k = 0; k < BLOCK; k++) begin
        in_valid[k] = ($urandom % 8) != 0;
        in_type[k]  = rtype();
      end
      #1;
      // reference
      mp = -1;
      for (int e = N - 1; e >= 0; e--) if (m_valid[e] && !issued[e] && mispred[e] && mp < 0) mp = e;
      for (int e = 0; e < N; e++) begin
        v[e]   = m_valid[e] && !(mp >= 0 && e < mp);
        pend[e] = v[e] && !issued[e];
        rdy[e] = rdy1[e] && rdy2[e];
        alu[e] = pend[e] && rdy[e] && m_type[e].alu;
        mul[e] = pend[e] && rdy[e] && m_type[e].mul && mul_ok;
        br[e]  = pend[e] && rdy[e] && m_type[e].cntrl;
      end
      ost = -1;
      for (int e = N - 1; e >= 0; e--) if (pend[e] && m_type[e].store) begin ost = e; break; end
      st = '0;
      if (ost >= 0 && rdy[ost]) begin
        bit older_ld;
        older_ld = 0;
        for (int j = ost + 1; j < N; j++) if (pend[j] && m_type[j].load) older_ld = 1;
        if (!older_ld) st[ost] = 1'b1;
      end
      ld = '0;
      for (int e = 0; e < N; e++) if (pend[e] && rdy[e] && m_type[e].load && !ld_hold && (ost < 0 || e > ost)) ld[e] = 1'b1;
      g1 = oldest(alu);
      g = alu; if (g1 >= 0) g[g1] = 0;
      g2 = oldest(g | mul);
      if (g2 >= 0) g[g2] = 0;
      g3 = oldest(g | st);
      g4a = oldest(br);
      g4b = oldest(ld);
      expect_grant(0, g1); expect_grant(1, g2); expect_grant(2, g3);
      expect_grant(3, g4a); expect_grant(4, g4b);
      checks++;
      if (kill_any !== (mp >= 0) || valid !== v) begin failures++; $display("FAIL kill/valid"); end
      if (g2 >= 0 && m_type[g2].mul) n_mul2++;
      if (g3 >= 0 && m_type[g3].store) n_st3++;
      if (g3 >= 0 && m_type[g3].alu) n_alu3++;
      if (mp >= 0) n_kill++;
      if (ld_hold && oldest(pend & ~issued) >= 0) n_ldblk++;
      // mirror the storage
      @(posedge clk);
      for (int e = N - 1; e >= 0; e--) begin
        if (shift_en[e / BLOCK]) begin
          if (e < BLOCK) begin m_valid[e] = in_valid[e] && (mp < 0); m_type[e] = in_type[e]; end
          else begin m_valid[e] = v[e - BLOCK]; m_type[e] = m_type[e - BLOCK]; end
        end else m_valid[e] = v[e];
      end
    end
    checks++;
    if (n_mul2 == 0 || n_st3 == 0 || n_kill == 0 || n_alu3 == 0) begin
      failures++;
      $display("FAIL coverage mul2=%0d st3=%0d kill=%0d alu3=%0d", n_mul2, n_st3, n_kill, n_alu3);
    end
    $display("coverage mul2=%0d st3=%0d kill=%0d alu3=%0d", n_mul2, n_st3, n_kill, n_alu3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
