// tb_iw_window: end-to-end test of the instruction window at its default
// size (32 rows, four-wide decode, five issue slots, four write-back ports).
//
// The testbench plays the decoder/reorder buffer and all functional units.
// It generates programs (seven short directed ones, then random ones, and
// last a random trace of 3000 instructions, over a thousand cycles, whose
// branches are all predicted correctly),
// computes every instruction's value in program order as a reference, feeds
// blocks of four whenever the window accepts them, and returns results on
// the write-back ports the window plans for them. Loads miss the cache at
// random and are refilled later; the multiplier is unavailable in bursts;
// branches are predicted wrongly at random, which ends a program.
// Tags are reused modulo 32 once their previous owner has completed.
//
// Checked: every operand delivered equals the reference value (through the
// bypass or from storage); each instruction issues once on a slot of its
// type; stores issue in order and never before an older load; loads never
// pass an older store; correctly predicted branches never issue, a
// mispredicted one issues and nothing younger issues from then on; the
// write-back plan matches the documented latencies; every correct-path
// instruction issues; directed programs check the issue latency (two cycles
// from acceptance), back-to-back issue of dependent ALU and load-hit chains,
// a two-cycle multiply, a sustained rate of four instructions accepted
// and four issued per cycle, a branch and a load leaving together on port 4,
// a window that fills up behind a stalled multiply, and a product routed
// to write-back port 4 that holds a load result back a cycle. Each
// mechanism named in the design is counted and must have happened at least
// once.
`timescale 1ns/1ps
module tb_iw_window;
  import iw_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  inst_t   in_blk [BLOCK];
  logic    in_ready;
  logic    mul_avail;
  wb_t     wb [N_WB];
  issue_t  iss [N_SLOT];
  tagbus_t plan [N_WB];

  iw_window dut (.clk, .rst_n, .in_i(in_blk), .in_ready_o(in_ready),
                 .mul_avail_i(mul_avail), .wb_i(wb), .iss_o(iss), .plan_o(plan));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- program
  localparam int MAXI = 3000;
  localparam int NPROG = 19;
  itype_t      ty   [MAXI];
  int          s1   [MAXI];
  int          s2   [MAXI];
  logic [31:0] im1  [MAXI];
  logic [31:0] im2  [MAXI];
  logic [31:0] val  [MAXI];
  logic [7:0]  opc  [MAXI];
  logic        pred [MAXI];
  bit          wrong[MAXI];
  bit          mispr[MAXI];
  bit          sent [MAXI];
  bit          issued [MAXI];
  bit          written[MAXI];
  bit          missed [MAXI];
  int          sent_cyc[MAXI];
  int          iss_cyc [MAXI];
  int          wr_cyc  [MAXI];
  int          refill_at[MAXI];
  int          owner[32];
  int          plen, nsent, br_idx, br_iss_cyc, prog;
  bit          allow_miss;

  // mechanism counters
  int n_ooo, n_three_alu, n_port4_dual, n_bypass, n_load_bypass, n_false,
      n_mul_p3, n_mul_p4, n_load_blocked, n_mispred, n_correct_br,
      n_store, n_full, n_killed, n_mul_wait, n_store_port3;

  function automatic bit produces(int k);
    return ty[k].alu || ty[k].mul || ty[k].load;
  endfunction

  function automatic logic [31:0] opv1(int k);
    return (s1[k] >= 0) ? val[s1[k]] : im1[k];
  endfunction
  function automatic logic [31:0] opv2(int k);
    return (s2[k] >= 0) ? val[s2[k]] : im2[k];
  endfunction
  function automatic logic [31:0] memf(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic itype_t mk(int t);
    itype_t r;
    r = '0;
    case (t)
      0: r.alu = 1'b1;
      1: r.mul = 1'b1;
      2: r.load = 1'b1;
      3: r.store = 1'b1;
      default: r.cntrl = 1'b1;
    endcase
    return r;
  endfunction

  function automatic int pick_src(int k, int pct);
    int d;
    if (k == 0 || ($urandom % 100) >= pct) return -1;
    for (int tries = 0; tries < 6; tries++) begin
      d = 1 + ($urandom % ((k < 12) ? k : 12));
      if (produces(k - d)) return k - d;
    end
    return -1;
  endfunction

  task automatic gen(input int kind);
    int t, r;
    br_idx = -1;
    br_iss_cyc = -1;
    allow_miss = (kind >= 7);
    case (kind)
      0: plen = 8;     // dependent ALU chain
      1: plen = 6;     // load -> ALU -> load -> ALU ...
      2: plen = 4;     // multiply -> ALU
      3: plen = 40;    // independent blocks of ALU, ALU, LOAD, ALU
      4: plen = 8;     // branch and load leave together on port 4
      5: plen = 48;    // a stalled multiply fills the window
      6: plen = 8;     // product on port 4 holds a load result back
      8: plen = MAXI;  // long trace, every branch predicted correctly
      default: plen = 120 + ($urandom % 200);
    endcase
    for (int k = 0; k < plen; k++) begin
      im1[k] = $urandom; im2[k] = $urandom; opc[k] = 8'($urandom);
      s1[k] = -1; s2[k] = -1; pred[k] = 1'b0;
      wrong[k] = 1'b0; mispr[k] = 1'b0;
      sent[k] = 0; issued[k] = 0; written[k] = 0; missed[k] = 0;
      iss_cyc[k] = -1; wr_cyc[k] = -1; refill_at[k] = -1;
      if (kind == 0) begin
        t = 0; if (k > 0) s1[k] = k - 1;
      end else if (kind == 1) begin
        t = (k % 2 == 0) ? 2 : 0; if (k > 0) s2[k] = k - 1;
      end else if (kind == 2) begin
        t = (k == 0) ? 1 : 0; if (k > 0) s1[k] = k - 1;
      end else if (kind == 3) begin
        t = (k % 4 == 2) ? 2 : 0;
      end else if (kind == 4) begin
        case (k)
          0: t = 0;
          1: begin t = 0; s1[k] = 0; end
          2: begin t = 2; s2[k] = 1; end
          3: begin t = 4; s1[k] = 0; end
          default: t = 0;
        endcase
      end else if (kind == 6) begin
        t = (k == 0) ? 1 : (k == 7) ? 2 : 0;
      end else if (kind == 5) begin
        t = (k == 0) ? 1 : 0;
        if (k > 0 && k % 4 == 0) s1[k] = 0;
      end else begin
        r = $urandom % 100;
        t = (r < 44) ? 0 : (r < 56) ? 1 : (r < 72) ? 2 : (r < 86) ? 3 : 4;
        ty[k] = mk(t);   // needed by pick_src for earlier entries only
        if (t == 0 || t == 1 || t == 3) begin
          s1[k] = pick_src(k, 55);
          s2[k] = pick_src(k, 45);
        end else if (t == 2) begin
          s2[k] = pick_src(k, 50);
        end else begin
          s1[k] = pick_src(k, 80);
        end
      end
      ty[k] = mk(t);
      case (t)
        0: val[k] = opv1(k) + opv2(k) + 32'(opc[k]);
        1: val[k] = opv1(k) * opv2(k);
        2: val[k] = memf(opv2(k));
        default: val[k] = 32'h0;
      endcase
      if (t == 4) begin
        pred[k] = opv1(k)[0];
        if ((($urandom % 100) < 12 && kind != 8) || kind == 4) pred[k] = ~pred[k];
        mispr[k] = (pred[k] != opv1(k)[0]);
        if (mispr[k] && br_idx < 0) br_idx = k;
      end
      if (br_idx >= 0 && k > br_idx) wrong[k] = 1'b1;
    end
    nsent = 0;
  endtask

  // instruction k finished: its tag may be reused
  function automatic bit fin(int k);
    if (!sent[k]) return 1'b0;
    if (wrong[k]) return !issued[k] || !produces(k) || written[k];
    if (ty[k].cntrl && !mispr[k]) return (s1[k] < 0) || written[s1[k]];
    return issued[k] && (!produces(k) || written[k]);
  endfunction

  function automatic bit can_send(int k);
    if (k >= plen) return 1'b0;
    if (br_iss_cyc >= 0) return 1'b0;              // fetch redirected
    if (k >= 32 && !fin(k - 32)) return 1'b0;      // tag still in use
    if (k >= 32 && written[k - 32] && wr_cyc[k - 32] >= cyc) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit prog_done();
    for (int k = 0; k < nsent; k++) if (!fin(k)) return 1'b0;
    if (nsent < plen && br_iss_cyc < 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int slot_of(int k);
    if (ty[k].cntrl) return 3;
    if (ty[k].load)  return 4;
    return -1;
  endfunction

  // ------------------------------------------------------------ one cycle
  task automatic do_issue();
    int k, nalu;
    bit p4a, p4b;
    nalu = 0; p4a = 0; p4b = 0;
    for (int s = 0; s < N_SLOT; s++) begin
      if (!iss[s].valid) continue;
      k = owner[iss[s].dest];
      check(sent[k] && !issued[k], $sformatf("slot %0d: tag %0d issued twice or unsent", s, iss[s].dest));
      if (iss[s].operand_invalid) begin
        n_false++;
        continue;
      end
      check(iss[s].itype == ty[k], $sformatf("slot %0d type", s));
      check(iss[s].opcode == opc[k], $sformatf("slot %0d opcode", s));
      case (s)
        0: check(ty[k].alu, "port 1 carries ALU only");
        1: check(ty[k].alu || ty[k].mul, "port 2 carries ALU/MUL");
        2: check(ty[k].alu || ty[k].store, "port 3 carries ALU/STORE");
        3: check(ty[k].cntrl, "port 4a carries CNTRL");
        default: check(ty[k].load, "port 4b carries LOAD");
      endcase
      if (ty[k].alu) nalu++;
      if (s == 3) p4a = 1;
      if (s == 4) p4b = 1;
      if (s == 2 && ty[k].store) n_store_port3++;
      if ((!ty[k].load && iss[s].src1 != opv1(k)) || (!ty[k].cntrl && iss[s].src2 != opv2(k)))
        $display("DBG inst %0d sent %0d: s1=%0d(t%0d wr%0d miss%0d) s2=%0d(t%0d wr%0d miss%0d)", k, sent_cyc[k],
          s1[k], s1[k] >= 0 ? ty[s1[k]] : 0, s1[k] >= 0 ? wr_cyc[s1[k]] : -9, s1[k] >= 0 ? missed[s1[k]] : 0,
          s2[k], s2[k] >= 0 ? ty[s2[k]] : 0, s2[k] >= 0 ? wr_cyc[s2[k]] : -9, s2[k] >= 0 ? missed[s2[k]] : 0);
      if (!ty[k].load) check(iss[s].src1 == opv1(k), $sformatf("inst %0d src1 %h != %h", k, iss[s].src1, opv1(k)));
      if (!ty[k].cntrl) check(iss[s].src2 == opv2(k), $sformatf("inst %0d src2 %h != %h", k, iss[s].src2, opv2(k)));
      if (br_iss_cyc >= 0) check(!wrong[k], $sformatf("wrong-path inst %0d issued after the branch", k));
      if (ty[k].cntrl) begin
        check(mispr[k], $sformatf("correctly predicted branch %0d issued", k));
        if (k == br_idx) br_iss_cyc = cyc;
        n_mispred++;
      end
      if (ty[k].load || ty[k].store) begin
        for (int j = 0; j < k; j++) begin
          if (ty[j].store && !wrong[j]) check(issued[j] && iss_cyc[j] < cyc, $sformatf("inst %0d passes older store %0d", k, j));
          if (ty[k].store && ty[j].load && !wrong[j]) check(issued[j] && iss_cyc[j] < cyc, $sformatf("store %0d passes older load %0d", k, j));
        end
      end
      if (ty[k].store) n_store++;
      for (int j = k + 1; j < nsent; j++) if (issued[j]) begin n_ooo++; break; end
      if (!ty[k].load && s1[k] >= 0 && wr_cyc[s1[k]] == cyc - 1) begin
        n_bypass++; if (ty[s1[k]].load) n_load_bypass++;
      end
      if (!ty[k].cntrl && s2[k] >= 0 && wr_cyc[s2[k]] == cyc - 1) begin
        n_bypass++; if (ty[s2[k]].load) n_load_bypass++;
      end
      issued[k] = 1; iss_cyc[k] = cyc;
    end
    if (nalu == 3) n_three_alu++;
    if (p4a && p4b) n_port4_dual++;
  endtask

  task automatic do_plan_and_wb();
    int k;
    for (int w = 0; w < N_WB; w++) wb[w] = '0;
    for (int w = 0; w < N_WB; w++) begin
      if (!plan[w].valid) continue;
      k = owner[plan[w].tag];
      check(issued[k] && produces(k), $sformatf("plan port %0d: tag %0d not an issued producer", w, plan[w].tag));
      if (ty[k].alu)  check(iss_cyc[k] == cyc && w < 3, $sformatf("ALU %0d result timing/port", k));
      if (ty[k].mul) begin
        check(iss_cyc[k] == cyc - 1 && (w == 2 || w == 3), $sformatf("MUL %0d result timing/port", k));
        if (w == 2) n_mul_p3++; else n_mul_p4++;
      end
      if (ty[k].load) begin
        check(w == 3 && iss_cyc[k] <= cyc, $sformatf("LOAD %0d result timing/port", k));
        if (iss_cyc[k] < cyc) n_load_blocked++;
      end
      wb[w].valid = 1'b1;
      wb[w].tag   = plan[w].tag;
      if (w == WB_LOAD && ty[k].load && allow_miss && !missed[k] && ($urandom % 100) < 25) begin
        wb[w].miss   = 1'b1;
        missed[k]    = 1'b1;
        refill_at[k] = cyc + 3 + ($urandom % 5);
      end else begin
        wb[w].data = val[k];
        written[k] = 1; wr_cyc[k] = cyc;
      end
    end
    if (!plan[WB_LOAD].valid) begin
      for (int j = 0; j < nsent; j++) begin
        if (missed[j] && !written[j] && refill_at[j] <= cyc) begin
          wb[WB_LOAD] = '{valid: 1'b1, miss: 1'b0, tag: 5'(j % 32), data: val[j]};
          written[j] = 1; wr_cyc[j] = cyc;
          break;
        end
      end
    end
  endtask

  task automatic do_send();
    bit pending_mispred;
    for (int b = 0; b < BLOCK; b++) in_blk[b] = '0;
    pending_mispred = (br_idx >= 0 && sent[br_idx] && br_iss_cyc < 0);
    if (!in_ready) begin
      if (!pending_mispred) n_full++;   // no free block
      return;
    end
    for (int b = 0; b < BLOCK; b++) begin
      int k;
      k = nsent;
      if (!can_send(k)) break;
      in_blk[b].valid  = 1'b1;
      in_blk[b].itype  = ty[k];
      in_blk[b].opcode = opc[k];
      in_blk[b].dest   = 5'(k % 32);
      in_blk[b].pred   = pred[k];
      in_blk[b].src1.tag   = (s1[k] >= 0) ? 5'(s1[k] % 32) : 5'd0;
      in_blk[b].src1.ready = (s1[k] < 0) || ty[k].load || (written[s1[k]] && wr_cyc[s1[k]] < cyc);
      in_blk[b].src1.data  = opv1(k);
      in_blk[b].src2.tag   = (s2[k] >= 0) ? 5'(s2[k] % 32) : 5'd0;
      in_blk[b].src2.ready = (s2[k] < 0) || ty[k].cntrl || (written[s2[k]] && wr_cyc[s2[k]] < cyc);
      in_blk[b].src2.data  = opv2(k);
      if (!in_blk[b].src1.ready) in_blk[b].src1.data = $urandom;
      if (!in_blk[b].src2.ready) in_blk[b].src2.data = $urandom;
      owner[k % 32] = k;
      sent[k] = 1; sent_cyc[k] = cyc;
      nsent++;
    end
  endtask

  // ------------------------------------------------------------- main
  initial begin
    int start, kind, full_before, blk_before, p4_before;
    for (int b = 0; b < BLOCK; b++) in_blk[b] = '0;
    for (int w = 0; w < N_WB; w++) wb[w] = '0;
    for (int t = 0; t < 32; t++) owner[t] = 0;
    mul_avail = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (prog = 0; prog < NPROG; prog++) begin
      kind = (prog < 7) ? prog : (prog == NPROG - 1) ? 8 : 7;
      gen(kind);
      start = cyc;
      full_before = n_full;
      blk_before = n_load_blocked;
      p4_before = n_mul_p4;
      while (1) begin
        @(negedge clk);
        mul_avail = (kind == 5) ? (cyc - start > 25) : (kind < 7) || ((cyc % 47) < 36);
        do_issue();
        do_plan_and_wb();
        do_send();
        if (!mul_avail) n_mul_wait++;
        if (prog_done()) break;
        if (cyc - start > 4 * plen + 200) begin
          check(1'b0, $sformatf("program %0d made no progress", prog));
          break;
        end
      end
      // results of the last issues drain
      for (int b = 0; b < BLOCK; b++) in_blk[b] = '0;
      repeat (3) begin
        @(negedge clk);
        do_issue();
        do_plan_and_wb();
      end
      for (int k = 0; k < nsent; k++) begin
        if (wrong[k]) begin
          if (!issued[k]) n_killed++;
        end else if (ty[k].cntrl && !mispr[k]) begin
          check(!issued[k], "correct branch never issues");
          n_correct_br++;
        end else begin
          check(issued[k], $sformatf("prog %0d inst %0d never issued", prog, k));
        end
      end
      // directed latency checks
      if (kind == 0) begin
        check(iss_cyc[0] == sent_cyc[0] + 2, $sformatf("issue latency %0d", iss_cyc[0] - sent_cyc[0]));
        for (int k = 1; k < plen; k++)
          check(iss_cyc[k] == iss_cyc[k-1] + 1, $sformatf("ALU chain gap at %0d", k));
      end
      if (kind == 1) begin
        for (int k = 1; k < plen; k++)
          check(iss_cyc[k] == iss_cyc[k-1] + 1, $sformatf("load/ALU chain gap at %0d", k));
      end
      if (kind == 2) begin
        check(iss_cyc[1] == iss_cyc[0] + 2, "multiply latency two cycles");
      end
      if (kind == 4) begin
        check(iss_cyc[2] == iss_cyc[3], "load and branch issued together on port 4");
      end
      if (kind == 6) begin
        check(n_mul_p4 > p4_before && n_load_blocked > blk_before, "product on port 4 held the load back");
        check(iss_cyc[7] == iss_cyc[0] + 1, "load issued in the cycle after the multiply");
      end
      if (kind == 8) begin
        check(cyc - start >= 1000, "long trace ran for at least 1000 cycles");
        check(nsent == plen, "long trace sent completely");
      end
      if (kind == 5) begin
        check(n_full > full_before, "window filled behind the stalled multiply");
      end
      if (kind == 3) begin
        // four instructions decoded and four issued in every cycle
        for (int k = 0; k < plen; k++) begin
          check(sent_cyc[k] == sent_cyc[0] + k / 4, $sformatf("block %0d not accepted back to back", k / 4));
          check(iss_cyc[k] == sent_cyc[k] + 2, $sformatf("inst %0d issue rate", k));
        end
      end
      $display("program %0d: %0d instructions, %0d cycles", prog, nsent, cyc - start);
    end

    $display("mechanisms: ooo=%0d three_alu=%0d port4_dual=%0d bypass=%0d load_bypass=%0d false_issue=%0d",
             n_ooo, n_three_alu, n_port4_dual, n_bypass, n_load_bypass, n_false);
    $display("            mul_p3=%0d mul_p4=%0d load_blocked=%0d mispredict=%0d correct_branch=%0d",
             n_mul_p3, n_mul_p4, n_load_blocked, n_mispred, n_correct_br);
    $display("            store=%0d store_port3=%0d window_full=%0d killed=%0d mul_unavailable=%0d",
             n_store, n_store_port3, n_full, n_killed, n_mul_wait);
    check(n_ooo > 0, "out-of-order issue happened");
    check(n_three_alu > 0, "three ALU issues in one cycle happened");
    check(n_port4_dual > 0, "control transfer and load together on port 4 happened");
    check(n_bypass > 0, "bypass happened");
    check(n_load_bypass > 0, "load bypass happened");
    check(n_false > 0, "false issue happened");
    check(n_mul_p3 > 0, "product on write-back port 3 happened");
    check(n_mul_p4 > 0, "product on write-back port 4 happened");
    check(n_load_blocked > 0, "load result held back happened");
    check(n_mispred > 0, "mispredicted branch happened");
    check(n_correct_br > 0, "correctly predicted branch happened");
    check(n_store > 0, "store issue happened");
    check(n_full > 0, "window full happened");
    check(n_killed > 0, "younger instructions killed happened");
    check(n_mul_wait > 0, "multiplier unavailable happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
