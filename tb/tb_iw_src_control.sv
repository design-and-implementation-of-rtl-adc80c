// tb_iw_src_control: drives the src1 control field with random new blocks,
// announced tags, results (with load misses), read lines, false issues and
// condition LSBs, and compares every output with a row-by-row reference.
// A fixed scenario at the start checks the cycle behaviour explicitly:
// announce in cycle t makes a waiting row ready at t+1; its result in t+1
// raises its write line and the bypass control of the slot reading it.
`timescale 1ns/1ps
module tb_iw_src_control;
  import iw_pkg::*;
  localparam int N = 32;
  localparam int NBLK = N / BLOCK;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NBLK-1:0] shift_en;
  src_in_t in_r [BLOCK];
  tagbus_t ann [N_WB];
  wb_t wb [N_WB];
  logic [N-1:0] grant [N_RD];
  logic [N-1:0] issue_any, false_row, lsb;
  logic [N-1:0] rdy, issued, present, false_o, mispred, br_ok;
  logic [N_WB-1:0] wr [N];
  logic [N_WB-1:0] in_wr [BLOCK];
  logic [N_WB-1:0] byp [N_RD];
  int checks = 0, failures = 0;
  int n_ann = 0, n_wr = 0, n_false = 0, n_mp = 0, n_ok = 0, n_byp = 0;

  iw_src_control #(.N(N), .IS_SRC1(1'b1)) dut (.clk, .rst_n, .shift_en_i(shift_en), .in_i(in_r),
    .ann_i(ann), .wb_i(wb), .grant_i(grant), .issue_any_i(issue_any), .false_row_i(false_row),
    .data_lsb_i(lsb), .rdy_o(rdy), .issued_o(issued), .present_o(present), .wr_o(wr),
    .in_wr_o(in_wr), .byp_o(byp), .false_o(false_o), .mispred_o(mispred), .br_ok_o(br_ok));

  always #5 clk = ~clk;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic ready, present, issued, branch, pred;
  } mrow_t;
  mrow_t m [N];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic idle();
    shift_en = '0;
    for (int k = 0; k < BLOCK; k++) in_r[k] = '0;
    for (int w = 0; w < N_WB; w++) begin ann[w] = '0; wb[w] = '0; end
    for (int s = 0; s < N_RD; s++) grant[s] = '0;
    issue_any = '0; false_row = '0; lsb = '0;
  endtask

  initial begin
    for (int e = 0; e < N; e++) m[e] = '0;
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // directed: a new waiting row (tag 9) enters row 0..3
    @(negedge clk);
    shift_en = '1;
    for (int k = 0; k < BLOCK; k++) begin in_r[k].tag = 5'd9; in_r[k].ready = (k != 2); end
    @(negedge clk);
    idle();
    #1 chk(!rdy[2] && rdy[1], "new row 2 waits, row 1 ready");
    ann[1] = '{valid: 1'b1, tag: 5'd9};          // announced in cycle t
    @(negedge clk);
    idle();
    #1 chk(rdy[2] && !present[2], "ready one cycle after the announcement");
    wb[1] = '{valid: 1'b1, miss: 1'b0, tag: 5'd9, data: 32'h1};
    grant[2][2] = 1'b1;                          // read on slot 2 in the same cycle
    issue_any[2] = 1'b1;
    #1 chk(wr[2] == 4'b0010 && byp[2] == 4'b0010 && wr[1] == 4'b0000, "write line and bypass in the result cycle");
    @(negedge clk);
    idle();
    #1 chk(present[2] && issued[2], "stored and issued");
    // reset for the random phase
    rst_n = 1'b0; #1 rst_n = 1'b1;

    for (int c = 0; c < 3000; c++) begin
      mrow_t upd [N];
      mrow_t inu [BLOCK];
      logic [N_WB-1:0] ewr [N];
      logic [N-1:0] emiss, efalse;
      @(negedge clk);
      idle();
      for (int w = 0; w < N_WB; w++) begin
        ann[w].valid = ($urandom % 3) == 0; ann[w].tag = TAG_W'($urandom);
        wb[w].valid = ($urandom % 2) == 0; wb[w].tag = TAG_W'($urandom); wb[w].data = $urandom;
        wb[w].miss = (w == WB_LOAD) && (($urandom % 3) == 0);
      end
      if (c % 4 == 0) begin
        int b;
        b = $urandom % NBLK;
        for (int k = 0; k <= b; k++) shift_en[k] = 1'b1;
      end
      for (int k = 0; k < BLOCK; k++) begin
        in_r[k].tag = TAG_W'($urandom); in_r[k].ready = $urandom; in_r[k].branch = ($urandom % 4) == 0;
        in_r[k].pred = $urandom;
      end
      lsb = $urandom;
      // reference match lines
      for (int e = 0; e < N; e++) begin
        for (int w = 0; w < N_WB; w++)
          ewr[e][w] = wb[w].valid && wb[w].tag == m[e].tag && !(w == WB_LOAD && wb[w].miss) && !m[e].present;
        emiss[e] = wb[WB_LOAD].valid && wb[WB_LOAD].miss && wb[WB_LOAD].tag == m[e].tag && !m[e].present;
      end
      // read lines only for rows whose operand is there or arriving
      for (int s = 0; s < N_RD; s++) begin
        int r;
        r = $urandom % N;
        if (($urandom % 2) == 0 && (m[r].present || (|ewr[r]) || emiss[r])) begin
          grant[s][r] = 1'b1;
          issue_any[r] = 1'b1;
        end
      end
      for (int e = 0; e < N; e++) efalse[e] = issue_any[e] && emiss[e];
      false_row = efalse | (($urandom % 8 == 0) ? issue_any & $urandom : '0);
      #1;
      for (int e = 0; e < N; e++) begin
        bit annm, mp;
        annm = 0;
        for (int w = 0; w < N_WB; w++) if (ann[w].valid && ann[w].tag == m[e].tag) annm = 1;
        chk(wr[e] == ewr[e], $sformatf("wr row %0d", e));
        chk(false_o[e] == efalse[e], $sformatf("false row %0d", e));
        mp = m[e].branch && m[e].present && (lsb[e] ^ m[e].pred);
        chk(mispred[e] == mp, $sformatf("mispred row %0d", e));
        chk(br_ok[e] == (m[e].branch && m[e].present && !(lsb[e] ^ m[e].pred)), $sformatf("br_ok row %0d", e));
        chk(rdy[e] == (m[e].branch ? mp : m[e].ready), $sformatf("rdy row %0d", e));
        chk(issued[e] == m[e].issued && present[e] == m[e].present, $sformatf("issued/present row %0d", e));
        if (|ewr[e]) n_wr++;
        if (annm) n_ann++;
        if (efalse[e]) n_false++;
        if (mp) n_mp++;
        if (br_ok[e]) n_ok++;
        upd[e] = m[e];
        upd[e].present = m[e].present || (|ewr[e]);
        upd[e].ready = (m[e].ready || annm || (|ewr[e])) && !emiss[e];
        upd[e].issued = !false_row[e] && (m[e].issued || issue_any[e]);
      end
      for (int s = 0; s < N_RD; s++) begin
        logic [N_WB-1:0] eb;
        eb = '0;
        for (int e = 0; e < N; e++) if (grant[s][e]) eb = ewr[e];
        chk(byp[s] == eb, $sformatf("bypass slot %0d", s));
        if (|eb) n_byp++;
      end
      for (int k = 0; k < BLOCK; k++) begin
        bit annm, wrm, missm;
        annm = 0; wrm = 0;
        for (int w = 0; w < N_WB; w++) begin
          if (ann[w].valid && ann[w].tag == in_r[k].tag) annm = 1;
          if (wb[w].valid && wb[w].tag == in_r[k].tag && !(w == WB_LOAD && wb[w].miss) && !in_r[k].ready) wrm = 1;
        end
        missm = wb[WB_LOAD].valid && wb[WB_LOAD].miss && wb[WB_LOAD].tag == in_r[k].tag && !in_r[k].ready;
        inu[k].tag = in_r[k].tag;
        inu[k].present = in_r[k].ready || wrm;
        inu[k].ready = (in_r[k].ready || annm || wrm) && !missm;
        inu[k].issued = 0;
        inu[k].branch = in_r[k].branch;
        inu[k].pred = in_r[k].pred;
      end
      @(posedge clk);
      for (int e = 0; e < N; e++) begin
        if (shift_en[e / BLOCK]) m[e] = (e < BLOCK) ? inu[e] : upd[e - BLOCK];
        else m[e] = upd[e];
      end
    end
    chk(n_ann > 0 && n_wr > 0 && n_false > 0 && n_mp > 0 && n_ok > 0 && n_byp > 0, "coverage");
    $display("coverage ann=%0d wr=%0d false=%0d mispred=%0d ok=%0d bypass=%0d", n_ann, n_wr, n_false, n_mp, n_ok, n_byp);
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
