// tb_iw_wb_ctrl: random issue patterns; checks which tag each write-back
// port carries in every cycle against a cycle-by-cycle reference of the
// policy: ALU and load results one cycle after issue on their own port;
// the product two cycles after issue on port 3 if no ALU issued on port 3 in
// the cycle after the multiply, else on port 4, holding a load back a cycle.
`timescale 1ns/1ps
module tb_iw_wb_ctrl;
  import iw_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  tagbus_t alu [3];
  tagbus_t mul, ld;
  tagbus_t ann [N_WB];
  tagbus_t plan [N_WB];
  logic ld_hold, mul_p4, ld_block;
  int checks = 0, failures = 0;
  int n_p3 = 0, n_p4 = 0, n_blk = 0;

  iw_wb_ctrl dut (.clk, .rst_n, .alu_i(alu), .mul_i(mul), .ld_i(ld), .ann_o(ann),
                  .plan_o(plan), .ld_hold_o(ld_hold), .mul_p4_o(mul_p4), .ld_block_o(ld_block));

  always #5 clk = ~clk;

  // reference state
  tagbus_t r_mul, r_ldb;
  tagbus_t exp_plan [N_WB];

  initial begin
    tagbus_t nx [N_WB];
    tagbus_t lsrc;
    r_mul = '0; r_ldb = '0;
    for (int w = 0; w < N_WB; w++) exp_plan[w] = '0;
    alu = '{default: '0}; mul = '0; ld = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // check this cycle's plan
      for (int w = 0; w < N_WB; w++) begin
        checks++;
        if (plan[w] !== exp_plan[w]) begin
          failures++;
          $display("FAIL cycle %0d port %0d plan %p exp %p", c, w, plan[w], exp_plan[w]);
        end
      end
      checks++;
      if (ld_hold !== r_ldb.valid) begin failures++; $display("FAIL ld_hold"); end
      // new issues (tags random but distinct per cycle)
      for (int k = 0; k < 3; k++) begin
        alu[k].valid = ($urandom % 100) < 50;
        alu[k].tag   = TAG_W'(k);
      end
      mul.valid = ($urandom % 100) < 40;  mul.tag = 5'd10 + 5'(c % 8);
      ld.valid  = !r_ldb.valid && (($urandom % 100) < 60);  ld.tag = 5'd20 + 5'(c % 8);
      #1;
      // reference next plan
      nx[0] = alu[0];
      nx[1] = alu[1];
      if (r_mul.valid && alu[2].valid) begin
        nx[2] = alu[2];
        lsrc  = r_ldb.valid ? r_ldb : ld;
        nx[3] = r_mul;
        if (lsrc.valid) n_blk++;
        r_ldb = lsrc;
        n_p4++;
      end else begin
        nx[2] = alu[2].valid ? alu[2] : r_mul;
        if (r_mul.valid) n_p3++;
        nx[3] = r_ldb.valid ? r_ldb : ld;
        r_ldb = '0;
      end
      for (int w = 0; w < N_WB; w++) begin
        checks++;
        if (ann[w] !== nx[w]) begin
          failures++;
          $display("FAIL cycle %0d ann %0d = %p exp %p", c, w, ann[w], nx[w]);
        end
      end
      r_mul = mul;
      exp_plan = nx;
    end
    checks++;
    if (n_p3 == 0 || n_p4 == 0 || n_blk == 0) begin
      failures++;
      $display("FAIL coverage p3=%0d p4=%0d blocked=%0d", n_p3, n_p4, n_blk);
    end
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
