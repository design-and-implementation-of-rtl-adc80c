// tb_iw_src_data: random shifts, write lines, read lines and bypass
// controls on a source data field; checks each slot's operand (stored value
// or, when bypassed, the selected result bus) and the stored LSBs against a
// reference copy of the field.
`timescale 1ns/1ps
module tb_iw_src_data;
  import iw_pkg::*;
  localparam int N = 32;
  localparam int NBLK = N / BLOCK;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NBLK-1:0] shift_en;
  logic [DATA_W-1:0] in_data [BLOCK];
  logic [N_WB-1:0] wr [N];
  logic [N_WB-1:0] in_wr [BLOCK];
  wb_t wb [N_WB];
  logic [N-1:0] grant [N_RD];
  logic [N_WB-1:0] byp [N_RD];
  logic [DATA_W-1:0] op [N_RD];
  logic [N-1:0] lsb;
  int checks = 0, failures = 0, n_byp = 0;

  iw_src_data #(.N(N)) dut (.clk, .rst_n, .shift_en_i(shift_en), .in_data_i(in_data), .wr_i(wr),
    .in_wr_i(in_wr), .wb_i(wb), .grant_i(grant), .byp_i(byp), .op_o(op), .lsb_o(lsb));

  always #5 clk = ~clk;

  logic [DATA_W-1:0] m [N];

  function automatic logic [N_WB-1:0] onehot_or_zero();
    return (($urandom % 3) == 0) ? N_WB'(1 << ($urandom % N_WB)) : '0;
  endfunction

  initial begin
    for (int e = 0; e < N; e++) m[e] = '0;
    shift_en = '0;
    for (int k = 0; k < BLOCK; k++) begin in_data[k] = '0; in_wr[k] = '0; end
    for (int e = 0; e < N; e++) wr[e] = '0;
    for (int w = 0; w < N_WB; w++) wb[w] = '0;
    for (int s = 0; s < N_RD; s++) begin grant[s] = '0; byp[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [DATA_W-1:0] upd [N];
      logic [DATA_W-1:0] inu [BLOCK];
      @(negedge clk);
      shift_en = '0;
      if (c % 3 == 0) for (int k = 0; k <= $urandom % NBLK; k++) shift_en[k] = 1'b1;
      for (int w = 0; w < N_WB; w++) begin wb[w].valid = 1; wb[w].miss = 0; wb[w].tag = '0; wb[w].data = $urandom; end
      for (int e = 0; e < N; e++) wr[e] = onehot_or_zero();
      for (int k = 0; k < BLOCK; k++) begin in_data[k] = $urandom; in_wr[k] = onehot_or_zero(); end
      for (int s = 0; s < N_RD; s++) begin
        grant[s] = (($urandom % 4) != 0) ? N'(1) << ($urandom % N) : '0;
        byp[s] = (($urandom % 3) == 0) ? onehot_or_zero() : '0;
      end
      #1;
      for (int s = 0; s < N_RD; s++) begin
        logic [DATA_W-1:0] exp;
        exp = '0;
        for (int e = 0; e < N; e++) if (grant[s][e]) exp = m[e];
        for (int w = 0; w < N_WB; w++) if (byp[s][w]) begin exp = wb[w].data; n_byp++; end
        checks++;
        if (op[s] !== exp) begin failures++; $display("FAIL slot %0d op %h exp %h", s, op[s], exp); end
      end
      for (int e = 0; e < N; e++) begin
        checks++;
        if (lsb[e] !== m[e][0]) begin failures++; $display("FAIL lsb %0d", e); end
        upd[e] = m[e];
        for (int w = 0; w < N_WB; w++) if (wr[e][w]) upd[e] = wb[w].data;
      end
      for (int k = 0; k < BLOCK; k++) begin
        inu[k] = in_data[k];
        for (int w = 0; w < N_WB; w++) if (in_wr[k][w]) inu[k] = wb[w].data;
      end
      @(posedge clk);
      for (int e = 0; e < N; e++)
        if (shift_en[e / BLOCK]) m[e] = (e < BLOCK) ? inu[e] : upd[e - BLOCK];
        else m[e] = upd[e];
    end
    checks++;
    if (n_byp == 0) failures++;
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
