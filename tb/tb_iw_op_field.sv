// tb_iw_op_field: random block shifts and read lines on the opcode and
// destination-tag columns; checks the five read ports against a reference
// copy of the columns.
`timescale 1ns/1ps
module tb_iw_op_field;
  import iw_pkg::*;
  localparam int N = 32;
  localparam int NBLK = N / BLOCK;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NBLK-1:0] shift_en;
  logic [OPC_W-1:0] in_op [BLOCK];
  logic [TAG_W-1:0] in_dest [BLOCK];
  logic [N-1:0] grant [N_SLOT];
  logic [OPC_W-1:0] op [N_SLOT];
  logic [TAG_W-1:0] dest [N_SLOT];
  int checks = 0, failures = 0;

  iw_op_field #(.N(N)) dut (.clk, .rst_n, .shift_en_i(shift_en), .in_op_i(in_op),
    .in_dest_i(in_dest), .grant_i(grant), .op_o(op), .dest_o(dest));

  always #5 clk = ~clk;

  logic [OPC_W-1:0] mo [N];
  logic [TAG_W-1:0] md [N];

  initial begin
    for (int e = 0; e < N; e++) begin mo[e] = '0; md[e] = '0; end
    shift_en = '0;
    for (int k = 0; k < BLOCK; k++) begin in_op[k] = '0; in_dest[k] = '0; end
    for (int s = 0; s < N_SLOT; s++) grant[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      shift_en = '0;
      if (c % 2 == 0) for (int k = 0; k <= $urandom % NBLK; k++) shift_en[k] = 1'b1;
      for (int k = 0; k < BLOCK; k++) begin in_op[k] = OPC_W'($urandom); in_dest[k] = TAG_W'($urandom); end
      for (int s = 0; s < N_SLOT; s++) grant[s] = (($urandom % 4) != 0) ? N'(1) << ($urandom % N) : '0;
      #1;
      for (int s = 0; s < N_SLOT; s++) begin
        logic [OPC_W-1:0] eo;
        logic [TAG_W-1:0] ed;
        eo = '0; ed = '0;
        for (int e = 0; e < N; e++) if (grant[s][e]) begin eo = mo[e]; ed = md[e]; end
        checks++;
        if (op[s] !== eo || dest[s] !== ed) begin failures++; $display("FAIL slot %0d", s); end
      end
      @(posedge clk);
      for (int e = N - 1; e >= 0; e--)
        if (shift_en[e / BLOCK]) begin
          mo[e] = (e < BLOCK) ? in_op[e] : mo[e - BLOCK];
          md[e] = (e < BLOCK) ? in_dest[e] : md[e - BLOCK];
        end
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
