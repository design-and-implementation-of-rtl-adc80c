// tb_iw_shift_ctrl: block shift enables against a reference that finds the
// lowest free block of four rows.
`timescale 1ns/1ps
module tb_iw_shift_ctrl;
  localparam int N = 32;
  localparam int NBLK = N / 4;
  logic [N-1:0] done;
  logic [NBLK-1:0] shift_en;
  logic space;
  int checks = 0, failures = 0;

  iw_shift_ctrl #(.N(N)) dut (.done_i(done), .shift_en_o(shift_en), .space_o(space));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [NBLK-1:0] exp;
      int lowest;
      // mostly-done rows so that free blocks occur
      done = $urandom | $urandom | $urandom;
      if (n % 5 == 0) done = '0;
      if (n % 7 == 0) done[($urandom % NBLK) * 4 +: 4] = 4'hF;
      #1;
      lowest = -1;
      for (int b = 0; b < NBLK; b++) if (&done[b*4 +: 4]) lowest = b;
      for (int b = 0; b < NBLK; b++) exp[b] = (b <= lowest);
      checks++;
      if (shift_en !== exp || space !== (lowest >= 0)) begin
        failures++;
        $display("FAIL done=%h shift=%b exp=%b", done, shift_en, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
