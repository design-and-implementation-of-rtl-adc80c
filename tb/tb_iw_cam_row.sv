// tb_iw_cam_row: every stored tag against random search tags, with and
// without the search ports' valid bits.
`timescale 1ns/1ps
module tb_iw_cam_row;
  import iw_pkg::*;
  logic [TAG_W-1:0] tag;
  tagbus_t key [4];
  logic [3:0] match;
  int checks = 0, failures = 0;

  iw_cam_row #(.NPORT(4)) dut (.tag_i(tag), .key_i(key), .match_o(match));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] exp;
      tag = TAG_W'($urandom);
      for (int p = 0; p < 4; p++) begin
        key[p].valid = ($urandom % 4) != 0;
        key[p].tag   = (($urandom % 3) == 0) ? tag : TAG_W'($urandom);
      end
      #1;
      for (int p = 0; p < 4; p++) exp[p] = key[p].valid && (key[p].tag == tag);
      checks++;
      if (match !== exp) begin
        failures++;
        $display("FAIL tag=%0d match=%b exp=%b", tag, match, exp);
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
