// tb_iw_lookup_array: random and corner-case requests against a reference
// that scans the rows from the bottom (oldest) up.
`timescale 1ns/1ps
module tb_iw_lookup_array;
  localparam int N = 32;
  logic [N-1:0] req, grant, older;
  int checks = 0, failures = 0;

  iw_lookup_array #(.N(N)) dut (.req_i(req), .grant_o(grant), .older_o(older));

  task automatic apply(input logic [N-1:0] r);
    logic [N-1:0] eg, eo;
    bit seen;
    req = r;
    #1;
    eg = '0; eo = '0; seen = 0;
    for (int i = N - 1; i >= 0; i--) begin
      eo[i] = seen;
      if (r[i] && !seen) eg[i] = 1'b1;
      if (r[i]) seen = 1;
    end
    checks++;
    if (grant !== eg || older !== eo) begin
      failures++;
      $display("FAIL req=%h grant=%h (exp %h) older=%h (exp %h)", r, grant, eg, older, eo);
    end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < N; i++) apply(N'(1) << i);
    for (int i = 0; i < N; i++) apply(~(N'(1) << i));
    for (int n = 0; n < 2000; n++) apply($urandom & $urandom);
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
