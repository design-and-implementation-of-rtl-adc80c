// iw_src_data: operand storage of one source field (src1 or src2) with the
// bypass multiplexers at its bottom.
//
// Every row holds one DATA_W-bit operand. A new block of four shifts in at
// the top together with the rest of the window. A row's operand is written
// once, from the write-back port whose write line (wr_i, from the source
// control field) is raised for it. The field has four read ports, one per
// issue slot that uses this operand; a slot's read line (grant_i) is one-hot
// over the rows. At the bottom of the field each slot has a bypass
// multiplexer: if its bypass control (byp_i) names a write-back port, the
// operand is taken from that port's result bus in the same cycle instead of
// from storage. This is how an instruction issued in the cycle its producer's
// result appears gets the value without waiting for it to be stored.
//
// Reads and the bypass are combinational; the write and the shift happen at
// the rising clock edge. The field structure, the write-once use of the
// cells and the position of the bypass muxes follow the source design; the
// register-based cell is this design's own choice.
module iw_src_data
  import iw_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N/BLOCK-1:0]  shift_en_i,
  input  logic [DATA_W-1:0]   in_data_i [BLOCK],  // new block's operands
  input  logic [N_WB-1:0]     wr_i      [N],      // write lines per row
  input  logic [N_WB-1:0]     in_wr_i   [BLOCK],  // write lines of new rows
  input  wb_t                 wb_i      [N_WB],   // result buses
  input  logic [N-1:0]        grant_i   [N_RD],   // read lines per slot
  input  logic [N_WB-1:0]     byp_i     [N_RD],   // bypass control per slot
  output logic [DATA_W-1:0]   op_o      [N_RD],   // operand per slot
  output logic [N-1:0]        lsb_o               // stored LSB of each row
);

  logic [DATA_W-1:0] data_q [N];
  logic [DATA_W-1:0] upd    [N];
  logic [DATA_W-1:0] in_upd [BLOCK];

  // Value a result bus delivers to a row (at most one write line is set,
  // tags being unique).
  function automatic logic [DATA_W-1:0] written(input logic [N_WB-1:0] wr,
                                                input logic [DATA_W-1:0] old,
                                                input wb_t wb [N_WB]);
    logic [DATA_W-1:0] v;
    v = old;
    for (int w = 0; w < N_WB; w++) if (wr[w]) v = wb[w].data;
    return v;
  endfunction

  always_comb begin
    for (int e = 0; e < N; e++) upd[e] = written(wr_i[e], data_q[e], wb_i);
    // a new row whose operand arrives in its insertion cycle
    for (int e = 0; e < BLOCK; e++) in_upd[e] = written(in_wr_i[e], in_data_i[e], wb_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) data_q[e] <= '0;
    end else begin
      for (int e = 0; e < N; e++) begin
        if (shift_en_i[e / BLOCK]) data_q[e] <= (e < BLOCK) ? in_upd[e] : upd[e - BLOCK];
        else                       data_q[e] <= upd[e];
      end
    end
  end

  // Read ports with the bypass muxes.
  always_comb begin
    for (int s = 0; s < N_RD; s++) begin
      logic [DATA_W-1:0] rd;
      rd = '0;
      for (int e = 0; e < N; e++) if (grant_i[s][e]) rd = rd | data_q[e];
      op_o[s] = rd;
      for (int w = 0; w < N_WB; w++) if (byp_i[s][w]) op_o[s] = wb_i[w].data;
    end
    for (int e = 0; e < N; e++) lsb_o[e] = data_q[e][0];
  end

endmodule
