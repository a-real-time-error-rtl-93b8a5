// rtd_bitslice: one column of an RTD flip-flop array.
//
// A bit-slice holds one bit of every row in a column of flip-flops and
// carries three pieces of per-column logic built next to the cells:
//   * the read mux column: the cell selected by the one-hot read gates rsel
//     is driven to dout (AND-mask each F/F output, then an OR tree);
//   * the previous-data (PD) mux column: the same structure, selected by the
//     one-hot write gates, gives the value about to be overwritten. With
//     PD_MUX = 0 the column is left out (pd reads 0) for arrays that read
//     the old row through the normal read port before each write;
//   * the real-time column parity (RTCP) column: an XOR tree over all cells,
//     with no address at all. With V-way vertical interleaving there are V
//     trees, tree v covering rows r with r % V == v.
// Cells are written on the rising clock edge when their write gate is on.
// flip[] inverts a cell at the same edge; it stands in for an upset or a
// faulty write in simulation and in error-injection tests. It is this
// design's addition and not part of the document's bit-slice.
// dout, pd and rtcp are combinational functions of the cells.
// The cells have no reset, like the F/F column of the document's bit-slice.
module rtd_bitslice #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned V    = 1,
  parameter bit          PD_MUX = 1'b1
) (
  input  logic            clk,
  input  logic            din,
  input  logic [ROWS-1:0] wsel,
  input  logic [ROWS-1:0] flip,
  input  logic [ROWS-1:0] rsel,
  output logic            dout,
  output logic            pd,
  output logic [V-1:0]    rtcp
);
  logic [ROWS-1:0] q;

  for (genvar r = 0; r < ROWS; r++) begin : g_cell
    always_ff @(posedge clk)
      q[r] <= (wsel[r] ? din : q[r]) ^ flip[r];
  end

  // read and PD mux columns: masked F/F outputs into an OR tree
  assign dout = |(q & rsel);

  if (PD_MUX) begin : g_pd
    assign pd = |(q & wsel);
  end else begin : g_no_pd
    assign pd = 1'b0;
  end

  // real-time column parity, one XOR tree per vertical interleave class
  always_comb begin
    for (int unsigned v = 0; v < V; v++) begin
      rtcp[v] = 1'b0;
      for (int unsigned r = v; r < ROWS; r += V)
        rtcp[v] ^= q[r];
    end
  end
endmodule
