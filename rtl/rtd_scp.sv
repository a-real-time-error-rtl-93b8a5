// rtd_scp: stored column parity (SCP) register and error vector (EV).
//
// The SCP holds, per column, the parity the column should have given the
// values written into it. On every array write it is updated as
//     SCP(t+1) = SCP(t) ^ IN ^ PD ^ CV
// where IN is the row being written, PD the row being overwritten and CV the
// correction vector for PD (nonzero only when PD itself is faulty), so the
// update always uses the fault-free previous value. The error vector
//     EV = SCP ^ RTCP
// compares it with the real-time column parity of the cells every cycle; a
// set bit marks a column (or SCP bit) that holds an odd number of faults.
// With V-way vertical interleaving there are V SCP rows, one per row class
// (row % V), and the write updates the class of the written row.
//
// Initialisation: the cells power up with unknown content, so the SCP is
// loaded with the RTCP (EV becomes zero) in the first enabled cycle after
// reset, whenever sync is pulsed, and whenever RTD is switched back on after
// having been off. While en is low (RTD disabled by a control bit, to save
// power outside test and validation) the SCP is held and EV reads zero.
// The update rule and the RTCP load follow the document; the reset-time and
// re-enable reload policy is this design's choice.
// Timing: SCP changes on the rising edge; EV and err are combinational.
module rtd_scp #(
  parameter int unsigned COLS = 66,
  parameter int unsigned V    = 1,
  localparam int unsigned VW  = (V > 1) ? $clog2(V) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   sync,
  input  logic                   upd,
  input  logic [VW-1:0]          upd_cls,
  input  logic [COLS-1:0]        in_row,
  input  logic [COLS-1:0]        pd_row,
  input  logic [COLS-1:0]        cv,
  input  logic [V-1:0][COLS-1:0] rtcp,
  output logic [V-1:0][COLS-1:0] scp,
  output logic [V-1:0][COLS-1:0] ev,
  output logic                   err
);
  logic reload;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reload <= 1'b1;
    end else if (!en) begin
      reload <= 1'b1;
    end else begin
      reload <= 1'b0;
    end
  end

  // next SCP: a reload takes the RTCP as the base; a write in the same cycle
  // is then folded in with the actual PD, which the RTCP already contains
  logic [V-1:0][COLS-1:0] scp_d;

  always_comb begin
    scp_d = (reload || sync) ? rtcp : scp;
    if (upd)
      scp_d[upd_cls] = scp_d[upd_cls] ^ in_row ^ pd_row ^
                       ((reload || sync) ? '0 : cv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  scp <= '0;
    else if (en) scp <= scp_d;
  end

  always_comb begin
    ev  = (en && !reload) ? (scp ^ rtcp) : '0;
    err = |ev;
  end
endmodule
