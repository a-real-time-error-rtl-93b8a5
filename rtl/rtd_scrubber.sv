// rtd_scrubber: demand-scrubbing controller for an RTD-protected array.
//
// Used where in-line correction is not wanted: when RTD flags an error the
// array is scrubbed once. Every row is read through the array's read port
// and checked with its row parity. Rows without a parity error are XORed
// into an accumulator as wide as a stored row (cleared at start). A row with
// a parity error is remembered, not accumulated. After the last row, if
// exactly one row failed, its fault-free value is accumulator ^ SCP (the SCP
// is the XOR of the fault-free content of every row), and it is written back.
// More than one failing row, or RTD reporting an error that no row parity
// sees (an even number of flips in one row partition), gives DUE; so does a
// failing row while RTD sees nothing. With V-way vertical interleaving all
// of this is done per row class (row % V) with one accumulator per class.
//
// Interface: pulse start; busy is high until done pulses for one cycle, with
// fixed (a row was rewritten) and due valid while done is high and held
// until the next start. While busy the controller owns the array's ports:
// rd_en/rd_addr, reading rd_row/rd_perr combinationally in the same cycle,
// and wr_en/wr_addr/wr_data, which must be written with the SCP left
// unchanged (the row goes back to the value the SCP already assumes). A
// write is held until the array answers wr_ready (an array without its own
// PD port needs two cycles per write).
// Timing: start -> done takes ROWS scan cycles, V fix cycles (plus one per
// write the array holds off) and one done cycle.
//
// Follows the document's scrubbing procedure. The per-class generalisation,
// the handshake and the timing are this design's choices.
module rtd_scrubber #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned H      = 2,
  parameter int unsigned V      = 1,
  localparam int unsigned COLS  = DATA_W + H,
  localparam int unsigned AW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned VW    = (V > 1) ? $clog2(V) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   fixed,
  output logic                   due,
  // array read port
  output logic                   rd_en,
  output logic [AW-1:0]          rd_addr,
  input  logic [COLS-1:0]        rd_row,
  input  logic [H-1:0]           rd_perr,
  // array write port (SCP kept)
  output logic                   wr_en,
  output logic [AW-1:0]          wr_addr,
  output logic [DATA_W-1:0]      wr_data,
  input  logic                   wr_ready,
  // RTD state of the array
  input  logic [V-1:0][COLS-1:0] ev,
  input  logic [V-1:0][COLS-1:0] scp
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_FIX, S_DONE} state_e;

  state_e                 state;
  logic [AW-1:0]          idx;
  logic [VW-1:0]          fcls;
  logic [V-1:0][COLS-1:0] acc;
  logic [V-1:0]           bad, multi;
  logic [V-1:0][AW-1:0]   bad_row;

  logic [VW-1:0] scls;
  assign scls = VW'(idx % AW'(V));

  // fix decision for class fcls
  logic          ev_nz, do_fix, fix_due;
  logic [COLS-1:0] good_row;
  always_comb begin
    ev_nz    = |ev[fcls];
    do_fix   = bad[fcls] && !multi[fcls] && ev_nz;
    fix_due  = multi[fcls] || (bad[fcls] && !ev_nz) || (!bad[fcls] && ev_nz);
    good_row = acc[fcls] ^ scp[fcls];
  end

  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);
  assign rd_en   = (state == S_SCAN);
  assign rd_addr = idx;
  assign wr_en   = (state == S_FIX) && do_fix;
  assign wr_addr = bad_row[fcls];
  assign wr_data = good_row[DATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      fcls    <= '0;
      acc     <= '0;
      bad     <= '0;
      multi   <= '0;
      bad_row <= '0;
      fixed   <= 1'b0;
      due     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          idx   <= '0;
          fcls  <= '0;
          acc   <= '0;
          bad   <= '0;
          multi <= '0;
          fixed <= 1'b0;
          due   <= 1'b0;
        end
        S_SCAN: begin
          if (|rd_perr) begin
            if (bad[scls]) multi[scls] <= 1'b1;
            bad[scls]     <= 1'b1;
            bad_row[scls] <= idx;
          end else begin
            acc[scls] <= acc[scls] ^ rd_row;
          end
          idx <= idx + 1'b1;
          if (idx == AW'(ROWS - 1)) state <= S_FIX;
        end
        S_FIX: if (!do_fix || wr_ready) begin
          if (do_fix)  fixed <= 1'b1;
          if (fix_due) due   <= 1'b1;
          if (fcls == VW'(V - 1)) begin
            fcls  <= '0;
            state <= S_DONE;
          end else begin
            fcls <= fcls + 1'b1;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
