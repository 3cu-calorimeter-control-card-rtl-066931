// fault_monitor: watches the delatcher lines of the FEB slots and lets ECS
// switch a board off through the same line.
//
// Each FEB is protected by a delatcher that cuts its supply for a few ms when
// it sees a current surge (for instance a single-event latch-up). The
// delatcher's fault line runs point to point to the 3CU FPGA; it is an
// open-drain, active-low line: low while the delatcher is in fault or while
// anyone pulls it down. The monitor records every transition of a line into
// fault (high-to-low) in a sticky status bit, which ECS reads and clears by
// writing a one (clear_i). ECS can also ask for a line to be pulled down
// (force_i); the delatcher then keeps the board's supply off until the line
// is released, so a board can be held off for as long as needed.
//
// How it works: the lines are synchronized by two flops (reset value high,
// the released level) and compared with their value one cycle earlier. A
// pull-down the monitor drives itself would look like a fault, so a line's
// falling edge is ignored while its pull-down is on and for three cycles after
// it is released (the delay from pad through the synchronizer). A new fault
// and a clear of the same bit in one cycle leave the bit set.
//
// Interface: clk, rst_n; line_n_i (asynchronous line levels); force_i and
// clear_i (from the ECS registers); pd_o (1 = drive the line low, one flop
// after force_i); line_o (synchronized levels); status_o (sticky faults).
// Timing: a line that falls between two clock edges shows in status_o after
// the third rising edge that follows (two synchronizer stages, one edge
// detector). The sticky-status scheme and the masking window are this design's;
// the document gives the function (record fault transitions, pull the line
// down on an ECS register write).
module fault_monitor #(
  parameter int unsigned N_FEB = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_FEB-1:0] line_n_i,
  input  logic [N_FEB-1:0] force_i,
  input  logic [N_FEB-1:0] clear_i,
  output logic [N_FEB-1:0] pd_o,
  output logic [N_FEB-1:0] line_o,
  output logic [N_FEB-1:0] status_o
);

  localparam int unsigned MASK_DEPTH = 3;

  logic [N_FEB-1:0] line_s, line_q, fall, mask;
  logic [N_FEB-1:0] pd_hist [MASK_DEPTH];

  sync_2ff #(.WIDTH(N_FEB), .RESET_VAL({N_FEB{1'b1}})) u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   (line_n_i),
    .q_o   (line_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q <= '1;
      pd_o   <= '0;
      for (int i = 0; i < MASK_DEPTH; i++) pd_hist[i] <= '0;
    end else begin
      line_q     <= line_s;
      pd_o       <= force_i;
      pd_hist[0] <= pd_o;
      for (int i = 1; i < MASK_DEPTH; i++) pd_hist[i] <= pd_hist[i-1];
    end
  end

  always_comb begin
    mask = pd_o;
    for (int i = 0; i < MASK_DEPTH; i++) mask |= pd_hist[i];
    fall = line_q & ~line_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status_o <= '0;
    else        status_o <= (status_o & ~clear_i) | (fall & ~mask);
  end

  assign line_o = line_s;

endmodule
