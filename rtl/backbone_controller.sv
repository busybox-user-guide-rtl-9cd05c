// backbone_controller: collects replies from up to 8 branch controllers.
//
// A scan counter steps through the branches, one per clock_a cycle. When the scanned
// branch has its data_av flag set, the backbone copies its 48-bit reply to data_out,
// forms the channel number as branch index * CH_PER_BRANCH + the branch's count, pulses
// write_req for one cycle and acknowledges the branch with a one-cycle pulse on
// read_ack_vector. The outputs then hold until the next reply.
//
// Interface (clock_a): write_req is a single-cycle strobe for the RX memory and the
// D-RORC inbox buffer, with data_out and count_out valid in the same cycle; the
// consumers must accept one reply per cycle. Timing: one cycle from a flagged branch
// being scanned to write_req. Reading up to eight branches and writing to the RX memory
// and inbox follow the source design; the scan order and the channel numbering formula
// are this design's choices.
module backbone_controller #(
  parameter int unsigned BRANCHES      = 8,   // 1..8
  parameter int unsigned CH_PER_BRANCH = 15   // receivers per branch, 1..16
) (
  input  logic                clock_a,
  input  logic                areset,
  input  logic [47:0]         data_in_array  [BRANCHES],
  input  logic [3:0]          count_in_array [BRANCHES],
  input  logic [BRANCHES-1:0] data_av_vector,
  output logic [BRANCHES-1:0] read_ack_vector,
  output logic [47:0]         data_out,
  output logic [7:0]          count_out,
  output logic                write_req
);

  localparam int unsigned SW = (BRANCHES > 1) ? $clog2(BRANCHES) : 1;
  logic [SW-1:0] scan;

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      scan            <= '0;
      data_out        <= '0;
      count_out       <= '0;
      write_req       <= 1'b0;
      read_ack_vector <= '0;
    end else begin
      read_ack_vector <= '0;
      write_req       <= 1'b0;
      if (data_av_vector[scan] && !read_ack_vector[scan]) begin
        data_out              <= data_in_array[scan];
        count_out             <= 8'(32'(scan) * CH_PER_BRANCH + 32'(count_in_array[scan]));
        write_req             <= 1'b1;
        read_ack_vector[scan] <= 1'b1;
      end
      scan <= (32'(scan) == BRANCHES - 1) ? '0 : scan + 1'b1;
    end
  end

endmodule
