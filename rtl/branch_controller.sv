// branch_controller: collects replies from a group of up to 16 single-channel receivers.
//
// A scan counter steps through the receivers, one per clock_a cycle. When the scanned
// receiver has data_av set, its 48-bit reply is copied into the branch buffer, the
// receiver is acknowledged with a one-cycle pulse on read_ack_vector, and the branch's
// data_av goes high with count_out holding the receiver's index. Scanning stops while the
// buffer is full; the backbone controller's read_ack empties it and scanning resumes at
// the next receiver, so every receiver is served in turn.
//
// Interface (clock_a): data_in_array / data_av_vector from the receivers, read_ack from
// the backbone controller. Timing: a reply waiting at the scanned receiver is in the
// buffer one cycle later. Scanning, buffering, holding the flag until the backbone reads
// it and the 4-bit count output follow the source design; one-per-cycle scanning and the
// resume point are this design's choices.
module branch_controller #(
  parameter int unsigned CHANNELS = 16     // receivers on this branch, 1..16
) (
  input  logic                clock_a,
  input  logic                areset,
  input  logic [47:0]         data_in_array [CHANNELS],
  input  logic [CHANNELS-1:0] data_av_vector,
  input  logic                read_ack,
  output logic [CHANNELS-1:0] read_ack_vector,
  output logic [47:0]         data_out,
  output logic [3:0]          count_out,
  output logic                data_av
);

  logic [3:0] scan;

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      scan            <= '0;
      data_out        <= '0;
      count_out       <= '0;
      data_av         <= 1'b0;
      read_ack_vector <= '0;
    end else begin
      read_ack_vector <= '0;
      if (data_av) begin
        if (read_ack) data_av <= 1'b0;
      end else begin
        if (data_av_vector[scan] && !read_ack_vector[scan]) begin
          data_out              <= data_in_array[scan];
          count_out             <= scan;
          data_av               <= 1'b1;
          read_ack_vector[scan] <= 1'b1;
        end
        scan <= (scan == 4'(CHANNELS - 1)) ? '0 : scan + 1'b1;
      end
    end
  end

endmodule
