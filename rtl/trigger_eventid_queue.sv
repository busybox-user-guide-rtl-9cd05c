// trigger_eventid_queue: the event IDs the trigger system has announced, oldest first.
//
// Structural: an eventid_extractor reads the trigger receiver's CDH FIFO and writes each
// event's 36-bit ID into an eventid_fifo. The verification controller sees the oldest ID on
// eventid_out while new_eventid_av is high, and removes it with new_eventid_en once the
// event has been verified. num_of_eventids counts the IDs held and most_recent_eventid is
// the last one extracted; both are readable in the status registers.
//
// Interface: clock_b domain throughout; read_enable goes to the trigger receiver. The
// split into extractor and FIFO follows the source design.
module trigger_eventid_queue #(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clock_b,
  input  logic        areset,
  input  logic [32:0] DAQ_header_data,
  input  logic [3:0]  buffered_events,
  input  logic [3:0]  DAQ_read_counter,
  input  logic        new_eventid_en,
  output logic        read_enable,
  output logic [35:0] eventid_out,
  output logic        new_eventid_av,
  output logic [3:0]  num_of_eventids,
  output logic [35:0] most_recent_eventid
);

  logic        wr_en, empty, full;
  logic [35:0] wr_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  eventid_extractor u_extractor (
    .areset            (areset),
    .clock_in          (clock_b),
    .DAQ_header_data   (DAQ_header_data),
    .DAQ_read_counter  (DAQ_read_counter),
    .buffered_events   (buffered_events),
    .queue_full        (full),
    .read_enable       (read_enable),
    .write_enable      (wr_en),
    .extracted_eventid (wr_data)
  );

  eventid_fifo #(.WIDTH(36), .DEPTH(DEPTH)) u_fifo (
    .clock_b     (clock_b),
    .areset      (areset),
    .wr_en       (wr_en),
    .wr_data     (wr_data),
    .rd_en       (new_eventid_en),
    .rd_data     (eventid_out),
    .empty       (empty),
    .full        (full),
    .count       (count),
    .most_recent (most_recent_eventid)
  );

  assign new_eventid_av  = !empty;
  assign num_of_eventids = 4'(count);

endmodule
