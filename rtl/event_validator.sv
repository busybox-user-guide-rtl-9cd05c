// event_validator: decides when the data of an event has left the front-end buffers.
//
// The BusyBox learns each event's ID from the trigger system and asks every enabled
// D-RORC which event ID it last received. Once every enabled channel has answered with
// the same ID (and the current request ID), the event's data has reached the DAQ and its
// front-end buffer is free again; event_valid_out then pulses for one clock_b cycle.
//
// Parts: trigger_eventid_queue (IDs from the trigger receiver's CDH FIFO),
// drorc_inbox_buffer (replies from the 200 MHz receiver into the 40 MHz domain),
// eventid_control (request / wait / retry / halt state machine) and event_processor
// (EIDOK register and verification gate). fw_tx_* is the request port to the
// transmitter; fw_tx_mask selects the channels not yet verified.
//
// Interface: DRORC_* on clock_a (one reply per write strobe), everything else clock_b.
// The structure follows the source design.
module event_validator #(
  parameter int unsigned NUM_CHANNELS = 120,
  parameter int unsigned INBOX_DEPTH  = 128,
  parameter int unsigned QUEUE_DEPTH  = 8
) (
  input  logic                    areset,
  input  logic                    clock_a,
  input  logic                    clock_b,
  input  logic [47:0]             DRORC_data_in,
  input  logic [7:0]              DRORC_channel,
  input  logic                    DRORC_data_en,
  input  logic [NUM_CHANNELS-1:0] CHEN_vector,
  input  logic [32:0]             DAQ_header_data,
  input  logic [3:0]              buffered_events,
  input  logic [3:0]              DAQ_read_counter,
  input  logic                    force_validate,
  input  logic                    halt_validator,
  input  logic [15:0]             req_timeout,
  input  logic                    fw_tx_ack,
  output logic [NUM_CHANNELS-1:0] EIDOK_vector,
  output logic                    read_enable,
  output logic                    event_valid_out,
  output logic [35:0]             current_event_id,
  output logic [35:0]             most_recent_event_id,
  output logic [3:0]              requestID,
  output logic [15:0]             retry_count,
  output logic [3:0]              num_of_eventids,
  output logic                    fw_tx_request,
  output logic [7:0]              fw_tx_data,
  output logic [NUM_CHANNELS-1:0] fw_tx_mask
);

  logic        new_eventid_en, new_eventid_av;
  logic        inbox_read_req, inbox_empty, inbox_full, inbox_valid;
  logic [55:0] inbox_data;
  logic        event_reset, event_valid_int;

  drorc_inbox_buffer #(.WIDTH(56), .DEPTH(INBOX_DEPTH)) u_inbox (
    .clock_a  (clock_a),
    .clock_b  (clock_b),
    .areset   (areset),
    .wr_data  ({DRORC_channel, DRORC_data_in}),
    .wr_en    (DRORC_data_en),
    .full     (inbox_full),
    .rd_en    (inbox_read_req),
    .rd_data  (inbox_data),
    .rd_valid (inbox_valid),
    .empty    (inbox_empty)
  );

  trigger_eventid_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clock_b             (clock_b),
    .areset              (areset),
    .DAQ_header_data     (DAQ_header_data),
    .buffered_events     (buffered_events),
    .DAQ_read_counter    (DAQ_read_counter),
    .new_eventid_en      (new_eventid_en),
    .read_enable         (read_enable),
    .eventid_out         (current_event_id),
    .new_eventid_av      (new_eventid_av),
    .num_of_eventids     (num_of_eventids),
    .most_recent_eventid (most_recent_event_id)
  );

  eventid_control u_control (
    .clock_b         (clock_b),
    .areset          (areset),
    .force_validate  (force_validate),
    .halt_validator  (halt_validator),
    .new_eventid_av  (new_eventid_av),
    .inbox_empty     (inbox_empty),
    .event_valid_int (event_valid_int),
    .req_timeout     (req_timeout),
    .tx_ack          (fw_tx_ack),
    .new_eventid_en  (new_eventid_en),
    .inbox_read_req  (inbox_read_req),
    .event_valid_out (event_valid_out),
    .event_reset     (event_reset),
    .tx_req          (fw_tx_request),
    .tx_data         (fw_tx_data),
    .requestID       (requestID),
    .retry_count     (retry_count)
  );

  event_processor #(.NUM_CHANNELS(NUM_CHANNELS)) u_processor (
    .clock_b             (clock_b),
    .areset              (areset),
    .trigger_eventid     (current_event_id),
    .DRORC_message       (inbox_data),
    .DRORC_message_valid (inbox_valid),
    .CHEN_vector         (CHEN_vector),
    .local_requestID     (requestID),
    .event_reset         (event_reset),
    .EIDOK_vector        (EIDOK_vector),
    .tx_mask             (fw_tx_mask),
    .event_valid         (event_valid_int)
  );

endmodule
