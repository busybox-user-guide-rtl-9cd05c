// event_processor: checks D-RORC replies against the event ID being verified.
//
// For every reply popped from the inbox (DRORC_message_valid), the processor takes the
// channel number from bits 55:48. If the reply's request ID equals the current local
// request ID and its bunch-crossing and orbit IDs equal the trigger's event ID, that
// channel's bit in the EIDOK register is set; a reply that does not match clears it.
// event_reset clears the whole register when a new event is opened. The verification gate
// raises event_valid when every channel either has its CHEN (channel enable) bit clear or
// its EIDOK bit set. tx_mask = CHEN and not EIDOK lists the channels still to be asked.
//
// Interface: clock_b; EIDOK updates at the edge after the reply; event_valid and tx_mask
// are combinational from the registers. The comparison, EIDOK, the gate and the CHEN
// qualification follow the source design; the mask rule and the request ID check are
// this design's reading of the message formats.
module event_processor
  import busybox_pkg::*;
#(
  parameter int unsigned NUM_CHANNELS = 120
) (
  input  logic                    clock_b,
  input  logic                    areset,
  input  logic [35:0]             trigger_eventid,
  input  logic [55:0]             DRORC_message,
  input  logic                    DRORC_message_valid,
  input  logic [NUM_CHANNELS-1:0] CHEN_vector,
  input  logic [3:0]              local_requestID,
  input  logic                    event_reset,
  output logic [NUM_CHANNELS-1:0] EIDOK_vector,
  output logic [NUM_CHANNELS-1:0] tx_mask,
  output logic                    event_valid
);

  rx_word_t  rx;
  event_id_t trig;
  logic      match;

  assign rx    = rx_word_t'(DRORC_message);
  assign trig  = event_id_t'(trigger_eventid);
  assign match = (rx.msg.request_id == local_requestID) &&
                 (rx.msg.bunch_id   == trig.bunch_id)   &&
                 (rx.msg.orbit_id   == trig.orbit_id);

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      EIDOK_vector <= '0;
    end else if (event_reset) begin
      EIDOK_vector <= '0;
    end else if (DRORC_message_valid && 32'(rx.channel) < NUM_CHANNELS) begin
      EIDOK_vector[rx.channel] <= match;
    end
  end

  assign tx_mask     = CHEN_vector & ~EIDOK_vector;
  assign event_valid = &(EIDOK_vector | ~CHEN_vector);

endmodule
