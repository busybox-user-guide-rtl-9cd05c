// eventid_control: state machine that drives the verification of one event ID at a time.
//
// S_IDLE     waits for an event ID in the queue. It then clears EIDOK (event_reset),
//            steps the 4-bit request ID and clears the retry counter.
// S_REQUEST  asks the transmitter (tx_req) to send "Request Event ID" (command 0100) with
//            the current request ID to the channels still unverified, until tx_ack.
//            On entry from S_IDLE the request waits one cycle for EIDOK to be cleared.
// S_WAIT     drains the D-RORC inbox (inbox_read_req whenever it is not empty) while a
//            countdown of req_timeout cycles runs. When the verification gate reports all
//            channels matched it goes to S_VALID. When the countdown ends it counts a
//            retry and sends the request again with the same request ID, so a D-RORC that
//            has already answered repeats its answer. With halt_validator set it goes to
//            S_HALT instead.
// S_HALT     a known resting state for debugging: the inbox is still drained; clearing
//            halt_validator resumes with a new request, force_validate (a one-cycle pulse
//            from the register file) accepts the event as verified.
// S_VALID    pulses event_valid_out (frees one front-end buffer) and pops the event ID
//            (new_eventid_en), then returns to S_IDLE.
//
// Interface: clock_b; tx_data = {request ID, command type}. retry_count saturates at
// 0xFFFF. The controller's role, its outputs, the halt / force registers, the re-request
// timeout and the request ID scheme follow the source design; the state sequence is this
// design's own, built from that description and the D-RORC's reply rules.
module eventid_control
  import busybox_pkg::*;
(
  input  logic        clock_b,
  input  logic        areset,
  input  logic        force_validate,
  input  logic        halt_validator,
  input  logic        new_eventid_av,
  input  logic        inbox_empty,
  input  logic        event_valid_int,
  input  logic [15:0] req_timeout,
  input  logic        tx_ack,
  output logic        new_eventid_en,
  output logic        inbox_read_req,
  output logic        event_valid_out,
  output logic        event_reset,
  output logic        tx_req,
  output logic [7:0]  tx_data,
  output logic [3:0]  requestID,
  output logic [15:0] retry_count
);

  typedef enum logic [2:0] {S_IDLE, S_REQUEST, S_WAIT, S_HALT, S_VALID} ctl_state_t;

  ctl_state_t  state;
  logic [15:0] timer;

  // event_reset clears EIDOK at the end of the first S_REQUEST cycle; the request waits
  // for it so that the channel mask sent with it covers every enabled channel
  assign tx_req          = (state == S_REQUEST) && !event_reset;
  assign tx_data         = {requestID, CMD_REQUEST_EVENTID};
  assign inbox_read_req  = (state == S_WAIT || state == S_HALT) && !inbox_empty;
  assign event_valid_out = (state == S_VALID);
  assign new_eventid_en  = (state == S_VALID);

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      state       <= S_IDLE;
      timer       <= '0;
      requestID   <= '0;
      retry_count <= '0;
      event_reset <= 1'b0;
    end else begin
      event_reset <= 1'b0;
      unique case (state)
        S_IDLE: if (new_eventid_av) begin
          event_reset <= 1'b1;
          requestID   <= requestID + 1'b1;
          retry_count <= '0;
          state       <= S_REQUEST;
        end
        S_REQUEST: if (tx_ack && tx_req) begin
          timer <= req_timeout;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (event_valid_int && !event_reset) begin
            state <= S_VALID;
          end else if (halt_validator) begin
            state <= S_HALT;
          end else if (timer == '0) begin
            if (retry_count != 16'hFFFF) retry_count <= retry_count + 1'b1;
            state <= S_REQUEST;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_HALT: begin
          if (force_validate)       state <= S_VALID;
          else if (!halt_validator) state <= S_REQUEST;
        end
        S_VALID: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
