// busy_controller: drives the BUSY line to the central trigger processor.
//
// BUSY is raised when any of four conditions holds:
//   * ttcrx_rdy is low (no link to the trigger system, or a global reset in progress);
//   * the dead-time timer runs: every L0 trigger loads it with trig_timeout x TICK_CYCLES
//     clock_b cycles (trig_timeout has 10 us resolution, 400 cycles at 40 MHz);
//   * all front-end buffers are taken: fee_buffers_used >= fee_buffers_available;
//   * the trigger receiver reports busy (busy_triggermodule).
// fee_buffers_used counts up on the trigger that makes the front-end electronics start
// buffering - L1a when BUFFER_ON_L1 is set (TPC), L0 otherwise - and down on an L2 reject,
// an L2 timeout or an event_valid from the event ID verification. It stays within 0..15.
// busy_time counts the clock_b cycles during which BUSY was high.
//
// Interface: clock_b, all trigger inputs are one-cycle pulses. Timing: busy_out is
// registered and rises one cycle after the triggering pulse. The conditions, counting
// rules and registers follow the source design; the saturation and a simultaneous
// increment and decrement cancelling are this design's choices.
module busy_controller #(
  parameter bit          BUFFER_ON_L1 = 1'b1,  // TPC front ends buffer on L1a
  parameter int unsigned TICK_CYCLES  = 400    // clock_b cycles per trig_timeout unit
) (
  input  logic        areset,
  input  logic        clock_b,
  input  logic        ttcrx_rdy,
  input  logic        L0_trigger,
  input  logic        L1a_trigger,
  input  logic        L2a_trigger,
  input  logic        L2r_trigger,
  input  logic        L2_timeout,
  input  logic        busy_triggermodule,
  input  logic        event_valid,
  input  logic [15:0] trig_timeout,
  input  logic [3:0]  fee_buffers_available,
  output logic        busy_out,
  output logic [3:0]  fee_buffers_used,
  output logic [31:0] busy_time
);

  logic [31:0] deadtime;
  logic        inc, dec, buffers_full, busy_next;

  assign inc          = BUFFER_ON_L1 ? L1a_trigger : L0_trigger;
  assign dec          = L2r_trigger || L2_timeout || event_valid;
  assign buffers_full = (fee_buffers_used >= fee_buffers_available);
  assign busy_next    = !ttcrx_rdy || (deadtime != '0) || buffers_full || busy_triggermodule;

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      deadtime         <= '0;
      fee_buffers_used <= '0;
      busy_out         <= 1'b1;
      busy_time        <= '0;
    end else begin
      if (L0_trigger)            deadtime <= 32'(trig_timeout) * TICK_CYCLES;
      else if (deadtime != '0)   deadtime <= deadtime - 1'b1;

      if (inc && !dec && fee_buffers_used != 4'hF)      fee_buffers_used <= fee_buffers_used + 1'b1;
      else if (dec && !inc && fee_buffers_used != 4'h0) fee_buffers_used <= fee_buffers_used - 1'b1;

      busy_out <= busy_next;
      if (busy_out && busy_time != 32'hFFFF_FFFF) busy_time <= busy_time + 1'b1;
    end
  end

  // L2 accept needs no action here: the buffer stays taken until its event is verified.
  logic unused_l2a;
  assign unused_l2a = L2a_trigger;

endmodule
