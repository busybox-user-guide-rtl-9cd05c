// serial_decoder: oversampling receiver for one 16-bit word from a D-RORC.
//
// The serial line is sampled on every clock_a cycle (200 MHz), CYCLES_PER_BIT = 5 samples
// per 40 Mbit/s bit, after a two-flop synchroniser. The samples run through a shift
// register of 98 positions, which holds a 20-bit frame (start 1, start 2, 16 data bits
// MSB first, parity, stop) less its first and last sample. A frame is captured when the
// window shows the phase-lock pattern - the last four samples of start bit 1 low followed
// by the first four samples of start bit 2 high - and the stop condition, the three middle
// samples of the stop bit low. At that moment every bit's three middle samples sit at
// fixed positions; each bit is the majority of its three samples. The recovered parity
// bit is compared with the even parity of the data. After a capture the register is
// refilled with the idle level, so that bits of a consumed frame cannot be mistaken for
// the start pattern of the next one.
//
// Interface: serial_in is asynchronous. When a frame is captured, data_av pulses high
// for one clock_a cycle with data_out valid; parity_error is high in the same cycle if
// the parity did not match. Timing: data_av follows the last sampled stop-bit sample
// by four clock_a cycles (two synchroniser stages, shift, output register).
// With enable low the shift register is held at the idle (high) level and nothing is
// captured.
//
// The 98-sample register, the five-fold oversampling, the majority of the middle three
// samples and the start/stop capture conditions follow the source design; the parity
// sense and the synchroniser are this design's choices.
module serial_decoder
  import busybox_pkg::*;
(
  input  logic        clock_a,
  input  logic        areset,
  input  logic        enable,
  input  logic        serial_in,
  output logic        parity_error,
  output logic        data_av,
  output logic [15:0] data_out
);

  localparam int unsigned SR_LEN = CYCLES_PER_BIT * FRAME_BITS - 2;  // 98

  logic [1:0]        sync_q;
  logic [SR_LEN-1:0] sr;        // sr[0] newest sample; frame sample i sits at sr[SR_LEN-i]
  logic              capture;
  logic [15:0]       word;
  logic              par_bit;

  // Middle three samples of frame bit k (k = 0 is start bit 1)
  function automatic logic [2:0] bit_samples(input logic [SR_LEN-1:0] s, input int unsigned k);
    int unsigned base;
    base = SR_LEN - CYCLES_PER_BIT * k - 1;   // sample 5k+1
    return {s[base], s[base-1], s[base-2]};
  endfunction

  always_comb begin
    capture = (sr[SR_LEN-1 -: 4] == 4'b0000) &&     // start bit 1, samples 1..4
              (sr[SR_LEN-5 -: 4] == 4'b1111) &&     // start bit 2, samples 5..8
              (sr[2:0] == 3'b000);                  // stop bit, samples 96..98
    for (int j = 0; j < 16; j++)
      word[15-j] = majority3(bit_samples(sr, 2 + j));
    par_bit = majority3(bit_samples(sr, 18));
  end

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      sync_q       <= 2'b11;
      sr           <= '1;
      data_av      <= 1'b0;
      parity_error <= 1'b0;
      data_out     <= '0;
    end else begin
      sync_q <= {sync_q[0], serial_in};
      if (!enable) begin
        sr <= '1;
      end else if (capture) begin
        sr <= {{(SR_LEN-1){1'b1}}, sync_q[1]};   // frame consumed: forget it
      end else begin
        sr <= {sr[SR_LEN-2:0], sync_q[1]};
      end
      data_av      <= enable && capture;
      parity_error <= enable && capture && (par_bit != parity16(word));
      if (enable && capture)
        data_out <= word;
    end
  end

endmodule
