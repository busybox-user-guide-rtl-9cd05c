// serial_encoder: sends one 16-bit word to the D-RORCs as a serial frame.
//
// On data_enable_in (ignored while busy) the word is framed as start bit 1 (low), start
// bit 2 (high), sixteen data bits MSB first, an even parity bit and a stop bit (low), and
// loaded into a PISO. A cycle counter then shifts the PISO every CYCLES_PER_BIT clock
// cycles, so each bit is held for five 200 MHz cycles (40 Mbit/s). The line idles high.
//
// Interface: busy_out goes high the cycle after data_enable_in and stays high until the
// last bit (the stop bit) has been on the line for its five cycles; a whole frame takes
// 100 cycles. The frame layout and bit period follow the source design; the parity sense
// and the start-bit levels (start 1 low, start 2 high, as the receiver's phase-lock
// pattern needs) are this design's reading of it.
module serial_encoder
  import busybox_pkg::*;
(
  input  logic        clock_in,
  input  logic        areset,
  input  logic [15:0] data_in,
  input  logic        data_enable_in,
  output logic        busy_out,
  output logic        serial_out
);

  logic       load, shift, empty;
  logic [$clog2(CYCLES_PER_BIT)-1:0] bit_cnt;
  logic [FRAME_BITS-1:0] frame;

  assign frame = {1'b0, 1'b1, data_in, parity16(data_in), 1'b0};
  assign load  = data_enable_in && empty && !busy_out;
  assign shift = busy_out && (bit_cnt == ($clog2(CYCLES_PER_BIT))'(CYCLES_PER_BIT - 1));

  always_ff @(posedge clock_in or posedge areset) begin
    if (areset) begin
      busy_out <= 1'b0;
      bit_cnt  <= '0;
    end else if (load) begin
      busy_out <= 1'b1;
      bit_cnt  <= '0;
    end else if (busy_out) begin
      if (shift) begin
        bit_cnt <= '0;
      end else begin
        bit_cnt <= bit_cnt + 1'b1;
      end
      if (empty) busy_out <= 1'b0;
    end
  end

  piso #(.WIDTH(FRAME_BITS)) u_piso (
    .clock      (clock_in),
    .areset     (areset),
    .data_load  (load),
    .data_shift (shift),
    .data_in    (frame),
    .serial_out (serial_out),
    .piso_empty (empty)
  );

endmodule
