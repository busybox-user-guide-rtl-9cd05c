// transmitter_module: sends command words to the D-RORCs on the selected serial channels.
//
// Two sources share one serial encoder: the event ID verification logic (fw_req /
// fw_data / fw_mask, acknowledged by fw_ack) and a debug register written over the DCS bus
// at sub-address 0x001 (bits 15:8 channel number, bits 7:0 transmit byte). A DCS write
// sets a pending flag. A clock_b state machine - idle, firmware-init or DCS-init, wait for
// encoder - grants the DCS request first, then the firmware request, and only while the
// encoder is free. On a grant it latches the 16-bit command word (command type, request
// ID and Hamming check bits, see busybox_pkg) and the channel mask. A DCS channel number
// below NUM_CHANNELS selects that one channel; any larger number broadcasts on all.
//
// The encoder and the output registers run on clock_a (200 MHz, derived from clock_b).
// A request crosses as a toggle through a two-flop synchroniser; completion returns the
// same way, and the encoder counts as busy from the grant until that toggle is back.
// Channels whose mask bit is clear idle high. Timing: fw_ack pulses in the cycle after
// fw_req is seen in idle; the frame starts on the line about three clock_a cycles later
// and lasts 100 clock_a cycles. The state machine, DCS priority and broadcast rule follow
// the source design; the clock crossing and the mask polarity (1 = transmit) are this
// design's choices.
module transmitter_module
  import busybox_pkg::*;
#(
  parameter int unsigned NUM_CHANNELS = 120
) (
  input  logic                    areset,
  input  logic                    clock_a,
  input  logic                    clock_b,
  input  logic                    fw_req,
  input  logic [7:0]              fw_data,
  input  logic [NUM_CHANNELS-1:0] fw_mask,
  input  logic                    module_en,
  input  logic                    module_rnw,
  input  logic [15:0]             module_data_in,
  input  logic [11:0]             module_address,
  output logic [NUM_CHANNELS-1:0] serial_channels_out,
  output logic                    fw_ack,
  output logic [15:0]             module_data_out
);

  typedef enum logic [1:0] {S_IDLE, S_FW_INIT, S_DCS_INIT, S_WAIT_FOR_DECODER} tx_state_t;

  tx_state_t               state;
  logic [7:0]              dcs_tx_data, dcs_tx_channel;
  logic                    dcs_tx_pending;
  logic [15:0]             tx_word;
  logic [NUM_CHANNELS-1:0] tx_mask, dcs_mask;
  logic                    send_tgl;           // clock_b: flips on every grant
  logic [1:0]              done_sync;          // clock_b: done toggle synchroniser
  logic                    encoder_busy;

  // clock_a side
  logic [1:0]              send_sync;
  logic                    send_seen, done_tgl, enc_en, enc_busy, enc_busy_q, enc_serial;

  // DCS channel register -> mask
  always_comb begin
    if (32'(dcs_tx_channel) < NUM_CHANNELS) begin
      dcs_mask = '0;
      dcs_mask[dcs_tx_channel] = 1'b1;
    end else begin
      dcs_mask = '1;
    end
  end

  assign encoder_busy    = (send_tgl != done_sync[1]);
  assign module_data_out = {dcs_tx_channel, dcs_tx_data};

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      state          <= S_IDLE;
      dcs_tx_data    <= '0;
      dcs_tx_channel <= '0;
      dcs_tx_pending <= 1'b0;
      tx_word        <= '0;
      tx_mask        <= '0;
      send_tgl       <= 1'b0;
      done_sync      <= '0;
      fw_ack         <= 1'b0;
    end else begin
      done_sync <= {done_sync[0], done_tgl};
      fw_ack    <= 1'b0;
      if (module_en && !module_rnw && module_address == 12'h001) begin
        dcs_tx_data    <= module_data_in[7:0];
        dcs_tx_channel <= module_data_in[15:8];
        dcs_tx_pending <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (dcs_tx_pending && !encoder_busy)      state <= S_DCS_INIT;
          else if (fw_req && !encoder_busy)         state <= S_FW_INIT;
        end
        S_FW_INIT: begin
          tx_word  <= command_word(fw_data);
          tx_mask  <= fw_mask;
          send_tgl <= !send_tgl;
          fw_ack   <= 1'b1;
          state    <= S_WAIT_FOR_DECODER;
        end
        S_DCS_INIT: begin
          tx_word        <= command_word(dcs_tx_data);
          tx_mask        <= dcs_mask;
          send_tgl       <= !send_tgl;
          dcs_tx_pending <= 1'b0;
          state          <= S_WAIT_FOR_DECODER;
        end
        S_WAIT_FOR_DECODER: begin
          if (!encoder_busy) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      send_sync           <= '0;
      send_seen           <= 1'b0;
      done_tgl            <= 1'b0;
      enc_busy_q          <= 1'b0;
      serial_channels_out <= '1;
    end else begin
      send_sync  <= {send_sync[0], send_tgl};
      enc_busy_q <= enc_busy;
      if (enc_en) send_seen <= send_sync[1];
      if (enc_busy_q && !enc_busy) done_tgl <= send_seen;
      for (int i = 0; i < NUM_CHANNELS; i++)
        serial_channels_out[i] <= tx_mask[i] ? enc_serial : 1'b1;
    end
  end

  assign enc_en = (send_sync[1] != send_seen);

  serial_encoder u_encoder (
    .clock_in       (clock_a),
    .areset         (areset),
    .data_in        (tx_word),
    .data_enable_in (enc_en),
    .busy_out       (enc_busy),
    .serial_out     (enc_serial)
  );

endmodule
