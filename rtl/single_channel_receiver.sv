// single_channel_receiver: assembles one 48-bit D-RORC reply from three serial words.
//
// A serial_decoder recovers 16-bit words from the line. A small state machine expects
// three words in a row: the first becomes bits 47:32 of the reply, the second 31:16, the
// third 15:0. After each accepted word a countdown of WORD_TIMEOUT clock_a cycles starts;
// if the next word does not arrive before it expires, or a word arrives with a parity
// error, the partial reply is dropped and the next word is taken as a first word again.
// A complete reply is copied to data_out and data_av is set. data_av stays high until
// read_ack; a newer reply that completes before then overwrites the held one.
//
// Interface (all clock_a): enable gates the decoder; read_ack is a one-cycle pulse from
// the branch controller. Timing: data_av rises one cycle after the decoder reports the
// third word. Three-word assembly, parity and timeout discard and overwrite-if-unread
// follow the source design; the word order (first word most significant) and the
// timeout length are this design's choices.
module single_channel_receiver #(
  parameter int unsigned WORD_TIMEOUT = 200   // clock_a cycles allowed between words
) (
  input  logic        clock_a,
  input  logic        areset,
  input  logic        enable,
  input  logic        serial_in,
  input  logic        read_ack,
  output logic [47:0] data_out,
  output logic        data_av
);

  typedef enum logic [1:0] {S_WORD1, S_WORD2, S_WORD3} state_t;

  state_t      state;
  logic [15:0] dec_data;
  logic        dec_av, dec_perr;
  logic [31:0] partial;
  logic [$clog2(WORD_TIMEOUT+1)-1:0] timer;

  serial_decoder u_dec (
    .clock_a      (clock_a),
    .areset       (areset),
    .enable       (enable),
    .serial_in    (serial_in),
    .parity_error (dec_perr),
    .data_av      (dec_av),
    .data_out     (dec_data)
  );

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      state    <= S_WORD1;
      partial  <= '0;
      timer    <= '0;
      data_out <= '0;
      data_av  <= 1'b0;
    end else begin
      if (read_ack) data_av <= 1'b0;
      if (!enable) begin
        state   <= S_WORD1;
        data_av <= 1'b0;
      end else if (dec_av) begin
        timer <= ($clog2(WORD_TIMEOUT+1))'(WORD_TIMEOUT);
        if (dec_perr) begin
          state <= S_WORD1;
        end else begin
          unique case (state)
            S_WORD1: begin partial[31:16] <= dec_data; state <= S_WORD2; end
            S_WORD2: begin partial[15:0]  <= dec_data; state <= S_WORD3; end
            S_WORD3: begin
              data_out <= {partial, dec_data};
              data_av  <= 1'b1;
              state    <= S_WORD1;
            end
            default: state <= S_WORD1;
          endcase
        end
      end else if (state != S_WORD1) begin
        if (timer == '0) state <= S_WORD1;
        else             timer <= timer - 1'b1;
      end
    end
  end

endmodule
