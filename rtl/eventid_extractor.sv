// eventid_extractor: pulls each event record out of the trigger receiver's CDH FIFO and
// keeps only its event ID.
//
// Every event the trigger receiver accepts is stored there as nine 33-bit words: event
// info, event error, then headers 1 to 7. Header 1 carries the 12-bit bunch-crossing ID in
// bits 11:0, header 2 the 24-bit orbit ID in bits 23:0; together they form the 36-bit event
// ID {bunch-crossing, orbit}. Whenever buffered_events is non-zero and the event ID queue
// has room, the extractor raises read_enable for nine cycles. Each read word arrives on
// DAQ_header_data one cycle later, with DAQ_read_counter giving its index in the record
// (0 = info ... 8 = header 7); words 2 and 3 are captured. After word 8 the ID is written
// to the queue with a one-cycle write_enable. Two idle cycles follow so that the trigger
// receiver can update buffered_events before the next record is started.
//
// Interface (clock_in = clock_b, 40 MHz). The record layout and the ID fields follow the
// source design; the read timing, the meaning of the counter values and the idle gap are
// this design's assumptions about the trigger receiver's FIFO port.
module eventid_extractor (
  input  logic        areset,
  input  logic        clock_in,
  input  logic [32:0] DAQ_header_data,
  input  logic [3:0]  DAQ_read_counter,
  input  logic [3:0]  buffered_events,
  input  logic        queue_full,
  output logic        read_enable,
  output logic        write_enable,
  output logic [35:0] extracted_eventid
);

  localparam int unsigned WORDS = 9;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN, S_GAP} ext_state_t;

  ext_state_t  state;
  logic [3:0]  n;
  logic        word_valid;
  logic [11:0] bunch_id;
  logic [23:0] orbit_id;

  assign read_enable = (state == S_READ);

  always_ff @(posedge clock_in or posedge areset) begin
    if (areset) begin
      state             <= S_IDLE;
      n                 <= '0;
      word_valid        <= 1'b0;
      bunch_id          <= '0;
      orbit_id          <= '0;
      write_enable      <= 1'b0;
      extracted_eventid <= '0;
    end else begin
      word_valid   <= read_enable;
      write_enable <= 1'b0;
      if (word_valid) begin
        if (DAQ_read_counter == 4'd2) bunch_id <= DAQ_header_data[11:0];
        if (DAQ_read_counter == 4'd3) orbit_id <= DAQ_header_data[23:0];
      end
      unique case (state)
        S_IDLE: if (buffered_events != '0 && !queue_full) begin
          state <= S_READ;
          n     <= '0;
        end
        S_READ: begin
          n <= n + 1'b1;
          if (n == 4'(WORDS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          // last word is on the bus in this cycle
          extracted_eventid <= {bunch_id, orbit_id};
          write_enable      <= 1'b1;
          state             <= S_GAP;
          n                 <= '0;
        end
        S_GAP: begin
          n <= n + 1'b1;
          if (n == 4'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
