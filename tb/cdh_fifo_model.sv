// cdh_fifo_model: behavioural model of the trigger receiver's event FIFO, as seen by the
// event ID extractor. Not synthesisable.
//
// push adds one event (bunch-crossing ID, orbit ID). Each event is read out as nine 33-bit
// words - event info, event error, headers 1..7 - one word per clock cycle in which
// read_enable is high, each appearing on DAQ_header_data one cycle later together with
// its index on DAQ_read_counter. Header 1 carries the bunch-crossing ID in bits 11:0,
// header 2 the orbit ID in bits 23:0; the other words hold filler values. After the ninth
// word the event is removed. buffered_events is the number of complete events held,
// saturating at 15. Reading an empty FIFO returns zeros and is counted in underruns.
module cdh_fifo_model (
  input  logic        clock,
  input  logic        areset,
  input  logic        push,
  input  logic [11:0] push_bunch,
  input  logic [23:0] push_orbit,
  input  logic        read_enable,
  output logic [32:0] DAQ_header_data,
  output logic [3:0]  DAQ_read_counter,
  output logic [3:0]  buffered_events,
  output int          underruns
);
  logic [35:0] q [$];
  int          word;

  assign buffered_events = (q.size() > 15) ? 4'd15 : 4'(q.size());

  always @(posedge clock or posedge areset) begin
    if (areset) begin
      q.delete();
      word             <= 0;
      underruns        <= 0;
      DAQ_header_data  <= '0;
      DAQ_read_counter <= '0;
    end else begin
      if (read_enable) begin
        if (q.size() == 0) begin
          underruns        <= underruns + 1;
          DAQ_header_data  <= '0;
          DAQ_read_counter <= 4'(word);
        end else begin
          case (word)
            2:       DAQ_header_data <= {21'h0, q[0][35:24]};
            3:       DAQ_header_data <= {9'h0, q[0][23:0]};
            default: DAQ_header_data <= {1'b0, 16'hCD00 | 16'(word), q[0][15:0]};
          endcase
          DAQ_read_counter <= 4'(word);
          if (word == 8) void'(q.pop_front());
        end
        word <= (word == 8) ? 0 : word + 1;
      end
      if (push) q.push_back({push_bunch, push_orbit});
    end
  end
endmodule
