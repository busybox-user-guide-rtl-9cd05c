// drorc_model: behavioural model of one D-RORC's side of the BusyBox serial link, for
// simulation only.
//
// The model decodes 20-bit command frames on cmd_in (start 0, start 1, 16 data bits MSB
// first, even parity, stop 0; five clock_a cycles per bit) by sampling the middle of each
// bit, and checks the framing, the parity and the Hamming check bits. Events the D-RORC
// has received data for are added with push / push_id (36-bit event ID). Command handling:
//   request event ID - if the request ID differs from the last one answered and an event
//                      is waiting, the oldest event is taken and its ID is sent back with
//                      the request ID and DRORC_ID; if the request ID is the same as last
//                      time, the last reply is sent again; with no event waiting nothing
//                      is sent;
//   resend last      - the last reply is sent again;
//   force pop        - the oldest waiting event is dropped;
//   force request ID - the last request ID is set to the given value.
// A reply is three 16-bit frames (bits 47:32, 31:16, 15:0) with a short gap between them,
// starting REPLY_DELAY cycles after the command; the reply line changes shortly after the
// clock_a edge. With mute high, commands are counted but
// not acted on.
module drorc_model
  import busybox_pkg::*;
#(
  parameter logic [7:0] DRORC_ID    = 8'd0,
  parameter int         REPLY_DELAY = 20
) (
  input  logic        clock_a,
  input  logic        areset,
  input  logic        cmd_in,
  output logic        reply_out,
  input  logic        push,
  input  logic [35:0] push_id,
  input  logic        mute,
  output int          commands,
  output int          requests,
  output int          replies,
  output int          resends,
  output int          bad_frames,
  output int          waiting
);
  logic [35:0] q [$];
  logic [47:0] last_reply;
  logic [3:0]  last_reqid;
  bit          have_last;
  logic        line = 1'b1;

  assign reply_out = line;

  assign waiting = q.size();

  always @(posedge clock_a) if (!areset && push) q.push_back(push_id);

  task automatic send_word(input logic [15:0] w);
    logic [19:0] f;
    f = {1'b0, 1'b1, w, ^w, 1'b0};
    for (int b = 19; b >= 0; b--)
      repeat (CYCLES_PER_BIT) begin @(posedge clock_a); #0.1 line = f[b]; end
    @(posedge clock_a); #0.1 line = 1'b1;
  endtask

  task automatic send_reply(input logic [47:0] r);
    repeat (REPLY_DELAY) @(posedge clock_a);
    for (int k = 0; k < 3; k++) begin
      send_word(r[47 - 16 * k -: 16]);
      repeat (10) @(posedge clock_a);
    end
    replies++;
  endtask

  initial begin
    commands   = 0;
    requests   = 0;
    replies    = 0;
    resends    = 0;
    bad_frames = 0;
    have_last  = 0;
    last_reqid = '0;
    last_reply = '0;
    forever begin
      logic [19:0] f;
      logic [15:0] w;
      logic [3:0]  cmd, reqid;
      @(posedge clock_a iff (!areset && cmd_in === 1'b0));
      repeat (2) @(posedge clock_a);               // middle of start bit 1
      for (int b = 19; b >= 0; b--) begin
        f[b] = cmd_in;
        if (b != 0) repeat (CYCLES_PER_BIT) @(posedge clock_a);
      end
      repeat (3) @(posedge clock_a);               // end of the stop bit
      w = f[17:2];
      if (f[19] !== 1'b0 || f[18] !== 1'b1 || f[0] !== 1'b0 || f[1] !== ^w ||
          w[7:4] !== hamming_check(w[15:12]) || w[3:0] !== hamming_check(w[11:8])) begin
        bad_frames++;
        continue;
      end
      commands++;
      cmd   = w[15:12];
      reqid = w[11:8];
      if (mute) continue;
      case (cmd)
        CMD_REQUEST_EVENTID: begin
          requests++;
          if (have_last && reqid == last_reqid) begin
            resends++;
            send_reply(last_reply);
          end else if (q.size() != 0) begin
            last_reply = {reqid, q.pop_front(), DRORC_ID};
            last_reqid = reqid;
            have_last  = 1;
            send_reply(last_reply);
          end
        end
        CMD_RESEND_LAST: if (have_last) begin
          resends++;
          send_reply(last_reply);
        end
        CMD_FORCE_POP:   if (q.size() != 0) void'(q.pop_front());
        CMD_FORCE_REQID: last_reqid = reqid;
        default: bad_frames++;
      endcase
    end
  end
endmodule
