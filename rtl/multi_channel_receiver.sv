// multi_channel_receiver: receives replies from all D-RORC channels of one FPGA.
//
// NUM_CHANNELS single-channel receivers are grouped into NUM_BRANCHES branches of
// CH_PER_BRANCH receivers each (120 channels give 8 branches of 15). Each branch
// controller scans its receivers and buffers one reply; the backbone controller scans the
// branches and hands replies out one at a time with their channel number. A receiver whose
// CHEN bit is clear is held idle, so an unconnected input cannot produce messages.
//
// Interface (clock_a): serial_channels_in and CHEN_vector are indexed by channel number;
// data_out / channel_out are valid while write_req is high for one cycle. Timing: a reply
// leaves about three cycles after its third word is decoded when nothing else is waiting,
// and at worst after every other waiting receiver has been served. The three-level
// collector, the counts and the channel gating follow the source design.
module multi_channel_receiver #(
  parameter int unsigned NUM_CHANNELS  = 120,
  parameter int unsigned NUM_BRANCHES  = 8,
  parameter int unsigned WORD_TIMEOUT  = 200
) (
  input  logic                    clock_a,
  input  logic                    areset,
  input  logic [NUM_CHANNELS-1:0] serial_channels_in,
  input  logic [NUM_CHANNELS-1:0] CHEN_vector,
  output logic [47:0]             data_out,
  output logic [7:0]              channel_out,
  output logic                    write_req
);

  localparam int unsigned CPB = (NUM_CHANNELS + NUM_BRANCHES - 1) / NUM_BRANCHES;

  logic [47:0]       br_data  [NUM_BRANCHES];
  logic [3:0]        br_count [NUM_BRANCHES];
  logic [NUM_BRANCHES-1:0] br_av, br_ack;

  initial assert (CPB <= 16) else $error("at most 16 receivers per branch");

  for (genvar b = 0; b < NUM_BRANCHES; b++) begin : g_branch
    logic [47:0]    rx_data [CPB];
    logic [CPB-1:0] rx_av, rx_ack;

    for (genvar c = 0; c < CPB; c++) begin : g_chan
      localparam int unsigned CH = b * CPB + c;
      if (CH < NUM_CHANNELS) begin : g_rx
        single_channel_receiver #(.WORD_TIMEOUT(WORD_TIMEOUT)) u_rx (
          .clock_a   (clock_a),
          .areset    (areset),
          .enable    (CHEN_vector[CH]),
          .serial_in (serial_channels_in[CH]),
          .read_ack  (rx_ack[c]),
          .data_out  (rx_data[c]),
          .data_av   (rx_av[c])
        );
      end else begin : g_none
        assign rx_data[c] = '0;
        assign rx_av[c]   = 1'b0;
      end
    end

    branch_controller #(.CHANNELS(CPB)) u_branch (
      .clock_a         (clock_a),
      .areset          (areset),
      .data_in_array   (rx_data),
      .data_av_vector  (rx_av),
      .read_ack        (br_ack[b]),
      .read_ack_vector (rx_ack),
      .data_out        (br_data[b]),
      .count_out       (br_count[b]),
      .data_av         (br_av[b])
    );
  end

  backbone_controller #(.BRANCHES(NUM_BRANCHES), .CH_PER_BRANCH(CPB)) u_backbone (
    .clock_a         (clock_a),
    .areset          (areset),
    .data_in_array   (br_data),
    .count_in_array  (br_count),
    .data_av_vector  (br_av),
    .read_ack_vector (br_ack),
    .data_out        (data_out),
    .count_out       (channel_out),
    .write_req       (write_req)
  );

endmodule
