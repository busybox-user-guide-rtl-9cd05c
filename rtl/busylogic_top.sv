// busylogic_top: the BusyBox busy logic for one FPGA.
//
// The BusyBox tells the central trigger processor to stop sending triggers while the
// detector's front-end electronics (FEE) have no free event buffer. It counts buffers as
// they are taken by triggers and frees one only when every enabled D-RORC (the DAQ readout
// cards) has confirmed, over a serial link, that it received that event's data - the
// D-RORC reports the last event ID it saw and the BusyBox compares it with the ID the
// trigger system announced.
//
// Data paths:
//   DCS bus -> dcs_arbit_addr_dec -> register ports of: transmitter_module (module 0),
//     rx_memory_module (1), ctrl_regs (2), and the trigger receiver (3, external ports).
//   trigger receiver CDH FIFO -> event_validator (ID queue) ;
//   event_validator -> transmitter_module -> channels_out (requests to the D-RORCs) ;
//   channels_in -> multi_channel_receiver -> event_validator (inbox) and, through
//     rx_mem_filter, rx_memory_module ;
//   trigger pulses + event_valid -> busy_controller -> busy_out, buffers_used.
//
// Clocks: clock_b is the 40 MHz LHC bunch clock, clock_a a 200 MHz clock derived from it
// with aligned edges; the serial receivers, the transmitter's encoder and the RX memory
// write port run on clock_a, all control on clock_b. areset is asynchronous, active high.
// The trigger receiver (decoding the TTC L1-accept and serial-B lines) is a separate
// design; its trigger pulses, CDH FIFO read port and register port are ports of this
// module. The DCS data bus is split into in / out / output-enable.
// Module structure and connections follow the source design; the default parameters are
// its main TPC configuration (120 channels in 8 branches, buffering on L1a).
module busylogic_top #(
  parameter int unsigned NUM_CHANNELS = 120,
  parameter int unsigned NUM_BRANCHES = 8,
  parameter int unsigned NUM_MODULES  = 8,
  parameter bit          FPGA_ID      = 1'b0,
  parameter bit          BUFFER_ON_L1 = 1'b1,
  parameter int unsigned TICK_CYCLES  = 400,
  parameter int unsigned WORD_TIMEOUT = 200,
  parameter int unsigned RX_MEM_DEPTH = 1024,
  parameter int unsigned INBOX_DEPTH  = 128,
  parameter int unsigned QUEUE_DEPTH  = 8
) (
  input  logic                    clock_a,
  input  logic                    clock_b,
  input  logic                    areset,
  input  logic                    ttcrx_rdy,
  // serial links to / from the D-RORCs
  input  logic [NUM_CHANNELS-1:0] channels_in,
  output logic [NUM_CHANNELS-1:0] channels_out,
  // DCS bus
  input  logic [15:0]             dcs_addr,
  input  logic                    dcs_strobe_n,
  input  logic                    dcs_RnW,
  input  logic [15:0]             dcs_data_in,
  output logic [15:0]             dcs_data_out,
  output logic                    dcs_data_oe,
  output logic                    dcs_ack_n,
  // trigger receiver: decoded triggers
  input  logic                    L0_trigger,
  input  logic                    L1a_trigger,
  input  logic                    L2a_trigger,
  input  logic                    L2r_trigger,
  input  logic                    L2_timeout,
  input  logic                    trigger_busy,
  // trigger receiver: CDH FIFO read port
  input  logic [32:0]             DAQ_header_data,
  input  logic [3:0]              DAQ_read_counter,
  input  logic [3:0]              buffered_events,
  output logic                    trigger_read_enable,
  // trigger receiver: register port (DCS module 3)
  output logic                    trigger_module_en,
  output logic                    trigger_rnw,
  output logic [11:0]             trigger_address,
  output logic [15:0]             trigger_data_in,
  input  logic [15:0]             trigger_data_out,
  // busy
  output logic                    busy_out,
  output logic [3:0]              buffers_used
);

  import busybox_pkg::*;

  // register bus
  logic [NUM_MODULES-1:0] module_en;
  logic [15:0]            module_rdata [NUM_MODULES];
  logic [15:0]            module_wdata;
  logic [11:0]            module_address;
  logic                   module_rnw;

  // control and status
  logic [NUM_CHANNELS-1:0] chen, eidok;
  logic [7:0]  rx_mask, rx_pattern;
  logic [3:0]  fee_available;
  logic [15:0] trig_timeout, req_timeout;
  logic        halt_validator, force_validate;

  // receiver
  logic [47:0] rx_data;
  logic [7:0]  rx_channel;
  logic        rx_write, rx_mem_we;
  logic [9:0]  mem_pointer;

  // verification
  logic        event_valid, fw_req, fw_ack;
  logic [7:0]  fw_data;
  logic [NUM_CHANNELS-1:0] fw_mask;
  logic [35:0] current_id, newest_id;
  logic [3:0]  request_id, num_ids;
  logic [15:0] retry_count;
  logic [31:0] busy_time;

  dcs_arbit_addr_dec #(.NUM_MODULES(NUM_MODULES)) u_dcs (
    .c_fpga_id         (FPGA_ID),
    .clock_b           (clock_b),
    .areset            (areset),
    .dcs_strobe_n      (dcs_strobe_n),
    .dcs_RnW           (dcs_RnW),
    .dcs_addr          (dcs_addr),
    .dcs_data_in       (dcs_data_in),
    .dcs_data_out      (dcs_data_out),
    .dcs_data_oe       (dcs_data_oe),
    .dcs_ack_n         (dcs_ack_n),
    .module_data_array (module_rdata),
    .module_en_array   (module_en),
    .module_data_out   (module_wdata),
    .module_address    (module_address),
    .module_RnW        (module_rnw)
  );

  for (genvar m = 4; m < NUM_MODULES; m++) begin : g_unused_module
    assign module_rdata[m] = '0;
  end

  assign trigger_module_en = module_en[MOD_TRIGGER];
  assign trigger_rnw       = module_rnw;
  assign trigger_address   = module_address;
  assign trigger_data_in   = module_wdata;
  assign module_rdata[MOD_TRIGGER] = trigger_data_out;

  ctrl_regs #(.NUM_CHANNELS(NUM_CHANNELS)) u_regs (
    .clock_b               (clock_b),
    .areset                (areset),
    .module_en             (module_en[MOD_CSR]),
    .module_rnw            (module_rnw),
    .module_address        (module_address),
    .module_data_in        (module_wdata),
    .mem_pointer           (mem_pointer),
    .event_count           (num_ids),
    .current_eventid       (current_id),
    .most_recent_eventid   (newest_id),
    .requestID             (request_id),
    .retry_count           (retry_count),
    .EIDOK_vector          (eidok),
    .busy_time             (busy_time),
    .module_data_out       (module_rdata[MOD_CSR]),
    .rx_mem_matching_mask  (rx_mask),
    .rx_mem_pattern        (rx_pattern),
    .fee_buffers_available (fee_available),
    .trig_timeout          (trig_timeout),
    .req_timeout           (req_timeout),
    .halt_validator        (halt_validator),
    .force_validate        (force_validate),
    .CHEN_vector_out       (chen)
  );

  transmitter_module #(.NUM_CHANNELS(NUM_CHANNELS)) u_tx (
    .areset              (areset),
    .clock_a             (clock_a),
    .clock_b             (clock_b),
    .fw_req              (fw_req),
    .fw_data             (fw_data),
    .fw_mask             (fw_mask),
    .module_en           (module_en[MOD_TX]),
    .module_rnw          (module_rnw),
    .module_data_in      (module_wdata),
    .module_address      (module_address),
    .serial_channels_out (channels_out),
    .fw_ack              (fw_ack),
    .module_data_out     (module_rdata[MOD_TX])
  );

  multi_channel_receiver #(
    .NUM_CHANNELS (NUM_CHANNELS),
    .NUM_BRANCHES (NUM_BRANCHES),
    .WORD_TIMEOUT (WORD_TIMEOUT)
  ) u_rx (
    .clock_a            (clock_a),
    .areset             (areset),
    .serial_channels_in (channels_in),
    .CHEN_vector        (chen),
    .data_out           (rx_data),
    .channel_out        (rx_channel),
    .write_req          (rx_write)
  );

  rx_mem_filter u_filter (
    .pattern       (rx_pattern),
    .match_mask    (rx_mask),
    .drorc_address (rx_channel),
    .write_en      (rx_write),
    .filtered_we   (rx_mem_we)
  );

  rx_memory_module #(.DEPTH(RX_MEM_DEPTH)) u_rxmem (
    .clock_a         (clock_a),
    .clock_b         (clock_b),
    .areset          (areset),
    .data_in         ({8'h00, rx_channel, rx_data}),
    .data_in_en      (rx_mem_we),
    .mem_pointer     (mem_pointer),
    .module_en       (module_en[MOD_RXMEM]),
    .module_rnw      (module_rnw),
    .module_address  (module_address),
    .module_data_in  (module_wdata),
    .module_data_out (module_rdata[MOD_RXMEM])
  );

  event_validator #(
    .NUM_CHANNELS (NUM_CHANNELS),
    .INBOX_DEPTH  (INBOX_DEPTH),
    .QUEUE_DEPTH  (QUEUE_DEPTH)
  ) u_validator (
    .areset               (areset),
    .clock_a              (clock_a),
    .clock_b              (clock_b),
    .DRORC_data_in        (rx_data),
    .DRORC_channel        (rx_channel),
    .DRORC_data_en        (rx_write),
    .CHEN_vector          (chen),
    .DAQ_header_data      (DAQ_header_data),
    .buffered_events      (buffered_events),
    .DAQ_read_counter     (DAQ_read_counter),
    .force_validate       (force_validate),
    .halt_validator       (halt_validator),
    .req_timeout          (req_timeout),
    .fw_tx_ack            (fw_ack),
    .EIDOK_vector         (eidok),
    .read_enable          (trigger_read_enable),
    .event_valid_out      (event_valid),
    .current_event_id     (current_id),
    .most_recent_event_id (newest_id),
    .requestID            (request_id),
    .retry_count          (retry_count),
    .num_of_eventids      (num_ids),
    .fw_tx_request        (fw_req),
    .fw_tx_data           (fw_data),
    .fw_tx_mask           (fw_mask)
  );

  busy_controller #(.BUFFER_ON_L1(BUFFER_ON_L1), .TICK_CYCLES(TICK_CYCLES)) u_busy (
    .areset                (areset),
    .clock_b               (clock_b),
    .ttcrx_rdy             (ttcrx_rdy),
    .L0_trigger            (L0_trigger),
    .L1a_trigger           (L1a_trigger),
    .L2a_trigger           (L2a_trigger),
    .L2r_trigger           (L2r_trigger),
    .L2_timeout            (L2_timeout),
    .busy_triggermodule    (trigger_busy),
    .event_valid           (event_valid),
    .trig_timeout          (trig_timeout),
    .fee_buffers_available (fee_available),
    .busy_out              (busy_out),
    .fee_buffers_used      (buffers_used),
    .busy_time             (busy_time)
  );

endmodule
