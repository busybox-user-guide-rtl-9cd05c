// ctrl_regs: control and status registers at DCS addresses 0x2000-0x21FF.
//
// Sub-address map (bits 11:0 of the DCS address; R = read only, RW, W = write trigger):
//   0x000 R  RX memory write pointer          0x008 RW L0 dead-time, 10 us units
//   0x001 R  event IDs waiting                0x009 RW FEE buffers available (reset 4)
//   0x002 R  current event ID bits 35:32      0x00A RW halt verification FSM (bit 0)
//   0x003 R  current event ID bits 31:16      0x00B W  force event ID match (bit 0)
//   0x004 R  current event ID bits 15:0       0x00C RW re-request timeout, clock_b cycles
//   0x005 R  newest event ID bits 35:32       0x00D R  current request ID
//   0x006 R  newest event ID bits 31:16       0x00E R  request retry count
//   0x007 R  newest event ID bits 15:0        0x010 R  busy timer bits 31:16
//   0x012 RW RX memory filter: 7:0 pattern,   0x011 R  busy timer bits 15:0
//            15:8 mask                        0x015 R  firmware version (BCD x.xx)
//   0x1XX    channel XX: bit 0 RW channel enable (CHEN), bit 1 R event ID matched (EIDOK)
// Unused addresses read 0.
//
// Interface: clock_b; a write happens in the cycle module_en is high with module_rnw low.
// Read data is registered: module_data_out shows the register addressed in the previous
// cycle. force_validate is a one-cycle pulse on a write of 1 to 0x00B. The register map
// follows the source design; reset values other than the buffer count, the BCD version
// format and the read latency are this design's choices.
module ctrl_regs #(
  parameter int unsigned NUM_CHANNELS        = 120,
  parameter logic [15:0] FW_VERSION          = 16'h0101,
  parameter logic [15:0] TRIG_TIMEOUT_RESET  = 16'd10,
  parameter logic [15:0] REQ_TIMEOUT_RESET   = 16'd1000,
  parameter logic [3:0]  FEE_BUFFERS_RESET   = 4'd4
) (
  input  logic                    clock_b,
  input  logic                    areset,
  input  logic                    module_en,
  input  logic                    module_rnw,
  input  logic [11:0]             module_address,
  input  logic [15:0]             module_data_in,
  input  logic [9:0]              mem_pointer,
  input  logic [3:0]              event_count,
  input  logic [35:0]             current_eventid,
  input  logic [35:0]             most_recent_eventid,
  input  logic [3:0]              requestID,
  input  logic [15:0]             retry_count,
  input  logic [NUM_CHANNELS-1:0] EIDOK_vector,
  input  logic [31:0]             busy_time,
  output logic [15:0]             module_data_out,
  output logic [7:0]              rx_mem_matching_mask,
  output logic [7:0]              rx_mem_pattern,
  output logic [3:0]              fee_buffers_available,
  output logic [15:0]             trig_timeout,
  output logic [15:0]             req_timeout,
  output logic                    halt_validator,
  output logic                    force_validate,
  output logic [NUM_CHANNELS-1:0] CHEN_vector_out
);

  logic        wr;
  logic [15:0] rdata;
  logic [7:0]  ch;

  assign wr = module_en && !module_rnw;
  assign ch = module_address[7:0];

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      rx_mem_matching_mask  <= '0;
      rx_mem_pattern        <= '0;
      fee_buffers_available <= FEE_BUFFERS_RESET;
      trig_timeout          <= TRIG_TIMEOUT_RESET;
      req_timeout           <= REQ_TIMEOUT_RESET;
      halt_validator        <= 1'b0;
      force_validate        <= 1'b0;
      CHEN_vector_out       <= '0;
      module_data_out       <= '0;
    end else begin
      force_validate  <= 1'b0;
      module_data_out <= rdata;
      if (wr) begin
        if (module_address[11:8] == 4'h1) begin
          if (32'(ch) < NUM_CHANNELS) CHEN_vector_out[ch] <= module_data_in[0];
        end else begin
          unique case (module_address)
            12'h008: trig_timeout          <= module_data_in;
            12'h009: fee_buffers_available <= module_data_in[3:0];
            12'h00A: halt_validator        <= module_data_in[0];
            12'h00B: force_validate        <= module_data_in[0];
            12'h00C: req_timeout           <= module_data_in;
            12'h012: {rx_mem_matching_mask, rx_mem_pattern} <= module_data_in;
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (module_address[11:8] == 4'h1) begin
      if (32'(ch) < NUM_CHANNELS) rdata = {14'd0, EIDOK_vector[ch], CHEN_vector_out[ch]};
    end else begin
      unique case (module_address)
        12'h000: rdata = {6'd0, mem_pointer};
        12'h001: rdata = {12'd0, event_count};
        12'h002: rdata = {12'd0, current_eventid[35:32]};
        12'h003: rdata = current_eventid[31:16];
        12'h004: rdata = current_eventid[15:0];
        12'h005: rdata = {12'd0, most_recent_eventid[35:32]};
        12'h006: rdata = most_recent_eventid[31:16];
        12'h007: rdata = most_recent_eventid[15:0];
        12'h008: rdata = trig_timeout;
        12'h009: rdata = {12'd0, fee_buffers_available};
        12'h00A: rdata = {15'd0, halt_validator};
        12'h00C: rdata = req_timeout;
        12'h00D: rdata = {12'd0, requestID};
        12'h00E: rdata = retry_count;
        12'h010: rdata = busy_time[31:16];
        12'h011: rdata = busy_time[15:0];
        12'h012: rdata = {rx_mem_matching_mask, rx_mem_pattern};
        12'h015: rdata = FW_VERSION;
        default: rdata = '0;
      endcase
    end
  end

endmodule
