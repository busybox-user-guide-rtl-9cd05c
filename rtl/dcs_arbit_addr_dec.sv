// dcs_arbit_addr_dec: bridge from the DCS board's asynchronous register bus to the
// internal register ports of the firmware modules.
//
// The DCS board drives address, data and read-not-write, then pulls strobe_n low and
// waits for ack_n low. Address bit 15 selects the FPGA: a cycle whose bit 15 differs
// from c_fpga_id is left to the other FPGA and never acknowledged here. Bits 14:12 select
// one of NUM_MODULES modules and bits 11:0 the register inside it. strobe_n passes a
// two-flop synchroniser on clock_b; when it is seen low the bus fields are latched and
// the selected module gets a one-cycle module_en pulse with module_address, module_RnW and
// (for a write) module_data_out. For a read, the module's registered data is taken from
// module_data_array two cycles later. ack_n is then pulled low (with the data driven for a
// read) and held until strobe_n is seen high again.
//
// Interface: the 16-bit bidirectional DCS data bus is split into dcs_data_in,
// dcs_data_out and dcs_data_oe; the pad's tristate buffer belongs to the FPGA wrapper.
// Timing: a write is acknowledged 4 clock_b cycles and a read 6 cycles after strobe_n
// falls. strobe_n must stay high for at least three clock_b cycles between bus cycles.
// The address split and the strobe / acknowledge handshake follow the source
// design; the synchroniser depth, read wait and data-bus split are this design's choices.
module dcs_arbit_addr_dec #(
  parameter int unsigned NUM_MODULES = 8
) (
  input  logic        c_fpga_id,
  input  logic        clock_b,
  input  logic        areset,
  input  logic        dcs_strobe_n,
  input  logic        dcs_RnW,
  input  logic [15:0] dcs_addr,
  input  logic [15:0] dcs_data_in,
  output logic [15:0] dcs_data_out,
  output logic        dcs_data_oe,
  output logic        dcs_ack_n,
  input  logic [15:0] module_data_array [NUM_MODULES],
  output logic [NUM_MODULES-1:0] module_en_array,
  output logic [15:0] module_data_out,
  output logic [11:0] module_address,
  output logic        module_RnW
);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_ACK, S_IGNORE} dcs_state_t;

  dcs_state_t state;
  logic [1:0] strobe_sync;
  logic       strobe;          // synchronised, active high
  logic [2:0] module_sel;

  assign strobe = !strobe_sync[1];

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      state           <= S_IDLE;
      strobe_sync     <= 2'b11;
      module_en_array <= '0;
      module_data_out <= '0;
      module_address  <= '0;
      module_RnW      <= 1'b1;
      module_sel      <= '0;
      dcs_data_out    <= '0;
      dcs_data_oe     <= 1'b0;
      dcs_ack_n       <= 1'b1;
    end else begin
      strobe_sync     <= {strobe_sync[0], dcs_strobe_n};
      module_en_array <= '0;
      unique case (state)
        S_IDLE: if (strobe) begin
          if (dcs_addr[15] == c_fpga_id) begin
            module_sel      <= dcs_addr[14:12];
            module_address  <= dcs_addr[11:0];
            module_RnW      <= dcs_RnW;
            module_data_out <= dcs_data_in;
            if (32'(dcs_addr[14:12]) < NUM_MODULES)
              module_en_array[dcs_addr[14:12]] <= 1'b1;
            state <= dcs_RnW ? S_RD1 : S_ACK;
          end else begin
            state <= S_IGNORE;
          end
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          dcs_data_out <= (32'(module_sel) < NUM_MODULES) ? module_data_array[module_sel] : '0;
          state        <= S_ACK;
        end
        S_ACK: begin
          dcs_ack_n   <= 1'b0;
          dcs_data_oe <= module_RnW;
          if (!strobe) begin
            dcs_ack_n   <= 1'b1;
            dcs_data_oe <= 1'b0;
            state       <= S_IDLE;
          end
        end
        S_IGNORE: if (!strobe) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
