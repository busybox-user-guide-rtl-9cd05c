// rx_memory_module: stores the most recent D-RORC replies for inspection over the DCS bus.
//
// Each stored entry is 56 bits: a 48-bit reply plus its 8-bit channel number. The entries
// live in four 16-bit x DEPTH banks (block RAMs on the FPGA) that share one address:
// bank 0 holds reply bits 47:32, bank 1 bits 31:16, bank 2 bits 15:0 and bank 3 the
// channel number in bits 15:8. Replies are written from the 200 MHz side (clock_a) at the
// address of a 10-bit write pointer that then advances, wrapping round after DEPTH
// entries. The DCS side (clock_b) sees the banks at sub-addresses 0x000-0xFFF: address
// bits 11:2 select the entry and bits 1:0 the bank. A DCS write (for tests) crosses to
// clock_a with a toggle and is applied on the next cycle without a reply write.
//
// Interface: data_in[55:0] with data_in_en (one clock_a cycle per entry); module_* is the
// DCS register port, read data is valid one clock_b cycle after the address.
// mem_pointer is the write pointer, Gray-coded across the clock boundary and decoded
// again on clock_b. The banks, the bank/address mapping and the 10-bit pointer follow the
// source design; wrap-around, DCS-write timing and the pointer crossing are this design's
// choices.
module rx_memory_module #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clock_a,
  input  logic        clock_b,
  input  logic        areset,
  input  logic [63:0] data_in,
  input  logic        data_in_en,
  output logic [9:0]  mem_pointer,
  input  logic        module_en,
  input  logic        module_rnw,
  input  logic [11:0] module_address,
  input  logic [15:0] module_data_in,
  output logic [15:0] module_data_out
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] wptr;
  logic [15:0]   wdata [4];
  logic [15:0]   rdata [4];
  logic [1:0]    rd_bank;

  // DCS write request, clock_b
  logic          dcs_wr_tgl;
  logic [AW-1:0] dcs_wr_addr;
  logic [1:0]    dcs_wr_bank;
  logic [15:0]   dcs_wr_data;
  // clock_a side of the crossing
  logic [1:0]    dcs_wr_sync;
  logic          dcs_wr_seen, dcs_wr_go;

  // Pointer crossing
  logic [AW-1:0] wptr_gray, gray_s1, gray_s2;

  assign wdata[0] = data_in[47:32];
  assign wdata[1] = data_in[31:16];
  assign wdata[2] = data_in[15:0];
  assign wdata[3] = {data_in[55:48], 8'h00};

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      wptr        <= '0;
      wptr_gray   <= '0;
      dcs_wr_sync <= '0;
      dcs_wr_seen <= 1'b0;
    end else begin
      dcs_wr_sync <= {dcs_wr_sync[0], dcs_wr_tgl};
      if (data_in_en) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
      end else if (dcs_wr_go) begin
        dcs_wr_seen <= dcs_wr_sync[1];
      end
    end
  end

  assign dcs_wr_go = (dcs_wr_sync[1] != dcs_wr_seen) && !data_in_en;

  for (genvar k = 0; k < 4; k++) begin : g_bank
    logic [15:0] mem [DEPTH];
    always_ff @(posedge clock_a) begin
      if (data_in_en)
        mem[wptr] <= wdata[k];
      else if (dcs_wr_go && dcs_wr_bank == 2'(k))
        mem[dcs_wr_addr] <= dcs_wr_data;
    end
    always_ff @(posedge clock_b) begin
      rdata[k] <= mem[module_address[AW+1:2]];
    end
  end

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      dcs_wr_tgl  <= 1'b0;
      dcs_wr_addr <= '0;
      dcs_wr_bank <= '0;
      dcs_wr_data <= '0;
      rd_bank     <= '0;
      gray_s1     <= '0;
      gray_s2     <= '0;
    end else begin
      rd_bank <= module_address[1:0];
      gray_s1 <= wptr_gray;
      gray_s2 <= gray_s1;
      if (module_en && !module_rnw) begin
        dcs_wr_tgl  <= !dcs_wr_tgl;
        dcs_wr_addr <= module_address[AW+1:2];
        dcs_wr_bank <= module_address[1:0];
        dcs_wr_data <= module_data_in;
      end
    end
  end

  assign module_data_out = rdata[rd_bank];

  // Gray to binary
  always_comb begin
    logic [AW-1:0] b;
    b[AW-1] = gray_s2[AW-1];
    for (int i = AW - 2; i >= 0; i--) b[i] = b[i+1] ^ gray_s2[i];
    mem_pointer = 10'(b);
  end

endmodule
