// Testbench for dcs_arbit_addr_dec: a DCS-board model runs strobe/acknowledge bus cycles
// (with the strobe changing at arbitrary times against clock_b) to 8 module models holding
// registers. Checks that writes reach only the addressed module with the right
// sub-address and data, that reads return the addressed module's register, that the data
// bus is driven only during read acknowledge, and that cycles for the other FPGA
// (address bit 15) are neither acknowledged nor passed on.
module tb_dcs_arbit_addr_dec;
  localparam int M = 8;
  logic clk = 0, rst = 0;
  logic        strobe_n = 1, rnw = 1;
  logic [15:0] addr = '0, din = '0, dout;
  logic        oe, ack_n;
  logic [15:0] mdata [M];
  logic [M-1:0] men;
  logic [15:0] mdo;
  logic [11:0] maddr;
  logic        mrnw;
  logic [15:0] regs [M][16];
  int checks = 0, failures = 0, enables = 0;

  dcs_arbit_addr_dec #(.NUM_MODULES(M)) dut (
    .c_fpga_id(1'b0), .clock_b(clk), .areset(rst), .dcs_strobe_n(strobe_n),
    .dcs_RnW(rnw), .dcs_addr(addr), .dcs_data_in(din), .dcs_data_out(dout),
    .dcs_data_oe(oe), .dcs_ack_n(ack_n), .module_data_array(mdata),
    .module_en_array(men), .module_data_out(mdo), .module_address(maddr), .module_RnW(mrnw));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // module models: 16 registers each, registered read data
  for (genvar m = 0; m < M; m++) begin : g_mod
    always @(posedge clk) begin
      mdata[m] <= regs[m][maddr[3:0]];
      if (men[m] && !mrnw) regs[m][maddr[3:0]] <= mdo;
    end
  end

  always @(posedge clk) if (!rst) begin
    check($countones(men) <= 1, "more than one module enabled");
    if (men != '0) enables++;
    check(!oe || !ack_n, "data bus driven outside acknowledge");
  end

  task automatic bus_cycle(input bit read, input logic [15:0] a, input logic [15:0] d,
                           output logic [15:0] q, output bit acked);
    int g = 0;
    #($urandom_range(1, 9));
    addr = a; rnw = read; din = d;
    #($urandom_range(1, 9));
    strobe_n = 0;
    while (ack_n && g < 200) begin #1; g++; end
    acked = !ack_n;
    q = dout;
    if (acked && read) check(oe, "data bus not driven on read acknowledge");
    #($urandom_range(1, 9));
    strobe_n = 1;
    g = 0;
    while (!ack_n && g < 100) begin #1; g++; end
    check(ack_n, "ack not released");
    #30;   // strobe_n stays high for at least three clock_b cycles between bus cycles
  endtask

  initial begin
    logic [15:0] q;
    bit acked;
    logic [15:0] shadow [M][16];
    for (int m = 0; m < M; m++) for (int r = 0; r < 16; r++) begin
      regs[m][r] = 16'(m * 256 + r);
      shadow[m][r] = regs[m][r];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      int m, r, e0;
      bit other;
      m = $urandom_range(0, M - 1);
      r = $urandom_range(0, 15);
      other = ($urandom_range(0, 9) == 0);
      e0 = enables;
      if ($urandom_range(0, 1)) begin
        logic [15:0] d;
        d = 16'($urandom);
        bus_cycle(0, {other, 3'(m), 12'(r)}, d, q, acked);
        check(acked == !other, $sformatf("write acknowledge (other FPGA %0b)", other));
        if (!other) shadow[m][r] = d;
      end else begin
        bus_cycle(1, {other, 3'(m), 12'(r)}, 16'h0, q, acked);
        check(acked == !other, $sformatf("read acknowledge (other FPGA %0b)", other));
        if (!other) check(q == shadow[m][r], $sformatf("read module %0d reg %0d: %h expected %h",
                                                       m, r, q, shadow[m][r]));
      end
      check(enables - e0 == (other ? 0 : 1), "module enable count");
    end
    for (int m = 0; m < M; m++) for (int r = 0; r < 16; r++)
      check(regs[m][r] == shadow[m][r], $sformatf("module %0d register %0d", m, r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
