// Testbench for rx_memory_module at full depth (1024 entries): writes replies from the
// 200 MHz side, reads all four banks back over the DCS port, checks the write pointer
// seen on clock_b, wrap-around after 1024 entries, and a DCS write followed by a read.
module tb_rx_memory_module;
  localparam int D = 1024;
  logic clka = 0, clkb = 0, rst = 0;
  logic [63:0] din = '0;
  logic        den = 0;
  logic [9:0]  ptr;
  logic        men = 0, mrnw = 1;
  logic [11:0] maddr = '0;
  logic [15:0] mdin = '0, mdout;
  logic [55:0] model [D];
  int checks = 0, failures = 0, wcount = 0;

  rx_memory_module #(.DEPTH(D)) dut (
    .clock_a(clka), .clock_b(clkb), .areset(rst), .data_in(din), .data_in_en(den),
    .mem_pointer(ptr), .module_en(men), .module_rnw(mrnw), .module_address(maddr),
    .module_data_in(mdin), .module_data_out(mdout));

  always #1 clka = ~clka;
  always #5 clkb = ~clkb;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_entries(input int n);
    for (int i = 0; i < n; i++) begin
      logic [55:0] v;
      v = {8'($urandom_range(0, 119)), 16'($urandom), 32'($urandom)};
      @(negedge clka) begin din = {8'hA5, v}; den = 1; end
      model[wcount % D] = v;
      wcount++;
      @(negedge clka) den = 0;
      if ($urandom_range(0, 1)) @(negedge clka);
    end
  endtask

  task automatic dcs_read(input logic [11:0] a, output logic [15:0] d);
    @(negedge clkb) begin men = 1; mrnw = 1; maddr = a; end
    @(negedge clkb) begin men = 0; d = mdout; end
  endtask

  task automatic dcs_write(input logic [11:0] a, input logic [15:0] d);
    @(negedge clkb) begin men = 1; mrnw = 0; maddr = a; mdin = d; end
    @(negedge clkb) begin men = 0; mrnw = 1; end
  endtask

  task automatic check_entry(input int e);
    logic [15:0] r [4];
    logic [55:0] v;
    v = model[e];
    for (int b = 0; b < 4; b++) dcs_read(12'(e * 4 + b), r[b]);
    check(r[0] == v[47:32] && r[1] == v[31:16] && r[2] == v[15:0] && r[3] == {v[55:48], 8'h00},
          $sformatf("entry %0d: %h %h %h %h expected %h", e, r[0], r[1], r[2], r[3], v));
  endtask

  initial begin
    repeat (3) @(negedge clkb);
    rst = 0;
    write_entries(40);
    repeat (4) @(negedge clkb);
    check(ptr == 10'(40), $sformatf("pointer %0d after 40 writes", ptr));
    for (int e = 0; e < 40; e++) check_entry(e);
    // fill and wrap round
    write_entries(D - 40 + 7);
    repeat (4) @(negedge clkb);
    check(ptr == 10'(7), $sformatf("pointer %0d after wrap", ptr));
    for (int e = 0; e < 10; e++) check_entry(e);
    for (int e = D - 5; e < D; e++) check_entry(e);
    // DCS write into bank 2 of entry 300, then read it back
    dcs_write(12'(300 * 4 + 2), 16'hBEEF);
    repeat (3) @(negedge clkb);
    model[300][15:0] = 16'hBEEF;
    check_entry(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clkb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
