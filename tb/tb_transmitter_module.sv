// Testbench for transmitter_module: decodes the frames on all 120 serial outputs by
// sampling each bit in its middle and checks the frame layout, the command word (type,
// request ID and Hamming check bits), the channel selection and the idle level of
// unselected channels. Covers firmware requests with random masks, DCS writes to one
// channel and to all channels, DCS priority when both requests wait for the encoder, and
// read-back of the DCS transmit register.
module tb_transmitter_module;
  import busybox_pkg::*;
  localparam int N = 120;
  logic clka = 0, clkb = 0, rst = 0;
  logic          fw_req = 0;
  logic [7:0]    fw_data = '0;
  logic [N-1:0]  fw_mask = '0;
  logic          men = 0, mrnw = 1;
  logic [15:0]   mdin = '0;
  logic [11:0]   maddr = '0;
  logic [N-1:0]  sout;
  logic          fw_ack;
  logic [15:0]   mdout;
  int checks = 0, failures = 0;

  transmitter_module #(.NUM_CHANNELS(N)) dut (
    .areset(rst), .clock_a(clka), .clock_b(clkb), .fw_req(fw_req), .fw_data(fw_data),
    .fw_mask(fw_mask), .module_en(men), .module_rnw(mrnw), .module_data_in(mdin),
    .module_address(maddr), .serial_channels_out(sout), .fw_ack(fw_ack),
    .module_data_out(mdout));

  always #1 clka = ~clka;   // 200 MHz-like
  always #5 clkb = ~clkb;   // 40 MHz-like, rising edges aligned with clka
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Wait for a frame on any channel and decode it; returns the frame and the set of
  // channels that carried it.
  task automatic get_frame(output logic [19:0] f, output logic [N-1:0] m);
    int guard = 0;
    do begin @(posedge clka); guard++; end while (&sout && guard < 2000);
    check(guard < 2000, "no frame seen");
    repeat (2) @(posedge clka);          // middle of start bit 1
    m = ~sout;
    for (int b = 19; b >= 0; b--) begin
      logic v;
      v = |(sout & m);
      f[b] = v;
      check((sout | m) == '1, "unselected channel left idle level");
      check((sout & m) == (m & {N{v}}), "selected channels disagree");
      repeat (5) @(posedge clka);
    end
  endtask

  task automatic expect_frame(input logic [7:0] byte_in, input logic [N-1:0] mask, input string what);
    logic [19:0] f;
    logic [N-1:0] m;
    logic [15:0] w;
    w = command_word(byte_in);
    get_frame(f, m);
    check(m == mask, $sformatf("%s: channel set", what));
    check(f == {1'b0, 1'b1, w, ^w, 1'b0},
          $sformatf("%s: frame %h expected %h", what, f, {1'b0, 1'b1, w, ^w, 1'b0}));
  endtask

  task automatic dcs_write(input logic [11:0] a, input logic [15:0] d);
    @(negedge clkb) begin men = 1; mrnw = 0; maddr = a; mdin = d; end
    @(negedge clkb) begin men = 0; mrnw = 1; end
  endtask

  task automatic fw_send(input logic [7:0] d, input logic [N-1:0] m);
    int guard = 0;
    @(negedge clkb) begin fw_req = 1; fw_data = d; fw_mask = m; end
    do begin @(negedge clkb); guard++; end while (!fw_ack && guard < 1000);
    check(guard < 1000, "fw_ack missing");
    fw_req = 0;
  endtask

  initial begin
    repeat (3) @(negedge clkb);
    rst = 0;
    repeat (4) @(negedge clkb);
    check(&sout, "idle high after reset");
    // firmware requests with random masks
    for (int t = 0; t < 12; t++) begin
      logic [7:0] d;
      logic [N-1:0] m;
      d = 8'($urandom);
      m = {$urandom, $urandom, $urandom, $urandom};
      m[t] = 1'b1;
      fork
        fw_send(d, m);
        expect_frame(d, m, $sformatf("firmware %0d", t));
      join
    end
    // DCS write to one channel
    fork
      dcs_write(12'h001, 16'h0516);
      expect_frame(8'h16, N'(1) << 5, "DCS channel 5");
    join
    check(mdout == 16'h0516, "DCS register read-back");
    // DCS broadcast (channel number beyond the last channel)
    fork
      dcs_write(12'h001, 16'hFF06);
      expect_frame(8'h06, '1, "DCS broadcast");
    join
    // a write to another sub-address does not transmit
    dcs_write(12'h002, 16'h0333);
    begin
      int idle = 0;
      repeat (300) @(posedge clka) if (&sout) idle++;
      check(idle == 300, "write to unused sub-address transmitted");
    end
    // firmware and DCS requests both waiting while the encoder is busy: DCS goes first
    fork
      begin
        fw_send(8'h31, N'(1) << 60);
        repeat (2) @(negedge clkb);
        fork
          fw_send(8'h94, N'(1) << 100);
          dcs_write(12'h001, 16'h0A55);
        join
      end
      begin
        expect_frame(8'h31, N'(1) << 60, "first firmware");
        expect_frame(8'h55, N'(1) << 10, "DCS before waiting firmware");
        expect_frame(8'h94, N'(1) << 100, "waiting firmware");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clkb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
