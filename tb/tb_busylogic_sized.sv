// End-to-end scenario for busylogic_top at a channel count N set by the instantiating
// bench (tb_busylogic_96, tb_busylogic_24, tb_busylogic_20). It is the scenario of
// tb_busylogic_top, which runs the design at its default size with no parameters set;
// here N replaces 120 everywhere.
//
// Around the design: N D-RORC models on the serial links, a model of the trigger
// receiver's CDH event FIFO, a model of the trigger receiver's register port, and a DCS
// board model running strobe/acknowledge bus cycles. Trigger pulses come from this bench.
//
// Scenario, each step checked and each mechanism counted:
//   busy while ttcrx_rdy is low; firmware version and trigger-port reads over DCS;
//   channel enables for channels 0..N-2 (N-1 stays disabled); L0 dead time; event ID
//   verification of single events (request, replies, match, buffer freed) with all
//   replies stored in the RX memory and read back; the RX memory filter storing one
//   channel only; busy with all FEE buffers taken and the queue of four events verified
//   in order; buffer release by L2 reject and by L2 timeout; a re-request after a missed
//   request; halt with a D-RORC that never saw the event and release by force-validate;
//   DCS transmissions to one channel and broadcast to all; busy from the trigger
//   receiver; the busy-time counter. The mechanism counts are printed at the end and
//   each must be non-zero.
module tb_busylogic_sized #(parameter int N = 96);
  import busybox_pkg::*;

  logic clka = 0, clkb = 0, rst = 0;
  logic          rdy = 0;
  logic [N-1:0]  ch_in, ch_out;
  logic [15:0]   dcs_addr = '0, dcs_din = '0, dcs_dout;
  logic          dcs_strobe_n = 1, dcs_rnw = 1, dcs_oe, dcs_ack_n;
  logic          l0 = 0, l1a = 0, l2a = 0, l2r = 0, l2t = 0, tbusy = 0;
  logic [32:0]   hdr;
  logic [3:0]    hdr_cnt, buffered;
  logic          hdr_ren;
  logic          trig_en, trig_rnw;
  logic [11:0]   trig_addr;
  logic [15:0]   trig_din, trig_dout = '0, trig_reg = '0;
  logic          busy;
  logic [3:0]    used;

  // CDH FIFO model inputs and D-RORC model controls
  logic          cdh_push = 0;
  logic [11:0]   cdh_bunch = '0;
  logic [23:0]   cdh_orbit = '0;
  int            cdh_underruns;
  logic [N-1:0]  d_push = '0, d_mute = '0;
  logic [35:0]   d_id = '0;
  int d_commands [N], d_requests [N], d_replies [N], d_resends [N], d_bad [N], d_waiting [N];

  int checks = 0, failures = 0;
  int m_busy_rdy = 0, m_busy_dead = 0, m_busy_full = 0, m_busy_trig = 0;
  int m_verified = 0, m_l2r = 0, m_l2t = 0, m_retry = 0, m_force = 0;
  int m_dcs_tx_one = 0, m_dcs_tx_all = 0, m_rxmem = 0, m_rx_filter = 0;
  int m_trig_port = 0, m_chen_off = 0, m_busy_time = 0;
  int orbit = 1000;

  busylogic_top #(.NUM_CHANNELS(N)) dut (
    .clock_a(clka), .clock_b(clkb), .areset(rst), .ttcrx_rdy(rdy),
    .channels_in(ch_in), .channels_out(ch_out),
    .dcs_addr(dcs_addr), .dcs_strobe_n(dcs_strobe_n), .dcs_RnW(dcs_rnw),
    .dcs_data_in(dcs_din), .dcs_data_out(dcs_dout), .dcs_data_oe(dcs_oe),
    .dcs_ack_n(dcs_ack_n),
    .L0_trigger(l0), .L1a_trigger(l1a), .L2a_trigger(l2a), .L2r_trigger(l2r),
    .L2_timeout(l2t), .trigger_busy(tbusy),
    .DAQ_header_data(hdr), .DAQ_read_counter(hdr_cnt), .buffered_events(buffered),
    .trigger_read_enable(hdr_ren),
    .trigger_module_en(trig_en), .trigger_rnw(trig_rnw), .trigger_address(trig_addr),
    .trigger_data_in(trig_din), .trigger_data_out(trig_dout),
    .busy_out(busy), .buffers_used(used));

  cdh_fifo_model u_cdh (
    .clock(clkb), .areset(rst), .push(cdh_push), .push_bunch(cdh_bunch),
    .push_orbit(cdh_orbit), .read_enable(hdr_ren), .DAQ_header_data(hdr),
    .DAQ_read_counter(hdr_cnt), .buffered_events(buffered), .underruns(cdh_underruns));

  for (genvar c = 0; c < N; c++) begin : g_drorc
    drorc_model #(.DRORC_ID(8'(c))) u_drorc (
      .clock_a(clka), .areset(rst), .cmd_in(ch_out[c]), .reply_out(ch_in[c]),
      .push(d_push[c]), .push_id(d_id), .mute(d_mute[c]),
      .commands(d_commands[c]), .requests(d_requests[c]), .replies(d_replies[c]),
      .resends(d_resends[c]), .bad_frames(d_bad[c]), .waiting(d_waiting[c]));
  end

  // trigger receiver register port model: one register, reads return {4'hC, address}
  always @(posedge clkb) begin
    trig_dout <= {4'hC, trig_addr};
    if (trig_en && !trig_rnw) trig_reg <= trig_din;
  end

  always #1 clka = ~clka;   // 200 MHz-like
  always #5 clkb = ~clkb;   // 40 MHz-like, rising edges aligned with clka
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- DCS board model
  task automatic dcs_cycle(input bit read, input logic [15:0] a, input logic [15:0] d,
                           output logic [15:0] q, input bit expect_ack = 1);
    int g = 0;
    #3;
    dcs_addr = a; dcs_rnw = read; dcs_din = d;
    #3;
    dcs_strobe_n = 0;
    while (dcs_ack_n && g < 400) begin #1; g++; end
    check(dcs_ack_n != expect_ack, $sformatf("DCS cycle to %h: acknowledge %b", a, !dcs_ack_n));
    q = dcs_dout;
    if (read) check(dcs_oe == expect_ack, "DCS data bus drive on read");
    #3;
    dcs_strobe_n = 1;
    g = 0;
    while (!dcs_ack_n && g < 400) begin #1; g++; end
    #30;
  endtask

  task automatic dcs_write(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] q;
    dcs_cycle(0, a, d, q);
  endtask

  task automatic dcs_read(input logic [15:0] a, output logic [15:0] q);
    dcs_cycle(1, a, 16'h0, q);
  endtask

  // ---------------------------------------------------------------- triggers and events
  task automatic pulse(ref logic s);
    @(negedge clkb) s = 1;
    @(negedge clkb) s = 0;
  endtask

  // L2 accept: the event enters the CDH FIFO and, for the channels in dmask, the D-RORCs
  task automatic deliver_event(input logic [N-1:0] dmask, output logic [35:0] id);
    orbit += 7;
    id = {12'($urandom_range(0, 3563)), 24'(orbit)};
    @(negedge clkb) begin
      l2a = 1; cdh_push = 1; cdh_bunch = id[35:24]; cdh_orbit = id[23:0];
      d_push = dmask; d_id = id;
    end
    @(negedge clka) d_push = '0;
    @(negedge clkb) begin l2a = 0; cdh_push = 0; end
  endtask

  task automatic wait_used(input int v, input string what);
    int g = 0;
    while (32'(used) != v && g < 40000) begin @(negedge clkb); g++; end
    check(32'(used) == v, $sformatf("%s: buffers used %0d, expected %0d", what, used, v));
  endtask

  task automatic read_pointer(output int p);
    logic [15:0] q;
    dcs_read(16'h2000, q);
    p = 32'(q);
  endtask

  localparam logic [N-1:0] ENABLED = {1'b0, {(N-1){1'b1}}};

  initial begin
    logic [15:0] q;
    logic [35:0] id;
    logic [35:0] ids [4];
    int p0, p1, c0, t0;
    int req_before [N];

    // ---- reset, ttcrx_rdy
    repeat (3) @(negedge clkb);
    rst = 0;
    repeat (10) @(negedge clkb);
    check(busy, "busy while ttcrx_rdy is low");
    if (busy) m_busy_rdy++;
    rdy = 1;
    repeat (5) @(negedge clkb);
    check(!busy && used == 0, "not busy once ttcrx_rdy is high");

    // ---- register reads, trigger receiver port
    dcs_read(16'h2015, q);
    check(q == 16'h0101, $sformatf("firmware version %h", q));
    dcs_read(16'h3005, q);
    check(q == 16'hC005, $sformatf("trigger receiver register read %h", q));
    dcs_write(16'h3002, 16'h1234);
    check(trig_reg == 16'h1234, "trigger receiver register write");
    if (q == 16'hC005 && trig_reg == 16'h1234) m_trig_port++;
    dcs_cycle(1, 16'hA015, 16'h0, q, 0);   // address bit 15 set: the other FPGA's cycle

    // ---- configuration
    for (int c = 0; c < N - 1; c++) dcs_write(16'h2100 + 16'(c), 16'h0001);
    dcs_read(16'h2100 + 16'(N - 1), q);
    check(q[0] == 1'b0, "channel 119 disabled");
    dcs_read(16'h2100 + 16'd5, q);
    check(q[0] == 1'b1, "channel 5 enabled");
    dcs_write(16'h200C, 16'd600);   // re-request timeout, clock_b cycles
    dcs_write(16'h2008, 16'd1);     // L0 dead time, 10 us
    dcs_read(16'h2009, q);
    check(q == 16'd4, "four FEE buffers by default");

    // ---- one event: dead time, buffer, verification, RX memory
    read_pointer(p0);
    pulse(l0);
    repeat (3) @(negedge clkb);
    check(busy, "busy during L0 dead time");
    t0 = 0;
    while (busy && t0 < 1000) begin @(negedge clkb); t0++; end
    check(t0 > 390 && t0 < 410, $sformatf("dead time lasted %0d cycles", t0 + 3));
    if (t0 > 390 && t0 < 410) m_busy_dead++;
    pulse(l1a);
    repeat (2) @(negedge clkb);
    check(used == 1, "L1a takes a buffer");
    deliver_event(ENABLED, id);
    wait_used(0, "single event verified");
    if (used == 0) m_verified++;
    for (int c = 0; c < N - 1; c++)
      check(d_requests[c] == 1 && d_replies[c] == 1, $sformatf("D-RORC %0d request/reply", c));
    check(d_commands[N - 1] == 0, "disabled channel got a request");
    if (d_commands[N - 1] == 0) m_chen_off++;
    repeat (20) @(negedge clkb);
    read_pointer(p1);
    check(p1 - p0 == N - 1, $sformatf("%0d replies stored, expected %0d", p1 - p0, N - 1));
    begin
      // stored entries: bank 0 = {request ID, bunch-crossing ID}, bank 3 = channel
      bit seen [N];
      int ok = 1;
      for (int e = p0; e < p1; e++) begin
        logic [15:0] b0, b3;
        dcs_read(16'h1000 + 16'(e * 4 + 0), b0);
        dcs_read(16'h1000 + 16'(e * 4 + 3), b3);
        if (b0[11:0] != id[35:24] || 32'(b3[15:8]) >= N - 1 || seen[b3[15:8]]) ok = 0;
        else seen[b3[15:8]] = 1;
      end
      check(ok == 1, "RX memory contents");
      if (ok == 1 && p1 - p0 == N - 1) m_rxmem++;
    end

    // ---- RX memory filter: store channel 5 only
    dcs_write(16'h2012, 16'hFF05);
    read_pointer(p0);
    pulse(l1a);
    deliver_event(ENABLED, id);
    wait_used(0, "event verified with filter set");
    if (used == 0) m_verified++;
    repeat (20) @(negedge clkb);
    read_pointer(p1);
    dcs_read(16'h1000 + 16'(p0 * 4 + 3), q);
    check(p1 - p0 == 1 && q == 16'h0500, $sformatf("filter: %0d stored, channel %h", p1 - p0, q));
    if (p1 - p0 == 1 && q == 16'h0500) m_rx_filter++;
    dcs_write(16'h2012, 16'h0000);

    // ---- all four FEE buffers taken, then four queued events verified in order
    repeat (4) pulse(l1a);
    repeat (3) @(negedge clkb);
    check(used == 4 && busy, "busy with all buffers taken");
    if (used == 4 && busy) m_busy_full++;
    for (int k = 0; k < 4; k++) deliver_event(ENABLED, ids[k]);
    repeat (3) @(negedge clkb);
    wait_used(0, "four queued events verified");
    if (used == 0) m_verified += 4;
    repeat (3) @(negedge clkb);
    check(!busy, "busy released after verification");
    dcs_read(16'h2007, q);
    check(q == ids[3][15:0], "newest event ID register");

    // ---- L2 reject and L2 timeout release a buffer without verification
    pulse(l1a);
    repeat (2) @(negedge clkb);
    check(used == 1, "buffer taken");
    pulse(l2r);
    repeat (2) @(negedge clkb);
    check(used == 0, "L2 reject frees the buffer");
    if (used == 0) m_l2r++;
    pulse(l1a);
    pulse(l2t);
    repeat (2) @(negedge clkb);
    check(used == 0, "L2 timeout frees the buffer");
    if (used == 0) m_l2t++;

    // ---- missed request: D-RORC 5 deaf for the first request, answered on the retry
    for (int c = 0; c < N; c++) req_before[c] = d_requests[c];
    c0 = d_commands[5];
    d_mute[5] = 1;
    pulse(l1a);
    deliver_event(ENABLED, id);
    while (d_commands[5] == c0) @(negedge clkb);
    @(negedge clkb) d_mute[5] = 0;
    wait_used(0, "event verified after a re-request");
    dcs_read(16'h200E, q);
    check(q >= 16'd1, $sformatf("retry count %0d", q));
    check(d_commands[5] - c0 >= 2 && d_requests[6] == req_before[6] + 1,
          "only the missing channel was asked again");
    if (used == 0 && q >= 16'd1) m_retry++;

    // ---- halt: D-RORC 7 never sees the event; released by force-validate
    dcs_write(16'h200A, 16'h0001);
    pulse(l1a);
    deliver_event(ENABLED & ~(N'(1) << 7), id);
    repeat (3000) @(negedge clkb);
    check(used == 1, "event with a missing D-RORC not verified");
    dcs_read(16'h2107, q);
    check(q == 16'h0001, $sformatf("channel 7 enabled, no match: %h", q));
    dcs_read(16'h2106, q);
    check(q == 16'h0003, $sformatf("channel 6 enabled, matched: %h", q));
    dcs_read(16'h200E, q);
    check(q == 16'd0, "no re-requests while halted");
    dcs_write(16'h200B, 16'h0001);
    wait_used(0, "force-validate");
    if (used == 0) m_force++;
    dcs_write(16'h200A, 16'h0000);

    // ---- DCS transmissions: resend-last to channel 3, then broadcast
    c0 = d_commands[3];
    t0 = d_commands[4];
    read_pointer(p0);
    dcs_write(16'h0001, 16'h0305);
    repeat (400) @(negedge clkb);
    check(d_commands[3] == c0 + 1 && d_commands[4] == t0, "DCS command to channel 3 only");
    read_pointer(p1);
    check(p1 - p0 == 1, "channel 3 reply stored");
    if (d_commands[3] == c0 + 1 && d_commands[4] == t0 && p1 - p0 == 1) m_dcs_tx_one++;
    begin
      int cmd_before [N];
      int all_ok = 1;
      for (int c = 0; c < N; c++) cmd_before[c] = d_commands[c];
      read_pointer(p0);
      dcs_write(16'h0001, 16'hFF05);
      repeat (600) @(negedge clkb);
      for (int c = 0; c < N; c++) if (d_commands[c] != cmd_before[c] + 1) all_ok = 0;
      read_pointer(p1);
      check(all_ok == 1, "DCS broadcast reached every channel");
      check(p1 - p0 == N - 1, $sformatf("%0d broadcast replies stored", p1 - p0));
      if (all_ok == 1) m_dcs_tx_all++;
    end

    // ---- normal operation after the stale replies
    pulse(l1a);
    deliver_event(ENABLED, id);
    wait_used(0, "event verified after DCS traffic");
    if (used == 0) m_verified++;

    // ---- busy from the trigger receiver
    tbusy = 1;
    repeat (3) @(negedge clkb);
    check(busy, "busy from the trigger receiver");
    if (busy) m_busy_trig++;
    tbusy = 0;
    repeat (3) @(negedge clkb);
    check(!busy, "trigger receiver busy released");

    // ---- busy-time counter
    begin
      logic [15:0] hi, lo;
      dcs_read(16'h2010, hi);
      dcs_read(16'h2011, lo);
      check({hi, lo} > 32'd400, $sformatf("busy time %0d", {hi, lo}));
      if ({hi, lo} > 32'd400) m_busy_time++;
    end

    // ---- link and FIFO health
    for (int c = 0; c < N; c++) check(d_bad[c] == 0, $sformatf("bad frames on channel %0d", c));
    check(cdh_underruns == 0, "CDH FIFO read while empty");

    $display("mechanisms: busy_ttcrx_rdy=%0d busy_deadtime=%0d busy_buffers_full=%0d busy_trigger=%0d",
             m_busy_rdy, m_busy_dead, m_busy_full, m_busy_trig);
    $display("mechanisms: events_verified=%0d l2_reject=%0d l2_timeout=%0d retry=%0d force=%0d",
             m_verified, m_l2r, m_l2t, m_retry, m_force);
    $display("mechanisms: dcs_tx_one=%0d dcs_tx_broadcast=%0d rx_memory=%0d rx_filter=%0d",
             m_dcs_tx_one, m_dcs_tx_all, m_rxmem, m_rx_filter);
    $display("mechanisms: trigger_port=%0d disabled_channel=%0d busy_time=%0d",
             m_trig_port, m_chen_off, m_busy_time);
    check(m_busy_rdy > 0 && m_busy_dead > 0 && m_busy_full > 0 && m_busy_trig > 0 &&
          m_verified > 0 && m_l2r > 0 && m_l2t > 0 && m_retry > 0 && m_force > 0 &&
          m_dcs_tx_one > 0 && m_dcs_tx_all > 0 && m_rxmem > 0 && m_rx_filter > 0 &&
          m_trig_port > 0 && m_chen_off > 0 && m_busy_time > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clkb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
