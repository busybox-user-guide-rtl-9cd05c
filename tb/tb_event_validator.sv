// Testbench for event_validator at full size (120 channels). Event IDs enter through the
// trigger receiver FIFO model; a transmitter model acknowledges each request and then
// plays the D-RORCs, writing one reply per requested channel on the 200 MHz side. Checks
// that each event is validated once and in order with its own request ID, that only
// enabled and still-unmatched channels are asked again after a missing reply, that
// disabled channels are never asked, and that halt stops re-requests until
// force_validate.
module tb_event_validator;
  localparam int N = 120;
  logic clka = 0, clkb = 0, rst = 0;
  logic [47:0]  din = '0;
  logic [7:0]   dch = '0;
  logic         den = 0;
  logic [N-1:0] chen = '0, eidok, txmask;
  logic [32:0]  hdr;
  logic [3:0]   hdr_cnt, buffered, reqid, nids;
  logic         hdr_ren, valid, force_v = 0, halt = 0, txreq, txack = 0;
  logic [15:0]  rto = 16'd300, retries;
  logic [35:0]  cur, recent;
  logic [7:0]   txdata;
  logic         push = 0;
  logic [11:0]  pb = '0;
  logic [23:0]  po = '0;
  int           underruns;
  logic [35:0]  events [$];
  logic [N-1:0] silent = '0;      // channels that do not answer
  int checks = 0, failures = 0, n_valid = 0, n_req = 0, asked_disabled = 0;

  event_validator #(.NUM_CHANNELS(N)) dut (
    .areset(rst), .clock_a(clka), .clock_b(clkb), .DRORC_data_in(din),
    .DRORC_channel(dch), .DRORC_data_en(den), .CHEN_vector(chen),
    .DAQ_header_data(hdr), .buffered_events(buffered), .DAQ_read_counter(hdr_cnt),
    .force_validate(force_v), .halt_validator(halt), .req_timeout(rto),
    .fw_tx_ack(txack), .EIDOK_vector(eidok), .read_enable(hdr_ren),
    .event_valid_out(valid), .current_event_id(cur), .most_recent_event_id(recent),
    .requestID(reqid), .retry_count(retries), .num_of_eventids(nids),
    .fw_tx_request(txreq), .fw_tx_data(txdata), .fw_tx_mask(txmask));
  cdh_fifo_model u_cdh (
    .clock(clkb), .areset(rst), .push(push), .push_bunch(pb), .push_orbit(po),
    .read_enable(hdr_ren), .DAQ_header_data(hdr), .DAQ_read_counter(hdr_cnt),
    .buffered_events(buffered), .underruns(underruns));

  always #1 clka = ~clka;
  always #5 clkb = ~clkb;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmitter and D-RORC model
  initial begin
    @(negedge rst);
    forever begin
      logic [N-1:0] m;
      logic [3:0]   id;
      logic [35:0]  ev;
      @(negedge clkb iff txreq);
      txack = 1;
      m = txmask; id = txdata[7:4]; ev = cur;
      n_req++;
      check(txdata[3:0] == 4'b0100, "request command type");
      if ((m & ~chen) != '0) asked_disabled++;
      @(negedge clkb) txack = 0;
      repeat (40) @(negedge clka);
      for (int c = 0; c < N; c++)
        if (m[c] && !silent[c]) begin
          @(negedge clka) begin din = {id, ev, 8'(c)}; dch = 8'(c); den = 1; end
          @(negedge clka) den = 0;
        end
    end
  end

  always @(posedge clkb) if (!rst && valid) begin
    n_valid++;
    if (events.size() == 0) check(0, "validation with no event pending");
    else begin
      logic [35:0] e;
      e = events.pop_front();
      check(cur == e, $sformatf("validated %h expected %h", cur, e));
    end
  end

  task automatic add_event();
    @(negedge clkb) begin
      push = 1; pb = 12'($urandom_range(0, 3563)); po = 24'($urandom);
      events.push_back({pb, po});
    end
    @(negedge clkb) push = 0;
  endtask

  task automatic wait_valid(input int n, input string what);
    int g = 0;
    while (n_valid < n && g < 20000) begin @(negedge clkb); g++; end
    check(n_valid >= n, what);
  endtask

  initial begin
    int r0;
    for (int c = 0; c < N; c++) chen[c] = (c % 10 != 9);
    repeat (3) @(negedge clkb);
    rst = 0;
    // a run of events
    for (int k = 0; k < 6; k++) add_event();
    wait_valid(6, "six events validated");
    check(retries == 0 && n_req == 6, $sformatf("one request per event: %0d requests, %0d retries", n_req, retries));
    // one channel silent for the first request
    silent[33] = 1;
    r0 = n_req;
    add_event();
    repeat (200) @(negedge clkb);
    silent[33] = 0;
    wait_valid(7, "event validated after a re-request");
    check(retries >= 1, "retry counted");
    check(n_req - r0 >= 2, "request repeated");
    // halt with a channel that never answers, then force
    silent[50] = 1;
    halt = 1;
    add_event();
    repeat (2000) @(negedge clkb);
    check(n_valid == 7, "no validation while a channel is missing");
    check(retries == 0, "no re-request while halted");
    check(eidok[51] && !eidok[50], $sformatf("EIDOK of answered and silent channels: %0d set, requests %0d", $countones(eidok), n_req));
    @(negedge clkb) force_v = 1;
    @(negedge clkb) force_v = 0;
    wait_valid(8, "forced validation");
    halt = 0;
    silent[50] = 0;
    add_event();
    wait_valid(9, "normal operation after forcing");
    check(asked_disabled == 0, "a disabled channel was asked");
    check(underruns == 0, "trigger FIFO read while empty");
    check(events.size() == 0, "events left unvalidated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clkb);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
