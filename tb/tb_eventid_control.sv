// Testbench for eventid_control: drives its inputs directly and checks the sequence for
// each event ID - event_reset and a new request ID, a request to the transmitter held
// until acknowledged, inbox reads, event_valid_out / new_eventid_en after a match,
// re-requests with the same request ID and a growing retry count after req_timeout
// cycles, and halt with force-validate.
module tb_eventid_control;
  import busybox_pkg::*;
  logic clk = 0, rst = 0;
  logic        force_v = 0, halt = 0, av = 0, inbox_empty = 1, valid_int = 0, tx_ack = 0;
  logic [15:0] req_timeout = 16'd20;
  logic        take, inbox_rd, valid_out, ereset, tx_req;
  logic [7:0]  tx_data;
  logic [3:0]  reqid;
  logic [15:0] retries;
  int checks = 0, failures = 0, n_req = 0, n_reset = 0, n_valid = 0;

  eventid_control dut (
    .clock_b(clk), .areset(rst), .force_validate(force_v), .halt_validator(halt),
    .new_eventid_av(av), .inbox_empty(inbox_empty), .event_valid_int(valid_int),
    .req_timeout(req_timeout), .tx_ack(tx_ack), .new_eventid_en(take),
    .inbox_read_req(inbox_rd), .event_valid_out(valid_out), .event_reset(ereset),
    .tx_req(tx_req), .tx_data(tx_data), .requestID(reqid), .retry_count(retries));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmitter model: acknowledge a request after a few cycles
  always @(negedge clk) begin
    tx_ack <= 1'b0;
    if (!rst && tx_req && !tx_ack && $urandom_range(0, 2) == 0) tx_ack <= 1'b1;
  end

  always @(posedge clk) if (!rst) begin
    if (tx_req && tx_ack) begin
      n_req++;
      check(tx_data == {reqid, CMD_REQUEST_EVENTID}, "request byte");
    end
    if (ereset) n_reset++;
    if (valid_out) begin
      n_valid++;
      check(take, "new_eventid_en with event_valid_out");
    end
    check(!(inbox_rd && inbox_empty), "inbox read while empty");
  end

  // wait for the request of the current event to be acknowledged
  task automatic wait_request();
    int g = 0;
    int t0 = n_req;
    while (n_req == t0 && g < 500) begin @(negedge clk); g++; end
    check(g < 500, "no request sent");
  endtask

  task automatic wait_valid();
    int g = 0;
    while (!valid_out && g < 500) begin @(negedge clk); g++; end
    check(valid_out, "event not validated");
    @(negedge clk);
  endtask

  initial begin
    logic [3:0] id0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(!tx_req && n_reset == 0, "idle without event IDs");
    // 1: plain match
    av = 1; id0 = reqid;
    wait_request();
    check(reqid == id0 + 4'd1, "request ID advanced");
    check(n_reset == 1, "event_reset for the new event");
    inbox_empty = 0;
    repeat (2) @(negedge clk);
    check(inbox_rd, "inbox read while waiting");
    inbox_empty = 1; valid_int = 1;
    wait_valid();
    valid_int = 0;
    av = 0;
    check(n_valid == 1 && retries == 0, "first event validated without retry");
    // 2: no match - re-requests after the timeout, same request ID, retry count grows
    repeat (3) @(negedge clk);
    av = 1; id0 = reqid;
    wait_request();
    av = 0;
    for (int r = 1; r <= 3; r++) begin
      int t0, g;
      t0 = n_req;
      g = 0;
      while (n_req == t0 && g < 200) begin @(negedge clk); g++; end
      check(g > 20 && g < 40, $sformatf("re-request after %0d cycles", g));
      check(retries == 16'(r), $sformatf("retry count %0d expected %0d", retries, r));
      check(reqid == id0 + 4'd1, "same request ID on re-request");
    end
    valid_int = 1;
    wait_valid();
    valid_int = 0;
    // 3: halt, then force validation
    av = 1;
    wait_request();
    av = 0;
    halt = 1;
    repeat (60) @(negedge clk);
    begin
      int t0;
      t0 = n_req;
      repeat (60) @(negedge clk);
      check(n_req == t0, "no re-request while halted");
    end
    @(negedge clk) force_v = 1;
    @(negedge clk) force_v = 0;
    repeat (3) @(negedge clk);
    check(n_valid == 3, "forced validation");
    halt = 0;
    // 4: halt released without forcing - requests resume
    av = 1;
    wait_request();
    av = 0;
    halt = 1;
    repeat (10) @(negedge clk);
    halt = 0;
    wait_request();
    valid_int = 1;
    wait_valid();
    valid_int = 0;
    check(n_valid == 4, "four events validated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
