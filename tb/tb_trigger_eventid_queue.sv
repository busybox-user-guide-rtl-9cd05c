// Testbench for trigger_eventid_queue: events enter through the trigger receiver FIFO
// model; the consumer takes them with new_eventid_en at random times. Checks order,
// the count, new_eventid_av, most_recent_eventid, and that extraction pauses while the
// queue is full (8 entries) without losing events.
module tb_trigger_eventid_queue;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 0;
  logic        push = 0;
  logic [11:0] pb = '0;
  logic [23:0] po = '0;
  logic [32:0] hdr;
  logic [3:0]  cnt, buffered, num;
  logic        ren, take = 0, av;
  logic [35:0] eid, recent, last_pushed = '0;
  int          underruns;
  logic [35:0] expected [$];
  int checks = 0, failures = 0, got = 0, max_num = 0;
  bit drain = 0;

  trigger_eventid_queue #(.DEPTH(DEPTH)) dut (
    .clock_b(clk), .areset(rst), .DAQ_header_data(hdr), .buffered_events(buffered),
    .DAQ_read_counter(cnt), .new_eventid_en(take), .read_enable(ren), .eventid_out(eid),
    .new_eventid_av(av), .num_of_eventids(num), .most_recent_eventid(recent));
  cdh_fifo_model fifo (
    .clock(clk), .areset(rst), .push(push), .push_bunch(pb), .push_orbit(po),
    .read_enable(ren), .DAQ_header_data(hdr), .DAQ_read_counter(cnt),
    .buffered_events(buffered), .underruns(underruns));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    check(av == (num != 0), "new_eventid_av disagrees with the count");
    check(32'(num) <= DEPTH, "count above depth");
    if (32'(num) > max_num) max_num = 32'(num);
  end

  // consumer: idle until the queue has been seen full, then taking at random times
  initial begin
    @(negedge rst);
    forever begin
      @(negedge clk);
      take = 0;
      if (av && drain && $urandom_range(0, 3) == 0) begin
        if (expected.size() == 0) check(0, "event available with none expected");
        else begin
          logic [35:0] e;
          e = expected.pop_front();
          check(eid == e, $sformatf("event ID %h expected %h", eid, e));
        end
        got++;
        take = 1;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) begin
        push = 1; pb = 12'($urandom_range(0, 3563)); po = 24'($urandom);
        expected.push_back({pb, po});
      end
      @(negedge clk) push = 0;
      if (i < 15) repeat (3) @(negedge clk);
      else repeat ($urandom_range(10, 60)) @(negedge clk);
      if (i == 14) begin
        repeat (400) @(negedge clk);
        check(num == 4'(DEPTH), $sformatf("queue holds %0d, expected full", num));
        check(buffered == 4'(15 - DEPTH), "extraction paused while the queue is full");
        check(recent == expected[DEPTH - 1], "most recent event ID");
        drain = 1;
      end
    end
    repeat (2000) @(negedge clk);
    check(got == 40, $sformatf("%0d event IDs taken", got));
    check(underruns == 0, "FIFO read while empty");
    check(max_num == DEPTH, "queue never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
