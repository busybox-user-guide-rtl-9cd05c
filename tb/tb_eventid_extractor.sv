// Testbench for eventid_extractor with a model of the trigger receiver's event FIFO:
// pushes events with random IDs and gaps, stalls the extractor with queue_full at random,
// and checks that every event ID is written once, in order, that read_enable lasts nine
// cycles per record, and that the FIFO is never read when empty.
module tb_eventid_extractor;
  logic clk = 0, rst = 0;
  logic        push = 0;
  logic [11:0] pb = '0;
  logic [23:0] po = '0;
  logic [32:0] hdr;
  logic [3:0]  cnt, buffered;
  logic        qfull = 0, ren, wen;
  logic [35:0] eid;
  int          underruns;
  logic [35:0] expected [$];
  int checks = 0, failures = 0, got = 0, ren_run = 0;

  eventid_extractor dut (
    .areset(rst), .clock_in(clk), .DAQ_header_data(hdr), .DAQ_read_counter(cnt),
    .buffered_events(buffered), .queue_full(qfull), .read_enable(ren),
    .write_enable(wen), .extracted_eventid(eid));
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
    if (ren) ren_run <= ren_run + 1;
    else if (ren_run != 0) begin
      check(ren_run == 9, $sformatf("read_enable lasted %0d cycles", ren_run));
      ren_run <= 0;
    end
    if (wen) begin
      got++;
      if (expected.size() == 0) check(0, "event ID written with none expected");
      else begin
        logic [35:0] e;
        e = expected.pop_front();
        check(eid == e, $sformatf("event ID %h expected %h", eid, e));
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk) begin
        push = 1; pb = 12'($urandom_range(0, 3563)); po = 24'($urandom);
        expected.push_back({pb, po});
      end
      @(negedge clk) push = 0;
      qfull = ($urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 25)) @(negedge clk);
    end
    qfull = 0;
    repeat (400) @(negedge clk);
    check(got == 60, $sformatf("%0d event IDs written", got));
    check(expected.size() == 0, "event IDs missing");
    check(underruns == 0, "FIFO read while empty");
    check(buffered == 0, "events left in the FIFO");
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
