// Testbench for eventid_fifo (first-word fall-through, 8 entries): random writes and
// reads against a queue model; checks data order, empty/full/count, most_recent, and
// that a write while full or a read while empty changes nothing.
module tb_eventid_fifo;
  localparam int W = 36, D = 8;
  logic clk = 0, rst = 0;
  logic          wr = 0, rd = 0;
  logic [W-1:0]  wdata = '0, rdata, recent;
  logic          empty, full;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0]  model [$];
  logic [W-1:0]  last = '0;
  int checks = 0, failures = 0, fulls = 0;

  eventid_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clock_b(clk), .areset(rst), .wr_en(wr), .wr_data(wdata), .rd_en(rd),
    .rd_data(rdata), .empty(empty), .full(full), .count(count), .most_recent(recent));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare outputs with the model
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(32'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
      if (model.size() != 0) check(rdata == model[0], "head of queue");
      check(recent == last, "most recent entry");
      if (full) fulls++;
      // next operation; bias towards filling in the first half
      wr = ($urandom_range(0, 9) < ((t < 1500) ? 7 : 3));
      rd = ($urandom_range(0, 9) < ((t < 1500) ? 3 : 7));
      wdata = {$urandom, 4'($urandom)};
      @(posedge clk);
      #0.1;
      begin
        bit accept_wr;
        accept_wr = wr && model.size() < D;   // a write while full is refused
        if (rd && model.size() != 0) void'(model.pop_front());
        if (accept_wr) begin model.push_back(wdata); last = wdata; end
      end
    end
    check(fulls > 0, "never full");
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
