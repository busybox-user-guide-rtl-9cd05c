// Testbench for event_processor at full size (120 channels): random event IDs, request IDs
// and channel enables; replies arrive for random channels, some with a wrong request ID,
// bunch-crossing or orbit ID. A model tracks EIDOK; the test checks EIDOK, tx_mask and
// event_valid after every reply, and the clearing by event_reset.
module tb_event_processor;
  import busybox_pkg::*;
  localparam int N = 120;
  logic clk = 0, rst = 0;
  logic [35:0]  trig = '0;
  logic [55:0]  msg = '0;
  logic         mval = 0, ereset = 0;
  logic [N-1:0] chen = '0, eidok, txmask;
  logic [3:0]   reqid = '0;
  logic         valid;
  logic [N-1:0] model = '0;
  int checks = 0, failures = 0, valids = 0;

  event_processor #(.NUM_CHANNELS(N)) dut (
    .clock_b(clk), .areset(rst), .trigger_eventid(trig), .DRORC_message(msg),
    .DRORC_message_valid(mval), .CHEN_vector(chen), .local_requestID(reqid),
    .event_reset(ereset), .EIDOK_vector(eidok), .tx_mask(txmask), .event_valid(valid));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    check(eidok == model, "EIDOK vector");
    check(txmask == (chen & ~model), "tx_mask");
    check(valid == ((model | ~chen) == '1), "event_valid");
    if (valid) valids++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ev = 0; ev < 40; ev++) begin
      @(negedge clk) begin
        ereset = 1;
        trig  = {12'($urandom_range(0, 3563)), 24'($urandom)};
        reqid = 4'($urandom);
        for (int c = 0; c < N; c++) chen[c] = ($urandom_range(0, 9) != 0);
      end
      @(negedge clk) ereset = 0;
      model = '0;
      compare();
      for (int r = 0; r < 1000 && !valid; r++) begin
        drorc_msg_t m;
        logic [7:0] ch;
        int kind;
        ch = 8'($urandom_range(0, N - 1));
        // mostly answer for a channel that has not matched yet
        if ($urandom_range(0, 9) < 7)
          for (int k = 0; k < N; k++)
            if (chen[(32'(ch) + k) % N] && !model[(32'(ch) + k) % N]) begin
              ch = 8'((32'(ch) + k) % N);
              break;
            end
        kind = $urandom_range(0, 9);
        m.request_id = (kind == 1) ? reqid + 4'd1 : reqid;
        m.bunch_id   = (kind == 2) ? trig[35:24] ^ 12'h001 : trig[35:24];
        m.orbit_id   = (kind == 3) ? trig[23:0] ^ 24'h800000 : trig[23:0];
        m.drorc_id   = ch;
        @(negedge clk) begin msg = {ch, m}; mval = 1; end
        @(negedge clk) mval = 0;
        model[ch] = !(kind inside {1, 2, 3});
        compare();
      end
    end
    check(valids > 30, $sformatf("only %0d events validated", valids));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
