// Testbench for rx_mem_filter: exhaustive over channel number and write enable for a set
// of pattern/mask pairs, including mask 0 (store everything) and mask FF (one channel).
module tb_rx_mem_filter;
  logic [7:0] pattern = '0, mask = '0, addr = '0;
  logic       we = 0, fwe;
  int checks = 0, failures = 0;

  rx_mem_filter dut (.pattern(pattern), .match_mask(mask), .drorc_address(addr),
                     .write_en(we), .filtered_we(fwe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] pats [6] = '{8'h00, 8'h05, 8'h77, 8'hF0, 8'h3C, 8'hFF};
    logic [7:0] masks [6] = '{8'h00, 8'hFF, 8'hF0, 8'h0F, 8'h81, 8'h3C};
    for (int p = 0; p < 6; p++)
      for (int m = 0; m < 6; m++)
        for (int a = 0; a < 256; a++)
          for (int w = 0; w < 2; w++) begin
            bit exp;
            pattern = pats[p]; mask = masks[m]; addr = 8'(a); we = w[0];
            #1;
            exp = w[0];
            for (int b = 0; b < 8; b++)
              if (masks[m][b] && (pats[p][b] != addr[b])) exp = 0;
            check(fwe == exp, $sformatf("pattern %h mask %h channel %h we %0d", pattern, mask, addr, we));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
