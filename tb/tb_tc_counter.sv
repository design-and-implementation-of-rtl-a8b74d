// tb_tc_counter: self-checking test of the terminal-count counter used for
// the TCSG's PRF, PW, window-start and range-gate counters.
// A reference model counts alongside with random enables, clears and
// terminal counts (including 0 and 1); count and tc are compared every
// cycle.
module tb_tc_counter;
  logic       clk = 0, rst = 1, clear = 0, en = 0;
  logic [7:0] term = 8'd5, count;
  logic       tc;
  int checks = 0, failures = 0;
  int ref_cnt = 0, tcs = 0;

  tc_counter #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lastv(int t);
    return (t == 0) ? 0 : t - 1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if (cyc % 500 == 0) term = 8'($urandom_range(0, 12));
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 60) == 0);
      #1;
      checks++;
      if (count != 8'(ref_cnt) || tc != (en && ref_cnt == lastv(term))) begin
        failures++;
        if (failures < 10)
          $display("mismatch cyc %0d: count %0d exp %0d tc %b term %0d",
                   cyc, count, ref_cnt, tc, term);
      end
      if (tc) tcs++;
      @(posedge clk);
      if (clear) ref_cnt = 0;
      else if (en) ref_cnt = (ref_cnt == lastv(term)) ? 0 : ref_cnt + 1;
      #1;
    end
    checks++;
    if (tcs < 100) begin failures++; $display("too few terminal counts %0d", tcs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
