// tb_ws_rom: checks every entry of the window-start ROM against
// code * 10 us at 245.76 MHz computed here in real arithmetic, and the
// one-clock read latency.
module tb_ws_rom;
  logic        clk = 0;
  logic [7:0]  code = 0;
  logic [23:0] count;
  int checks = 0, failures = 0;

  ws_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      longint expv;
      code = 8'(c);
      @(posedge clk); #1;
      expv = longint'($floor(real'(c) * 10e-6 * 245.76e6 + 1e-6));
      checks++;
      if (count != 24'(expv)) begin
        failures++;
        $display("code %0d: %0d, expected %0d", c, count, expv);
      end
    end
    // 540 us, the window start used in the radar's example, is code 54
    code = 8'd54; @(posedge clk); #1;
    checks++;
    if (count != 24'd132710) begin failures++; $display("540 us: %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
