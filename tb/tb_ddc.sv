// tb_ddc: drives the down converter with random samples and local
// oscillator values, with random window (acc_en) and dump pulses, and
// compares every dumped I and Q with a reference sum of the products
// (shifted right 13). Also checks the one-clock dump-to-valid latency and
// that nothing is accumulated outside the window.
module tb_ddc;
  logic               clk = 0, rst = 1;
  logic signed [13:0] adc;
  logic signed [17:0] lo_cos, lo_sin;
  logic               acc_en, dump;
  logic signed [31:0] i_o, q_o;
  logic               valid;
  int checks = 0, failures = 0, dumps = 0;

  ddc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint si, sq, exp_i, exp_q;
  longint pi_d, pq_d;     // products registered inside the DDC
  logic   exp_valid;

  initial begin
    adc = 0; lo_cos = 0; lo_sin = 0; acc_en = 0; dump = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    si = 0; sq = 0; pi_d = 0; pq_d = 0; exp_valid = 0;
    for (int t = 0; t < 20000; t++) begin
      // inputs for this cycle
      adc    = 14'($urandom);
      lo_cos = 18'($urandom);
      lo_sin = 18'($urandom);
      acc_en = ((t / 700) % 3) != 2;
      dump   = acc_en && ($urandom_range(0, 99) == 0);
      #1;
      // outputs of the previous edge
      checks++;
      if (valid != exp_valid) begin failures++; $display("valid at %0d", t); end
      if (valid && exp_valid) begin
        checks++;
        if (i_o != 32'(exp_i >>> 13) || q_o != 32'(exp_q >>> 13)) begin
          failures++;
          if (failures < 10)
            $display("t=%0d I %0d exp %0d Q %0d exp %0d", t, i_o,
                     exp_i >>> 13, q_o, exp_q >>> 13);
        end
        dumps++;
      end
      // model of the edge
      @(posedge clk);
      exp_valid = dump;
      if (dump) begin
        exp_i = si + pi_d; exp_q = sq + pq_d;
        si = 0; sq = 0;
      end else if (acc_en) begin
        si += pi_d; sq += pq_d;
      end
      pi_d = longint'(adc) * longint'(lo_cos);
      pq_d = longint'(adc) * longint'(lo_sin);
      #1;
    end
    checks++;
    if (dumps < 50) begin failures++; $display("only %0d dumps", dumps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
