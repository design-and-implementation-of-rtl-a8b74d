// tb_dds: checks the DDS sine/cosine against $sin/$cos of the phase angle
// 21 clocks earlier (the CORDIC latency), within 8 LSB, for the radar's
// 18.1 MHz tuning word and a random one; also checks the phase accumulator
// step and that the outputs reach near full scale.
module tb_dds;
  localparam int LAT = 21;
  localparam real PI = 3.14159265358979;
  logic               clk = 0, rst = 1;
  logic [29:0]        ftw;
  logic [15:0]        angle;
  logic signed [17:0] sin_o, cos_o;
  int checks = 0, failures = 0;
  logic [15:0] hist [$];
  int max_s = 0;

  dds dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [29:0] f, input int n);
    logic [29:0] acc_model;
    ftw = f;
    rst = 1;
    hist.delete();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    acc_model = 0;
    for (int t = 0; t < n; t++) begin
      real es, ec;
      int  ds, dc;
      #1;
      checks++;
      if (angle != acc_model[29:14]) begin
        failures++;
        $display("phase accumulator wrong at %0d", t);
      end
      hist.push_back(angle);
      if (hist.size() > LAT) begin
        logic [15:0] a;
        a  = hist.pop_front();
        es = 131000.0 * $sin(2.0 * PI * real'(a) / 65536.0);
        ec = 131000.0 * $cos(2.0 * PI * real'(a) / 65536.0);
        ds = int'(real'(sin_o) - es);
        dc = int'(real'(cos_o) - ec);
        checks++;
        if (ds > 8 || ds < -8 || dc > 8 || dc < -8) begin
          failures++;
          if (failures < 10)
            $display("t=%0d angle=%0d sin %0d (%f) cos %0d (%f)", t, a,
                     sin_o, es, cos_o, ec);
        end
        if (sin_o > max_s) max_s = sin_o;
      end
      acc_model = acc_model + f;
      @(posedge clk);
    end
  endtask

  initial begin
    run(30'd79080107, 3000);       // 18.1 MHz at 245.76 MHz
    run(30'($urandom), 3000);
    run(30'd1 << 20, 3000);         // slow sweep, every angle region
    checks++;
    if (max_s < 130900) begin failures++; $display("peak %0d", max_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
