// tb_hf_radar_rx: end-to-end test of the receiver at a 1 MHz clock, with a
// 125 kHz local oscillator, 8-word FIFOs and 10 pulses per acquisition, the
// host played by the USB chip model.
//  1. the host sends a control setup (EP0) and, as OUT data (EP1), the
//     settings 60 us pulse, 500 Hz PRF, 16 range gates, east beam, then
//     TEST; the test acquisition runs 10 pulses into 8-deep FIFOs, so the
//     last two pulses overflow every used FIFO;
//  2. READ of FIFO 5 and an IN request (EP2): the host must get
//     {pulse p, gate 5} for p = 0..7, four 16-bit words each;
//  3. START with a tone at the oscillator frequency on the ADC whose
//     amplitude is 400*(g+1) during range gate g; the host reads FIFOs 0, 3
//     and 15 back and checks sqrt(I^2+Q^2) = 20*A*131000/2/2^13 within 1%;
//  4. STOP in the middle of an acquisition; the TCSG must stop after its
//     PRT. A pulse-width change between runs is checked on the TX output.
// Each mechanism (TR/TX pulses, sample pulses, EP0/EP1/EP2 transfers, test
// mode, read, overflow, stop, setting change) is counted and must occur.
module tb_hf_radar_rx;
  import hf_radar_pkg::*;
  localparam int DEPTH = 8, PULSES = 10;
  localparam real PI = 3.14159265358979;

  logic               clk = 0, rst = 1;
  logic signed [13:0] adc_data = 0;
  logic signed [17:0] dac_i, dac_q;
  logic               tr_pulse, tx_pulse, rx_window, beam_en;
  logic [1:0]         beam;
  logic [1:0]         hpi_a;
  logic               hpi_cs_n, hpi_rd_n, hpi_wr_n, hpi_d_oe, hpi_int;
  logic [15:0]        hpi_d_o, hpi_d_i;
  tcsg_state_t        tcsg_state;
  logic [3:0]         usb_state;
  logic               sys_busy;
  logic [63:0]        fifo_overflow;
  int checks = 0, failures = 0;

  hf_radar_rx #(.CLK_KHZ(1000), .LO_HZ(125000), .DEPTH(DEPTH),
                .PULSES(PULSES)) dut (.*);
  cy7c67300_model chip (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, what); end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_tr = 0, n_tx = 0, n_samp = 0, n_test = 0, n_read = 0, n_ovf = 0,
      n_stop = 0, n_setup = 0, n_tx60 = 0, n_tx20 = 0, n_dac = 0;
  int tx_len = 0;
  logic tr_q = 0, tx_q = 0, ovf_q = 0;
  always @(posedge clk) begin
    if (tr_pulse && !tr_q) n_tr++;
    if (tx_pulse) begin
      tx_len++;
      if (dac_i != 0) n_dac++;
    end
    if (!tx_pulse && tx_q) begin
      n_tx++;
      if (tx_len == 60) n_tx60++;
      if (tx_len == 20) n_tx20++;
      tx_len = 0;
    end
    if (dut.sampling_pulse) n_samp++;
    if (dut.test_mode && dut.sampling_pulse) n_test++;
    if (|fifo_overflow && !ovf_q) n_ovf++;
    if (!tx_pulse && dac_i != 0) begin failures++; $display("DAC active without TX"); end
    tr_q = tr_pulse; tx_q = tx_pulse; ovf_q = |fifo_overflow;
  end

  // ---------------------------------------------------- ADC stimulus
  int cyc = 0, open_cyc = 0;
  logic win_q = 0;
  always @(posedge clk) begin
    int g, off;
    real a;
    #1;
    cyc++;
    if (rx_window && !win_q) open_cyc = cyc;
    win_q = rx_window;
    off = rx_window ? cyc - open_cyc : -1;
    g   = (off + 1) / 20;
    if (g > 15) g = 15;
    a   = 400.0 * real'(g + 1);
    adc_data = 14'($rtoi($floor(a * $cos(2.0 * PI * real'(cyc) / 8.0) + 0.5)));
  end

  // --------------------------------------------------------- host
  task automatic send(input logic [15:0] words [$]);
    int a0;
    a0 = chip.n_acks;
    chip.host_out(words);
    // wait for the ACK, then until the words have been read out
    while (chip.n_acks == a0 || usb_state != 4'd2 || chip.hpi_int) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  function automatic logic [15:0] sys(sys_op_t op, int fifo);
    return {4'h0, 6'(fifo), op, CMD_SYS};
  endfunction

  task automatic wait_idle();
    int t = 0;
    while ((sys_busy || tcsg_state != TS0_INIT) && t < 300000) begin t++; @(posedge clk); end
  endtask

  // read FIFO f through the USB chip: n FIFO words
  task automatic read_fifo(input int f, input int n, output logic [63:0] w [$]);
    logic [15:0] q [$];
    logic [15:0] c [$];
    c = '{sys(OP_READ, f)};
    send(c);
    n_read++;
    chip.host_in(4 * n, q);
    w.delete();
    for (int k = 0; k < n; k++) w.push_back({q[4*k], q[4*k+1], q[4*k+2], q[4*k+3]});
  endtask

  initial begin
    logic [15:0] c [$];
    logic [63:0] w [$];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chip.wait_configured();
    // 1. control setup, settings, test acquisition
    chip.host_setup(64'h8006_0100_0000_0012);
    while (!dut.setup_valid) @(posedge clk);
    n_setup++;
    check(dut.setup_pkt == 64'h8006_0100_0000_0012, "setup packet");
    c = '{{12'd1, CMD_PW}, {12'd3, CMD_PRF}, {12'd54, CMD_WS},
          {12'd16, CMD_GATES}, {12'd1, CMD_BEAM}, sys(OP_TEST, 0)};
    send(c);
    check(sys_busy && dut.test_mode, "test mode started");
    while (!beam_en) @(posedge clk);
    #1 check(beam == 2'd1, "east beam on the beam output");
    wait_idle();
    check(n_tr == PULSES, $sformatf("%0d pulses in test acquisition", n_tr));
    check(n_test == PULSES * 16, $sformatf("test samples %0d", n_test));
    check(fifo_overflow == 64'hFFFF, "FIFOs 0..15 overflowed");
    // 2. read FIFO 5
    read_fifo(5, DEPTH, w);
    for (int p = 0; p < DEPTH; p++)
      check(w[p] == {32'(p), 32'd5}, $sformatf("test word %0d: %h", p, w[p]));
    check(!sys_busy, "read ended at empty FIFO");
    // 3. tone acquisition, 20 us pulse
    c = '{{12'd0, CMD_PW}, sys(OP_START, 0)};
    send(c);
    wait_idle();
    check(fifo_overflow == 64'hFFFF, "overflow after 10 pulses into 8 words");
    for (int i = 0; i < 3; i++) begin
      int f;
      f = (i == 0) ? 0 : (i == 1) ? 3 : 15;
      read_fifo(f, DEPTH, w);
      for (int p = 0; p < DEPTH; p++) begin
        real iv, qv, mag, expv;
        iv   = real'($signed(w[p][63:32]));
        qv   = real'($signed(w[p][31:0]));
        mag  = $sqrt(iv * iv + qv * qv);
        expv = 20.0 * 400.0 * real'(f + 1) * 131000.0 / 2.0 / 8192.0;
        check(mag > 0.99 * expv && mag < 1.01 * expv,
              $sformatf("gate %0d pulse %0d |IQ| %f exp %f", f, p, mag, expv));
      end
    end
    // 4. STOP in the middle
    c = '{sys(OP_START, 0)};
    send(c);
    while (n_tr < 2 * PULSES + 2) @(posedge clk);
    c = '{sys(OP_STOP, 0)};
    send(c);
    n_stop++;
    check(!sys_busy, "stopped");
    wait_idle();
    check(tcsg_state == TS0_INIT && n_tr < 3 * PULSES, "TCSG idle after STOP");
    // mechanisms
    check(n_tx60 == PULSES && n_tx20 >= PULSES, "pulse-width change on TX");
    check(n_samp > 0 && n_read == 4 && n_ovf > 0 && n_stop > 0 && n_setup > 0,
          "mechanisms seen");
    check(n_dac > 0, "DAC carrier during TX");
    check(chip.n_in_done == 4 && chip.protocol_errors == 0, "EP2 transfers");
    $display("pulses %0d samples %0d test %0d reads %0d overflow %0d stop %0d setup %0d",
             n_tr, n_samp, n_test, n_read, n_ovf, n_stop, n_setup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
