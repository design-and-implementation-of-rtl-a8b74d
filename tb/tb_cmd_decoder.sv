// tb_cmd_decoder: sends every kind of command word, random data in the
// upper bits, and checks the settings it updates, the one-clock system
// command pulse, the reset settings and the count of unknown selects.
module tb_cmd_decoder;
  import hf_radar_pkg::*;
  logic        clk = 0, rst = 1, cmd_valid = 0;
  logic [15:0] cmd = 0;
  tcsg_cfg_t   cfg, exp_cfg;
  logic        sys_valid;
  sys_op_t     sys_op;
  logic [5:0]  sys_fifo;
  logic [7:0]  bad_cmds;
  int checks = 0, failures = 0, bad = 0;

  cmd_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp_cfg = '{pw_sel: 2'b00, prf_sel: 2'b01, ws_code: 8'd54,
                num_gates: 7'd64, beam: 2'b00};
    check(cfg == exp_cfg, "reset settings");
    for (int t = 0; t < 3000; t++) begin
      logic [3:0]  sel;
      logic [11:0] data;
      sel  = 4'($urandom_range(0, 7));
      data = 12'($urandom);
      cmd = {data, sel}; cmd_valid = 1;
      @(posedge clk); #1 cmd_valid = 0;
      case (sel)
        4'd0: exp_cfg.pw_sel    = data[1:0];
        4'd1: exp_cfg.prf_sel   = data[1:0];
        4'd2: exp_cfg.ws_code   = data[7:0];
        4'd3: exp_cfg.num_gates = data[6:0];
        4'd4: exp_cfg.beam      = data[1:0];
        4'd5: ;
        default: bad++;
      endcase
      check(cfg == exp_cfg, "settings");
      check(sys_valid == (sel == 4'd5), "sys pulse");
      if (sel == 4'd5)
        check(sys_op == sys_op_t'(data[1:0]) && sys_fifo == data[7:2], "sys fields");
      check(bad_cmds == 8'(bad), "bad count");
      // idle clock: the pulse lasts one cycle only
      @(posedge clk); #1;
      check(!sys_valid, "pulse ends");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
