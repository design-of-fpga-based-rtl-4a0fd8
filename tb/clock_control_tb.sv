// clock_control_tb: checks the divide-by-32 count, the divided clock and the
// position and rate of every phase enable against a free-running model.
module clock_control_tb;
  logic mclk = 1'b0;
  logic rst;
  logic [4:0] phase;
  logic clk_out, div_start, err_en, ctrl_en, out_en, plant_en;
  int checks = 0, failures = 0;
  int n_div = 0, n_err = 0, n_ctrl = 0, n_out = 0, n_plant = 0, n_rise = 0;
  int exp_cnt;
  logic clk_out_d;

  clock_control dut (.*);

  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge mclk);
    #1 rst = 1'b0;
    exp_cnt = 0;
    clk_out_d = 1'b0;
    // 10 full sample periods
    for (int c = 0; c < 320; c++) begin
      check(phase == 5'(exp_cnt), "phase count");
      check(clk_out == (exp_cnt >= 16), "clk_out = Mclk/32");
      check(div_start == (exp_cnt == 0),  "div_start at phase 0");
      check(err_en    == (exp_cnt == 28), "err_en at phase 28");
      check(ctrl_en   == (exp_cnt == 29), "ctrl_en at phase 29");
      check(out_en    == (exp_cnt == 30), "out_en at phase 30");
      check(plant_en  == (exp_cnt == 31), "plant_en at phase 31");
      n_div += div_start; n_err += err_en; n_ctrl += ctrl_en;
      n_out += out_en;    n_plant += plant_en;
      if (clk_out && !clk_out_d) n_rise++;
      clk_out_d = clk_out;
      @(posedge mclk); #1;
      exp_cnt = (exp_cnt + 1) % 32;
    end
    check(n_div == 10 && n_err == 10 && n_ctrl == 10 && n_out == 10 && n_plant == 10,
          "one pulse of each enable per 32 cycles");
    check(n_rise == 10, "ten divided-clock periods in 320 cycles");
    // synchronous reset mid-count returns to phase 0
    repeat (7) @(posedge mclk);
    #1 rst = 1'b1;
    @(posedge mclk); #1 rst = 1'b0;
    check(phase == 0, "reset returns to phase 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
