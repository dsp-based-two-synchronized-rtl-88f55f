// tb_cs_task_scheduler: self-checking test of the task slot / CS generator.
// The default instance (two motors, 8000-cycle tasks) must hold cs low for
// the first 8000 cycles after reset, then high for 8000, and so on, with
// slot_start high exactly in the first cycle of each slot. A second instance
// with three motors and 5-cycle slots checks the wrap of a wider select.
module tb_cs_task_scheduler;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       cs;
  logic       ss;
  logic [1:0] cs3;
  logic       ss3;
  int         checks = 0, failures = 0;
  int         toggles = 0;

  cs_task_scheduler dut (.clk(clk), .rst_n(rst_n), .cs(cs), .slot_start(ss));
  cs_task_scheduler #(.N_MOTORS(3), .TASK_CYCLES(5)) dut3 (.clk(clk), .rst_n(rst_n), .cs(cs3), .slot_start(ss3));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_cs;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_cs = 1'b0;
    for (int t = 0; t < 6 * 8000; t++) begin
      if (t > 0) @(negedge clk);
      checks++;
      if (cs !== 1'((t / 8000) % 2) || ss !== (t % 8000 == 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: cs=%b slot_start=%b", t, cs, ss);
      end
      if (cs != prev_cs) toggles++;
      prev_cs = cs;
      if (t < 60) begin
        checks++;
        if (cs3 !== 2'((t / 5) % 3) || ss3 !== (t % 5 == 0)) begin
          failures++;
          $display("3-motor cycle %0d: cs=%0d slot_start=%b", t, cs3, ss3);
        end
      end
    end
    checks++;
    if (toggles != 5) begin failures++; $display("%0d cs toggles, expected 5", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
