// tb_motor_buffer: self-checking test of one motor buffer.
// Drives random data with a random load enable for 500 cycles and compares
// the register output with a reference value kept by the testbench: the
// output takes the input one edge after a cycle with load high, and holds
// otherwise. Also checks the all-off value after reset.
module tb_motor_buffer;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       load;
  logic [5:0] d, q, ref_q;
  int         checks = 0, failures = 0;

  motor_buffer #(.WIDTH(6)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b1; d = 6'h3f;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 6'h00) begin failures++; $display("reset value %h", q); end
    rst_n = 1'b1;
    ref_q = '0;
    for (int i = 0; i < 500; i++) begin
      load = $urandom_range(0, 1) == 1;
      d    = 6'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
