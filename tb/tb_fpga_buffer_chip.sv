// tb_fpga_buffer_chip: self-checking test of the buffer chip.
// Part 1 replays the reference simulation: datain counts 0, 1, 2, ... while
// cs alternates 0, 1, 0, 1, ... on a 100 ns clock; after the eight steps the
// buffer outputs must read datol = 0,0,2,2,4,4,6,6 and
// dator = (reset),1,1,3,3,5,5,7, i.e. each buffer takes datain when it is
// selected and keeps it otherwise.
// Part 2 drives random data and random selects into the two-buffer chip and
// into a three-buffer instance, compared against a reference model.
module tb_fpga_buffer_chip;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       cs;
  logic [1:0] cs3;
  logic [5:0] datain;
  logic [5:0] dato  [2];
  logic [5:0] dato3 [3];
  logic [5:0] ref2  [2];
  logic [5:0] ref3  [3];
  int         checks = 0, failures = 0;

  localparam logic [5:0] EXP_L [8] = '{0, 0, 2, 2, 4, 4, 6, 6};
  localparam logic [5:0] EXP_R [8] = '{0, 1, 1, 3, 3, 5, 5, 7};

  fpga_buffer_chip dut (.clk(clk), .rst_n(rst_n), .cs(cs), .datain(datain), .dato(dato));
  fpga_buffer_chip #(.N_MOTORS(3)) dut3 (.clk(clk), .rst_n(rst_n), .cs(cs3), .datain(datain), .dato(dato3));

  always #50 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; cs = 1'b0; cs3 = 2'd0; datain = '0;
    #120 rst_n = 1'b1;
    @(negedge clk);
    // Part 1: the reference sequence.
    for (int i = 0; i < 8; i++) begin
      datain = 6'(i);
      cs     = i[0];
      @(posedge clk); #1;
      check(dato[0], EXP_L[i], $sformatf("step %0d datol", i));
      check(dato[1], EXP_R[i], $sformatf("step %0d dator", i));
    end
    // Part 2: random traffic, 2 and 3 buffers.
    ref2[0] = dato[0]; ref2[1] = dato[1];
    for (int k = 0; k < 3; k++) ref3[k] = dato3[k];
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      datain = 6'($urandom);
      cs     = 1'($urandom);
      cs3    = 2'($urandom_range(0, 3));   // 3 selects no buffer
      @(posedge clk);
      ref2[cs] = datain;
      if (cs3 < 3) ref3[cs3] = datain;
      #1;
      for (int k = 0; k < 2; k++) check(dato[k], ref2[k], $sformatf("rand %0d buf %0d", i, k));
      for (int k = 0; k < 3; k++) check(dato3[k], ref3[k], $sformatf("rand3 %0d buf %0d", i, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
