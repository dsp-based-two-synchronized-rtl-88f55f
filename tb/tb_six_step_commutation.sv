// tb_six_step_commutation: self-checking test of the hall decoder.
// Steps the hall code through the six sectors of a forward rotation, twice,
// then through random codes including the two illegal ones. The expected
// switch pattern is derived arithmetically from the sector number s
// (0..5 for hall 100, 110, 010, 011, 001, 101): the high phase is s/2 and the
// low phase is (s+1)/2 + 1 modulo 3. Checks the three-edge latency, that
// exactly one high and one low switch are on, and the fault flag.
module tb_six_step_commutation;
  import tmcs_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] hall;
  pwm_sig_t   en;
  logic       hall_fault;
  int         checks = 0, failures = 0;

  localparam logic [2:0] SEQ [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  six_step_commutation dut (.clk(clk), .rst_n(rst_n), .hall(hall), .en(en), .hall_fault(hall_fault));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pwm_sig_t expect_en(input logic [2:0] h);
    logic [5:0] v = '0;
    for (int s = 0; s < 6; s++)
      if (SEQ[s] == h) begin
        int hi = s / 2;
        int lo = ((s + 1) / 2 + 1) % 3;
        v[5 - 2 * hi] = 1'b1;      // xH lines sit at bits 5, 3, 1
        v[4 - 2 * lo] = 1'b1;      // xL lines sit at bits 4, 2, 0
      end
    return pwm_sig_t'(v);
  endfunction

  task automatic apply(input logic [2:0] h);
    pwm_sig_t prev_en;
    @(negedge clk);
    prev_en = en;
    hall = h;
    repeat (2) @(negedge clk);
    checks++;
    if (en !== prev_en) begin failures++; $display("hall %b: output changed prev_en 3 edges", h); end
    @(negedge clk);
    checks++;
    if (en !== expect_en(h)) begin
      failures++;
      $display("hall %b: en=%b expected %b", h, en, expect_en(h));
    end
    checks++;
    if (hall_fault !== (h == 3'b000 || h == 3'b111)) begin
      // the fault flag is one edge later than en
      @(negedge clk);
      if (hall_fault !== (h == 3'b000 || h == 3'b111)) begin
        failures++; $display("hall %b: fault flag %b", h, hall_fault);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; hall = 3'b000;
    #22 rst_n = 1'b1;
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 6; s++) apply(SEQ[s]);
    for (int i = 0; i < 100; i++) apply(3'($urandom));
    apply(3'b000);
    apply(3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
