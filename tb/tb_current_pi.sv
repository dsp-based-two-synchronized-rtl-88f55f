// tb_current_pi: self-checking test of the incremental PI controller.
// A reference model in 64-bit integers computes
//   acc += K0*e(n) + K1*e(n-1), clamped to [0, U_MAX * 2^KFRAC], u = acc >> KFRAC
// for random set points, feedbacks and gains, sampled at random intervals.
// Each sample checks u and that valid rises exactly one cycle after the
// strobe (the one-cycle latency). The test counts how often the output hit
// each clamp and fails if either never happened. A last phase closes the loop
// around a first-order plant model and checks the current settles on the
// set point, as the controller is meant to do.
module tb_current_pi;
  localparam int unsigned KF   = 12;
  localparam int unsigned UMAX = 1600;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               sample;
  logic signed [15:0] i_ref, i_fb, k0, k1;
  logic        [15:0] u;
  logic               valid;
  int                 checks = 0, failures = 0;
  int                 hit_lo = 0, hit_hi = 0;
  longint             acc, e_prev, e, s;

  current_pi #(.DW(16), .KFRAC(KF), .U_MAX(UMAX)) dut (
    .clk(clk), .rst_n(rst_n), .sample(sample), .i_ref(i_ref), .i_fb(i_fb),
    .k0(k0), .k1(k1), .u(u), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint plant;
    rst_n = 1'b0; sample = 1'b0; i_ref = '0; i_fb = '0; k0 = '0; k1 = '0;
    acc = 0; e_prev = 0;
    #22 rst_n = 1'b1;
    @(negedge clk);
    check(longint'(u), 0, "u after reset");
    check(longint'(valid), 0, "valid after reset");
    for (int i = 0; i < 600; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      i_ref = 16'($urandom_range(0, 4000)) - 16'sd1000;
      i_fb  = 16'($urandom_range(0, 4000)) - 16'sd1000;
      k0    = 16'($urandom_range(0, 16384)) - 16'sd4096;   // -1.0 .. 3.0
      k1    = 16'($urandom_range(0, 16384)) - 16'sd12288;  // -3.0 .. 1.0
      sample = 1'b1;
      e = longint'(i_ref) - longint'(i_fb);
      s = acc + longint'(k0) * e + longint'(k1) * e_prev;
      e_prev = e;
      if (s < 0) begin acc = 0; hit_lo++; end
      else if (s > (longint'(UMAX) << KF)) begin acc = longint'(UMAX) << KF; hit_hi++; end
      else acc = s;
      @(negedge clk);
      sample = 1'b0;
      check(longint'(valid), 1, $sformatf("valid one cycle after sample %0d", i));
      check(longint'(u), acc >>> KF, $sformatf("u at sample %0d", i));
      @(negedge clk);
      check(longint'(valid), 0, "valid is one cycle wide");
    end
    if (hit_lo == 0) begin failures++; $display("lower clamp never reached"); end
    if (hit_hi == 0) begin failures++; $display("upper clamp never reached"); end
    checks += 2;
    // Closed loop: plant i(n+1) = i(n) + (u*4 - i(n))/8, set point 2000.
    // Kp = 0.5, Ki*T = 0.25: K0 = 0.625, K1 = -0.375 (Q3.12).
    rst_n = 1'b0; #12 rst_n = 1'b1;
    @(negedge clk);
    plant = 0;
    k0 = 16'sd2560; k1 = -16'sd1536; i_ref = 16'sd2000;
    for (int n = 0; n < 200; n++) begin
      i_fb = 16'(plant);
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      plant = plant + (longint'(u) * 4 - plant) / 8;
    end
    checks++;
    if (plant < 1990 || plant > 2010) begin
      failures++;
      $display("closed loop did not settle: i = %0d", plant);
    end
    $display("clamp low %0d, clamp high %0d, settled current %0d", hit_lo, hit_hi, plant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
