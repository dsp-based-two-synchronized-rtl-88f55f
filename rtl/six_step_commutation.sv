// six_step_commutation: block commutation of a three-phase BLDC motor from
// its three hall sensors.
//
// In each of the six 60-degree sectors reported by the hall sensors one
// phase is switched to the high rail and one to the low rail; the third
// floats. The hall inputs are asynchronous, so they pass a two-flop
// synchroniser; the switch enables are then decoded and registered, giving a
// latency of three clock edges from a hall change to `en`.
// hall = {Ha, Hb, Hc}. Sector table (forward rotation, Ha-Hb-Hc sequence
// 100, 110, 010, 011, 001, 101):
//   100: A high, B low     110: A high, C low     010: B high, C low
//   011: B high, A low     001: C high, A low     101: C high, B low
// The codes 000 and 111 cannot occur with working sensors: all switches are
// turned off and `hall_fault` is raised.
// Following the reference design: a six-step commutation stage fed by three
// hall sensors that produces the six inverter switch signals. This design's
// own choices: the sector table (the common 120-degree sensor arrangement),
// the synchroniser and the fault output.
module six_step_commutation
  import tmcs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic [2:0] hall,
  output pwm_sig_t en,
  output logic     hall_fault
);

  logic [2:0] hall_m, hall_s;
  pwm_sig_t   en_d;

  always_comb begin
    en_d = '0;
    unique case (hall_s)
      3'b100:  begin en_d.ah = 1'b1; en_d.bl = 1'b1; end
      3'b110:  begin en_d.ah = 1'b1; en_d.cl = 1'b1; end
      3'b010:  begin en_d.bh = 1'b1; en_d.cl = 1'b1; end
      3'b011:  begin en_d.bh = 1'b1; en_d.al = 1'b1; end
      3'b001:  begin en_d.ch = 1'b1; en_d.al = 1'b1; end
      3'b101:  begin en_d.ch = 1'b1; en_d.bl = 1'b1; end
      default: en_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hall_m     <= '0;
      hall_s     <= '0;
      en         <= '0;
      hall_fault <= 1'b0;
    end else begin
      hall_m     <= hall;
      hall_s     <= hall_m;
      en         <= en_d;
      hall_fault <= (hall_s == 3'b000) || (hall_s == 3'b111);
    end
  end

  // Never both switches of one leg at once (shoot-through).
  a_no_shoot: assert property (@(posedge clk) disable iff (!rst_n)
    !(en.ah && en.al) && !(en.bh && en.bl) && !(en.ch && en.cl));

endmodule
