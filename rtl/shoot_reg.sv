// Shoot register of the game controller. The capture unit delivers the shoot
// gesture as a level (high while the hand is up); this register is set on
// each rising edge of that level and stays set until the game logic that
// uses the shot pulses `clr`. A shot is therefore taken once per raise of
// the arm, and holding the arm up does not fire repeatedly. The level is
// synchronized first; set wins over a clear in the same clock.
module shoot_reg (
  input  logic clk,
  input  logic rst,
  input  logic shoot_lvl,
  input  logic clr,
  output logic pending
);
  logic s, s_d;
  sync2 #(.W(1)) u_sync (.clk, .rst, .d(shoot_lvl), .q(s));
  always_ff @(posedge clk) begin
    if (rst) begin
      s_d     <= 1'b0;
      pending <= 1'b0;
    end else begin
      s_d <= s;
      if (s && !s_d) pending <= 1'b1;
      else if (clr)  pending <= 1'b0;
    end
  end
endmodule
