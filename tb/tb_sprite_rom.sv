// Testbench for sprite_rom: hand-computed rows of several sprites and digit
// glyphs, the mirror relations of the reversed sprites, and the one colour
// per sprite.
module tb_sprite_rom;
  import para_pkg::*;
  logic [7:0] code;
  logic [3:0] row;
  logic [15:0] bits;
  logic [3:0] digit;
  logic [2:0] digit_row;
  logic [7:0] digit_bits;
  int checks = 0, failures = 0;
  sprite_rom dut (.code, .row, .bits, .digit, .digit_row, .digit_bits);

  task automatic exp_s(input logic [7:0] c, input int r, input logic [15:0] v);
    code = c; row = 4'(r); #1;
    checks++;
    if (bits !== v) begin failures++; $display("code %0d row %0d: %h want %h", c, r, bits, v); end
  endtask
  task automatic exp_d(input int d, input int r, input logic [7:0] v);
    digit = 4'(d); digit_row = 3'(r); #1;
    checks++;
    if (digit_bits !== v) begin failures++; $display("digit %0d row %0d: %h want %h", d, r, digit_bits, v); end
  endtask
  function automatic logic [15:0] mirror2(input logic [15:0] v);
    for (int i = 0; i < 8; i++) mirror2[2*i +: 2] = v[14-2*i +: 2];
  endfunction

  initial begin
    exp_s(C_TROOPER, 2, 16'hAAAA);     // full row, colour 2
    exp_s(C_TROOPER, 11, 16'h0820);    // pixels 2 and 5
    exp_s(C_BOMB, 4, 16'h3FFC);        // pixels 1..6, colour 3
    exp_s(C_BOMB, 11, 16'h0000);
    exp_s(C_BULLET, 0, 16'h4000);      // one pixel, colour 1
    exp_s(C_BULLET, 1, 16'h0000);
    exp_s(C_GUN1, 11, 16'h5555);
    exp_s(C_GUN1, 0, 16'h0001);
    exp_s(C_GUN2, 0, 16'h4000);
    exp_s(C_END, 3, 16'h0000);
    // mirrored pairs and single colour
    for (int r = 0; r < 12; r++) begin
      logic [15:0] a, b;
      code = C_HELI1; row = 4'(r); #1 a = bits;
      code = C_HELI1REV; #1 b = bits;
      checks++; if (b !== mirror2(a)) begin failures++; $display("heli1 mirror row %0d", r); end
      code = C_HELI2; #1 a = bits;
      code = C_HELI2REV; #1 b = bits;
      checks++; if (b !== mirror2(a)) begin failures++; $display("heli2 mirror row %0d", r); end
      code = C_EXPLODE1; #1 a = bits;
      code = C_EXPLODE2; #1 b = bits;
      checks++; if (b !== mirror2(a)) begin failures++; $display("explode mirror row %0d", r); end
      for (int i = 0; i < 8; i++) begin
        checks++; if (a[2*i +: 2] != 2'b00 && a[2*i +: 2] != 2'b11) begin failures++; $display("explosion colour"); end
      end
    end
    exp_d(8, 0, 8'h54);   // 111
    exp_d(1, 0, 8'h10);   // 010
    exp_d(0, 3, 8'h44);   // 101
    exp_d(7, 6, 8'h10);   // 010
    exp_d(4, 6, 8'h04);   // 001
    exp_d(2, 4, 8'h40);   // 100
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
