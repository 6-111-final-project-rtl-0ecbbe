// Shared types and constants of the Paratroopers game hardware.
//
// The screen is 128 x 96 pixels, row 0 at the top. The game controller keeps
// helicopters and falling objects (bombs and paratroopers) in one small RAM
// whose words are the packed structs below; bullets live in registers. The
// sprite codes travel over the 8-bit request/ready bus from the game
// controller to the video output: each sprite is a triple (code, x, y) and a
// frame ends with END_CODE. The codes 0..10 and END_CODE, the gun row 83, the
// helicopter heights 0 and 8, their entry columns 127 and -15 and the
// 15-frame explosion follow the original design; the word layouts, slot counts
// and the codes 11/12 for the score and health read-outs are this design's own.
package para_pkg;

  // ---------------- screen geometry ----------------
  localparam int SCREEN_W   = 128;
  localparam int SCREEN_H   = 96;
  localparam int SPRITE_H   = 12;     // sprite rows
  localparam int SPRITE_W   = 8;      // pixels per sprite half
  localparam int GUN_Y      = 83;     // top row of the gun sprite
  localparam int GROUND_Y   = 84;     // object top row at which it touches the ground
  localparam int HELI_Y_L   = 0;      // row of helicopters flying right-to-left
  localparam int HELI_Y_R   = 8;      // row of helicopters flying left-to-right
  localparam int DROP_OFS   = 6;      // rows below the helicopter where a drop starts
  localparam int EXPLODE_FRAMES = 15;

  // ---------------- object RAM ----------------
  localparam int HELI_SLOTS   = 8;    // RAM words 0..7
  localparam int OBJ_SLOTS    = 24;   // RAM words 8..31
  localparam int FIRST_OBJECT = 8;
  localparam int RAM_DEPTH    = 32;
  localparam int NUM_BULLETS  = 4;
  localparam logic [6:0] BULLET_NONE = 7'h7F;  // y of an empty bullet register

  // helicopter word
  typedef struct packed {
    logic              exploded;
    logic [3:0]        timer;      // explosion frames left
    logic              dir;        // 0: enters at x=127 flying left, 1: enters at -15 flying right
    logic signed [8:0] x;          // left edge, may be off screen
    logic [6:0]        drop_dist;  // pixels still to fly before the next drop
  } heli_t;                        // 22 bits

  // bomb / paratrooper word
  typedef struct packed {
    logic              exploded;
    logic [3:0]        timer;
    logic              is_bomb;
    logic [1:0]        pad;
    logic [6:0]        x;
    logic [6:0]        y;
  } obj_t;                         // 22 bits

  localparam int WORD_W = 22;
  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [6:0] x;
    logic [6:0] y;                 // BULLET_NONE when the register is empty
  } bullet_t;

  // ---------------- sprite codes on the video bus ----------------
  typedef enum logic [7:0] {
    C_TROOPER  = 8'd0,
    C_BOMB     = 8'd1,
    C_HELI1    = 8'd2,
    C_HELI2    = 8'd3,
    C_EXPLODE1 = 8'd4,
    C_EXPLODE2 = 8'd5,
    C_GUN1     = 8'd6,
    C_GUN2     = 8'd7,
    C_HELI1REV = 8'd8,
    C_HELI2REV = 8'd9,
    C_BULLET   = 8'd10,
    C_SCORE    = 8'd11,            // x carries a number shown bottom-left
    C_HEALTH   = 8'd12,            // x carries a number shown bottom-right
    C_END      = 8'hC0
  } code_e;

  // game levels selected by position (0 slowest)
  localparam int LEVELS = 4;

  // overlap of a one-pixel bullet with a box
  function automatic logic hit_box(input logic signed [9:0] bx, input logic signed [9:0] by,
                                   input logic signed [9:0] ox, input logic signed [9:0] oy,
                                   input int w);
    return (bx >= ox) && (bx < ox + 10'(w)) && (by >= oy) && (by < oy + 10'(SPRITE_H));
  endfunction

endpackage
