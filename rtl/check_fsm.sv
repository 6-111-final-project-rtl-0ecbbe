// Check machine of the game controller: collisions and ground hits.
// It walks the helicopters (16 x 12 box) and then the bombs and paratroopers
// (8 x 12 box) that are not already exploding. A live bullet inside a box
// marks both for removal: the sprite is set exploding for 15 frames and the
// bullet is put in `kill_mask`, which the update machine empties at once when
// `done` (= kill_valid) pulses; every such hit adds one to the score. An
// object that has reached the ground row is set exploding as well and adds
// to the frame's `damage`: 1 for a paratrooper, 2 for a bomb. A bullet can
// destroy only one sprite; one RAM word is examined per clock.
// Marking both for removal, the 1/2 damage points and the 15-frame explosion
// follow the original design; the boxes, the score of one per hit (held at
// 255) and the order of the walk are this design's choices.
// The RAM write data is the word just read with only the exploded flag and
// timer replaced by constants, so synthesis sees every write-data bit as a
// constant or a copy of the read data; that is the intended behaviour.
module check_fsm
  import para_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          new_game,
  input  logic          start,
  output logic          done,
  input  logic [4:0]    numheli,
  input  logic [4:0]    numobject,
  input  bullet_t       bullets [NUM_BULLETS],
  output logic [NUM_BULLETS-1:0] kill_mask,
  output logic [6:0]    damage,
  output logic [7:0]    score,
  output logic [4:0]    ram_addr,
  output logic          ram_we,
  output word_t         ram_wdata,
  input  word_t         ram_rdata,
  output logic          ev_hit,
  output logic          ev_ground
);
  typedef enum logic [1:0] {C_IDLE, C_HELI, C_OBJ, C_DONE} state_e;
  state_e     state;
  logic [4:0] idx;

  heli_t h, h_new;
  obj_t  o, o_new;
  assign h = heli_t'(ram_rdata);
  assign o = obj_t'(ram_rdata);

  // first live, not yet used bullet inside the current sprite's box
  logic                   hit, ground;
  logic [NUM_BULLETS-1:0] hit_bit;
  always_comb begin
    logic signed [9:0] ox, oy;
    int w;
    logic alive;
    if (state == C_HELI) begin
      ox    = 10'(h.x);
      oy    = h.dir ? 10'sd8 : 10'sd0;
      w     = 2 * SPRITE_W;
      alive = (idx < numheli) && !h.exploded;
    end else begin
      ox    = 10'(o.x);
      oy    = 10'(o.y);
      w     = SPRITE_W;
      alive = (state == C_OBJ) && (idx < numobject) && !o.exploded;
    end
    hit     = 1'b0;
    hit_bit = '0;
    for (int b = 0; b < NUM_BULLETS; b++) begin
      if (!hit && alive && bullets[b].y != BULLET_NONE && !kill_mask[b] &&
          hit_box(10'(bullets[b].x), 10'(bullets[b].y), ox, oy, w)) begin
        hit        = 1'b1;
        hit_bit[b] = 1'b1;
      end
    end
    ground = (state == C_OBJ) && alive && !hit && (o.y >= 7'(GROUND_Y));
    h_new = h;
    h_new.exploded = 1'b1;
    h_new.timer    = 4'(EXPLODE_FRAMES);
    o_new = o;
    o_new.exploded = 1'b1;
    o_new.timer    = 4'(EXPLODE_FRAMES);
  end

  always_comb begin
    ram_addr  = (state == C_OBJ) ? 5'(FIRST_OBJECT) + idx : idx;
    ram_we    = hit || ground;
    ram_wdata = (state == C_HELI) ? word_t'(h_new) : word_t'(o_new);
  end

  always_ff @(posedge clk) begin
    if (rst || new_game) begin
      state     <= C_IDLE;
      idx       <= '0;
      kill_mask <= '0;
      damage    <= '0;
      score     <= '0;
      done      <= 1'b0;
      ev_hit    <= 1'b0;
      ev_ground <= 1'b0;
    end else begin
      done      <= 1'b0;
      ev_hit    <= hit;
      ev_ground <= ground;
      if (hit) begin
        kill_mask <= kill_mask | hit_bit;
        if (score != 8'hFF) score <= score + 1'b1;
      end
      if (ground) damage <= damage + (o.is_bomb ? 7'd2 : 7'd1);
      unique case (state)
        C_IDLE: if (start) begin
          idx       <= '0;
          kill_mask <= '0;
          damage    <= '0;
          state     <= C_HELI;
        end
        C_HELI: begin
          if (idx >= numheli) begin idx <= '0; state <= C_OBJ; end
          else idx <= idx + 1'b1;
        end
        C_OBJ: begin
          if (idx >= numobject) state <= C_DONE;
          else idx <= idx + 1'b1;
        end
        C_DONE: begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
