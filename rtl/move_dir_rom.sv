// move_dir_rom: moving-direction ROM of the square search control.
//
// Gives the direction of the next unit move of the candidate block from
// three values: the end-point (ep) where the previous step's path stopped,
// a corner of the previous 3x3 square; the min-point (mp) of the previous
// step, one of the eight neighbours of its centre and the centre of the new
// square; and the moved number (mn), the count of moves already made in this
// step. last is high on the final move of the step. The string of moves for
// an (ep, mp) pair starts at the end-point, visits every candidate of the new
// square that the previous square did not contain, ends on a corner of the
// new square (the next end-point) and never leaves the union of the two
// squares; among such strings it is a shortest one. Candidates visited again
// on the way are the bubble cycles of the advanced searching flow. Example:
// end-point bottom-left, min-point right gives right, right, right, up, up.
//
// The ROM addressed by end-point, min-point and moved number, and the example
// above, follow the published design. The published depth is six moves per
// (ep, mp) pair, which covers every pair except an end-point diagonally
// opposite a corner min-point: those need eight one-pixel moves, so this ROM
// is eight deep (3-bit mn). Entries beyond a string's length return DIR_UP
// with last low and are never addressed by the controller.
// Combinational; one 3-bit word (dir, last) per address, 4 x 8 x 8 words.
module move_dir_rom
  import ime_pkg::*;
(
  input  ep_t        ep,
  input  logic [2:0] mp,
  input  logic [2:0] mn,
  output dir_t       dir,
  output logic       last
);
  dir_t       moves[8];
  logic [3:0] len;

  always_comb begin
    unique case ({ep, mp})
      {EP_TL, 3'd0}: begin len = 4'd6; moves = '{DIR_UP, DIR_RIGHT, DIR_LEFT, DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP}; end  // MP (-1,-1): U R L L D D
      {EP_TL, 3'd1}: begin len = 4'd3; moves = '{DIR_UP, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,-1): U R R
      {EP_TL, 3'd2}: begin len = 4'd6; moves = '{DIR_RIGHT, DIR_UP, DIR_RIGHT, DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP}; end  // MP (+1,-1): R U R R D D
      {EP_TL, 3'd3}: begin len = 4'd3; moves = '{DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (-1,+0): L D D
      {EP_TL, 3'd4}: begin len = 4'd5; moves = '{DIR_RIGHT, DIR_RIGHT, DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+1,+0): R R R D D
      {EP_TL, 3'd5}: begin len = 4'd6; moves = '{DIR_DOWN, DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP}; end  // MP (-1,+1): D L D D R R
      {EP_TL, 3'd6}: begin len = 4'd5; moves = '{DIR_DOWN, DIR_DOWN, DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,+1): D D D R R
      {EP_TL, 3'd7}: begin len = 4'd8; moves = '{DIR_DOWN, DIR_DOWN, DIR_RIGHT, DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP}; end  // MP (+1,+1): D D R D R R U U
      {EP_TR, 3'd0}: begin len = 4'd6; moves = '{DIR_LEFT, DIR_UP, DIR_LEFT, DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP}; end  // MP (-1,-1): L U L L D D
      {EP_TR, 3'd1}: begin len = 4'd3; moves = '{DIR_UP, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,-1): U L L
      {EP_TR, 3'd2}: begin len = 4'd6; moves = '{DIR_UP, DIR_LEFT, DIR_RIGHT, DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP}; end  // MP (+1,-1): U L R R D D
      {EP_TR, 3'd3}: begin len = 4'd5; moves = '{DIR_LEFT, DIR_LEFT, DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP, DIR_UP}; end  // MP (-1,+0): L L L D D
      {EP_TR, 3'd4}: begin len = 4'd3; moves = '{DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+1,+0): R D D
      {EP_TR, 3'd5}: begin len = 4'd8; moves = '{DIR_DOWN, DIR_DOWN, DIR_LEFT, DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP}; end  // MP (-1,+1): D D L D L L U U
      {EP_TR, 3'd6}: begin len = 4'd5; moves = '{DIR_DOWN, DIR_DOWN, DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,+1): D D D L L
      {EP_TR, 3'd7}: begin len = 4'd6; moves = '{DIR_DOWN, DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP}; end  // MP (+1,+1): D R D D L L
      {EP_BL, 3'd0}: begin len = 4'd6; moves = '{DIR_UP, DIR_LEFT, DIR_UP, DIR_UP, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP}; end  // MP (-1,-1): U L U U R R
      {EP_BL, 3'd1}: begin len = 4'd5; moves = '{DIR_UP, DIR_UP, DIR_UP, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,-1): U U U R R
      {EP_BL, 3'd2}: begin len = 4'd8; moves = '{DIR_UP, DIR_UP, DIR_RIGHT, DIR_UP, DIR_RIGHT, DIR_RIGHT, DIR_DOWN, DIR_DOWN}; end  // MP (+1,-1): U U R U R R D D
      {EP_BL, 3'd3}: begin len = 4'd3; moves = '{DIR_LEFT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (-1,+0): L U U
      {EP_BL, 3'd4}: begin len = 4'd5; moves = '{DIR_RIGHT, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+1,+0): R R R U U
      {EP_BL, 3'd5}: begin len = 4'd6; moves = '{DIR_UP, DIR_LEFT, DIR_DOWN, DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP}; end  // MP (-1,+1): U L D D R R
      {EP_BL, 3'd6}: begin len = 4'd3; moves = '{DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,+1): D R R
      {EP_BL, 3'd7}: begin len = 4'd6; moves = '{DIR_RIGHT, DIR_DOWN, DIR_RIGHT, DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+1,+1): R D R R U U
      {EP_BR, 3'd0}: begin len = 4'd8; moves = '{DIR_UP, DIR_UP, DIR_LEFT, DIR_UP, DIR_LEFT, DIR_LEFT, DIR_DOWN, DIR_DOWN}; end  // MP (-1,-1): U U L U L L D D
      {EP_BR, 3'd1}: begin len = 4'd5; moves = '{DIR_UP, DIR_UP, DIR_UP, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,-1): U U U L L
      {EP_BR, 3'd2}: begin len = 4'd6; moves = '{DIR_UP, DIR_RIGHT, DIR_UP, DIR_UP, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP}; end  // MP (+1,-1): U R U U L L
      {EP_BR, 3'd3}: begin len = 4'd5; moves = '{DIR_LEFT, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (-1,+0): L L L U U
      {EP_BR, 3'd4}: begin len = 4'd3; moves = '{DIR_RIGHT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+1,+0): R U U
      {EP_BR, 3'd5}: begin len = 4'd6; moves = '{DIR_LEFT, DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (-1,+1): L D L L U U
      {EP_BR, 3'd6}: begin len = 4'd3; moves = '{DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP, DIR_UP, DIR_UP, DIR_UP}; end  // MP (+0,+1): D L L
      {EP_BR, 3'd7}: begin len = 4'd6; moves = '{DIR_UP, DIR_RIGHT, DIR_DOWN, DIR_DOWN, DIR_LEFT, DIR_LEFT, DIR_UP, DIR_UP}; end  // MP (+1,+1): U R D D L L
      default: begin len = 4'd0; moves = '{default: DIR_UP}; end
    endcase
    dir  = moves[mn];
    last = ({1'b0, mn} == len - 4'd1);
  end
endmodule
