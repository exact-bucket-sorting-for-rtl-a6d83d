// seg_control: step selection of the segment generator (its SEL LOGIC).
//
// Purely combinational. It sees only the sign bits of the twelve A values
// (three triangle sides at the four segment vertices TL, TR, BR, BL; a sign
// bit is 1 where the value is negative, i.e. strictly outside that side) and
// a few comparisons of the segment coordinates with the triangle's extreme
// columns and last row, and picks the next step:
//   INSIDE    a segment vertex is inside the triangle when its three sign
//             bits are 0 (boundary included).
//   INTERS    a segment side meets the triangle's line-set when no triangle
//             side has both of its end vertices outside; this covers both an
//             edge crossing the segment side (signs differ) and a segment side
//             lying inside.
//   RIGHT/LEFT_LOGIC  a step right is needed when SVertex TR or BR is inside,
//             or the right side meets the triangle, and the triangle reaches
//             that far (its rightmost column lies further right); left
//             likewise. The column test plays the part of the Vertex B/C
//             column flags: it rejects crossings of the extended side lines
//             beyond the vertex where the sides end, and it keeps the walk on
//             screen when a vertex lies on the screen's left edge.
//   BOTT      the segment is a good step-down point when its bottom side meets
//             the triangle and this is not the row of Vertex C; then the
//             segment below certainly overlaps the triangle.
//   STEP_SEL  priority: right (right phase) > jump (right phase, row start
//             needed a left step) > left (left phase) > row step below this
//             segment (good point) > row step below the last good point >
//             finish (load the next triangle if one waits).
// A segment generator that is not busy loads a waiting triangle; a busy one
// that its consumer holds (advance low) takes no step.
module seg_control
  import seg_pkg::*;
(
  input  logic       busy,
  input  logic       advance,      // consumer took the current segment
  input  logic       load_valid,   // a triangle setup record is waiting
  input  logic [2:0] s_tl, s_tr, s_br, s_bl,   // sign bits per side
  input  segc_t      sx, sy,
  input  segc_t      col_l, col_r, row_c,
  input  logic       phase_right,  // right stepping (else left stepping)
  input  logic       row_first,    // current segment is the row's first
  input  logic       start_left,   // saved: row's first segment needs a left step
  output logic [3:0] in_tri,       // TL, TR, BR, BL inside the triangle
  output logic       right_need,
  output logic       left_need,
  output logic       good_point,
  output logic       start_left_eff,
  output step_e      step
);
  logic inters_r, inters_l, inters_b, last_row;

  always_comb begin
    in_tri     = {~|s_tl, ~|s_tr, ~|s_br, ~|s_bl};
    inters_r   = ~|(s_tr & s_br);
    inters_l   = ~|(s_tl & s_bl);
    inters_b   = ~|(s_bl & s_br);
    last_row   = (sy == row_c);

    right_need = (in_tri[2] | in_tri[1] | inters_r) & (sx < col_r);
    left_need  = (in_tri[3] | in_tri[0] | inters_l) & (sx > col_l);
    good_point = inters_b & ~last_row;
    start_left_eff = row_first ? left_need : start_left;

    if (!busy) begin
      step = load_valid ? STEP_LOAD : STEP_NONE;
    end else if (!advance) begin
      step = STEP_NONE;
    end else if (phase_right && right_need) begin
      step = STEP_RIGHT;
    end else if (phase_right && start_left_eff) begin
      step = STEP_JUMP;
    end else if (!phase_right && left_need) begin
      step = STEP_LEFT;
    end else if (!last_row) begin
      step = good_point ? STEP_ROWGP : STEP_ROW;
    end else begin
      step = load_valid ? STEP_LOAD : STEP_DONE;
    end
  end
endmodule
