// segment_generator: walks every screen segment a triangle overlaps, one
// segment per clock.
//
// State: the current segment (SX, SY), the 12 A values of the three triangle
// sides at the four segment vertices (Ak_REG), the values of the row's first
// segment (its X and the A values at its left vertices, AkSTRTL/AkSTRBL) and
// of the last good step-down point (its X and the A values at its bottom
// vertices, AkSTLBL/AkSTLBR). Each row starts right-stepping; when no further
// right step is needed it jumps to the segment left of the row's first one (if
// that one needs a left step) and steps left; then it steps one row down below
// the current segment if that is a good step-down point, or else below the
// last good one; the walk ends in the row of Vertex C. All A updates are the
// micro-operations of Table 1 of the unit this implements (dkY = Dy*SW steps
// one segment in X, dkX = Dx*SH one segment in Y):
//   Load   TL=TL_in      TR=TR_in     BR=TR_in-dkX  BL=TL_in-dkX
//   Right  TL=TR         TR=TR+dkY    BR=BR+dkY     BL=BR
//   Left   TL=TL-dkY     TR=TL        BR=BL         BL=BL-dkY
//   Jump   TL=STRTL-dkY  TR=STRTL     BR=STRBL      BL=STRBL-dkY
//   Row+GP TL=BL         TR=BR        BR=BR-dkX     BL=BL-dkX
//   Row    TL=STLBL      TR=STLBR     BR=STLBR-dkX  BL=STLBL-dkX
// All candidate results are computed in parallel and a multiplexer selects by
// step, as in the source architecture.
//
// Interface: the triangle record is taken (in_valid && in_ready) in the cycle
// of a LOAD step; the current segment is offered on out (out_valid = BUSY) and
// the walk advances in each cycle where out_ready is high. A new triangle is
// loaded in the same cycle the last segment of the previous one is taken, so
// segments flow without gaps.
module segment_generator
  import seg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  tri_setup_t in,
  output logic       out_valid,
  input  logic       out_ready,
  output seg_hit_t   out,
  output step_e      step           // step taken this cycle (observation)
);
  typedef aval_t [2:0] avec_t;

  logic  busy, phase_right, row_first, start_left, gp_valid;
  segc_t sx, sy, col_l, col_r, row_c, str_x, gp_x;
  ptr_t  ptr;
  avec_t a_tl, a_tr, a_br, a_bl, dkx, dky;
  avec_t str_tl, str_bl, gp_bl, gp_br;

  function automatic logic [2:0] signs(avec_t v);
    return {v[2][A_W-1], v[1][A_W-1], v[0][A_W-1]};
  endfunction

  function automatic avec_t vadd(avec_t a, avec_t b);
    avec_t r;
    for (int k = 0; k < 3; k++) r[k] = a[k] + b[k];
    return r;
  endfunction

  function automatic avec_t vsub(avec_t a, avec_t b);
    avec_t r;
    for (int k = 0; k < 3; k++) r[k] = a[k] - b[k];
    return r;
  endfunction

  // in_tri, right_need and left_need are used inside the step decision;
  // they are brought out of seg_control for its testbench only.
  logic [3:0] in_tri;
  logic right_need, left_need, good_point, start_left_eff;

  seg_control u_ctrl (
    .busy          (busy),
    .advance       (out_ready),
    .load_valid    (in_valid),
    .s_tl          (signs(a_tl)),
    .s_tr          (signs(a_tr)),
    .s_br          (signs(a_br)),
    .s_bl          (signs(a_bl)),
    .sx            (sx),
    .sy            (sy),
    .col_l         (col_l),
    .col_r         (col_r),
    .row_c         (row_c),
    .phase_right   (phase_right),
    .row_first     (row_first),
    .start_left    (start_left),
    .in_tri        (in_tri),
    .right_need    (right_need),
    .left_need     (left_need),
    .good_point    (good_point),
    .start_left_eff(start_left_eff),
    .step          (step)
  );

  assign in_ready  = (step == STEP_LOAD);
  assign out_valid = busy;
  assign out       = '{ptr: ptr, sx: sx, sy: sy};

  // Values of the row's first segment and of the last good point, including
  // the current segment when it is one of them.
  avec_t str_tl_e, str_bl_e, gp_bl_e, gp_br_e;
  segc_t str_x_e, gp_x_e;
  always_comb begin
    str_tl_e = row_first ? a_tl : str_tl;
    str_bl_e = row_first ? a_bl : str_bl;
    str_x_e  = row_first ? sx   : str_x;
    gp_bl_e  = good_point ? a_bl : gp_bl;
    gp_br_e  = good_point ? a_br : gp_br;
    gp_x_e   = good_point ? sx   : gp_x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      {phase_right, row_first, start_left, gp_valid} <= '0;
      {sx, sy, col_l, col_r, row_c, str_x, gp_x, ptr} <= '0;
      {a_tl, a_tr, a_br, a_bl, dkx, dky} <= '0;
      {str_tl, str_bl, gp_bl, gp_br} <= '0;
    end else begin
      // Remember the row start and the last good step-down point while the
      // walk moves on.
      if (busy && out_ready) begin
        if (row_first) begin
          str_tl     <= a_tl;
          str_bl     <= a_bl;
          str_x      <= sx;
          start_left <= start_left_eff;
        end
        if (good_point) begin
          gp_bl    <= a_bl;
          gp_br    <= a_br;
          gp_x     <= sx;
          gp_valid <= 1'b1;
        end
      end

      unique case (step)
        STEP_LOAD: begin
          busy        <= 1'b1;
          ptr         <= in.ptr;
          a_tl        <= in.a_tl;
          a_tr        <= in.a_tr;
          a_br        <= vsub(in.a_tr, in.dkx);
          a_bl        <= vsub(in.a_tl, in.dkx);
          dkx         <= in.dkx;
          dky         <= in.dky;
          sx          <= in.col_a;
          sy          <= in.row_a;
          col_l       <= in.col_l;
          col_r       <= in.col_r;
          row_c       <= in.row_c;
          phase_right <= 1'b1;
          row_first   <= 1'b1;
          gp_valid    <= 1'b0;
        end
        STEP_RIGHT: begin
          a_tl      <= a_tr;
          a_tr      <= vadd(a_tr, dky);
          a_br      <= vadd(a_br, dky);
          a_bl      <= a_br;
          sx        <= sx + 1'b1;
          row_first <= 1'b0;
        end
        STEP_LEFT: begin
          a_tl      <= vsub(a_tl, dky);
          a_tr      <= a_tl;
          a_br      <= a_bl;
          a_bl      <= vsub(a_bl, dky);
          sx        <= sx - 1'b1;
          row_first <= 1'b0;
        end
        STEP_JUMP: begin
          a_tl        <= vsub(str_tl_e, dky);
          a_tr        <= str_tl_e;
          a_br        <= str_bl_e;
          a_bl        <= vsub(str_bl_e, dky);
          sx          <= str_x_e - 1'b1;
          phase_right <= 1'b0;
          row_first   <= 1'b0;
        end
        STEP_ROWGP, STEP_ROW: begin
          a_tl        <= gp_bl_e;
          a_tr        <= gp_br_e;
          a_br        <= vsub(gp_br_e, dkx);
          a_bl        <= vsub(gp_bl_e, dkx);
          sx          <= gp_x_e;
          sy          <= sy + 1'b1;
          phase_right <= 1'b1;
          row_first   <= 1'b1;
          gp_valid    <= 1'b0;
        end
        STEP_DONE: busy <= 1'b0;
        default: ;
      endcase
    end
  end

  // A row step below an earlier segment needs a stored good point.
  a_row_has_gp: assert property (@(posedge clk) disable iff (!rst_n)
                                 step == STEP_ROW |-> gp_valid);
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out));
endmodule
