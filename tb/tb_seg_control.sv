// tb_seg_control: checks the step-decision logic against geometry.
//
// For random triangles (tb_ref_pkg::make_setup) and random segments the
// triangle overlaps, the A values at the segment's four vertices are formed
// from the setup record and their sign bits applied. The decisions must then
// agree with the separating-axis overlap test of the neighbours: a right step
// is needed exactly when the segment to the right overlaps, a left step
// exactly when the one to the left does, and the segment is a good step-down
// point exactly when the one below does. Each vertex's inside flag is checked
// with a point-in-triangle test, and the selected step with the priority
// order (right, jump, left, row step at a good point, row step, finish).
module tb_seg_control;
  import seg_pkg::*;
  import tb_ref_pkg::*;

  logic       busy, advance, load_valid, phase_right, row_first, start_left;
  logic [2:0] s_tl, s_tr, s_br, s_bl;
  segc_t      sx, sy, col_l, col_r, row_c;
  logic [3:0] in_tri;
  logic       right_need, left_need, good_point, start_left_eff;
  step_e      step;

  seg_control dut (.*);

  int checks = 0, failures = 0;
  int n_r = 0, n_l = 0, n_g = 0;

  function automatic bit pt_in(int x[3], int y[3], longint px, longint py);
    longint c0, c1, c2;
    c0 = cross3(x[0], y[0], x[1], y[1], px, py);
    c1 = cross3(x[1], y[1], x[2], y[2], px, py);
    c2 = cross3(x[2], y[2], x[0], y[0], px, py);
    return (c0 >= 0 && c1 >= 0 && c2 >= 0) || (c0 <= 0 && c1 <= 0 && c2 <= 0);
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b (seg %0d,%0d)", what, got, exp, sx, sy);
    end
  endtask

  initial begin
    int wl, hl, ncols, nrows;
    for (int iter = 0; iter < 4000; iter++) begin
      int x[3], y[3], csx, csy, cand_x[$], cand_y[$], pick;
      tri_setup_t st;
      bit degen, exp_r, exp_l, exp_g, exp_sle;
      aval_t tl[3], tr[3], br[3], bl[3];
      step_e exp_step;
      wl = (iter % 2) ? 5 : 6; hl = wl - 1;
      ncols = 640 >> wl; nrows = 480 >> hl;
      do begin
        for (int i = 0; i < 3; i++) begin
          if (iter % 3 == 0) begin
            x[i] = int'($urandom_range(ncols - 1)) << wl; y[i] = int'($urandom_range(nrows - 1)) << hl;
          end else begin
            x[i] = $urandom_range(639); y[i] = $urandom_range(479);
          end
        end
        make_setup(x, y, 0, wl, hl, st, degen);
      end while (degen);
      cand_x.delete(); cand_y.delete();
      for (int j = 0; j < nrows; j++)
        for (int i = 0; i < ncols; i++)
          if (overlaps(x, y, i, j, wl, hl)) begin cand_x.push_back(i); cand_y.push_back(j); end
      pick = $urandom_range(cand_x.size() - 1);
      csx = cand_x[pick]; csy = cand_y[pick];
      for (int k = 0; k < 3; k++) begin
        tl[k] = st.a_tl[k] + aval_t'(csx - int'(st.col_a)) * st.dky[k]
                           - aval_t'(csy - int'(st.row_a)) * st.dkx[k];
        tr[k] = tl[k] + st.dky[k];
        bl[k] = tl[k] - st.dkx[k];
        br[k] = tr[k] - st.dkx[k];
      end
      s_tl = {tl[2][A_W-1], tl[1][A_W-1], tl[0][A_W-1]};
      s_tr = {tr[2][A_W-1], tr[1][A_W-1], tr[0][A_W-1]};
      s_br = {br[2][A_W-1], br[1][A_W-1], br[0][A_W-1]};
      s_bl = {bl[2][A_W-1], bl[1][A_W-1], bl[0][A_W-1]};
      sx = segc_t'(csx); sy = segc_t'(csy);
      col_l = st.col_l; col_r = st.col_r; row_c = st.row_c;
      busy = ($urandom_range(9) != 0);
      advance = ($urandom_range(9) != 0);
      load_valid = $urandom_range(1);
      phase_right = $urandom_range(1);
      row_first = $urandom_range(1);
      start_left = $urandom_range(1);
      #1;
      exp_r = (csx + 1 < ncols) && overlaps(x, y, csx + 1, csy, wl, hl);
      exp_l = (csx > 0) && overlaps(x, y, csx - 1, csy, wl, hl);
      exp_g = overlaps(x, y, csx, csy + 1, wl, hl);
      n_r += exp_r; n_l += exp_l; n_g += exp_g;
      check("right_need", right_need, exp_r);
      check("left_need", left_need, exp_l);
      check("good_point", good_point, exp_g);
      check("inside TL", in_tri[3], pt_in(x, y, csx << wl, csy << hl));
      check("inside TR", in_tri[2], pt_in(x, y, (csx + 1) << wl, csy << hl));
      check("inside BR", in_tri[1], pt_in(x, y, (csx + 1) << wl, (csy + 1) << hl));
      check("inside BL", in_tri[0], pt_in(x, y, csx << wl, (csy + 1) << hl));
      exp_sle = row_first ? exp_l : start_left;
      if (!busy)                      exp_step = load_valid ? STEP_LOAD : STEP_NONE;
      else if (!advance)              exp_step = STEP_NONE;
      else if (phase_right && exp_r)  exp_step = STEP_RIGHT;
      else if (phase_right && exp_sle) exp_step = STEP_JUMP;
      else if (!phase_right && exp_l) exp_step = STEP_LEFT;
      else if (csy != int'(st.row_c)) exp_step = exp_g ? STEP_ROWGP : STEP_ROW;
      else                            exp_step = load_valid ? STEP_LOAD : STEP_DONE;
      checks++;
      if (step !== exp_step) begin
        failures++;
        if (failures < 10) $display("FAIL step %s expected %s", step.name(), exp_step.name());
      end
    end
    checks++;
    if (n_r == 0 || n_l == 0 || n_g == 0) begin
      failures++;
      $display("FAIL cases not covered: right %0d left %0d good %0d", n_r, n_l, n_g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
