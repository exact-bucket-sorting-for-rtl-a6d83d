// input_pipeline: turns a stream of vertices into the setup record that the
// segment generator loads for each triangle.
//
// Two pipelines, as in the unit this implements. The short one gathers three
// consecutive vertices from the FIFO (one per clock) into a triangle and sorts
// them by Y into Vertex A (top), B and C (bottom); the triangle pointer is the
// index of the triangle in the vertex stream since the last frame_start. The
// long one computes, per stage:
//   S  the segments of the vertices: column/row of Vertex A (the first
//      segment), row of Vertex C (the last row), and the leftmost and rightmost
//      columns the triangle reaches; the screen position of SVertex TL;
//   O  the two products of the orientation test A1(B) (side A-C at Vertex B);
//   P  per side k (one side per clock, three clocks per triangle): the deltas
//      Dx, Dy of Eq. (2) and the offsets of SVertex TL from the side's vertex;
//   Q  the two products of A_k(TL) = (X_TL - x_i)*Dy - (Y_TL - y_i)*Dx;
//   R  A_k at SVertex TL and TR (TR = TL + Dy*SW) and the step values
//      dkX = Dx*SH, dkY = Dy*SW; after the third side the record is output.
// A new triangle can therefore leave every three clocks.
//
// Design choices beyond the source description: each side's function is
// multiplied by +1 or -1 (chosen from the sign of A1(B)) so that the closed
// triangle is where all three A values are >= 0; triangles of zero area are
// dropped (drop pulses for one clock); segment sizes are powers of two given
// as log2 values; the first segment row is the topmost row whose closed
// rectangle holds Vertex A, and col_l likewise the leftmost column.
// Four multipliers are used: two for the orientation test, two shared by the
// three sides.
//
// Handshake: valid/ready on both sides. The whole pipeline holds while the
// output record is valid and not taken.
module input_pipeline
  import seg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] cfg_wl,        // log2 of the segment width
  input  logic [2:0] cfg_hl,        // log2 of the segment height
  input  logic       frame_start,   // restarts triangle numbering at 0
  input  logic       vin_valid,
  output logic       vin_ready,
  input  vertex_t    vin,
  output logic       out_valid,
  input  logic       out_ready,
  output tri_setup_t out,
  output logic       drop,          // a zero-area triangle was discarded
  output logic       busy           // a triangle is somewhere in the pipeline
);
  localparam int unsigned DW = COORD_W + 1;   // signed delta width
  localparam int unsigned PW = 2 * DW;        // product width

  typedef logic signed [DW-1:0] delta_t;
  typedef logic signed [PW-1:0] prod_t;

  // signed difference of two coordinates
  function automatic delta_t dif(coord_t a, coord_t b);
    return delta_t'(a) - delta_t'(b);
  endfunction

  wire en = !out_valid || out_ready;

  // ---------------- gather: three vertices per triangle ----------------
  vertex_t    g_v [3];
  logic [1:0] g_cnt;          // vertices held (3 = triangle complete)
  ptr_t       g_ptr, tri_no;
  logic       s_take;         // stage S takes the gathered triangle

  wire g_full = (g_cnt == 2'd3);
  assign vin_ready = en && (!g_full || s_take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_cnt  <= '0;
      tri_no <= '0;
      g_ptr  <= '0;
      for (int i = 0; i < 3; i++) g_v[i] <= '0;
    end else begin
      if (frame_start) tri_no <= '0;
      if (en) begin
        if (vin_valid && vin_ready) begin
          if (g_full) begin
            g_v[0] <= vin;
            g_cnt  <= 2'd1;
          end else begin
            g_v[g_cnt] <= vin;
            g_cnt      <= g_cnt + 2'd1;
            if (g_cnt == 2'd2) begin
              g_ptr <= frame_start ? '0 : tri_no;
              tri_no <= (frame_start ? '0 : tri_no) + 1'b1;
            end
          end
        end else if (s_take) begin
          g_cnt <= '0;
        end
      end
    end
  end

  // ---------------- S: sort by Y, vertex segments ----------------
  vertex_t va, vb, vc;
  always_comb begin
    vertex_t t0, t1, t2, tmp;
    tmp = '0;
    t0 = g_v[0]; t1 = g_v[1]; t2 = g_v[2];
    if (t1.y < t0.y) begin tmp = t0; t0 = t1; t1 = tmp; end
    if (t2.y < t1.y) begin tmp = t1; t1 = t2; t2 = tmp; end
    if (t1.y < t0.y) begin tmp = t0; t0 = t1; t1 = tmp; end
    va = t0; vb = t1; vc = t2;
  end

  logic    s_valid, o_take;
  vertex_t s_a, s_b, s_c;
  ptr_t    s_ptr;
  segc_t   s_col_a, s_row_a, s_row_c, s_col_l, s_col_r;
  coord_t  s_xtl, s_ytl;

  assign s_take = g_full && (!s_valid || o_take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      {s_a, s_b, s_c, s_ptr} <= '0;
      {s_col_a, s_row_a, s_row_c, s_col_l, s_col_r, s_xtl, s_ytl} <= '0;
    end else if (en) begin
      if (s_take) begin
        coord_t xmin, xmax;
        segc_t  ca, ra;
        xmin = va.x; xmax = va.x;
        if (vb.x < xmin) xmin = vb.x;
        if (vc.x < xmin) xmin = vc.x;
        if (vb.x > xmax) xmax = vb.x;
        if (vc.x > xmax) xmax = vc.x;
        ca = segc_t'(va.x >> cfg_wl);
        ra = (va.y == '0) ? '0 : segc_t'((va.y - 1'b1) >> cfg_hl);
        s_valid <= 1'b1;
        s_a <= va; s_b <= vb; s_c <= vc;
        s_ptr   <= g_ptr;
        s_col_a <= ca;
        s_row_a <= ra;
        s_row_c <= segc_t'(vc.y >> cfg_hl);
        s_col_l <= (xmin == '0) ? '0 : segc_t'((xmin - 1'b1) >> cfg_wl);
        s_col_r <= segc_t'(xmax >> cfg_wl);
        s_xtl   <= coord_t'(coord_t'(ca) << cfg_wl);
        s_ytl   <= coord_t'(coord_t'(ra) << cfg_hl);
      end else if (o_take) begin
        s_valid <= 1'b0;
      end
    end
  end

  // ---------------- O: orientation products, side sequencer ----------------
  logic    o_valid;
  vertex_t o_a, o_b, o_c;
  ptr_t    o_ptr;
  segc_t   o_col_a, o_row_a, o_row_c, o_col_l, o_col_r;
  coord_t  o_xtl, o_ytl;
  prod_t   o_p1, o_p2;
  logic [1:0] o_k;            // side being issued

  assign o_take = s_valid && (!o_valid || o_k == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_k     <= '0;
      {o_a, o_b, o_c, o_ptr, o_p1, o_p2} <= '0;
      {o_col_a, o_row_a, o_row_c, o_col_l, o_col_r, o_xtl, o_ytl} <= '0;
    end else if (en) begin
      if (o_take) begin
        o_valid <= 1'b1;
        o_k     <= '0;
        o_a <= s_a; o_b <= s_b; o_c <= s_c; o_ptr <= s_ptr;
        o_col_a <= s_col_a; o_row_a <= s_row_a; o_row_c <= s_row_c;
        o_col_l <= s_col_l; o_col_r <= s_col_r;
        o_xtl <= s_xtl; o_ytl <= s_ytl;
        // A1(B) = (xB - xA)*(yA - yC) - (yB - yA)*(xA - xC)
        o_p1 <= prod_t'(dif(s_b.x, s_a.x)) * prod_t'(dif(s_a.y, s_c.y));
        o_p2 <= prod_t'(dif(s_b.y, s_a.y)) * prod_t'(dif(s_a.x, s_c.x));
      end else if (o_valid) begin
        if (o_k == 2'd2) o_valid <= 1'b0;
        else             o_k     <= o_k + 2'd1;
      end
    end
  end

  prod_t a1b;
  assign a1b = o_p1 - o_p2;

  // ---------------- P: deltas and offsets of side k ----------------
  logic       p_valid, p_last, p_degen;
  logic [1:0] p_k;
  delta_t     p_dx, p_dy, p_ox, p_oy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      {p_last, p_degen, p_k, p_dx, p_dy, p_ox, p_oy} <= '0;
    end else if (en) begin
      p_valid <= o_valid;
      if (o_valid) begin
        vertex_t v0, v1;
        logic    neg;
        delta_t  dx, dy;
        unique case (o_k)
          2'd0:    begin v0 = o_a; v1 = o_b; neg = (a1b > 0); end
          2'd1:    begin v0 = o_a; v1 = o_c; neg = (a1b < 0); end
          default: begin v0 = o_b; v1 = o_c; neg = (a1b > 0); end
        endcase
        dx = delta_t'(v0.x) - delta_t'(v1.x);
        dy = delta_t'(v0.y) - delta_t'(v1.y);
        p_dx    <= neg ? -dx : dx;
        p_dy    <= neg ? -dy : dy;
        p_ox    <= delta_t'(o_xtl) - delta_t'(v0.x);
        p_oy    <= delta_t'(o_ytl) - delta_t'(v0.y);
        p_k     <= o_k;
        p_last  <= (o_k == 2'd2);
        p_degen <= (a1b == 0);
      end
    end
  end

  // Per-triangle fields travel alongside the sides; they are stable in O
  // while its three sides are issued, so they are sampled there at the end.
  tri_setup_t stg;            // record being assembled

  // ---------------- Q: products of side k ----------------
  logic       q_valid, q_last, q_degen;
  logic [1:0] q_k;
  prod_t      q_p1, q_p2;
  delta_t     q_dx, q_dy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      {q_last, q_degen, q_k, q_p1, q_p2, q_dx, q_dy} <= '0;
    end else if (en) begin
      q_valid <= p_valid;
      if (p_valid) begin
        q_p1    <= prod_t'(p_ox) * prod_t'(p_dy);
        q_p2    <= prod_t'(p_oy) * prod_t'(p_dx);
        q_dx    <= p_dx;
        q_dy    <= p_dy;
        q_k     <= p_k;
        q_last  <= p_last;
        q_degen <= p_degen;
      end
    end
  end

  // ---------------- R: A values at TL and TR, assembly ----------------
  aval_t r_atl, r_atr, r_dkx, r_dky;
  always_comb begin
    r_dkx = aval_t'(q_dx) <<< cfg_hl;
    r_dky = aval_t'(q_dy) <<< cfg_wl;
    r_atl = aval_t'(q_p1) - aval_t'(q_p2);
    r_atr = r_atl + r_dky;
  end

  // The triangle fields are captured when side 0 is issued in O; O already
  // holds the next triangle by the time the last side reaches R.
  typedef struct packed {
    ptr_t  ptr;
    segc_t col_a, row_a, row_c, col_l, col_r;
  } tri_fields_t;
  tri_fields_t tf_p, tf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tf_p <= '0;
      tf_q <= '0;
    end else if (en) begin
      if (o_valid && o_k == 2'd0) begin
        tf_p.ptr   <= o_ptr;
        tf_p.col_a <= o_col_a;
        tf_p.row_a <= o_row_a;
        tf_p.row_c <= o_row_c;
        tf_p.col_l <= o_col_l;
        tf_p.col_r <= o_col_r;
      end
      if (p_valid && p_k == 2'd0) tf_q <= tf_p;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stg       <= '0;
      out       <= '0;
      out_valid <= 1'b0;
      drop      <= 1'b0;
    end else begin
      drop <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (en && q_valid) begin
        if (q_last) begin
          tri_setup_t t;
          t = stg;
          t.a_tl[2] = r_atl;
          t.a_tr[2] = r_atr;
          t.dkx[2]  = r_dkx;
          t.dky[2]  = r_dky;
          t.ptr   = tf_q.ptr;
          t.col_a = tf_q.col_a;
          t.row_a = tf_q.row_a;
          t.row_c = tf_q.row_c;
          t.col_l = tf_q.col_l;
          t.col_r = tf_q.col_r;
          if (q_degen) begin
            drop <= 1'b1;
          end else begin
            out       <= t;
            out_valid <= 1'b1;
          end
        end else begin
          stg.a_tl[q_k] <= r_atl;
          stg.a_tr[q_k] <= r_atr;
          stg.dkx[q_k]  <= r_dkx;
          stg.dky[q_k]  <= r_dky;
        end
      end
    end
  end

  assign busy = (g_cnt != '0) || s_valid || o_valid || p_valid || q_valid || out_valid;

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out));
endmodule
