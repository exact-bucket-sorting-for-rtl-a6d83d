// tb_throughput: throughput of the segmenting unit at its default parameters
// on the two extreme loads of a 640 x 480 screen with 32 x 16 segments.
//
// Memory is always ready and vertices are offered every clock. The clocks
// from the first external write of a run to its last are counted:
//   large    triangles covering 90..110 segments each (about 100, the heavy
//            load). The unit must write every clock: clocks = pointers +
//            block links, i.e. one segment per clock plus one clock per new
//            32-word block.
//   three    triangles covering exactly three segments. The input side
//            delivers a triangle every three clocks and the walk takes three,
//            so the writes must stay back to back: clocks = pointers + links.
//   single   triangles inside one segment. Now the three clocks per triangle
//            of the input side are the limit: clocks = 3 per triangle (less
//            the last triangle's trailing two), plus at most one per link (a
//            link write may fall into an idle clock).
// It also checks that the number of pointers written equals the number of
// (triangle, segment) overlaps of the reference test, and prints the rate in
// triangles per second for a 100 MHz clock.
module tb_throughput;
  import seg_pkg::*;
  import tb_ref_pkg::*;

  localparam int XRES = 640, YRES = 480, WL = 5, HL = 4;
  localparam int NCOLS = XRES >> WL, NROWS = YRES >> HL;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  cfg_wl = 3'(WL), cfg_hl = 3'(HL);
  segc_t       cfg_ncols = segc_t'(NCOLS);
  logic        init_mode = 1'b0, frame_start = 1'b0;
  logic        vin_valid = 1'b0, vin_ready;
  vertex_t     vin;
  logic        ext_valid, ext_ready = 1'b1;
  logic [23:0] ext_addr;
  logic [PTR_W-1:0] ext_data;
  logic        busy, ev_drop, ev_new_block;
  step_e       ev_step;

  segmenting_unit dut (
    .clk, .rst_n, .cfg_wl, .cfg_hl, .cfg_ncols, .init_mode, .frame_start,
    .vin_valid, .vin_ready, .vin,
    .ext_valid, .ext_ready, .ext_addr, .ext_data,
    .busy, .ev_step, .ev_drop, .ev_new_block
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0, first_wr = -1, last_wr = -1;
  int n_writes = 0, n_newblk = 0;

  always_ff @(posedge clk) begin
    cycles <= cycles + 1;
    if (rst_n) begin
      if (ext_valid && ext_ready) begin
        n_writes++;
        if (first_wr < 0) first_wr <= cycles;
        last_wr <= cycles;
      end
      if (ev_new_block) n_newblk++;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // number of segments the triangle overlaps (only its bounding box is tried)
  function automatic int seg_count(int x[3], int y[3]);
    int n = 0, x0, x1, y0, y1;
    x0 = x[0]; x1 = x[0]; y0 = y[0]; y1 = y[0];
    for (int i = 1; i < 3; i++) begin
      if (x[i] < x0) x0 = x[i];
      if (x[i] > x1) x1 = x[i];
      if (y[i] < y0) y0 = y[i];
      if (y[i] > y1) y1 = y[i];
    end
    for (int sy = (y0 >> HL) - 1; sy <= (y1 >> HL) + 1; sy++)
      for (int sx = (x0 >> WL) - 1; sx <= (x1 >> WL) + 1; sx++)
        if (sx >= 0 && sy >= 0 && sx < NCOLS && sy < NROWS && overlaps(x, y, sx, sy, WL, HL)) n++;
    return n;
  endfunction

  task automatic send_vertex(int x, int y);
    vin       = '{x: coord_t'(x), y: coord_t'(y)};
    vin_valid = 1'b1;
    while (!vin_ready) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic wait_idle();
    int quiet = 0;
    vin_valid = 1'b0;
    while (quiet < 8) begin
      @(negedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
  endtask

  // triangles of a run, made before the run so that they can be sent one
  // vertex per clock
  int rx [$][3];
  int ry [$][3];

  // kind 0: 90..110 segments, 1: exactly three, 2: exactly one
  task automatic make_run(int kind, int ntri, output int pointers);
    int x[3], y[3], n, cx, cy;
    rx.delete(); ry.delete();
    pointers = 0;
    while (rx.size() < ntri) begin
      cx = $urandom_range(XRES - 1);
      cy = $urandom_range(YRES - 1);
      for (int i = 0; i < 3; i++) begin
        case (kind)
          0: begin x[i] = $urandom_range(XRES - 1); y[i] = $urandom_range(YRES - 1); end
          1: begin x[i] = cx + $urandom_range(16) - 8; y[i] = cy + $urandom_range(16) - 8; end
          default: begin
            x[i] = ((cx >> WL) << WL) + 1 + $urandom_range((1 << WL) - 2);
            y[i] = ((cy >> HL) << HL) + 1 + $urandom_range((1 << HL) - 2);
          end
        endcase
      end
      if (x[0] < 0 || x[1] < 0 || x[2] < 0 || y[0] < 0 || y[1] < 0 || y[2] < 0 ||
          x[0] >= XRES || x[1] >= XRES || x[2] >= XRES ||
          y[0] >= YRES || y[1] >= YRES || y[2] >= YRES || degenerate(x, y)) continue;
      n = seg_count(x, y);
      if ((kind == 0 && (n < 90 || n > 110)) || (kind == 1 && n != 3) || (kind == 2 && n != 1))
        continue;
      rx.push_back(x);
      ry.push_back(y);
      pointers += n;
    end
  endtask

  task automatic run(string name, int kind, int ntri);
    int pointers, links, w0, b0;
    longint span;
    make_run(kind, ntri, pointers);
    w0 = n_writes; b0 = n_newblk;
    first_wr = -1;
    for (int t = 0; t < rx.size(); t++)
      for (int i = 0; i < 3; i++) send_vertex(rx[t][i], ry[t][i]);
    wait_idle();
    links = n_newblk - b0;
    span = last_wr - first_wr + 1;
    check({name, ": pointers written"}, n_writes - w0 == pointers + links);
    if (kind == 2)
      check({name, ": three clocks per triangle"},
            span >= 3 * (ntri - 1) + 1 && span <= 3 * (ntri - 1) + 1 + links);
    else
      check({name, ": one write every clock"}, span == pointers + links);
    $display("%s: %0d triangles, %0d pointers, %0d links, %0d clocks, %0.2f segments/triangle, %0.0f triangles/s at 100 MHz",
             name, ntri, pointers, links, span, real'(pointers) / ntri, 100.0e6 * ntri / span);
  endtask

  initial begin
    int bx0[3], by0[3], bx1[3], by1[3];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // frame start: background triangles under init_mode
    frame_start = 1'b1; init_mode = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    bx0 = '{0, XRES - 1, 0};        by0 = '{0, 0, YRES - 1};
    bx1 = '{XRES - 1, XRES - 1, 0}; by1 = '{0, YRES - 1, YRES - 1};
    for (int i = 0; i < 3; i++) send_vertex(bx0[i], by0[i]);
    for (int i = 0; i < 3; i++) send_vertex(bx1[i], by1[i]);
    wait_idle();
    init_mode = 1'b0;
    @(negedge clk);
    run("large", 0, 200);
    run("three", 1, 300);
    run("single", 2, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
