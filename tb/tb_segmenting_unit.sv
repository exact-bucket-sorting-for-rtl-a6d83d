// tb_segmenting_unit: end-to-end test of the segmenting unit at its default
// parameters.
//
// Two frames on a 640 x 480 screen, the first with 32 x 16 segments, the
// second with 64 x 32. Each frame starts with frame_start and the two
// full-screen background triangles under init_mode, then streams random
// triangles (large, small, thin, grid-aligned, zero-area, and bursts of tiny
// triangles in one segment). External memory is a model that accepts writes
// with a random ready. Afterwards every segment's pointer list is walked
// through its chained 32-word blocks and compared with the list computed by a
// separating-axis overlap test of every triangle against every segment.
// Counts how often each mechanism happened (right/left steps, jumps, both
// kinds of row steps, dropped triangles, new blocks, memory stalls, FIFO
// backpressure, back-to-back accesses to one segment) and fails one that
// never did.
module tb_segmenting_unit;
  import seg_pkg::*;
  import tb_ref_pkg::*;

  localparam int XRES = 640, YRES = 480;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] cfg_wl, cfg_hl;
  segc_t      cfg_ncols;
  logic       init_mode = 1'b0, frame_start = 1'b0;
  logic       vin_valid = 1'b0, vin_ready;
  vertex_t    vin;
  logic       ext_valid, ext_ready;
  logic [23:0] ext_addr;
  logic [PTR_W-1:0] ext_data;
  logic       busy, ev_drop, ev_new_block;
  step_e      ev_step;

  segmenting_unit dut (
    .clk, .rst_n, .cfg_wl, .cfg_hl, .cfg_ncols, .init_mode, .frame_start,
    .vin_valid, .vin_ready, .vin,
    .ext_valid, .ext_ready, .ext_addr, .ext_data,
    .busy, .ev_step, .ev_drop, .ev_new_block
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;

  // external memory model
  int unsigned mem [int unsigned];
  int ready_pct = 100;
  int n_writes = 0;
  always_ff @(posedge clk) begin
    cycles <= cycles + 1;
    ext_ready <= ($urandom_range(99) < ready_pct);
    if (ext_valid && ext_ready) begin
      mem[ext_addr] = ext_data;
      n_writes++;
    end
  end

  // mechanism counters
  int n_right, n_left, n_jump, n_rowgp, n_row, n_drop, n_newblk, n_stall, n_fifo_full, n_same_seg;
  always_ff @(posedge clk) if (rst_n) begin
    case (ev_step)
      STEP_RIGHT: n_right++;
      STEP_LEFT:  n_left++;
      STEP_JUMP:  n_jump++;
      STEP_ROWGP: n_rowgp++;
      STEP_ROW:   n_row++;
      default: ;
    endcase
    if (ev_drop) n_drop++;
    if (ev_new_block) n_newblk++;
    if (ext_valid && !ext_ready) n_stall++;
    if (vin_valid && !vin_ready) n_fifo_full++;
    // a segment read while the same segment's word is being written
    if (dut.h_valid && dut.h_ready && dut.u_addrgen.w_done &&
        dut.u_addrgen.seg_num == dut.u_addrgen.w_seg) n_same_seg++;
  end

  // triangles of the current frame (pointer = index)
  int tx [$][3];
  int ty [$][3];

  // Called at a falling edge; returns at the falling edge after the word
  // was taken. vin_valid stays high for back-to-back words.
  task automatic send_vertex(int x, int y);
    vin       = '{x: coord_t'(x), y: coord_t'(y)};
    vin_valid = 1'b1;
    while (!vin_ready) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic send_tri(int x[3], int y[3]);
    tx.push_back(x);
    ty.push_back(y);
    for (int i = 0; i < 3; i++) send_vertex(x[i], y[i]);
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic random_tri(int wl, int hl);
    int x[3], y[3], kind, cx, cy, r;
    kind = $urandom_range(9);
    cx = $urandom_range(XRES - 1);
    cy = $urandom_range(YRES - 1);
    for (int i = 0; i < 3; i++) begin
      case (kind)
        0, 1: begin x[i] = $urandom_range(XRES - 1); y[i] = $urandom_range(YRES - 1); end
        2, 3: begin x[i] = cx + $urandom_range(60) - 30; y[i] = cy + $urandom_range(60) - 30; end
        4: begin  // thin: two close vertices and a far one
             if (i < 2) begin x[i] = cx + $urandom_range(6) - 3; y[i] = cy + $urandom_range(6) - 3; end
             else begin x[i] = $urandom_range(XRES - 1); y[i] = $urandom_range(YRES - 1); end
           end
        5: begin  // vertices on segment boundaries
             x[i] = int'($urandom_range((XRES >> wl) - 1)) << wl;
             y[i] = int'($urandom_range((YRES >> hl) - 1)) << hl;
           end
        6: begin  // zero area: collinear
             r = $urandom_range(40);
             x[i] = cx + i * r; y[i] = cy + i * (r / 2 + 1) * ($urandom_range(1) ? 0 : 1);
           end
        7: begin  // tiny, all in one segment near (100, 100)
             x[i] = 100 + $urandom_range(4); y[i] = 100 + $urandom_range(4);
           end
        default: begin r = 200; x[i] = cx + $urandom_range(r) - r/2; y[i] = cy + $urandom_range(r) - r/2; end
      endcase
      x[i] = clampi(x[i], 0, XRES - 1);
      y[i] = clampi(y[i], 0, YRES - 1);
    end
    if (kind == 6) begin x[2] = x[0]; y[2] = y[0]; end  // make it surely degenerate
    send_tri(x, y);
    // a burst of tiny triangles in the same segment
    if (kind == 7)
      repeat ($urandom_range(2, 5)) begin
        for (int i = 0; i < 3; i++) begin
          x[i] = 100 + $urandom_range(4); y[i] = 100 + $urandom_range(4);
        end
        send_tri(x, y);
      end
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 8) begin
      @(posedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
  endtask

  task automatic run_frame(int wl, int hl, int ntri, int rdy);
    int ncols, nrows, expected_total;
    int bx0[3], by0[3], bx1[3], by1[3];
    cfg_wl = 3'(wl); cfg_hl = 3'(hl);
    ncols = XRES >> wl; nrows = YRES >> hl;
    cfg_ncols = segc_t'(ncols);
    ready_pct = rdy;
    tx.delete(); ty.delete();
    mem.delete();
    n_writes = 0;
    // frame start and background
    @(negedge clk);
    frame_start = 1'b1; init_mode = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    bx0 = '{0, XRES - 1, 0};        by0 = '{0, 0, YRES - 1};
    bx1 = '{XRES - 1, XRES - 1, 0}; by1 = '{0, YRES - 1, YRES - 1};
    send_tri(bx0, by0);
    send_tri(bx1, by1);
    vin_valid = 1'b0;
    wait_idle();
    @(negedge clk);
    init_mode = 1'b0;
    for (int t = 0; t < ntri; t++) begin
      random_tri(wl, hl);
      if ($urandom_range(9) == 0) begin
        vin_valid = 1'b0;
        repeat ($urandom_range(20)) @(negedge clk);
      end
    end
    vin_valid = 1'b0;
    wait_idle();
    // walk every segment's list
    expected_total = 0;
    for (int sy = 0; sy < nrows; sy++)
      for (int sx = 0; sx < ncols; sx++) begin
        int unsigned addr;
        addr = (sy * ncols + sx) * 32;
        for (int t = 2; t < tx.size(); t++) begin
          if (degenerate(tx[t], ty[t]) || !overlaps(tx[t], ty[t], sx, sy, wl, hl)) continue;
          expected_total++;
          if (addr[4:0] == 5'd31) addr = mem.exists(addr) ? mem[addr] : 32'hffff_ffff;
          checks++;
          if (!mem.exists(addr) || mem[addr] != t) begin
            failures++;
            if (failures < 10)
              $display("FAIL segment (%0d,%0d): triangle %0d expected at 0x%0h, found %0d",
                       sx, sy, t, addr, mem.exists(addr) ? int'(mem[addr]) : -1);
          end
          addr++;
        end
      end
    // nothing written beyond the expected pointers and the block links
    checks++;
    if (n_writes != expected_total + n_newblk_frame()) begin
      failures++;
      $display("FAIL %0d writes, expected %0d pointers + %0d links", n_writes, expected_total,
               n_newblk_frame());
    end
    $display("frame %0dx%0d: %0d triangles, %0d pointers, %0d cycles", 1 << wl, 1 << hl,
             tx.size(), expected_total, cycles);
  endtask

  int newblk_base = 0;
  function automatic int n_newblk_frame();
    return n_newblk - newblk_base;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    newblk_base = n_newblk;
    run_frame(5, 4, 400, 80);
    newblk_base = n_newblk;
    run_frame(6, 5, 200, 100);
    $display("right=%0d left=%0d jump=%0d rowgp=%0d row=%0d drop=%0d newblock=%0d stall=%0d fifo_full=%0d same_seg=%0d",
             n_right, n_left, n_jump, n_rowgp, n_row, n_drop, n_newblk, n_stall, n_fifo_full, n_same_seg);
    checks++; if (n_right == 0)     begin failures++; $display("FAIL no right step"); end
    checks++; if (n_left == 0)      begin failures++; $display("FAIL no left step"); end
    checks++; if (n_jump == 0)      begin failures++; $display("FAIL no jump"); end
    checks++; if (n_rowgp == 0)     begin failures++; $display("FAIL no row step at a good point"); end
    checks++; if (n_row == 0)       begin failures++; $display("FAIL no row step from a saved good point"); end
    checks++; if (n_drop == 0)      begin failures++; $display("FAIL no zero-area triangle dropped"); end
    checks++; if (n_newblk == 0)    begin failures++; $display("FAIL no new block chained"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("FAIL FIFO never full"); end
    checks++; if (n_same_seg == 0)  begin failures++; $display("FAIL no back-to-back segment access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
