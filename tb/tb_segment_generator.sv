// tb_segment_generator: checks that the segment walk visits exactly the
// segments each triangle overlaps, each once, at one segment per clock.
//
// Setup records are built by tb_ref_pkg::make_setup for random triangles on
// a 640 x 480 screen (32 x 16 and 64 x 32 segments) and offered back to back.
// Every segment the generator outputs is checked against the separating-axis
// overlap test, duplicates are counted as failures, and after each triangle
// the number of segments output must equal the number the reference counts.
// In part one the consumer takes segments with a random ready; in part two it
// takes every one, and the total clocks from the first segment to the last
// must equal the total number of segments (no bubbles between triangles).
module tb_segment_generator;
  import seg_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, out_valid, out_ready;
  tri_setup_t in;
  seg_hit_t   out;
  step_e      step;

  segment_generator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, rdy_pct = 100, wl = 5, hl = 4;
  int tx [int][3];
  int ty [int][3];
  int expected_cnt [int];
  int got_cnt [int];
  bit seen [int][int];
  longint cyc = 0, first_out = -1, last_out = -1;
  int n_out = 0;
  int n_steps [step_e];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= ($urandom_range(99) < rdy_pct);
    if (rst_n) begin
      n_steps[step] = n_steps.exists(step) ? n_steps[step] + 1 : 1;
      if (out_valid && out_ready) begin
        int t, key;
        t = int'(out.ptr);
        key = int'(out.sy) * 256 + int'(out.sx);
        checks++;
        if (!tx.exists(t) || !overlaps(tx[t], ty[t], int'(out.sx), int'(out.sy), wl, hl) ||
            (seen.exists(t) && seen[t].exists(key))) begin
          failures++;
          if (failures < 8) $display("FAIL triangle %0d segment (%0d,%0d)", t, out.sx, out.sy);
        end
        seen[t][key] = 1;
        got_cnt[t] = got_cnt.exists(t) ? got_cnt[t] + 1 : 1;
        if (first_out < 0) first_out <= cyc;
        last_out <= cyc;
        n_out++;
      end
    end
  end

  int tri_no = 0;
  task automatic send(int kind);
    int x[3], y[3], ncols, nrows, cnt;
    tri_setup_t st;
    bit degen;
    do begin
      for (int i = 0; i < 3; i++) begin
        case (kind)
          0: begin x[i] = $urandom_range(639); y[i] = $urandom_range(479); end
          1: begin x[i] = 200 + $urandom_range(70); y[i] = 150 + $urandom_range(70); end
          2: begin x[i] = int'($urandom_range(19)) << 5; y[i] = int'($urandom_range(29)) << 4; end
          default: begin
            x[i] = (i == 2) ? $urandom_range(639) : 320 + $urandom_range(3);
            y[i] = (i == 2) ? $urandom_range(479) : 240 + $urandom_range(3);
          end
        endcase
      end
      make_setup(x, y, tri_no, wl, hl, st, degen);
    end while (degen);
    tx[tri_no] = x; ty[tri_no] = y;
    ncols = 640 >> wl; nrows = 480 >> hl;
    cnt = 0;
    for (int sy = 0; sy < nrows; sy++)
      for (int sx = 0; sx < ncols; sx++)
        if (overlaps(x, y, sx, sy, wl, hl)) cnt++;
    expected_cnt[tri_no] = cnt;
    tri_no++;
    in = st;
    in_valid = 1'b1;
    #1;  // in_ready follows in_valid combinationally
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    int quiet = 0;
    while (quiet < 4) begin
      @(negedge clk);
      quiet = (out_valid || in_valid) ? 0 : quiet + 1;
    end
  endtask

  int total_exp = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rdy_pct = 70;
    for (int t = 0; t < 300; t++) send($urandom_range(3));
    drain();
    wl = 6; hl = 5;
    for (int t = 0; t < 100; t++) send($urandom_range(3));
    drain();
    // part two: rate
    rdy_pct = 100;
    wl = 5; hl = 4;
    repeat (3) @(negedge clk);
    begin
      int n0, s0;
      n0 = n_out;
      s0 = tri_no;
      first_out = -1;
      for (int t = 0; t < 100; t++) send($urandom_range(3));
      in_valid = 1'b0;
      drain();
      for (int t = s0; t < tri_no; t++) total_exp += expected_cnt[t];
      checks++;
      if (last_out - first_out + 1 != total_exp || n_out - n0 != total_exp) begin
        failures++;
        $display("FAIL rate: %0d segments in %0d clocks", n_out - n0, last_out - first_out + 1);
      end
      $display("rate: %0d segments in %0d clocks", n_out - n0, last_out - first_out + 1);
    end
    foreach (expected_cnt[t]) begin
      checks++;
      if (!got_cnt.exists(t) || got_cnt[t] != expected_cnt[t]) begin
        failures++;
        if (failures < 8) $display("FAIL triangle %0d: %0d segments, expected %0d", t,
                                   got_cnt.exists(t) ? got_cnt[t] : 0, expected_cnt[t]);
      end
    end
    foreach (n_steps[s]) $display("step %s: %0d", s.name(), n_steps[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
