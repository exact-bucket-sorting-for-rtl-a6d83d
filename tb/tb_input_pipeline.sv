// tb_input_pipeline: checks the setup records of the input pipeline.
//
// Streams random triangles (large, small, on segment boundaries, zero-area)
// as vertices and compares every output record, field by field, with the
// record worked out from the definitions in tb_ref_pkg::make_setup. Zero-area
// triangles must be dropped (counted on drop) and must still consume a
// triangle number. Part one takes outputs with a random ready; part two takes
// every output at once and checks that, with vertices arriving every clock,
// a record leaves every three clocks.
module tb_input_pipeline;
  import seg_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] cfg_wl = 3'd5, cfg_hl = 3'd4;
  logic       frame_start = 1'b0;
  logic       vin_valid = 1'b0, vin_ready;
  vertex_t    vin;
  logic       out_valid, out_ready, drop, busy;
  tri_setup_t out;

  input_pipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_drop_exp = 0, n_drop = 0, rdy_pct = 100;
  tri_setup_t expq [$];
  longint cyc = 0, last_out = -1;
  int n_gap3 = 0, n_gap_other = 0;
  bit rate_phase = 0;
  longint rate_start = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    out_ready <= ($urandom_range(99) < rdy_pct);
    if (rst_n && drop) n_drop++;
    if (rst_n && out_valid && out_ready) begin
      tri_setup_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected record");
      end else begin
        e = expq.pop_front();
        if (out !== e) begin
          failures++;
          if (failures < 6)
            $display("FAIL ptr %0d: got %h\n             exp %h", e.ptr, out, e);
        end
      end
      if (rate_phase && last_out > rate_start) begin
        if (cyc - last_out == 3) n_gap3++;
        else n_gap_other++;
      end
      last_out <= cyc;
    end
  end

  task automatic send_vertex(int x, int y);
    vin       = '{x: coord_t'(x), y: coord_t'(y)};
    vin_valid = 1'b1;
    while (!vin_ready) @(negedge clk);
    @(negedge clk);
  endtask

  int unsigned tri_no = 0;
  task automatic send_tri(int kind);
    int x[3], y[3];
    tri_setup_t st;
    bit degen;
    // the rate phase sends only triangles with area, so none is dropped
    do begin
      for (int i = 0; i < 3; i++) begin
        case (kind)
          0: begin x[i] = $urandom_range(639); y[i] = $urandom_range(479); end
          1: begin x[i] = 300 + $urandom_range(40); y[i] = 200 + $urandom_range(40); end
          2: begin x[i] = int'($urandom_range(19)) << 5; y[i] = int'($urandom_range(29)) << 4; end
          default: begin x[i] = 10 + 7 * i; y[i] = 20 + 3 * i; end   // collinear
        endcase
      end
      make_setup(x, y, tri_no, int'(cfg_wl), int'(cfg_hl), st, degen);
    end while (rate_phase && degen);
    if (degen) n_drop_exp++;
    else expq.push_back(st);
    tri_no++;
    for (int i = 0; i < 3; i++) send_vertex(x[i], y[i]);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    rdy_pct = 60;
    for (int t = 0; t < 1200; t++) begin
      send_tri($urandom_range(3));
      if (t == 600) begin
        // segment size 64 x 32 for the second half
        vin_valid = 1'b0;
        while (busy) @(negedge clk);
        cfg_wl = 3'd6; cfg_hl = 3'd5;
      end
    end
    vin_valid = 1'b0;
    while (busy || expq.size() != 0) @(negedge clk);
    // throughput: every output taken, vertices every clock
    rdy_pct = 100;
    repeat (3) @(negedge clk);
    rate_phase = 1;
    rate_start = cyc;
    for (int t = 0; t < 200; t++) send_tri($urandom_range(2));
    vin_valid = 1'b0;
    while (busy) @(negedge clk);
    checks++;
    if (n_drop != n_drop_exp) begin
      failures++;
      $display("FAIL %0d drops, expected %0d", n_drop, n_drop_exp);
    end
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d records missing", expq.size());
    end
    checks++;
    if (n_gap_other != 0 || n_gap3 < 190) begin
      failures++;
      $display("FAIL rate: %0d gaps of 3 clocks, %0d other", n_gap3, n_gap_other);
    end
    $display("drops=%0d gaps3=%0d", n_drop, n_gap3);
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
