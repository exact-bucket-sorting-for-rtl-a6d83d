// tb_address_generator: checks the pointer lists built in external memory.
//
// A 4 x 4 segment screen. Each frame first walks every segment in init_mode
// (nothing may be written outside), then sends random (pointer, segment)
// pairs, often the same segment back to back, against a memory model with a
// random ready. The model keeps the expected list of every segment; at the end
// each list is followed from word segment*32 through the block links and
// compared. The number of new blocks must be (n-1)/31 for a list of n
// pointers. A last burst with the memory always ready must take exactly one
// clock per pointer plus one per new block.
module tb_address_generator;
  import seg_pkg::*;

  localparam int NC = 4, NR = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  segc_t       cfg_ncols = segc_t'(NC);
  logic        init_mode = 1'b0;
  logic        in_valid = 1'b0, in_ready;
  seg_hit_t    in;
  logic        ext_valid, ext_ready;
  logic [23:0] ext_addr;
  logic [PTR_W-1:0] ext_data;
  logic        new_block, busy;

  address_generator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, rdy_pct = 100;
  int unsigned mem [int unsigned];
  int n_writes = 0, n_newblk = 0;
  longint cyc = 0, first_wr = -1, last_wr = -1;
  int lists [int][$];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    ext_ready <= ($urandom_range(99) < rdy_pct);
    if (rst_n) begin
      if (ext_valid && ext_ready) begin
        mem[ext_addr] = ext_data;
        n_writes++;
        if (first_wr < 0) first_wr <= cyc;
        last_wr <= cyc;
      end
      if (new_block) n_newblk++;
    end
  end

  task automatic send(int ptr, int sx, int sy);
    in = '{ptr: ptr_t'(ptr), sx: segc_t'(sx), sy: segc_t'(sy)};
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic wait_idle();
    in_valid = 1'b0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic frame(int npts, int rdy);
    int exp_blk = 0, blk0;
    lists.delete();
    mem.delete();
    n_writes = 0;
    blk0 = n_newblk;
    init_mode = 1'b1;
    for (int s = NC * NR - 1; s >= 0; s--) send(0, s % NC, s / NC);
    wait_idle();
    init_mode = 1'b0;
    checks++;
    if (n_writes != 0) begin failures++; $display("FAIL writes in init mode"); end
    rdy_pct = rdy;
    for (int p = 0; p < npts; p++) begin
      int s;
      s = ($urandom_range(3) == 0) ? 5 : $urandom_range(NC * NR - 1);
      lists[s].push_back(p + 100);
      send(p + 100, s % NC, s / NC);
    end
    wait_idle();
    foreach (lists[s]) begin
      int unsigned addr;
      addr = s * 32;
      exp_blk += (lists[s].size() - 1) / 31;
      foreach (lists[s][i]) begin
        if (addr[4:0] == 5'd31) addr = mem.exists(addr) ? mem[addr] : 32'hffff_ffff;
        checks++;
        if (!mem.exists(addr) || mem[addr] != lists[s][i]) begin
          failures++;
          if (failures < 8) $display("FAIL segment %0d entry %0d at 0x%0h", s, i, addr);
        end
        addr++;
      end
    end
    checks++;
    if (n_newblk - blk0 != exp_blk) begin
      failures++;
      $display("FAIL %0d new blocks, expected %0d", n_newblk - blk0, exp_blk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    frame(1500, 70);
    frame(900, 90);
    // rate: memory always ready
    begin
      int b0, n0, s;
      rdy_pct = 100;
      repeat (3) @(negedge clk);
      b0 = n_newblk; n0 = n_writes;
      first_wr = -1;
      for (int p = 0; p < 400; p++) begin
        s = $urandom_range(NC * NR - 1);
        send(5000 + p, s % NC, s / NC);
      end
      wait_idle();
      checks++;
      if (last_wr - first_wr + 1 != 400 + (n_newblk - b0)) begin
        failures++;
        $display("FAIL rate: %0d writes, %0d new blocks in %0d clocks", n_writes - n0,
                 n_newblk - b0, last_wr - first_wr + 1);
      end
      $display("rate: %0d writes, %0d new blocks in %0d clocks", n_writes - n0, n_newblk - b0,
               last_wr - first_wr + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
