// address_generator: appends triangle pointers to per-segment lists in
// external memory (the Pointer Buffer).
//
// Each segment's list is a chain of 32-word blocks: words 0..30 hold triangle
// pointers and word 31 points to the next block. The Address Memory holds one
// word per segment, the external address where that segment's next pointer
// goes. Per accepted segment:
//   cycle 1  SEGMENT_NUM = SY*ncols + SX (one multiplier) addresses the
//            Address Memory (synchronous read);
//   cycle 2  the read word (AMEM_OUT) is compared in its five low bits with
//            COMP_VALUE = 31. If it is not the last word of a block, the
//            pointer is written there and the word is replaced by address+1;
//            one pointer per clock. If it is, a new block is taken from
//            NEXT_BLOCK: the pointer goes to its first word, then in a second
//            cycle NEXT_BLOCK goes to word 31 of the old block, the segment's
//            word becomes NEXT_BLOCK+1 and NEXT_BLOCK advances by 32. The input
//            is held for that extra cycle, and whenever the memory is busy.
// A word written in cycle 2 is forwarded to a following access of the same
// segment whose read was issued in that same cycle.
//
// Frame initialisation follows the source scheme: with init_mode high the two
// full-screen background triangles are walked, and every segment they reach
// gets Address Memory word segment*32 (its first block); NEXT_BLOCK restarts
// at SEG_MAX*32, after the first blocks of all segments. Nothing is written to
// external memory in that mode (a design choice: the source only says the
// background triangles set the words). init_mode must not change while
// segments are in flight.
//
// External write port: ext_valid/ext_ready, word address and 32-bit data.
module address_generator
  import seg_pkg::*;
#(
  parameter int unsigned SEG_MAX = 1024,  // Address Memory words (segments)
  parameter int unsigned EXT_AW  = 24     // external word address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  segc_t             cfg_ncols,    // segment columns on screen
  input  logic              init_mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  seg_hit_t          in,
  output logic              ext_valid,
  input  logic              ext_ready,
  output logic [EXT_AW-1:0] ext_addr,
  output logic [PTR_W-1:0]  ext_data,
  output logic              new_block,    // pulses when a block is chained
  output logic              busy          // an access is in progress
);
  localparam int unsigned SW_ = $clog2(SEG_MAX);
  localparam logic [4:0]  COMP_VALUE = 5'd31;
  localparam logic [EXT_AW-1:0] BLOCK_BASE = EXT_AW'(SEG_MAX * 32);

  typedef logic [EXT_AW-1:0] eaddr_t;
  typedef logic [SW_-1:0]    segn_t;

  eaddr_t amem [SEG_MAX];     // Address Memory
  eaddr_t amem_q;             // AMEM_OUT
  eaddr_t next_block;

  // Stage W (the access in progress)
  logic   w_valid, w_init, w_phase;
  segn_t  w_seg;
  ptr_t   w_ptr;
  // last Address Memory write, for forwarding
  logic   lw_valid;
  segn_t  lw_seg;
  eaddr_t lw_val;

  segn_t  seg_num;
  eaddr_t cur;
  logic   last_word, w_done, amem_we;
  eaddr_t amem_wd;

  always_comb begin
    seg_num   = segn_t'(in.sy * cfg_ncols + SW_'(in.sx));
    cur       = (lw_valid && lw_seg == w_seg) ? lw_val : amem_q;
    last_word = (cur[4:0] == COMP_VALUE);

    ext_valid = w_valid && !w_init;
    ext_addr  = cur;
    ext_data  = w_ptr;
    if (last_word) begin
      ext_addr = w_phase ? cur : next_block;
      ext_data = w_phase ? PTR_W'(next_block) : w_ptr;
    end

    w_done  = w_valid && (w_init || (ext_ready && (!last_word || w_phase)));
    amem_we = w_done;
    if (w_init)         amem_wd = eaddr_t'(w_seg) << 5;
    else if (last_word) amem_wd = next_block + 1'b1;
    else                amem_wd = cur + 1'b1;
  end

  assign in_ready  = !w_valid || w_done;
  assign busy      = w_valid;
  assign new_block = w_done && !w_init && last_word;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) amem_q <= amem[seg_num];
    if (amem_we) amem[w_seg] <= amem_wd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid    <= 1'b0;
      w_init     <= 1'b0;
      w_phase    <= 1'b0;
      w_seg      <= '0;
      w_ptr      <= '0;
      lw_valid   <= 1'b0;
      lw_seg     <= '0;
      lw_val     <= '0;
      next_block <= BLOCK_BASE;
    end else begin
      if (amem_we) begin
        lw_valid <= 1'b1;
        lw_seg   <= w_seg;
        lw_val   <= amem_wd;
      end
      if (w_valid && !w_init && last_word && !w_phase && ext_ready)
        w_phase <= 1'b1;
      if (new_block) next_block <= next_block + EXT_AW'(32);
      if (w_done && w_init) next_block <= BLOCK_BASE;
      if (in_valid && in_ready) begin
        w_valid <= 1'b1;
        w_init  <= init_mode;
        w_phase <= 1'b0;
        w_seg   <= seg_num;
        w_ptr   <= in.ptr;
      end else if (w_done) begin
        w_valid <= 1'b0;
      end
    end
  end

  a_ext_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               ext_valid && !ext_ready |=> ext_valid && $stable(ext_addr));
endmodule
