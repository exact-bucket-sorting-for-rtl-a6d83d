// segmenting_unit: exact bucket sorting of triangles into screen segments.
//
// Vertices of transformed, clipped triangles (three consecutive vertices per
// triangle) enter a FIFO. The input pipeline turns each triangle into a setup
// record (edge deltas and edge-function values at the first segment); the
// segment generator walks exactly the segments the triangle overlaps, one per
// clock; the address generator appends the triangle's pointer to the list of
// every such segment in external memory, in chained 32-word blocks.
//
//   vin -> vertex_fifo -> input_pipeline -> segment_generator
//                                         -> address_generator -> ext write
//
// Configuration (hold stable while triangles are in flight): segment width
// and height as log2 values (the smallest segment is 32 x 16), the number of
// segment columns on screen, and init_mode, under which the two full-screen
// background triangles that start a frame initialise the Address Memory.
// frame_start restarts triangle numbering; the pointer written for a triangle
// is its index in the vertex stream since the last frame_start.
// Every stage uses valid/ready; ext_ready low stalls the whole unit.
module segmenting_unit
  import seg_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned SEG_MAX    = 1024,
  parameter int unsigned EXT_AW     = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        cfg_wl,
  input  logic [2:0]        cfg_hl,
  input  segc_t             cfg_ncols,
  input  logic              init_mode,
  input  logic              frame_start,
  input  logic              vin_valid,
  output logic              vin_ready,
  input  vertex_t           vin,
  output logic              ext_valid,
  input  logic              ext_ready,
  output logic [EXT_AW-1:0] ext_addr,
  output logic [PTR_W-1:0]  ext_data,
  output logic              busy,         // something is in flight
  // events, for performance counters
  output step_e             ev_step,      // step of the segment generator
  output logic              ev_drop,      // zero-area triangle discarded
  output logic              ev_new_block  // a new 32-word block was chained
);
  logic       f_valid, f_ready;
  vertex_t    f_data;
  logic [$clog2(FIFO_DEPTH):0] f_level;

  logic       t_valid, t_ready, t_drop, ip_busy, ag_busy;
  tri_setup_t t_data;

  logic       h_valid, h_ready;
  seg_hit_t   h_data;
  step_e      step;
  logic       new_block;

  vertex_fifo #(.WIDTH($bits(vertex_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (vin_valid), .in_ready(vin_ready), .in_data(vin),
    .out_valid(f_valid),   .out_ready(f_ready),  .out_data(f_data),
    .level    (f_level)
  );

  input_pipeline u_inpipe (
    .clk, .rst_n, .cfg_wl, .cfg_hl, .frame_start,
    .vin_valid(f_valid), .vin_ready(f_ready), .vin(f_data),
    .out_valid(t_valid), .out_ready(t_ready), .out(t_data),
    .drop     (t_drop),  .busy(ip_busy)
  );

  segment_generator u_seggen (
    .clk, .rst_n,
    .in_valid (t_valid), .in_ready (t_ready), .in (t_data),
    .out_valid(h_valid), .out_ready(h_ready), .out(h_data),
    .step     (step)
  );

  address_generator #(.SEG_MAX(SEG_MAX), .EXT_AW(EXT_AW)) u_addrgen (
    .clk, .rst_n, .cfg_ncols, .init_mode,
    .in_valid (h_valid), .in_ready(h_ready), .in(h_data),
    .ext_valid, .ext_ready, .ext_addr, .ext_data,
    .new_block(new_block), .busy(ag_busy)
  );

  assign busy         = (f_level != '0) || ip_busy || h_valid || ag_busy;
  assign ev_step      = step;
  assign ev_drop      = t_drop;
  assign ev_new_block = new_block;
endmodule
