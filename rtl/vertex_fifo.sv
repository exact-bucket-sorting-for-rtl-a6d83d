// vertex_fifo: synchronous FIFO that decouples the transform stage from the
// input pipeline of the segmenting unit (synchronisation and load balancing).
//
// A circular buffer of DEPTH words with read and write pointers one bit wider
// than the index, so full and empty are told apart by the extra bit. Both
// sides use a valid/ready handshake: a word is written in a cycle where
// in_valid && in_ready, and leaves in a cycle where out_valid && out_ready.
// The head word is presented combinationally from the array (first-word
// fall-through), so a word written in cycle t can be read in cycle t+1.
// The depth is this design's choice; only the existence of the FIFO is given.
module vertex_fifo #(
  parameter int unsigned WIDTH = 22,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [IW:0] wp, rp;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  assign level     = wp - rp;
  assign in_ready  = (level != (IW+1)'(DEPTH));
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[IW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[IW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  // The source must hold a word until it is taken.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid && !in_ready |=> in_valid);
endmodule
