// tb_vertex_fifo: checks order, fullness and level of the vertex FIFO.
//
// Random writes and reads (each side active with its own probability, in
// phases that fill the FIFO and drain it) are compared with a queue model:
// every word read must be the oldest written, in_ready must be low exactly
// when DEPTH words are held, out_valid high exactly when at least one is, and
// level must equal the model's count.
module tb_vertex_fifo;
  localparam int W = 22, D = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D):0] level;

  vertex_fifo dut (.*);  // default size: 22-bit words, 16 deep

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model [$];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s (model holds %0d)", what, model.size());
    end
  endtask

  initial begin
    int pw, pr;
    bit taken = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // phases: fill, drain, balanced
      case ((cyc / 500) % 3)
        0: begin pw = 90; pr = 30; end
        1: begin pw = 30; pr = 90; end
        default: begin pw = 60; pr = 60; end
      endcase
      @(negedge clk);
      check("level", level == ($clog2(D)+1)'(model.size()));
      check("in_ready", in_ready == (model.size() < D));
      check("out_valid", out_valid == (model.size() > 0));
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      // a pending write is held until taken
      if (!(in_valid && !taken)) begin
        in_valid = ($urandom_range(99) < pw);
        in_data  = W'($urandom);
      end
      out_ready = ($urandom_range(99) < pr);
      #1;
      if (out_valid && out_ready) begin
        check("data order", model.size() > 0 && out_data == model[0]);
        if (model.size() > 0) void'(model.pop_front());
      end
      taken = in_valid && in_ready;
      if (taken) model.push_back(in_data);
    end
    check("full and empty reached", n_full > 0 && n_empty > 0);
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
