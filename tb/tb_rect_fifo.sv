// tb_rect_fifo: random pushes and pops of face rectangles against a
// queue model, including pushes while full (must be dropped and full must
// be high), pops while empty, simultaneous push and pop, and the
// first-word fall-through output.
module tb_rect_fifo;
  import fd_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  face_rect_t din = '0, dout;
  face_rect_t model [$];
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  rect_fifo #(.DEPTH(D), .T(face_rect_t)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // outputs reflect the model before this cycle's operations
      checks++;
      if (full != (model.size() == D) || empty != (model.size() == 0) ||
          (model.size() != 0 && dout != model[0])) begin
        failures++;
        $display("cycle %0d: full %0d empty %0d size %0d", t, full, empty, model.size());
      end
      push = ($urandom % 100) < ((t / 500) % 2 == 1 ? 70 : 35);
      pop  = ($urandom % 100) < ((t / 500) % 2 == 1 ? 35 : 70);
      din  = face_rect_t'($urandom);
      if (push && full) n_full++;
      if (push && pop && !full && !empty) n_both++;
      @(posedge clk);
      #1;
    end
    for (int t = 0; t < 1; t++) ;
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("coverage: full pushes %0d, push+pop %0d", n_full, n_both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge, from the values the DUT samples
  always @(posedge clk) if (rst_n) begin
    automatic bit was_full = (model.size() == D), was_empty = (model.size() == 0);
    automatic face_rect_t d = din;
    if (pop && !was_empty) void'(model.pop_front());
    if (push && !was_full) model.push_back(d);
  end
endmodule
