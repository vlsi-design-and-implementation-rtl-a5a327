// tb_stq_larger_queues: the queue built as a five-level (31-node) and a
// six-level (63-node) tree, the larger configurations obtained by adding
// levels to the 15-node tree. Both run random traffic in parallel, each
// through an stq_queue_checker against its own FIFO model, filling to
// capacity and draining to empty many times.
module tb_stq_larger_queues;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic start = 1'b0;
  logic done5, done6;
  int checks5, failures5, checks6, failures6;
  int cycles = 0;

  stq_queue_checker #(.LEVELS(5)) u_l5 (
    .clk(clk), .start(start), .done(done5), .checks(checks5), .failures(failures5)
  );
  stq_queue_checker #(.LEVELS(6)) u_l6 (
    .clk(clk), .start(start), .done(done6), .checks(checks6), .failures(failures6)
  );

  always @(posedge clk) begin
    cycles++;
    if (cycles > 500000) begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks6, failures5 + failures6 + 1);
      $finish;
    end
  end

  initial begin
    #1 start = 1'b1;
    wait (done5 && done6);
    $display("TB_RESULT checks=%0d failures=%0d", checks5 + checks6, failures5 + failures6);
    $finish;
  end
endmodule
