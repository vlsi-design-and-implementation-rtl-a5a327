// stq_queue_checker: drives one systolic_tree_queue of a given depth with
// random traffic and compares it with a FIFO model (testbench helper).
//
// After start rises it runs BLOCKS bursts of random instructions. Each burst
// has its own insert/delete bias, so the queue swings between full and empty.
// Every clock it checks full/empty/count, the accept signals and, on a
// delete, the item on dout (same clock). After each burst it idles LEVELS
// clocks and compares the number of occupied nodes with the model. It counts
// how often the queue was full, empty, refused an insert and refused a
// delete, and counts a failure for any of these that never happened. done
// rises at the end, with the totals in checks / failures.
module stq_queue_checker #(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned BLOCKS = 200
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned N  = stq_pkg::node_count(LEVELS);
  localparam int unsigned CW = $clog2(N + 1);

  logic rst, ins, del;
  logic [WIDTH-1:0] din, dout;
  logic dout_valid, ins_ok, del_ok, ovf, udf, full, empty;
  logic [CW-1:0] count;
  logic [WIDTH-1:0] node_s  [1:N];
  logic             node_ls [1:N];

  systolic_tree_queue #(.WIDTH(WIDTH), .LEVELS(LEVELS)) dut (.*);

  logic [WIDTH-1:0] model [$];
  int ev_full = 0, ev_empty = 0, ev_ovf = 0, ev_udf = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL L=%0d t=%0t: %s", LEVELS, $time, what);
    end
  endtask

  task automatic step(bit i, bit d, logic [WIDTH-1:0] v);
    bit exp_del, exp_ins;
    ins = i; del = d; din = v;
    #1;
    exp_del = d && model.size() != 0;
    exp_ins = i && !d && model.size() < N;
    check(full == (model.size() == N) && empty == (model.size() == 0), "full/empty");
    check(count == CW'(model.size()), "count");
    check(ins_ok == exp_ins && del_ok == exp_del && dout_valid == exp_del, "accepts");
    if (full)  ev_full++;
    if (empty) ev_empty++;
    if (ovf)   ev_ovf++;
    if (udf)   ev_udf++;
    if (exp_del) begin
      check(dout == model[0], $sformatf("dout %0h expected %0h", dout, model[0]));
      void'(model.pop_front());
    end
    if (exp_ins) model.push_back(v);
    @(posedge clk);
    #1;
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    rst = 1'b1; ins = 1'b0; del = 1'b0; din = '0;
    wait (start);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int blk = 0; blk < BLOCKS; blk++) begin
      int bias, occ;
      bias = (blk % 2 == 0) ? $urandom_range(55, 90) : $urandom_range(10, 45);
      repeat ($urandom_range(N, 3 * N)) begin
        int r;
        r = $urandom_range(0, 99);
        step(r < bias, r >= bias && r < bias + 40, WIDTH'($urandom));
      end
      repeat (LEVELS) step(1'b0, 1'b0, '0);
      occ = 0;
      for (int n = 1; n <= N; n++) occ += int'(node_ls[n]);
      check(occ == model.size(), $sformatf("occupancy %0d expected %0d", occ, model.size()));
    end
    while (model.size() != 0) step(1'b0, 1'b1, '0);
    check(ev_full > 0,  "queue never full");
    check(ev_empty > 0, "queue never empty");
    check(ev_ovf > 0,   "insert never refused");
    check(ev_udf > 0,   "delete never refused");
    $display("L=%0d N=%0d: full=%0d empty=%0d ovf=%0d udf=%0d", LEVELS, N, ev_full, ev_empty, ev_ovf, ev_udf);
    done = 1'b1;
  end
endmodule
