// tb_systolic_tree_queue: end-to-end test of the queue at its default size
// (15 nodes, 8-bit items), checked against a behavioural FIFO model.
//
// Phase 1 inserts items 1..15 on consecutive clocks into the empty queue, lets
// them settle and compares every node's data register with the expected
// placement of the 15-node tree (items alternate left/right at each node, so
// the root holds 1, its children 2 and 3, the next level 4 6 5 7 and the
// leaves 8 12 10 14 9 13 11 15). A 16th insert must be refused. Phase 2
// deletes all 15 on consecutive clocks, which must come out in order, one per
// clock, and a further delete must be refused. Phase 3 runs random
// instruction mixes (insert-heavy, delete-heavy, balanced) and compares every
// output with a SystemVerilog queue. Each node mechanism (insert into empty
// node, park-and-forward, refill from child, refill from the in-flight B
// register, node emptying) and each queue-level event (full, empty, refused
// insert, refused delete, insert+delete request, delete right after insert)
// is counted and must occur at least once; the node mechanisms are counted
// by stq_node_monitor, bound into every node.
module tb_systolic_tree_queue;
  import stq_pkg::*;

  localparam int unsigned WIDTH  = DEFAULT_WIDTH;
  localparam int unsigned LEVELS = DEFAULT_LEVELS;
  localparam int unsigned N      = node_count(LEVELS);
  localparam int unsigned CW     = $clog2(N + 1);

  logic clk = 1'b0;
  logic rst;
  logic ins, del;
  logic [WIDTH-1:0] din, dout;
  logic dout_valid, ins_ok, del_ok, ovf, udf, full, empty;
  logic [CW-1:0] count;
  logic [WIDTH-1:0] node_s  [1:N];
  logic             node_ls [1:N];

  systolic_tree_queue dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Watchdog.
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---- mechanism counters, summed over all nodes --------------------------
  // Incremented by the stq_node_monitor bound into every node.
  int n_ins_empty = 0, n_ins_full = 0, n_go_empty = 0, n_take_b = 0, n_take_ch = 0;

  bind stq_node stq_node_monitor u_mon (
    .clk, .rst, .c_ins_empty, .c_ins_full, .c_go_empty, .c_take_b, .c_take_child
  );

  // ---- reference model and queue-level event counters ----------------------
  logic [WIDTH-1:0] model [$];
  int ev_full = 0, ev_empty = 0, ev_ovf = 0, ev_udf = 0, ev_both = 0;
  int ev_del_after_ins = 0;
  bit last_was_ins = 1'b0;

  // Drive one clock of instructions; check outputs against the model just
  // before the rising edge, then update the model.
  task automatic step(bit i, bit d, logic [WIDTH-1:0] v);
    bit exp_ins_ok, exp_del_ok;
    ins = i; del = d; din = v;
    #1;
    exp_del_ok = d && (model.size() != 0);
    exp_ins_ok = i && !d && (model.size() < N);
    check(full  == (model.size() == N), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    check(count == CW'(model.size()),   "count");
    check(del_ok == exp_del_ok, "del_ok");
    check(ins_ok == exp_ins_ok, "ins_ok");
    check(dout_valid == exp_del_ok, "dout_valid");
    if (full)  ev_full++;
    if (empty) ev_empty++;
    if (ovf)   ev_ovf++;
    if (udf)   ev_udf++;
    if (i && d) ev_both++;
    if (exp_del_ok) begin
      check(dout == model[0],
            $sformatf("dout %0d expected %0d", dout, model[0]));
      if (last_was_ins && model.size() == 1) ev_del_after_ins++;
      void'(model.pop_front());
    end else begin
      check(dout == '0, "dout zero when nothing is deleted");
    end
    if (exp_ins_ok) model.push_back(v);
    last_was_ins = exp_ins_ok;
    @(posedge clk);
    #1;
  endtask

  // Expected placement of items 1..15 after 15 inserts, by heap node number.
  localparam int PLACE [1:15] = '{1, 2, 3, 4, 6, 5, 7, 8, 12, 10, 14, 9, 13, 11, 15};

  initial begin
    int mode;
    rst = 1'b1; ins = 1'b0; del = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Phase 1: 15 consecutive inserts, one per clock.
    for (int k = 1; k <= 15; k++) begin
      step(1'b1, 1'b0, WIDTH'(k));
    end
    check(full, "full after 15 inserts");
    step(1'b1, 1'b0, 8'hEE);      // refused: full
    step(1'b0, 1'b0, '0);
    step(1'b0, 1'b0, '0);
    step(1'b0, 1'b0, '0);
    for (int n = 1; n <= 15; n++) begin
      check(node_ls[n], $sformatf("node %0d occupied", n));
      check(int'(node_s[n]) == PLACE[n],
            $sformatf("node %0d holds %0d expected %0d", n, node_s[n], PLACE[n]));
    end

    // Phase 2: 15 consecutive deletes, one item out per clock, FIFO order.
    for (int k = 1; k <= 15; k++) begin
      step(1'b0, 1'b1, '0);
    end
    check(empty, "empty after 15 deletes");
    step(1'b0, 1'b1, '0);         // refused: empty

    // Phase 3: random mixes.
    for (int blk = 0; blk < 400; blk++) begin
      mode = $urandom_range(0, 2);
      repeat ($urandom_range(5, 40)) begin
        int r;
        bit i, d;
        r = $urandom_range(0, 99);
        case (mode)
          0: begin i = r < 70; d = r >= 60 && r < 80; end
          1: begin i = r < 25; d = r >= 20 && r < 90; end
          default: begin i = r < 45; d = r >= 40 && r < 85; end
        endcase
        step(i, d, WIDTH'($urandom));
      end
      // Occasionally settle and compare the tree's occupancy with the count.
      if (blk % 10 == 0) begin
        int occ;
        occ = 0;
        repeat (LEVELS) step(1'b0, 1'b0, '0);
        for (int n = 1; n <= N; n++) occ += int'(node_ls[n]);
        check(occ == model.size(), $sformatf("settled occupancy %0d expected %0d", occ, model.size()));
      end
    end
    // Drain.
    while (model.size() != 0) step(1'b0, 1'b1, '0);

    // Every mechanism must have happened.
    check(n_ins_empty > 0, "insert into empty node never happened");
    check(n_ins_full  > 0, "park-and-forward never happened");
    check(n_take_ch   > 0, "refill from child never happened");
    check(n_take_b    > 0, "refill from B never happened");
    check(n_go_empty  > 0, "node emptying never happened");
    check(ev_full > 0,  "queue never full");
    check(ev_empty > 0, "queue never empty");
    check(ev_ovf > 0,   "insert never refused");
    check(ev_udf > 0,   "delete never refused");
    check(ev_both > 0,  "insert+delete request never happened");
    check(ev_del_after_ins > 0, "delete right after insert never happened");
    $display("mechanisms: ins_empty=%0d ins_full=%0d take_child=%0d take_b=%0d go_empty=%0d",
             n_ins_empty, n_ins_full, n_take_ch, n_take_b,
             n_go_empty);
    $display("events: full=%0d empty=%0d ovf=%0d udf=%0d both=%0d del_after_ins=%0d cycles=%0d",
             ev_full, ev_empty, ev_ovf, ev_udf, ev_both, ev_del_after_ins, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
