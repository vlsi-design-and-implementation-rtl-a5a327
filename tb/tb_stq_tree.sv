// tb_stq_tree: tests of the bare node tree (no occupancy guard).
//
// Part 1, a three-node tree (LEVELS = 2): items 11, 22, 33, 44, 55 are
// inserted on consecutive clocks. The first three settle in the S registers
// of root, left and right child; 44 and 55 exceed the capacity and end up in
// the B registers of the left and right leaf, from where they go nowhere.
// Then three deletes on consecutive clocks must put 11, 22, 33 on topd, one
// per clock, after which the root is empty.
// Part 2, a six-level tree (63 nodes): random inserts and deletes, kept
// within capacity by the testbench, are compared with a FIFO model, and the
// tree's total occupancy is compared with the model after each settling
// pause. This exercises a deeper tree than the default and the one-level-per-
// clock ripple through six levels.
module tb_stq_tree;
  import stq_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned L3 = 2;
  localparam int unsigned N3 = node_count(L3);
  localparam int unsigned L6 = 6;
  localparam int unsigned N6 = node_count(L6);

  logic clk = 1'b0;
  always #5 clk = !clk;
  logic rst;

  int checks = 0, failures = 0, cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---- three-node tree ------------------------------------------------------
  logic         a_ins, a_del, a_root_ls;
  logic [W-1:0] a_topi, a_topd;
  logic [W-1:0] a_s  [1:N3];
  logic         a_ls [1:N3];

  stq_tree #(.WIDTH(W), .LEVELS(L3)) dut3 (
    .clk(clk), .rst(rst), .ins(a_ins), .del(a_del), .topi(a_topi),
    .topd(a_topd), .root_ls(a_root_ls), .node_s(a_s), .node_ls(a_ls)
  );

  // ---- six-level tree -------------------------------------------------------
  logic         b_ins, b_del, b_root_ls;
  logic [W-1:0] b_topi, b_topd;
  logic [W-1:0] b_s  [1:N6];
  logic         b_ls [1:N6];

  stq_tree #(.WIDTH(W), .LEVELS(L6)) dut6 (
    .clk(clk), .rst(rst), .ins(b_ins), .del(b_del), .topi(b_topi),
    .topd(b_topd), .root_ls(b_root_ls), .node_s(b_s), .node_ls(b_ls)
  );

  localparam logic [W-1:0] ITEMS [5] = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h55};

  logic [W-1:0] model [$];

  task automatic step6(bit i, bit d, logic [W-1:0] v);
    b_ins = i; b_del = d; b_topi = v;
    #1;
    if (d) begin
      check(b_topd == model[0], $sformatf("L6 topd %0h expected %0h", b_topd, model[0]));
      void'(model.pop_front());
    end else begin
      check(b_topd == '0, "L6 topd zero without delete");
    end
    if (i) model.push_back(v);
    @(posedge clk);
    #1;
    b_ins = 1'b0; b_del = 1'b0;
  endtask

  initial begin
    rst = 1'b1;
    a_ins = 1'b0; a_del = 1'b0; a_topi = '0;
    b_ins = 1'b0; b_del = 1'b0; b_topi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // Part 1.
    for (int k = 0; k < 5; k++) begin
      a_ins = 1'b1; a_topi = ITEMS[k];
      @(posedge clk); #1;
    end
    a_ins = 1'b0; a_topi = '0;
    repeat (2) @(posedge clk);
    #1;
    check(a_s[1] == 8'h11 && a_s[2] == 8'h22 && a_s[3] == 8'h33, "S1 S2 S3 = 11 22 33");
    check(a_ls[1] && a_ls[2] && a_ls[3], "all three nodes occupied");
    check(dut3.g_node[1].g_inner.u_node.b_q == 8'h55, "B1 = 55");
    check(dut3.g_node[2].g_leaf.u_node.b_q == 8'h44, "B2 = 44 (overflow item)");
    check(dut3.g_node[3].g_leaf.u_node.b_q == 8'h55, "B3 = 55 (overflow item)");
    for (int k = 0; k < 3; k++) begin
      a_del = 1'b1; #1;
      check(a_topd == ITEMS[k], $sformatf("delete %0d gives %0h, got %0h", k, ITEMS[k], a_topd));
      @(posedge clk); #1;
    end
    a_del = 1'b0; #1;
    check(a_topd == '0, "output bus zero after deletes");
    check(!a_root_ls, "root empty after three deletes");
    @(posedge clk); #1;
    check(!a_ls[2] && !a_ls[3], "children empty after three deletes");

    // Part 2.
    for (int blk = 0; blk < 200; blk++) begin
      int bias;
      int occ;
      bias = $urandom_range(20, 80);
      repeat ($urandom_range(10, 120)) begin
        bit i, d;
        i = 1'b0; d = 1'b0;
        if ($urandom_range(0, 99) < bias) i = model.size() < N6;
        else d = model.size() != 0;
        if ($urandom_range(0, 9) == 0) begin i = 1'b0; d = 1'b0; end
        step6(i, d, W'($urandom));
      end
      repeat (L6) step6(1'b0, 1'b0, '0);
      occ = 0;
      for (int n = 1; n <= N6; n++) occ += int'(b_ls[n]);
      check(occ == model.size(), $sformatf("L6 occupancy %0d expected %0d", occ, model.size()));
      check(b_root_ls == (model.size() != 0), "L6 root occupancy");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
