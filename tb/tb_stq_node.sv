// tb_stq_node: directed test of a single queue node.
//
// The testbench plays both the parent (insert/delete/data) and the two
// children (their S and LS). It checks:
//   * the single-node insert sequence 11, 22, 33, 44, 55, 66: 11 stays in S,
//     every later item passes through B and is offered on the left, right,
//     left, ... child bus in the clock after it arrives, with the other bus
//     and command at zero;
//   * a delete outputs S on topd in the same clock and refills S from the
//     child selected by CD (left first), sending that child a delete one
//     clock later, the next delete reading the other child;
//   * a delete with the selected child empty and an item in flight in B takes
//     the item back from B and suppresses its forward;
//   * a delete with the selected child empty and nothing in flight empties
//     the node, and a later insert restarts the alternation on the left;
//   * a delete applied to an empty node changes nothing.
module tb_stq_node;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst;
  logic ins_i, del_i;
  logic [W-1:0] topi_i, s_o, topd_o, topi_l_o, topi_r_o, s_l_i, s_r_i;
  logic ls_o, ins_l_o, del_l_o, ins_r_o, del_r_o, ls_l_i, ls_r_i;

  stq_node #(.WIDTH(W)) dut (.*);

  always #5 clk = !clk;

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
    if (cycles > 2000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Apply an instruction for one clock; returns after the edge.
  task automatic tick(bit i, bit d, logic [W-1:0] v);
    ins_i = i; del_i = d; topi_i = v;
    @(posedge clk);
    #1;
    ins_i = 1'b0; del_i = 1'b0; topi_i = '0;
    #1;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    ins_i = 1'b0; del_i = 1'b0; topi_i = '0;
    ls_l_i = 1'b0; ls_r_i = 1'b0; s_l_i = '0; s_r_i = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
  endtask

  localparam logic [W-1:0] SEQ [6] = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66};

  initial begin
    // ---- insert sequence ---------------------------------------------------
    do_reset();
    check(!ls_o && !ins_l_o && !ins_r_o, "empty after reset");
    tick(1'b1, 1'b0, SEQ[0]);
    check(ls_o && s_o == 8'h11, "first item stored in S");
    check(!ins_l_o && !ins_r_o && topi_l_o == '0 && topi_r_o == '0, "nothing forwarded");
    for (int k = 1; k < 6; k++) begin
      tick(1'b1, 1'b0, SEQ[k]);
      check(s_o == 8'h11, "S keeps the first item");
      if (k % 2 == 1) begin
        check(ins_l_o && !ins_r_o, $sformatf("item %h goes left", SEQ[k]));
        check(topi_l_o == SEQ[k] && topi_r_o == '0, "left bus carries B");
      end else begin
        check(ins_r_o && !ins_l_o, $sformatf("item %h goes right", SEQ[k]));
        check(topi_r_o == SEQ[k] && topi_l_o == '0, "right bus carries B");
      end
    end
    tick(1'b0, 1'b0, '0);
    check(!ins_l_o && !ins_r_o, "forward lasts one clock");

    // ---- refill from the children (left first, then right) -----------------
    // Children hold 22 (left) and 33 (right).
    ls_l_i = 1'b1; s_l_i = 8'h22; ls_r_i = 1'b1; s_r_i = 8'h33;
    ins_i = 1'b0; del_i = 1'b1; #1;
    check(topd_o == 8'h11, "delete shows S on topd in the same clock");
    tick(1'b0, 1'b1, '0);
    check(s_o == 8'h22 && ls_o, "S refilled from left child");
    check(del_l_o && !del_r_o, "delete passed to the left child");
    check(topd_o == '0, "topd zero without delete");
    // Left child has now consumed its item: show it empty.
    ls_l_i = 1'b0; s_l_i = 8'hAA;
    tick(1'b0, 1'b1, '0);
    check(s_o == 8'h33 && ls_o, "S refilled from right child");
    check(del_r_o && !del_l_o, "delete passed to the right child");
    ls_r_i = 1'b0; s_r_i = 8'hBB;
    tick(1'b0, 1'b0, '0);
    check(!del_l_o && !del_r_o, "delete command lasts one clock");

    // ---- selected child empty, nothing in flight: node empties --------------
    tick(1'b0, 1'b1, '0);
    check(!ls_o, "node empties");
    check(!del_l_o && !del_r_o, "no delete sent to empty children");
    // Delete of an empty node changes nothing.
    tick(1'b0, 1'b1, '0);
    check(!ls_o && !del_l_o && !del_r_o, "delete of empty node ignored");

    // ---- alternation restarts left after the node was empty ----------------
    tick(1'b1, 1'b0, 8'h01);
    check(ls_o && s_o == 8'h01, "insert into empty node");
    tick(1'b1, 1'b0, 8'h02);
    check(ins_l_o && topi_l_o == 8'h02, "first forward after restart goes left");

    // ---- refill from the in-flight B register -------------------------------
    // 02 is being forwarded to the (empty) left child during this clock.
    del_i = 1'b1; #1;
    check(topd_o == 8'h01, "delete output while B in flight");
    check(!ins_l_o && !ins_r_o, "forward of B suppressed when B is taken back");
    tick(1'b0, 1'b1, '0);
    check(ls_o && s_o == 8'h02, "S refilled from B");
    check(!del_l_o && !del_r_o, "no delete sent when refilled from B");
    // Alternation: CI and CD both moved to the right.
    tick(1'b1, 1'b0, 8'h03);
    check(ins_r_o && topi_r_o == 8'h03, "next forward goes right");
    ls_r_i = 1'b1; s_r_i = 8'h03;
    tick(1'b0, 1'b1, '0);
    check(s_o == 8'h03 && del_r_o, "next refill reads the right child");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
