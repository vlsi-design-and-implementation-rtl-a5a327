// stq_node_monitor: coverage monitor bound into every stq_node by the
// end-to-end testbench. Each clock it adds the node's five update conditions
// (insert into empty node, park-and-forward, node emptying, refill from B,
// refill from a child) to counters that live in tb_systolic_tree_queue, so
// the testbench can require that each mechanism occurred. It only observes.
module stq_node_monitor (
  input logic clk,
  input logic rst,
  input logic c_ins_empty,
  input logic c_ins_full,
  input logic c_go_empty,
  input logic c_take_b,
  input logic c_take_child
);
  always @(posedge clk) begin
    if (!rst) begin
      tb_systolic_tree_queue.n_ins_empty += int'(c_ins_empty);
      tb_systolic_tree_queue.n_ins_full  += int'(c_ins_full);
      tb_systolic_tree_queue.n_go_empty  += int'(c_go_empty);
      tb_systolic_tree_queue.n_take_b    += int'(c_take_b);
      tb_systolic_tree_queue.n_take_ch   += int'(c_take_child);
    end
  end
endmodule
