// stq_tree: a complete binary tree of stq_node cells forming the queue.
//
// 2**LEVELS-1 identical nodes are wired in heap order: node 1 is the root and
// the front of the queue, node i drives its left child 2*i and right child
// 2*i+1 (insert command and B data down, delete command down) and reads their
// S register and LS flag back. The children inputs of the leaves are tied to
// "empty". Only the root talks to the outside: an insert or delete applied
// here takes effect on the next rising edge, and on a delete topd carries the
// item being removed during the same clock (zero otherwise). Inserts ripple
// one level per clock towards the leaves, refills one level per clock, so the
// tree accepts one instruction every clock whatever its depth.
//
// The tree does not count its items: an insert into a tree that already holds
// 2**LEVELS-1 items is lost in a leaf's B register, and a delete of an empty
// tree does nothing. systolic_tree_queue adds the occupancy check.
//
// node_s / node_ls expose every node's S and LS (index = heap number) for
// observation. Identical nodes, the root as the only external port, and the
// 4-level, 15-node default follow the reference design; the heap numbering,
// the observation ports and tying the leaves' child inputs to "empty" are
// choices of this implementation. How the nodes are placed on a chip (a 4 x 4
// tile array with one spare tile) has no counterpart here.
module stq_tree #(
  parameter int unsigned WIDTH  = stq_pkg::DEFAULT_WIDTH,
  parameter int unsigned LEVELS = stq_pkg::DEFAULT_LEVELS,
  localparam int unsigned N     = stq_pkg::node_count(LEVELS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ins,
  input  logic             del,
  input  logic [WIDTH-1:0] topi,
  output logic [WIDTH-1:0] topd,
  output logic             root_ls,
  output logic [WIDTH-1:0] node_s  [1:N],
  output logic             node_ls [1:N]
);

  // Per-node link signals, indexed by heap number. Entry i is what node i
  // receives from its parent (ins_a, del_a, topi_a) and what it shows its
  // parent (s_a, ls_a).
  logic             ins_a  [1:N];
  logic             del_a  [1:N];
  logic [WIDTH-1:0] topi_a [1:N];
  logic [WIDTH-1:0] s_a    [1:N];
  logic             ls_a   [1:N];
  logic [WIDTH-1:0] topd_a [1:N];

  assign ins_a[1]  = ins;
  assign del_a[1]  = del;
  assign topi_a[1] = topi;
  assign topd      = topd_a[1];
  assign root_ls   = ls_a[1];

  for (genvar i = 1; i <= N; i++) begin : g_node
    assign node_s[i]  = s_a[i];
    assign node_ls[i] = ls_a[i];

    if (!stq_pkg::is_leaf(i, LEVELS)) begin : g_inner
      localparam int unsigned L = stq_pkg::left_child(i);
      localparam int unsigned R = stq_pkg::right_child(i);
      stq_node #(.WIDTH(WIDTH)) u_node (
        .clk      (clk),
        .rst      (rst),
        .ins_i    (ins_a[i]),
        .del_i    (del_a[i]),
        .topi_i   (topi_a[i]),
        .s_o      (s_a[i]),
        .ls_o     (ls_a[i]),
        .topd_o   (topd_a[i]),
        .ins_l_o  (ins_a[L]),
        .topi_l_o (topi_a[L]),
        .del_l_o  (del_a[L]),
        .s_l_i    (s_a[L]),
        .ls_l_i   (ls_a[L]),
        .ins_r_o  (ins_a[R]),
        .topi_r_o (topi_a[R]),
        .del_r_o  (del_a[R]),
        .s_r_i    (s_a[R]),
        .ls_r_i   (ls_a[R])
      );
    end else begin : g_leaf
      // A leaf's child ports lead nowhere: children read as empty, and the
      // commands a leaf would send down are left unconnected.
      stq_node #(.WIDTH(WIDTH)) u_node (
        .clk      (clk),
        .rst      (rst),
        .ins_i    (ins_a[i]),
        .del_i    (del_a[i]),
        .topi_i   (topi_a[i]),
        .s_o      (s_a[i]),
        .ls_o     (ls_a[i]),
        .topd_o   (topd_a[i]),
        .ins_l_o  (),
        .topi_l_o (),
        .del_l_o  (),
        .s_l_i    ('0),
        .ls_l_i   (1'b0),
        .ins_r_o  (),
        .topi_r_o (),
        .del_r_o  (),
        .s_r_i    ('0),
        .ls_r_i   (1'b0)
      );
    end
  end

endmodule
