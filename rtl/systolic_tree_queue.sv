// systolic_tree_queue: a FIFO queue built as a systolic binary tree.
//
// The default is the reference configuration, a 15-node queue of 8-bit items
// (LEVELS = 4, WIDTH = 8). The storage and all data movement are in stq_tree;
// this wrapper adds what the tree lacks, an occupancy count, so that the
// queue never loses an item to an overflowing leaf and never issues a delete
// to an empty root.
//
// Interface (one instruction per clock, both synchronous to clk):
//   ins, din      insert din. Accepted (ins_ok) unless the queue is full or
//                 del is also high; the item is stored at the next rising edge.
//   del           delete the front item. Accepted (del_ok) unless the queue is
//                 empty; the item appears on dout during the same clock, with
//                 dout_valid high, and is removed at the next rising edge.
//   full, empty   occupancy flags, valid in every clock.
//   count         number of items held.
//   ovf, udf      an insert refused because the queue is full / a delete
//                 refused because it is empty (combinational, for this clock).
// Insert followed immediately by delete, or any mix of the two, runs at one
// instruction per clock; an inserted item can be deleted on the very next
// clock. rst is synchronous and active high and empties the queue.
//
// The tree structure and the node behaviour follow the reference design. The
// full/empty flags, the refusal of inserts into a full queue and of deletes
// from an empty one, and "delete wins when both are requested" are choices of
// this implementation: the reference queue simply drops items inserted
// beyond its capacity.
module systolic_tree_queue #(
  parameter int unsigned WIDTH  = stq_pkg::DEFAULT_WIDTH,
  parameter int unsigned LEVELS = stq_pkg::DEFAULT_LEVELS,
  localparam int unsigned N     = stq_pkg::node_count(LEVELS),
  localparam int unsigned CW    = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ins,
  input  logic             del,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid,
  output logic             ins_ok,
  output logic             del_ok,
  output logic             ovf,
  output logic             udf,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count,
  output logic [WIDTH-1:0] node_s  [1:N],
  output logic             node_ls [1:N]
);

  logic [CW-1:0] count_q;
  logic          root_ls;

  always_comb begin
    full   = (count_q == CW'(N));
    empty  = (count_q == '0);
    del_ok = del && !empty;
    ins_ok = ins && !del && !full;
    ovf    = ins && !del && full;
    udf    = del && empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q <= '0;
    end else if (ins_ok) begin
      count_q <= count_q + 1'b1;
    end else if (del_ok) begin
      count_q <= count_q - 1'b1;
    end
  end

  stq_tree #(.WIDTH(WIDTH), .LEVELS(LEVELS)) u_tree (
    .clk     (clk),
    .rst     (rst),
    .ins     (ins_ok),
    .del     (del_ok),
    .topi    (din),
    .topd    (dout),
    .root_ls (root_ls),
    .node_s  (node_s),
    .node_ls (node_ls)
  );

  assign dout_valid = del_ok;
  assign count      = count_q;

  // The root holds an item exactly when the queue is not empty.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (root_ls == !empty)
        else $error("systolic_tree_queue: root occupancy disagrees with count");
    end
  end

endmodule
