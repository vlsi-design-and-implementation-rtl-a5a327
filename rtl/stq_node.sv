// stq_node: one processing element of the systolic tree queue.
//
// Every node of the tree is this same cell. It stores one queue item in its
// data register S (flag LS = S holds an item). An insert that finds S empty
// stores the item in S and clears both direction flags CI and CD. An insert
// that finds S full parks the item in the forwarding register B (flag LB) and
// sets IL or IR according to CI, then toggles CI; on the next cycle B is
// offered to that child, so successive items are sent left, right, left, ...
// A delete hands S to the parent (the parent reads it directly from s_o) and
// refills S:
//   * from the child selected by CD, which then receives a delete one cycle
//     later (flags DL / DR), CD toggling so reads also alternate left/right;
//   * from B if the selected child is empty but an item is in flight in B
//     (the forward of that item to the child is then cancelled);
//   * not at all if the selected child is empty and nothing is in flight:
//     the node becomes empty (LS cleared).
// Because inserts and deletes visit the children in the same alternating
// order, S always holds the oldest item of the subtree, which makes the tree a
// FIFO. Each node handles one instruction per clock (unit response time, unit
// pipeline interval); instructions travel one level per clock.
//
// Interface (names follow the node's block diagram):
//   ins_i / del_i / topi_i  instruction and insert data from the parent (INS1,
//                           DEL1, TOPI1); at most one of ins_i / del_i per clock
//   s_o, ls_o               S and LS, read combinationally by the parent
//   topd_o                  S gated by del_i (TOPD1); at the root this is the
//                           queue output bus, zero when no delete is applied
//   ins_l_o / ins_r_o       insert to left / right child (OIL1 / OIR1)
//   topi_l_o / topi_r_o     B gated by IL / IR (TOPI2 / TOPI3)
//   del_l_o / del_r_o       delete to left / right child (ODL1 / ODR1)
//   s_l_i, ls_l_i, s_r_i, ls_r_i   S and LS of the children (TOPD2/3, LSL/LSR)
// All state changes on the rising clock edge; rst is synchronous, active high,
// and empties the node.
//
// Following the reference behavioural model: the register set, the five
// update conditions and their left-before-right alternation (CI = 0 and
// CD = 0 select the left child). Design choices of this implementation: the
// "children empty" test looks only at the child selected by CD (with back-to-
// back deletes the other child's LS can lag one clock behind, and by the
// alternation the selected child is empty only when both are); LB marks an
// item in flight and lasts one clock; the forward of an item taken back from
// B is suppressed so the item is not stored twice.
module stq_node #(
  parameter int unsigned WIDTH = stq_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  // from / to the parent
  input  logic             ins_i,
  input  logic             del_i,
  input  logic [WIDTH-1:0] topi_i,
  output logic [WIDTH-1:0] s_o,
  output logic             ls_o,
  output logic [WIDTH-1:0] topd_o,
  // to / from the left child
  output logic             ins_l_o,
  output logic [WIDTH-1:0] topi_l_o,
  output logic             del_l_o,
  input  logic [WIDTH-1:0] s_l_i,
  input  logic             ls_l_i,
  // to / from the right child
  output logic             ins_r_o,
  output logic [WIDTH-1:0] topi_r_o,
  output logic             del_r_o,
  input  logic [WIDTH-1:0] s_r_i,
  input  logic             ls_r_i
);

  // Registers of the node.
  logic [WIDTH-1:0] s_q, b_q;
  logic ls_q, lb_q, ci_q, cd_q;
  logic il_q, ir_q, dl_q, dr_q;

  // Child selected for the next read.
  logic             sel_ls;
  logic [WIDTH-1:0] sel_s;

  // The five update conditions.
  logic c_ins_empty;   // insert into an empty node            (condition 1)
  logic c_ins_full;    // insert into a full node, park in B   (condition 2)
  logic c_del;         // delete applied to a full node
  logic c_go_empty;    // delete, nothing left below            (condition 3)
  logic c_take_b;      // delete, refill from the item in B     (condition 4)
  logic c_take_child;  // delete, refill from the selected child (condition 5)

  always_comb begin
    sel_ls       = cd_q ? ls_r_i : ls_l_i;
    sel_s        = cd_q ? s_r_i  : s_l_i;
    c_ins_empty  = ins_i && !ls_q;
    c_ins_full   = ins_i &&  ls_q;
    c_del        = del_i &&  ls_q;
    c_go_empty   = c_del && !sel_ls && !lb_q;
    c_take_b     = c_del && !sel_ls &&  lb_q;
    c_take_child = c_del &&  sel_ls;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q  <= '0;
      b_q  <= '0;
      ls_q <= 1'b0;
      lb_q <= 1'b0;
      ci_q <= 1'b0;
      cd_q <= 1'b0;
      il_q <= 1'b0;
      ir_q <= 1'b0;
      dl_q <= 1'b0;
      dr_q <= 1'b0;
    end else begin
      // Commands for the children, valid during the next clock.
      il_q <= c_ins_full && !ci_q;
      ir_q <= c_ins_full &&  ci_q;
      lb_q <= c_ins_full;
      dl_q <= c_take_child && !cd_q;
      dr_q <= c_take_child &&  cd_q;

      if (c_ins_empty) begin
        s_q  <= topi_i;
        ls_q <= 1'b1;
        ci_q <= 1'b0;
        cd_q <= 1'b0;
      end
      if (c_ins_full) begin
        b_q  <= topi_i;
        ci_q <= !ci_q;
      end
      if (c_go_empty) begin
        ls_q <= 1'b0;
      end
      if (c_take_b) begin
        s_q  <= b_q;
        cd_q <= !cd_q;
      end
      if (c_take_child) begin
        s_q  <= sel_s;
        cd_q <= !cd_q;
      end
    end
  end

  // Towards the parent.
  assign s_o    = s_q;
  assign ls_o   = ls_q;
  assign topd_o = del_i ? s_q : '0;

  // Towards the children. An item taken back into S from B is not forwarded.
  assign ins_l_o  = il_q && !c_take_b;
  assign ins_r_o  = ir_q && !c_take_b;
  assign topi_l_o = il_q ? b_q : '0;
  assign topi_r_o = ir_q ? b_q : '0;
  assign del_l_o  = dl_q;
  assign del_r_o  = dr_q;

  // Handshake rules: one instruction per clock.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(ins_i && del_i))
        else $error("stq_node: insert and delete in the same clock");
    end
  end

endmodule
