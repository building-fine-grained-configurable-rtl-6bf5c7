// rtos_tcb: one hardware task control block, a node of the linked queues.
//
// Every queue of the RTOS (the ready queue and each wait queue) is a singly
// linked list ordered by a priority key.  Each TCB stores its task's id,
// priority, state, and the id and key of the next node (next_id, next_pri).
// All TCBs see the same operation at once and decide locally, so inserting or
// removing a node takes a single clock cycle:
//
//  enqueue  - the node whose key <= PRI_IN < next_pri is the new node's
//             predecessor: it links to (ID_IN, PRI_IN) and drives its old
//             next_id/next_pri on NEXT_ID_OUT/NEXT_PRI_OUT.  The node whose
//             id equals ID_IN loads NEXT_ID_IN/NEXT_PRI_IN, the OR of all
//             nodes' outputs, i.e. its predecessor's old link.
//  dequeue  - the node being removed drives its own link on the outputs and
//             leaves the queue; the node whose next_id equals ID_IN loads
//             NEXT_ID_IN/NEXT_PRI_IN and so skips the removed node.
//
// Nodes that take no part drive zeros, so the outputs of all nodes can be
// ORed together.  These rules and the register set (id, pri, state, next_id,
// next_pri) are the design's; the end of a queue is next_id = -1 with key 31.
//
// Own choices: a queue header is the same node with HEADER=1: its id is 0,
// its key is 0 (ahead of every task) and it belongs to one fixed queue, so
// inserting at the head needs no special case.  In a FIFO queue every node
// uses key FIFO_KEY instead of its priority (FIFO_IN=1), which makes a new
// node go behind all others.  state holds the task status and the number of
// the queue the node is in (0: none), so that only nodes of the addressed
// queue react.  WE_IN with ID_IN = id writes the task status from STAT_IN.
// OP_PRICHG writes pri from PRI_IN.  Nodes leaving a queue clear their link
// to 0/0.  Everything is registered on the rising clock edge; the outputs are
// combinational from the registers and the inputs of the same cycle.
module rtos_tcb
  import rtos_pkg::*;
#(
  parameter id_t  MY_ID    = id_t'(1),   // task id of this TCB (0 for a header)
  parameter bit   HEADER   = 1'b0,       // 1: queue header node
  parameter qid_t HDR_QID  = QID_RDY,    // queue of a header node
  parameter pri_t INIT_PRI = pri_t'(1)   // initial task priority
) (
  input  logic       clk,
  input  logic       rst_n,
  input  tcb_op_e    operation_in,
  input  logic       we_in,
  input  id_t        id_in,
  input  pri_t       pri_in,
  input  qid_t       qid_in,
  input  logic       fifo_in,
  input  tstat_e     stat_in,
  input  id_t        next_id_in,
  input  pri_t       next_pri_in,
  output id_t        next_id_out,
  output pri_t       next_pri_out,
  // register contents, for reading a task's status
  output pri_t       pri_q,
  output tcb_state_t state_q,
  output id_t        next_id_q,
  output pri_t       next_pri_q
);

  logic self, in_q, pred_enq, pred_deq;
  pri_t key;

  always_comb begin
    self     = !HEADER && (id_in == MY_ID);
    in_q     = HEADER ? (qid_in == HDR_QID)
                      : (state_q.qid != QID_NONE && state_q.qid == qid_in);
    key      = HEADER ? HDR_KEY : (fifo_in ? FIFO_KEY : pri_q);
    pred_enq = in_q && (key <= pri_in) && (pri_in < next_pri_q);
    pred_deq = in_q && (next_id_q == id_in);

    next_id_out  = '0;
    next_pri_out = '0;
    if (operation_in == TOP_ENQ && pred_enq) begin
      next_id_out  = next_id_q;
      next_pri_out = next_pri_q;
    end else if (operation_in == TOP_DEQ && self && state_q.qid != QID_NONE) begin
      next_id_out  = next_id_q;
      next_pri_out = next_pri_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pri_q         <= HEADER ? HDR_KEY : INIT_PRI;
      state_q.tstat <= HEADER ? TS_RDY : TS_DMT;
      state_q.qid   <= HEADER ? HDR_QID : QID_NONE;
      next_id_q     <= HEADER ? TAIL_ID : '0;
      next_pri_q    <= HEADER ? TAIL_PRI : '0;
    end else if (operation_in == TOP_INIT) begin
      pri_q         <= HEADER ? HDR_KEY : INIT_PRI;
      state_q.tstat <= HEADER ? TS_RDY : TS_DMT;
      state_q.qid   <= HEADER ? HDR_QID : QID_NONE;
      next_id_q     <= HEADER ? TAIL_ID : '0;
      next_pri_q    <= HEADER ? TAIL_PRI : '0;
    end else begin
      unique case (operation_in)
        TOP_ENQ: begin
          if (pred_enq) begin
            next_id_q  <= id_in;
            next_pri_q <= pri_in;
          end
          if (self) begin
            next_id_q   <= next_id_in;
            next_pri_q  <= next_pri_in;
            state_q.qid <= qid_in;
          end
        end
        TOP_DEQ: begin
          if (pred_deq && !self) begin
            next_id_q  <= next_id_in;
            next_pri_q <= next_pri_in;
          end
          if (self) begin
            next_id_q   <= '0;
            next_pri_q  <= '0;
            state_q.qid <= QID_NONE;
          end
        end
        TOP_PRICHG: if (self) pri_q <= pri_in;
        default: ;
      endcase
      if (we_in && self) state_q.tstat <= stat_in;
    end
  end

endmodule
