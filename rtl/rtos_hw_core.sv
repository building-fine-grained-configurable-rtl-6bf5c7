// rtos_hw_core: the RTOS hardware core - the TCBs and the queue headers.
//
// Holds one hardware TCB (rtos_tcb) per task and one queue header per queue:
// the ready queue, one wait queue per semaphore, per eventflag and per data
// queue.  It carries out the operations the wrapper asks for, one per clock
// cycle: enqueue into / dequeue from the ready queue or a semaphore,
// eventflag or data-queue wait queue, return the head of a queue, return the
// highest-priority ready task (the head of the ready queue), change a task's
// priority and return a task's status.  The NEXT_ID_OUT/NEXT_PRI_OUT outputs
// of all nodes are ORed and fed back to every node, which is what makes an
// enqueue or dequeue a one-cycle operation.
//
// Interface: op (one of core_op_e) with obj (index of the semaphore,
// eventflag or data queue, from 0), id (task), pri (new priority, PRICHG
// only), fifo (the addressed wait queue is FIFO-ordered) and we/stat (write
// the task status of task id in the same cycle).  Results are combinational:
// head_id is the first task of the addressed queue (for *HEAD and
// PRIHIGHEST; TAIL_ID when the queue is empty) and tsk_* are the registers of
// task id.  Operations take effect at the next rising edge.
//
// The operation set and the TCB/OR structure follow the design.  The number
// of tasks and objects are parameters, standing for the per-application core
// that is generated from the system configuration; their defaults are those
// of the largest evaluated configuration (5 tasks, 4 semaphores,
// 3 eventflags, 3 data queues).  Using a header node per queue and deriving
// the enqueue key from the task's own priority register are own choices.
module rtos_hw_core
  import rtos_pkg::*;
#(
  parameter int        NUM_TSK  = 5,
  parameter int        NUM_SEM  = 4,
  parameter int        NUM_FLG  = 3,
  parameter int        NUM_DTQ  = 3,
  parameter ipri_vec_t TSK_IPRI = default_ipri()
) (
  input  logic       clk,
  input  logic       rst_n,
  input  core_op_e   op,
  input  obj_t       obj,
  input  id_t        id,
  input  pri_t       pri,
  input  logic       fifo,
  input  logic       we,
  input  tstat_e     stat,
  output id_t        head_id,
  output pri_t       head_pri,
  output tstat_e     tsk_stat,
  output qid_t       tsk_qid,
  output pri_t       tsk_pri,
  output id_t        tsk_next
);

  localparam int NQ = 1 + NUM_SEM + NUM_FLG + NUM_DTQ;   // number of queues

  // ------------------------------------------------ decode of the operation
  tcb_op_e top;
  kind_e   kind;
  qid_t    qid;
  pri_t    key_in;
  logic    fifo_eff;

  always_comb begin
    unique case (op)
      OP_INIT:                                          top = TOP_INIT;
      OP_READYENQUEUE, OP_SEMENQUEUE, OP_FLGENQUEUE, OP_DTQENQUEUE: top = TOP_ENQ;
      OP_READYDEQUEUE, OP_SEMDEQUEUE, OP_FLGDEQUEUE, OP_DTQDEQUEUE: top = TOP_DEQ;
      OP_PRICHG:                                        top = TOP_PRICHG;
      default:                                          top = TOP_NONE;
    endcase
    unique case (op)
      OP_READYENQUEUE, OP_READYDEQUEUE, OP_PRIHIGHEST:  kind = K_RDY;
      OP_SEMHEAD, OP_SEMENQUEUE, OP_SEMDEQUEUE:         kind = K_SEM;
      OP_FLGHEAD, OP_FLGENQUEUE, OP_FLGDEQUEUE:         kind = K_FLG;
      OP_DTQHEAD, OP_DTQENQUEUE, OP_DTQDEQUEUE:         kind = K_DTQ;
      default:                                          kind = K_NONE;
    endcase
    qid      = qid_of(kind, obj, NUM_SEM, NUM_FLG);
    fifo_eff = fifo && kind != K_RDY;            // the ready queue is by priority
  end

  // ------------------------------------------------------------- the nodes
  id_t        nid_out  [NQ + NUM_TSK];
  pri_t       npri_out [NQ + NUM_TSK];
  pri_t       n_pri    [NQ + NUM_TSK];
  tcb_state_t n_state  [NQ + NUM_TSK];
  id_t        n_next   [NQ + NUM_TSK];
  pri_t       n_npri   [NQ + NUM_TSK];
  id_t        next_id_or;
  pri_t       next_pri_or;

  // OR of the link outputs: only the node(s) taking part drive non-zero.
  always_comb begin
    next_id_or  = '0;
    next_pri_or = '0;
    for (int n = 0; n < NQ + NUM_TSK; n++) begin
      next_id_or  = next_id_or  | nid_out[n];
      next_pri_or = next_pri_or | npri_out[n];
    end
  end

  // Key presented with an enqueue: the task's priority, FIFO_KEY in a FIFO
  // queue.  PRICHG presents the new priority.
  always_comb begin
    tsk_pri  = '0;
    tsk_stat = TS_DMT;
    tsk_qid  = QID_NONE;
    tsk_next = '0;
    for (int t = 1; t <= NUM_TSK; t++) begin
      if (id == id_t'(t)) begin
        tsk_pri  = n_pri[NQ + t - 1];
        tsk_stat = n_state[NQ + t - 1].tstat;
        tsk_qid  = n_state[NQ + t - 1].qid;
        tsk_next = n_next[NQ + t - 1];
      end
    end
    if (top == TOP_PRICHG)  key_in = pri;
    else if (fifo_eff)      key_in = FIFO_KEY;
    else                    key_in = tsk_pri;
  end

  for (genvar q = 0; q < NQ; q++) begin : g_hdr
    rtos_tcb #(
      .MY_ID   ('0),
      .HEADER  (1'b1),
      .HDR_QID (qid_t'(q + 1)),
      .INIT_PRI(HDR_KEY)
    ) u_hdr (
      .clk, .rst_n,
      .operation_in(top), .we_in(1'b0), .id_in(id), .pri_in(key_in),
      .qid_in(qid), .fifo_in(fifo_eff), .stat_in(stat),
      .next_id_in(next_id_or), .next_pri_in(next_pri_or),
      .next_id_out(nid_out[q]), .next_pri_out(npri_out[q]),
      .pri_q(n_pri[q]), .state_q(n_state[q]),
      .next_id_q(n_next[q]), .next_pri_q(n_npri[q])
    );
  end

  for (genvar t = 0; t < NUM_TSK; t++) begin : g_tcb
    rtos_tcb #(
      .MY_ID   (id_t'(t + 1)),
      .HEADER  (1'b0),
      .HDR_QID (QID_NONE),
      .INIT_PRI(TSK_IPRI[t])
    ) u_tcb (
      .clk, .rst_n,
      .operation_in(top), .we_in(we), .id_in(id), .pri_in(key_in),
      .qid_in(qid), .fifo_in(fifo_eff), .stat_in(stat),
      .next_id_in(next_id_or), .next_pri_in(next_pri_or),
      .next_id_out(nid_out[NQ + t]), .next_pri_out(npri_out[NQ + t]),
      .pri_q(n_pri[NQ + t]), .state_q(n_state[NQ + t]),
      .next_id_q(n_next[NQ + t]), .next_pri_q(n_npri[NQ + t])
    );
  end

  // Head of the addressed queue: the link held by its header.
  always_comb begin
    head_id  = TAIL_ID;
    head_pri = TAIL_PRI;
    for (int q = 0; q < NQ; q++) begin
      if (qid == qid_t'(q + 1)) begin
        head_id  = n_next[q];
        head_pri = n_npri[q];
      end
    end
  end

  // A task is enqueued only when it is in no queue, and removed only from the
  // queue it is in.
  always_ff @(posedge clk) begin
    if (rst_n && top == TOP_ENQ)
      assert (tsk_qid == QID_NONE) else $error("rtos_hw_core: task %0d already queued", id);
    if (rst_n && top == TOP_DEQ && kind != K_NONE)
      assert (tsk_qid == qid) else $error("rtos_hw_core: task %0d not in queue %0d", id, qid);
  end

endmodule
