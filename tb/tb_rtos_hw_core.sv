// tb_rtos_hw_core: randomised self-checking test of the RTOS hardware core.
//
// A reference model keeps every queue (ready queue, semaphore, eventflag and
// data-queue wait queues) as an ordered list of task ids.  Random operations
// (enqueue a task that is in no queue, dequeue a queued task, change a
// priority) are applied to the core and to the model; after each one every
// queue is walked through the core's head and link outputs and compared with
// the model, together with each task's status and queue.  Priority queues
// put a task behind all tasks of equal or higher priority; FIFO queues behind
// all members.  Each operation must complete in one clock cycle.
module tb_rtos_hw_core;
  import rtos_pkg::*;

  localparam int NT = 5, NS = 4, NF = 3, ND = 3;
  localparam int NQ = 1 + NS + NF + ND;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  core_op_e op;
  obj_t     obj;
  id_t      id;
  pri_t     pri;
  logic     fifo, we;
  tstat_e   stat;
  id_t      head_id, tsk_next;
  pri_t     head_pri, tsk_pri;
  tstat_e   tsk_stat;
  qid_t     tsk_qid;

  rtos_hw_core #(.NUM_TSK(NT), .NUM_SEM(NS), .NUM_FLG(NF), .NUM_DTQ(ND)) dut (
    .clk, .rst_n, .op, .obj, .id, .pri, .fifo, .we, .stat,
    .head_id, .head_pri, .tsk_stat, .tsk_qid, .tsk_pri, .tsk_next);

  // model
  int   mq   [NQ][$];     // queue index 0: ready, then sem, flg, dtq
  int   mpri [1:NT];
  int   minq [1:NT];      // -1: in no queue
  bit   qfifo[NQ];

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic kind_e kind_of_q(int q);
    if (q == 0) return K_RDY;
    if (q < 1 + NS) return K_SEM;
    if (q < 1 + NS + NF) return K_FLG;
    return K_DTQ;
  endfunction
  function automatic int obj_of_q(int q);
    if (q < 1 + NS) return q - 1;
    if (q < 1 + NS + NF) return q - 1 - NS;
    return q - 1 - NS - NF;
  endfunction
  function automatic core_op_e head_op(kind_e k);
    case (k)
      K_RDY: return OP_PRIHIGHEST;
      K_SEM: return OP_SEMHEAD;
      K_FLG: return OP_FLGHEAD;
      default: return OP_DTQHEAD;
    endcase
  endfunction

  task automatic apply(input core_op_e o, input int q, input int t, input int p,
                       input bit w, input tstat_e s);
    @(negedge clk);
    op = o; obj = obj_t'(q < 0 ? 0 : obj_of_q(q)); id = id_t'(t); pri = pri_t'(p);
    fifo = (q >= 0) ? qfifo[q] : 1'b0; we = w; stat = s;
    @(posedge clk); #1;
    op = OP_NONE; we = 1'b0; #1;
  endtask

  task automatic check_all();
    for (int q = 0; q < NQ; q++) begin
      id_t cur;
      op = head_op(kind_of_q(q)); obj = obj_t'(q == 0 ? 0 : obj_of_q(q)); #1;
      cur = head_id;
      chk($sformatf("queue %0d head", q), cur, mq[q].size() ? mq[q][0] : int'(TAIL_ID));
      for (int i = 0; i < mq[q].size(); i++) begin
        chk($sformatf("queue %0d element %0d", q, i), cur, mq[q][i]);
        id = cur; #1;
        cur = tsk_next;
      end
      chk($sformatf("queue %0d end", q), cur, TAIL_ID);
    end
    op = OP_TASKSTATUS;
    for (int t = 1; t <= NT; t++) begin
      id = id_t'(t); #1;
      chk($sformatf("task %0d queue", t), tsk_qid, minq[t] < 0 ? 0 : minq[t] + 1);
      chk($sformatf("task %0d pri", t), tsk_pri, mpri[t]);
    end
    op = OP_NONE; #1;
  endtask

  int n_enq = 0, n_deq = 0, n_chg = 0, n_head_ins = 0;

  initial begin
    op = OP_NONE; obj = '0; id = '0; pri = '0; fifo = 0; we = 0; stat = TS_DMT;
    for (int q = 0; q < NQ; q++) qfifo[q] = (q % 2 == 0) && (q != 0);
    for (int t = 1; t <= NT; t++) begin
      mpri[t] = (t + 1) / 2;
      minq[t] = -1;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    apply(OP_INIT, -1, 0, 0, 0, TS_DMT);
    check_all();

    for (int it = 0; it < 400; it++) begin
      automatic int t = 1 + ($urandom % NT);
      automatic int r = $urandom % 10;
      if (r < 2) begin
        // priority change of a task in no queue
        if (minq[t] < 0) begin
          automatic int p = 1 + ($urandom % 6);
          apply(OP_PRICHG, -1, t, p, 0, TS_DMT);
          mpri[t] = p;
          n_chg++;
        end
      end else if (minq[t] < 0) begin
        automatic int q = ($urandom % 3 == 0) ? 0 : ($urandom % NQ);
        automatic int pos = 0;
        automatic int key = qfifo[q] ? 1 : mpri[t];
        automatic core_op_e o;
        case (kind_of_q(q))
          K_RDY: o = OP_READYENQUEUE;
          K_SEM: o = OP_SEMENQUEUE;
          K_FLG: o = OP_FLGENQUEUE;
          default: o = OP_DTQENQUEUE;
        endcase
        for (int i = 0; i < mq[q].size(); i++)
          if (qfifo[q] || mpri[mq[q][i]] <= key) pos = i + 1;
        if (pos == 0 && mq[q].size() > 0) n_head_ins++;
        mq[q].insert(pos, t);
        minq[t] = q;
        apply(o, q, t, 0, 1'b1, q == 0 ? TS_RDY : TS_WAI);
        n_enq++;
      end else begin
        automatic int q = minq[t];
        automatic core_op_e o;
        case (kind_of_q(q))
          K_RDY: o = OP_READYDEQUEUE;
          K_SEM: o = OP_SEMDEQUEUE;
          K_FLG: o = OP_FLGDEQUEUE;
          default: o = OP_DTQDEQUEUE;
        endcase
        foreach (mq[q][i]) if (mq[q][i] == t) begin mq[q].delete(i); break; end
        minq[t] = -1;
        apply(o, q, t, 0, 1'b1, TS_DMT);
        n_deq++;
      end
      check_all();
    end
    chk("enqueues happened", int'(n_enq > 50), 1);
    chk("dequeues happened", int'(n_deq > 50), 1);
    chk("priority changes happened", int'(n_chg > 5), 1);
    chk("head insertions happened", int'(n_head_ins > 5), 1);
    $display("enq=%0d deq=%0d chg=%0d head_ins=%0d", n_enq, n_deq, n_chg, n_head_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
