// rtos_pkg: types and constants shared by the hardware RTOS.
//
// The hardware RTOS executes a subset of the uITRON 4.0 standard-profile
// system calls (task management, task-dependent synchronisation, semaphores,
// eventflags, data queues) next to a processor core.  This package holds what
// every part of it agrees on: the width of task IDs and priorities, the
// uITRON error codes, the system-call numbers written by software, the
// operations of the RTOS hardware core (one per row of its operation table)
// and the per-task state kept in each hardware TCB.
//
// Following the design: an end-of-queue link is -1 with priority 31, the
// largest priority value; a lower priority value is a higher priority.
// Own choices: 8-bit task IDs (the return word carries the task ID in one
// byte), the numbering of the system calls, and the FIFO ordering key.
package rtos_pkg;

  // ---------------------------------------------------------------- widths
  localparam int ID_W   = 8;   // task ID field of the return word is a byte
  localparam int PRI_W  = 5;   // priorities 1..30, 31 is the end-of-queue key
  localparam int DATA_W = 32;  // MMIO data, data-queue element width
  localparam int OBJ_W  = 8;   // index of a semaphore / eventflag / data queue
  localparam int QID_W  = 8;   // queue identifier held in a TCB

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [PRI_W-1:0]  pri_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [OBJ_W-1:0]  obj_t;
  typedef logic [QID_W-1:0]  qid_t;

  localparam id_t  TAIL_ID  = '1;      // "-1": end of a queue, also "no task"
  localparam pri_t TAIL_PRI = '1;      // 31: priority key of the end of a queue
  localparam pri_t HDR_KEY  = '0;      // key of a queue header (before everything)
  localparam pri_t FIFO_KEY = 5'd1;    // key of every member of a FIFO queue
  localparam qid_t QID_NONE = '0;      // TCB is in no queue
  localparam qid_t QID_RDY  = 8'd1;    // the ready queue; then sem, flg, dtq

  // ------------------------------------------------------ uITRON error codes
  typedef logic [7:0] ercd_t;          // two's complement, low byte of an ER
  localparam ercd_t E_OK    = 8'd0;
  localparam ercd_t E_RSFN  = 8'hF6;   // -10 reserved function code
  localparam ercd_t E_PAR   = 8'hEF;   // -17 parameter error
  localparam ercd_t E_ID    = 8'hEE;   // -18 invalid ID number
  localparam ercd_t E_CTX   = 8'hE7;   // -25 context error
  localparam ercd_t E_ILUSE = 8'hE4;   // -28 illegal service call use
  localparam ercd_t E_OBJ   = 8'hD7;   // -41 object state error
  localparam ercd_t E_NOEXS = 8'hD6;   // -42 non-existent object
  localparam ercd_t E_QOVR  = 8'hD5;   // -43 queueing overflow
  localparam ercd_t E_RLWAI = 8'hCF;   // -49 forced release from waiting
  localparam ercd_t E_TMOUT = 8'hCE;   // -50 polling failure

  // ------------------------------------------------------ eventflag modes
  localparam data_t TWF_ANDW = 32'd0;
  localparam data_t TWF_ORW  = 32'd1;

  // ---------------------------------------------------- system call numbers
  typedef enum logic [7:0] {
    FN_NONE      = 8'd0,
    FN_ACT_TSK   = 8'd1,  FN_IACT_TSK  = 8'd2,  FN_CAN_ACT   = 8'd3,
    FN_EXT_TSK   = 8'd4,  FN_TER_TSK   = 8'd5,  FN_CHG_PRI   = 8'd6,
    FN_SLP_TSK   = 8'd7,  FN_WUP_TSK   = 8'd8,  FN_IWUP_TSK  = 8'd9,
    FN_CAN_WUP   = 8'd10, FN_REL_WAI   = 8'd11, FN_IREL_WAI  = 8'd12,
    FN_SIG_SEM   = 8'd13, FN_ISIG_SEM  = 8'd14, FN_WAI_SEM   = 8'd15,
    FN_POL_SEM   = 8'd16, FN_SET_FLG   = 8'd17, FN_ISET_FLG  = 8'd18,
    FN_CLR_FLG   = 8'd19, FN_WAI_FLG   = 8'd20, FN_POL_FLG   = 8'd21,
    FN_SND_DTQ   = 8'd22, FN_PSND_DTQ  = 8'd23, FN_IPSND_DTQ = 8'd24,
    FN_FSND_DTQ  = 8'd25, FN_IFSND_DTQ = 8'd26, FN_RCV_DTQ   = 8'd27,
    FN_PRCV_DTQ  = 8'd28
  } fn_e;
  localparam int NUM_FN = 29;          // bit n of a system-call mask enables fn n

  // ---------------------------------------------- memory-mapped addresses
  localparam logic [31:0] A_RET    = 32'hFFFF_0008;  // R: return code
  localparam logic [31:0] A_ISSUE  = 32'hFFFF_0100;  // W: system call number
  localparam logic [31:0] A_PARAM1 = 32'hFFFF_0104;  // W: parameters 1..5
  localparam logic [31:0] A_PARAM5 = 32'hFFFF_0114;
  localparam logic [31:0] A_RPAR   = 32'hFFFF_0120;  // R: return parameter
  localparam logic [31:0] A_WDATA  = 32'hFFFF_0124;  // R: wait result data of the running task
  localparam logic [31:0] A_WERCD  = 32'hFFFF_0128;  // R: wait release code of the running task

  // ------------------------------------------- RTOS hardware core operations
  typedef enum logic [3:0] {
    OP_NONE,
    OP_INIT,          // empty every queue, every task dormant
    OP_READYENQUEUE, OP_READYDEQUEUE, OP_PRIHIGHEST, OP_PRICHG, OP_TASKSTATUS,
    OP_SEMHEAD, OP_SEMENQUEUE, OP_SEMDEQUEUE,
    OP_FLGHEAD, OP_FLGENQUEUE, OP_FLGDEQUEUE,
    OP_DTQHEAD, OP_DTQENQUEUE, OP_DTQDEQUEUE
  } core_op_e;

  // What one TCB is asked to do in a cycle.
  typedef enum logic [2:0] {
    TOP_NONE, TOP_INIT, TOP_ENQ, TOP_DEQ, TOP_PRICHG
  } tcb_op_e;

  // Task status kept in a TCB.
  typedef enum logic [1:0] {
    TS_DMT = 2'd0,    // dormant
    TS_RDY = 2'd1,    // ready or running (member of the ready queue)
    TS_WAI = 2'd2     // waiting (sleeping, or in a wait queue)
  } tstat_e;

  typedef struct packed {
    tstat_e tstat;
    qid_t   qid;      // queue the TCB is linked into, QID_NONE if none
  } tcb_state_t;

  // Kind of kernel object a queue belongs to.
  typedef enum logic [2:0] {K_NONE, K_RDY, K_SEM, K_FLG, K_DTQ} kind_e;

  // Queue numbering: 0 none, 1 ready, then semaphores, eventflags, data queues.
  function automatic qid_t qid_of(kind_e k, obj_t o, int nsem, int nflg);
    case (k)
      K_RDY:   return QID_RDY;
      K_SEM:   return qid_t'(2 + int'(o));
      K_FLG:   return qid_t'(2 + nsem + int'(o));
      K_DTQ:   return qid_t'(2 + nsem + nflg + int'(o));
      default: return QID_NONE;
    endcase
  endfunction

  function automatic kind_e kind_of(qid_t q, int nsem, int nflg, int ndtq);
    if (q == QID_NONE)                     return K_NONE;
    else if (q == QID_RDY)                 return K_RDY;
    else if (int'(q) < 2 + nsem)           return K_SEM;
    else if (int'(q) < 2 + nsem + nflg)    return K_FLG;
    else if (int'(q) < 2 + nsem + nflg + ndtq) return K_DTQ;
    else                                   return K_NONE;
  endfunction

  function automatic obj_t obj_of(qid_t q, int nsem, int nflg);
    if (int'(q) < 2)                       return '0;
    else if (int'(q) < 2 + nsem)           return obj_t'(int'(q) - 2);
    else if (int'(q) < 2 + nsem + nflg)    return obj_t'(int'(q) - 2 - nsem);
    else                                   return obj_t'(int'(q) - 2 - nsem - nflg);
  endfunction

  function automatic core_op_e enq_op(kind_e k);
    case (k)
      K_SEM:   return OP_SEMENQUEUE;
      K_FLG:   return OP_FLGENQUEUE;
      K_DTQ:   return OP_DTQENQUEUE;
      default: return OP_READYENQUEUE;
    endcase
  endfunction

  function automatic core_op_e deq_op(kind_e k);
    case (k)
      K_RDY:   return OP_READYDEQUEUE;
      K_SEM:   return OP_SEMDEQUEUE;
      K_FLG:   return OP_FLGDEQUEUE;
      K_DTQ:   return OP_DTQDEQUEUE;
      default: return OP_TASKSTATUS;   // in no queue: only the status is written
    endcase
  endfunction

  // Default initial priorities: task t gets (t+1)/2, so pairs share a level.
  localparam int MAX_TSK = 32;
  typedef logic [MAX_TSK-1:0][PRI_W-1:0] ipri_vec_t;
  function automatic ipri_vec_t default_ipri();
    ipri_vec_t v;
    for (int t = 0; t < MAX_TSK; t++) v[t] = pri_t'((t + 2) / 2);
    return v;
  endfunction

endpackage
