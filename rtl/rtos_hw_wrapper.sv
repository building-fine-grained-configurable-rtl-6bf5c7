// rtos_hw_wrapper: memory-mapped front end and system-call state machine.
//
// Software issues a system call by writing its parameters to 0xffff0104..
// 0xffff0114 and then its number to 0xffff0100.  The wrapper then walks a
// state machine that checks the parameters, decides what the call does with
// the kernel-object registers it holds (semaphore counts, eventflag
// patterns, data-queue buffers, per-task counters) and drives the RTOS
// hardware core, one core operation per state and clock cycle:
//
//   INIT -> INITACT -> HIGHEST -> END -> WAIT        after reset
//   WAIT -> CHECK -> HEAD -> DEQ [-> PRICHG] [-> ENQ] [-> HIGHEST] -> END -> WAIT
//   set_flg: ... HEAD -> FLGSCAN (-> DEQ -> ENQ -> FLGSCAN)* -> HIGHEST -> END
//
// CHECK does the static error checks (E_RSFN, E_CTX, E_ID, E_NOEXS, E_PAR,
// E_ILUSE) and goes to END on an error.  HEAD reads the head of the object's
// wait queue (SEMHEAD/FLGHEAD/DTQHEAD) or the target task's status
// (TASKSTATUS) and plans at most one dequeue, one priority change and one
// enqueue.  DEQ, PRICHG and ENQ issue those, HIGHEST reads the head of the
// ready queue.  For sig_sem this is the design's own sequence: CHECK,
// SEMHEAD, SEMDEQUEUE (END here if no task waits), RDYENQUEUE, HIGHEST, END.
//
// Reading 0xffff0008 returns {done, 7'b0, switch_id, 8'h00, ercd}: bit 31 is
// 1 when the hardware is idle, bits 23:16 hold the task to switch to (0: keep
// the running task, 0xff: no task is ready) and bits 7:0 the uITRON error
// code.  0xffff0120 returns the value a call returns by reference (flag
// pattern, received data, can_act/can_wup count).
//
// Following the design: the address map above, busy-wait completion on bit
// 31, the task ID and error code fields, the state sequence, one-cycle queue
// operations, the call set, and configuration by parameters so that objects,
// calls and error checks an application does not use are left out of the
// hardware (FN_EN, the CHK_* switches, the per-object attribute masks).
// Own choices: the system-call numbers; a second read port pair, 0xffff0124
// (data a waiting task received: flag pattern, data-queue element) and
// 0xffff0128 (its wait release code, E_OK or E_RLWAI), read by a task that
// resumes after waiting; the running task is taken to be the one the last
// call told software to switch to; E_CTX for blocking calls from interrupt
// context (input irq_ctx) or with no running task; one wait queue per data
// queue, shared by senders and receivers (only one kind can wait at a time).
// The bus is a single-cycle register interface: bus_we writes bus_wdata to
// bus_addr at the rising edge; bus_rdata is combinational from bus_addr.
module rtos_hw_wrapper
  import rtos_pkg::*;
#(
  parameter int          NUM_TSK     = 5,
  parameter int          NUM_SEM     = 4,
  parameter int          NUM_FLG     = 3,
  parameter int          NUM_DTQ     = 3,
  parameter ipri_vec_t   TSK_IPRI    = default_ipri(),
  parameter logic [31:0] TSK_EXIST   = '1,     // created by CRE_TSK
  parameter logic [31:0] TSK_ACT     = 32'h1,  // TA_ACT: ready after reset
  parameter int          TMAX_TPRI   = 30,
  parameter int          TMAX_ACTCNT = 1,
  parameter int          TMAX_WUPCNT = 1,
  parameter logic [31:0] SEM_EXIST   = '1,
  parameter logic [31:0] SEM_TPRI    = 32'h5,  // 1: TA_TPRI wait queue, 0: TA_TFIFO
  parameter int          SEM_INIT    = 1,      // isemcnt
  parameter int          SEM_MAX     = 1,      // maxsem
  parameter logic [31:0] FLG_EXIST   = '1,
  parameter logic [31:0] FLG_TPRI    = 32'h1,
  parameter logic [31:0] FLG_WMUL    = 32'h3,  // 1: TA_WMUL, 0: TA_WSGL
  parameter logic [31:0] FLG_CLR     = 32'h4,  // TA_CLR
  parameter int          FLG_INIT    = 0,      // iflgptn
  parameter int          FLGPTN_W    = 16,
  parameter logic [31:0] DTQ_EXIST   = '1,
  parameter logic [31:0] DTQ_TPRI    = 32'h0,  // send-wait queue order
  parameter int          DTQ_CNT     = 4,      // dtqcnt of every data queue
  parameter logic [NUM_FN-1:0] FN_EN = '1,     // system calls present
  parameter bit          CHK_CTX     = 1'b1,
  parameter bit          CHK_ID      = 1'b1,
  parameter bit          CHK_NOEXS   = 1'b1,
  parameter bit          CHK_PAR     = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     irq_ctx,      // processor is in an interrupt handler
  // processor side
  input  logic     bus_we,
  input  logic [31:0] bus_addr,
  input  data_t    bus_wdata,
  output data_t    bus_rdata,
  output logic     busy,
  output id_t      run_id,
  // RTOS hardware core side
  output core_op_e core_op,
  output obj_t     core_obj,
  output id_t      core_id,
  output pri_t     core_pri,
  output logic     core_fifo,
  output logic     core_we,
  output tstat_e   core_stat,
  input  id_t      core_head_id,
  input  tstat_e   core_tsk_stat,
  input  qid_t     core_tsk_qid,
  input  id_t      core_tsk_next
);

  localparam int NT = (NUM_TSK > 0) ? NUM_TSK : 1;
  localparam int NS = (NUM_SEM > 0) ? NUM_SEM : 1;
  localparam int NF = (NUM_FLG > 0) ? NUM_FLG : 1;
  localparam int ND = (NUM_DTQ > 0) ? NUM_DTQ : 1;
  localparam int DQ = (DTQ_CNT > 0) ? DTQ_CNT : 1;
  localparam int CW = 8;                       // counter width

  typedef logic [FLGPTN_W-1:0] ptn_t;
  typedef logic [CW-1:0]       cnt_t;

  typedef enum logic [3:0] {
    ST_INIT, ST_INITACT, ST_WAIT, ST_CHECK, ST_HEAD, ST_DEQ, ST_PRICHG,
    ST_ENQ, ST_FLGSCAN, ST_HIGHEST, ST_END
  } state_e;

  state_e state;
  fn_e    fn;
  data_t  prm [1:5];
  id_t    ret_hi;
  ercd_t  ret_ercd;
  data_t  rpar;
  id_t    init_t;

  // plan of core operations made in HEAD / FLGSCAN
  logic   deq_en, chg_en, enq_en, scan;
  kind_e  deq_kind, enq_kind;
  obj_t   deq_obj, enq_obj;
  id_t    deq_id, enq_id, scan_cur;
  tstat_e deq_stat, enq_stat;
  logic   enq_fifo;
  pri_t   chg_pri;

  // per-task registers
  cnt_t   actcnt [NT];
  cnt_t   wupcnt [NT];
  ptn_t   waiptn [NT];
  logic   wf_orw [NT];
  data_t  wdata  [NT];
  ercd_t  wercd  [NT];
  // kernel objects
  cnt_t   semcnt [NS];
  ptn_t   flgptn [NF];
  data_t  dtqbuf [ND][DQ];
  cnt_t   dtqhd  [ND];
  cnt_t   dtqn   [ND];
  logic   dtq_sndw [ND];             // waiters of the data queue are senders

  // ------------------------------------------------------------- decoding
  logic  is_tsk_call, self_ok, on_self, is_sem, is_flg, is_dtq, blocking;
  id_t   tgt;
  obj_t  obj;
  ercd_t chk_err;

  always_comb begin
    is_tsk_call = fn inside {FN_ACT_TSK, FN_IACT_TSK, FN_CAN_ACT, FN_TER_TSK,
                             FN_CHG_PRI, FN_WUP_TSK, FN_IWUP_TSK, FN_CAN_WUP,
                             FN_REL_WAI, FN_IREL_WAI};
    self_ok     = fn inside {FN_ACT_TSK, FN_CAN_ACT, FN_TER_TSK, FN_CHG_PRI,
                             FN_WUP_TSK, FN_CAN_WUP, FN_REL_WAI};
    on_self     = fn inside {FN_EXT_TSK, FN_SLP_TSK};
    blocking    = fn inside {FN_EXT_TSK, FN_SLP_TSK, FN_WAI_SEM, FN_WAI_FLG,
                             FN_SND_DTQ, FN_RCV_DTQ};
    is_sem      = fn inside {[FN_SIG_SEM:FN_POL_SEM]};
    is_flg      = fn inside {[FN_SET_FLG:FN_POL_FLG]};
    is_dtq      = fn inside {[FN_SND_DTQ:FN_PRCV_DTQ]};
    if (on_self || (is_tsk_call && prm[1] == '0)) tgt = run_id;
    else                                          tgt = id_t'(prm[1]);
    obj         = obj_t'(prm[1] - 1);

    chk_err = E_OK;
    if (fn == FN_NONE || int'(fn) >= NUM_FN || !FN_EN[int'(fn)])
      chk_err = E_RSFN;
    else if (CHK_CTX && blocking && (irq_ctx || run_id == TAIL_ID))
      chk_err = E_CTX;
    else if (is_tsk_call && prm[1] == '0 && (!self_ok || irq_ctx || run_id == TAIL_ID))
      chk_err = E_ID;
    else if (fn == FN_TER_TSK && tgt == run_id)
      chk_err = E_ILUSE;
    else if (CHK_ID && is_tsk_call && prm[1] != '0 && (prm[1] > data_t'(NUM_TSK)))
      chk_err = E_ID;
    else if (CHK_ID && is_sem && (prm[1] == '0 || prm[1] > data_t'(NUM_SEM)))
      chk_err = E_ID;
    else if (CHK_ID && is_flg && (prm[1] == '0 || prm[1] > data_t'(NUM_FLG)))
      chk_err = E_ID;
    else if (CHK_ID && is_dtq && (prm[1] == '0 || prm[1] > data_t'(NUM_DTQ)))
      chk_err = E_ID;
    else if (CHK_NOEXS && is_tsk_call && !TSK_EXIST[int'(tgt) - 1])
      chk_err = E_NOEXS;
    else if (CHK_NOEXS && is_sem && !SEM_EXIST[int'(obj)])
      chk_err = E_NOEXS;
    else if (CHK_NOEXS && is_flg && !FLG_EXIST[int'(obj)])
      chk_err = E_NOEXS;
    else if (CHK_NOEXS && is_dtq && !DTQ_EXIST[int'(obj)])
      chk_err = E_NOEXS;
    else if (CHK_PAR && fn == FN_CHG_PRI && prm[2] > data_t'(TMAX_TPRI))
      chk_err = E_PAR;
    else if (CHK_PAR && fn inside {FN_WAI_FLG, FN_POL_FLG} &&
             (prm[2][FLGPTN_W-1:0] == '0 || prm[3] > TWF_ORW))
      chk_err = E_PAR;
    else if (fn inside {FN_FSND_DTQ, FN_IFSND_DTQ} && DTQ_CNT == 0)
      chk_err = E_ILUSE;
  end

  // -------------------------------------------------- task / object indices
  int ti, ri, si, fi, di, hi;                   // array indices
  int sndpos;                                   // tail slot of the data queue
  int hdnext;                                   // head slot after a pop
  kind_e tq_kind;
  obj_t  tq_obj;
  logic  tq_fifo;
  logic  flg_sat;
  ptn_t  cur_ptn;

  always_comb begin
    ti = int'(tgt) - 1;
    if (ti < 0 || ti >= NT) ti = 0;
    ri = int'(run_id) - 1;
    if (ri < 0 || ri >= NT) ri = 0;
    hi = int'(core_head_id) - 1;
    if (hi < 0 || hi >= NT) hi = 0;
    si = (int'(obj) < NS) ? int'(obj) : 0;
    fi = (int'(obj) < NF) ? int'(obj) : 0;
    di = (int'(obj) < ND) ? int'(obj) : 0;
    sndpos = int'(dtqhd[di]) + int'(dtqn[di]);
    if (sndpos >= DQ) sndpos = sndpos - DQ;
    hdnext = int'(dtqhd[di]) + 1;
    if (hdnext >= DQ) hdnext = 0;
    tq_kind = kind_of(core_tsk_qid, NUM_SEM, NUM_FLG, NUM_DTQ);
    tq_obj  = obj_of(core_tsk_qid, NUM_SEM, NUM_FLG);
    unique case (tq_kind)
      K_SEM:   tq_fifo = !SEM_TPRI[int'(tq_obj)];
      K_FLG:   tq_fifo = !FLG_TPRI[int'(tq_obj)];
      K_DTQ:   tq_fifo = dtq_sndw[int'(tq_obj) < ND ? int'(tq_obj) : 0] ? !DTQ_TPRI[int'(tq_obj)] : 1'b1;
      default: tq_fifo = 1'b0;
    endcase
    cur_ptn = flgptn[fi];
    if (prm[3] == TWF_ORW) flg_sat = (cur_ptn & prm[2][FLGPTN_W-1:0]) != '0;
    else                   flg_sat = (cur_ptn & prm[2][FLGPTN_W-1:0]) == prm[2][FLGPTN_W-1:0];
  end

  // eventflag scan: is the waiting task scan_cur satisfied?
  int   sci;
  logic scan_sat;
  always_comb begin
    sci = int'(scan_cur) - 1;
    if (sci < 0 || sci >= NT) sci = 0;
    if (wf_orw[sci]) scan_sat = (flgptn[fi] & waiptn[sci]) != '0;
    else             scan_sat = (flgptn[fi] & waiptn[sci]) == waiptn[sci];
  end

  // ---------------------------------------------------------- core drive
  always_comb begin
    core_op   = OP_NONE;
    core_obj  = obj;
    core_id   = tgt;
    core_pri  = chg_pri;
    core_fifo = 1'b0;
    core_we   = 1'b0;
    core_stat = TS_DMT;
    unique case (state)
      ST_INIT:    core_op = OP_INIT;
      ST_INITACT: if (int'(init_t) <= NUM_TSK && TSK_ACT[int'(init_t) - 1] &&
                      TSK_EXIST[int'(init_t) - 1]) begin
                    core_op   = OP_READYENQUEUE;
                    core_id   = init_t;
                    core_we   = 1'b1;
                    core_stat = TS_RDY;
                  end
      ST_HEAD:    if (is_sem)      core_op = OP_SEMHEAD;
                  else if (is_flg) core_op = OP_FLGHEAD;
                  else if (is_dtq) core_op = OP_DTQHEAD;
                  else             core_op = OP_TASKSTATUS;
      ST_DEQ:     if (deq_en) begin
                    core_op   = deq_op(deq_kind);
                    core_obj  = deq_obj;
                    core_id   = deq_id;
                    core_we   = 1'b1;
                    core_stat = deq_stat;
                  end
      ST_PRICHG:  begin
                    core_op  = OP_PRICHG;
                    core_id  = deq_id;
                  end
      ST_ENQ:     begin
                    core_op   = enq_op(enq_kind);
                    core_obj  = enq_obj;
                    core_id   = enq_id;
                    core_fifo = enq_fifo;
                    core_we   = 1'b1;
                    core_stat = enq_stat;
                  end
      ST_FLGSCAN: begin
                    core_op = OP_TASKSTATUS;
                    core_id = scan_cur;
                  end
      ST_HIGHEST: core_op = OP_PRIHIGHEST;
      default: ;
    endcase
  end

  // ------------------------------------------------------------ bus read
  logic done;
  assign done = (state == ST_WAIT);
  assign busy = !done;
  always_comb begin
    unique case (bus_addr)
      A_RET:   bus_rdata = {done, 7'b0, ret_hi, 8'h00, ret_ercd};
      A_RPAR:  bus_rdata = rpar;
      A_WDATA: bus_rdata = (run_id != TAIL_ID) ? wdata[int'(run_id) - 1 < NT ? int'(run_id) - 1 : 0] : '0;
      A_WERCD: bus_rdata = (run_id != TAIL_ID) ?
                           data_t'($signed(wercd[int'(run_id) - 1 < NT ? int'(run_id) - 1 : 0])) : '0;
      default: bus_rdata = '0;
    endcase
  end

  // ------------------------------------------------------- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_INIT;
      fn       <= FN_NONE;
      ret_hi   <= '0;
      ret_ercd <= E_OK;
      rpar     <= '0;
      run_id   <= TAIL_ID;
      init_t   <= id_t'(1);
      deq_en   <= 1'b0;
      chg_en   <= 1'b0;
      enq_en   <= 1'b0;
      scan     <= 1'b0;
      scan_cur <= TAIL_ID;
      for (int i = 1; i <= 5; i++) prm[i] <= '0;
    end else begin
      // parameter registers can be written at any time
      if (bus_we && bus_addr >= A_PARAM1 && bus_addr <= A_PARAM5 && bus_addr[1:0] == 2'b00)
        prm[int'((bus_addr - A_PARAM1) >> 2) + 1] <= bus_wdata;

      unique case (state)
        // ---------------------------------------------------- reset start-up
        ST_INIT: begin
          for (int t = 0; t < NT; t++) begin
            actcnt[t] <= '0;  wupcnt[t] <= '0;  waiptn[t] <= '0;
            wf_orw[t] <= 1'b0; wdata[t] <= '0;  wercd[t]  <= E_OK;
          end
          for (int s = 0; s < NS; s++) semcnt[s] <= cnt_t'(SEM_INIT);
          for (int f = 0; f < NF; f++) flgptn[f] <= ptn_t'(FLG_INIT);
          for (int d = 0; d < ND; d++) begin
            dtqhd[d] <= '0;  dtqn[d] <= '0;  dtq_sndw[d] <= 1'b0;
          end
          init_t <= id_t'(1);
          state  <= ST_INITACT;
        end
        ST_INITACT: begin
          if (int'(init_t) >= NUM_TSK) state <= ST_HIGHEST;
          init_t <= init_t + id_t'(1);
        end

        // --------------------------------------------------- wait for a call
        ST_WAIT: begin
          if (bus_we && bus_addr == A_ISSUE) begin
            fn    <= fn_e'(bus_wdata[7:0]);
            state <= ST_CHECK;
          end
        end

        // ------------------------------------------------ static error check
        ST_CHECK: begin
          ret_hi   <= '0;
          ret_ercd <= chk_err;
          deq_en   <= 1'b0;
          chg_en   <= 1'b0;
          enq_en   <= 1'b0;
          scan     <= 1'b0;
          state    <= (chk_err == E_OK) ? ST_HEAD : ST_END;
        end

        // ---------------------------- read queue head / task status, decide
        ST_HEAD: begin
          state <= ST_DEQ;
          unique case (fn)
            FN_ACT_TSK, FN_IACT_TSK: begin
              if (core_tsk_stat == TS_DMT) begin
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= tgt;
                enq_stat <= TS_RDY; enq_fifo <= 1'b0;
                wupcnt[ti] <= '0;
              end else if (int'(actcnt[ti]) < TMAX_ACTCNT)
                actcnt[ti] <= actcnt[ti] + 1'b1;
              else
                ret_ercd <= E_QOVR;
            end
            FN_CAN_ACT: begin
              rpar <= data_t'(actcnt[ti]);
              actcnt[ti] <= '0;
            end
            FN_EXT_TSK, FN_TER_TSK: begin
              if (core_tsk_stat == TS_DMT) ret_ercd <= E_OBJ;
              else begin
                deq_en  <= 1'b1; deq_kind <= tq_kind; deq_obj <= tq_obj;
                deq_id  <= tgt;  deq_stat <= TS_DMT;
                chg_en  <= 1'b1; chg_pri  <= TSK_IPRI[ti];
                wupcnt[ti] <= '0;
                if (actcnt[ti] != '0) begin
                  actcnt[ti] <= actcnt[ti] - 1'b1;
                  enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= tgt;
                  enq_stat <= TS_RDY; enq_fifo <= 1'b0;
                end
              end
            end
            FN_CHG_PRI: begin
              if (core_tsk_stat == TS_DMT) ret_ercd <= E_OBJ;
              else begin
                chg_en  <= 1'b1;
                chg_pri <= (prm[2] == '0) ? TSK_IPRI[ti] : pri_t'(prm[2]);
                deq_id  <= tgt;
                if (core_tsk_qid != QID_NONE && !tq_fifo) begin
                  deq_en <= 1'b1; deq_kind <= tq_kind; deq_obj <= tq_obj;
                  deq_stat <= core_tsk_stat;
                  enq_en <= 1'b1; enq_kind <= tq_kind; enq_obj <= tq_obj; enq_id <= tgt;
                  enq_stat <= core_tsk_stat; enq_fifo <= 1'b0;
                end
              end
            end
            FN_SLP_TSK: begin
              if (wupcnt[ti] != '0) wupcnt[ti] <= wupcnt[ti] - 1'b1;
              else begin
                deq_en <= 1'b1; deq_kind <= K_RDY; deq_obj <= '0;
                deq_id <= run_id; deq_stat <= TS_WAI;
                wercd[ri] <= E_OK;
              end
            end
            FN_WUP_TSK, FN_IWUP_TSK: begin
              if (core_tsk_stat == TS_DMT) ret_ercd <= E_OBJ;
              else if (core_tsk_stat == TS_WAI && core_tsk_qid == QID_NONE) begin
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= tgt;
                enq_stat <= TS_RDY; enq_fifo <= 1'b0;
                wercd[ti] <= E_OK;
              end else if (int'(wupcnt[ti]) < TMAX_WUPCNT)
                wupcnt[ti] <= wupcnt[ti] + 1'b1;
              else
                ret_ercd <= E_QOVR;
            end
            FN_CAN_WUP: begin
              if (core_tsk_stat == TS_DMT) ret_ercd <= E_OBJ;
              else begin
                rpar <= data_t'(wupcnt[ti]);
                wupcnt[ti] <= '0;
              end
            end
            FN_REL_WAI, FN_IREL_WAI: begin
              if (core_tsk_stat != TS_WAI) ret_ercd <= E_OBJ;
              else begin
                deq_en <= 1'b1; deq_kind <= tq_kind; deq_obj <= tq_obj; deq_id <= tgt; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= tgt; enq_stat <= TS_RDY;
                enq_fifo <= 1'b0;
                wercd[ti] <= E_RLWAI;
              end
            end

            // ------------------------------------------------ semaphores
            FN_SIG_SEM, FN_ISIG_SEM: begin
              if (core_head_id != TAIL_ID) begin
                deq_en <= 1'b1; deq_kind <= K_SEM; deq_obj <= obj; deq_id <= core_head_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= core_head_id; enq_stat <= TS_RDY;
                enq_fifo <= 1'b0;
                wercd[hi] <= E_OK;
              end else if (int'(semcnt[si]) < SEM_MAX)
                semcnt[si] <= semcnt[si] + 1'b1;
              else
                ret_ercd <= E_QOVR;
            end
            FN_WAI_SEM, FN_POL_SEM: begin
              if (semcnt[si] != '0) semcnt[si] <= semcnt[si] - 1'b1;
              else if (fn == FN_WAI_SEM) begin
                deq_en <= 1'b1; deq_kind <= K_RDY; deq_obj <= '0; deq_id <= run_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_SEM; enq_obj <= obj; enq_id <= run_id; enq_stat <= TS_WAI;
                enq_fifo <= !SEM_TPRI[si];
                wercd[ri] <= E_OK;
              end else
                ret_ercd <= E_TMOUT;
            end

            // ------------------------------------------------ eventflags
            FN_SET_FLG, FN_ISET_FLG: begin
              flgptn[fi] <= flgptn[fi] | prm[2][FLGPTN_W-1:0];
              if (core_head_id != TAIL_ID) begin
                scan     <= 1'b1;
                scan_cur <= core_head_id;
                state    <= ST_FLGSCAN;
              end else
                state <= ST_END;
            end
            FN_CLR_FLG: begin
              flgptn[fi] <= flgptn[fi] & prm[2][FLGPTN_W-1:0];
              state      <= ST_END;
            end
            FN_WAI_FLG, FN_POL_FLG: begin
              if (!FLG_WMUL[fi] && core_head_id != TAIL_ID)
                ret_ercd <= E_ILUSE;
              else if (flg_sat) begin
                rpar <= data_t'(cur_ptn);
                if (fn == FN_WAI_FLG) begin
                  wdata[ri] <= data_t'(cur_ptn);
                  wercd[ri] <= E_OK;
                end
                if (FLG_CLR[fi]) flgptn[fi] <= '0;
              end else if (fn == FN_WAI_FLG) begin
                waiptn[ri] <= prm[2][FLGPTN_W-1:0];
                wf_orw[ri] <= (prm[3] == TWF_ORW);
                wercd[ri]  <= E_OK;
                deq_en <= 1'b1; deq_kind <= K_RDY; deq_obj <= '0; deq_id <= run_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_FLG; enq_obj <= obj; enq_id <= run_id; enq_stat <= TS_WAI;
                enq_fifo <= !FLG_TPRI[fi];
              end else
                ret_ercd <= E_TMOUT;
            end

            // ----------------------------------------------- data queues
            FN_SND_DTQ, FN_PSND_DTQ, FN_IPSND_DTQ, FN_FSND_DTQ, FN_IFSND_DTQ: begin
              if (core_head_id != TAIL_ID && !dtq_sndw[di]) begin
                // a receiver waits: hand the data over
                wdata[hi] <= prm[2];
                wercd[hi] <= E_OK;
                deq_en <= 1'b1; deq_kind <= K_DTQ; deq_obj <= obj; deq_id <= core_head_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= core_head_id; enq_stat <= TS_RDY;
                enq_fifo <= 1'b0;
              end else if (int'(dtqn[di]) < DTQ_CNT) begin
                dtqbuf[di][sndpos] <= prm[2];
                dtqn[di] <= dtqn[di] + 1'b1;
              end else if (fn inside {FN_FSND_DTQ, FN_IFSND_DTQ}) begin
                // forced send: overwrite the oldest element
                dtqbuf[di][sndpos] <= prm[2];
                dtqhd[di] <= cnt_t'(hdnext);
              end else if (fn == FN_SND_DTQ) begin
                wdata[ri]    <= prm[2];
                wercd[ri]    <= E_OK;
                dtq_sndw[di] <= 1'b1;
                deq_en <= 1'b1; deq_kind <= K_RDY; deq_obj <= '0; deq_id <= run_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_DTQ; enq_obj <= obj; enq_id <= run_id; enq_stat <= TS_WAI;
                enq_fifo <= !DTQ_TPRI[di];
              end else
                ret_ercd <= E_TMOUT;
            end
            FN_RCV_DTQ, FN_PRCV_DTQ: begin
              if (dtqn[di] != '0) begin
                rpar <= dtqbuf[di][int'(dtqhd[di])];
                if (fn == FN_RCV_DTQ) begin
                  wdata[ri] <= dtqbuf[di][int'(dtqhd[di])];
                  wercd[ri] <= E_OK;
                end
                dtqhd[di] <= cnt_t'(hdnext);
                if (core_head_id != TAIL_ID && dtq_sndw[di]) begin
                  // a sender waits: its data takes the freed slot
                  dtqbuf[di][sndpos] <= wdata[hi];
                  wercd[hi] <= E_OK;
                  deq_en <= 1'b1; deq_kind <= K_DTQ; deq_obj <= obj; deq_id <= core_head_id; deq_stat <= TS_WAI;
                  enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= core_head_id; enq_stat <= TS_RDY;
                  enq_fifo <= 1'b0;
                end else
                  dtqn[di] <= dtqn[di] - 1'b1;
              end else if (core_head_id != TAIL_ID && dtq_sndw[di]) begin
                // no buffer: take the data straight from the sender
                rpar <= wdata[hi];
                if (fn == FN_RCV_DTQ) begin
                  wdata[ri] <= wdata[hi];
                  wercd[ri] <= E_OK;
                end
                wercd[hi] <= E_OK;
                deq_en <= 1'b1; deq_kind <= K_DTQ; deq_obj <= obj; deq_id <= core_head_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= core_head_id; enq_stat <= TS_RDY;
                enq_fifo <= 1'b0;
              end else if (fn == FN_RCV_DTQ) begin
                dtq_sndw[di] <= 1'b0;
                wercd[ri]    <= E_OK;
                deq_en <= 1'b1; deq_kind <= K_RDY; deq_obj <= '0; deq_id <= run_id; deq_stat <= TS_WAI;
                enq_en <= 1'b1; enq_kind <= K_DTQ; enq_obj <= obj; enq_id <= run_id; enq_stat <= TS_WAI;
                enq_fifo <= 1'b1;
              end else
                ret_ercd <= E_TMOUT;
            end
            default: state <= ST_END;
          endcase
        end

        // ------------------------------------------------ queue operations
        ST_DEQ: begin
          if (chg_en)      state <= ST_PRICHG;
          else if (enq_en) state <= ST_ENQ;
          else if (deq_en) state <= ST_HIGHEST;
          else             state <= ST_END;
        end
        ST_PRICHG: state <= enq_en ? ST_ENQ : ST_HIGHEST;
        ST_ENQ:    state <= scan ? ST_FLGSCAN : ST_HIGHEST;

        // -------------------------- release satisfied eventflag waiters
        ST_FLGSCAN: begin
          if (scan_cur == TAIL_ID) begin
            scan  <= 1'b0;
            state <= ST_HIGHEST;
          end else if (scan_sat) begin
            wdata[sci] <= data_t'(flgptn[fi]);
            wercd[sci] <= E_OK;
            deq_en <= 1'b1; deq_kind <= K_FLG; deq_obj <= obj; deq_id <= scan_cur; deq_stat <= TS_WAI;
            enq_en <= 1'b1; enq_kind <= K_RDY; enq_obj <= '0; enq_id <= scan_cur; enq_stat <= TS_RDY;
            enq_fifo <= 1'b0;
            if (FLG_CLR[fi]) begin
              flgptn[fi] <= '0;
              scan_cur   <= TAIL_ID;
            end else
              scan_cur <= core_tsk_next;
            state <= ST_DEQ;
          end else
            scan_cur <= core_tsk_next;
        end

        // ------------------------------------- highest-priority ready task
        ST_HIGHEST: begin
          // A task that exits and is started again by a queued activation
          // begins anew, so that also counts as a switch.
          if (core_head_id != run_id || fn == FN_EXT_TSK) begin
            ret_hi <= core_head_id;
            run_id <= core_head_id;
          end else
            ret_hi <= '0;
          state <= ST_END;
        end

        ST_END: state <= ST_WAIT;
        default: state <= ST_INIT;
      endcase
    end
  end

  // A system call may only be issued while the hardware is idle.
  always_ff @(posedge clk) begin
    if (rst_n && bus_we && bus_addr == A_ISSUE)
      assert (state == ST_WAIT) else $error("rtos_hw_wrapper: call issued while busy");
  end

endmodule
