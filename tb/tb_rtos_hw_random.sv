// tb_rtos_hw_random: randomized test of the complete RTOS hardware against
// a behavioural model of the kernel.
//
// The model keeps every queue as an ordered list of task IDs: priority
// queues insert a task behind all tasks of equal or higher priority, FIFO
// queues append. Next to the lists it keeps the task states, priorities,
// counters, semaphore counts, flag patterns and data-queue contents. It
// applies each call's rules directly to these lists, with none of the
// hardware's linked-list mechanics. Thousands of random calls are issued
// through the memory-mapped registers at the default configuration (5
// tasks, 4 semaphores, 3 eventflags, 3 data queues): task calls from the
// running task, interrupt-context calls, and a share of bad IDs and bad
// parameters. The test waits on the done bit between calls. After every call
// it compares the error code, the switch target, run_id and any value
// returned by reference. It also compares the wait-result registers of the
// running task. When no task is ready, only interrupt-context calls are made
// until one is.
module tb_rtos_hw_random;
  import rtos_pkg::*;

  localparam int NT = 5, NS = 4, NF = 3, ND = 3, DQ = 4;
  localparam int NQ = 1 + NS + NF + ND;
  localparam int CALLS = 6000;
  localparam logic [31:0] SEM_TPRI = 32'h5, FLG_TPRI = 32'h1, FLG_WMUL = 32'h3,
                          FLG_CLR = 32'h4, DTQ_TPRI = 32'h0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq_ctx = 1'b0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_addr = '0;
  data_t       bus_wdata = '0, bus_rdata;
  logic        busy;
  id_t         run_id;

  rtos_hw dut (.clk, .rst_n, .irq_ctx, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .busy, .run_id);

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic wr(input logic [31:0] a, input data_t d);
    @(negedge clk);
    bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_we = 1'b0; bus_addr = A_RET;
  endtask

  task automatic rd(input logic [31:0] a, output data_t d);
    bus_addr = a;
    #1;
    d = bus_rdata;
  endtask

  task automatic rdchk(input string what, input logic [31:0] a, input int exp);
    data_t d;
    rd(a, d);
    chk(what, int'(d), exp);
  endtask

  int   last_cycles;
  int   last_hi;
  int   last_er;
  data_t last_ret;

  // Issue a call the way the software part does, busy-waiting on bit 31.
  task automatic sc(input fn_e f, input data_t p1 = 0, input data_t p2 = 0, input data_t p3 = 0);
    wr(A_PARAM1, p1);
    wr(A_PARAM1 + 4, p2);
    wr(A_PARAM1 + 8, p3);
    @(negedge clk);
    bus_we = 1'b1; bus_addr = A_ISSUE; bus_wdata = data_t'(f);
    @(negedge clk);
    bus_we = 1'b0;
    last_cycles = 1;            // the issue edge has passed; state is CHECK
    rd(A_RET, last_ret);
    while (!last_ret[31]) begin
      @(negedge clk);
      last_cycles++;
      if (last_cycles > 100) break;
      rd(A_RET, last_ret);
    end
    last_hi  = int'(last_ret[23:16]);
    last_er  = int'($signed(last_ret[7:0]));
  endtask

  // call and check error code and switch target
  task automatic call(input string what, input fn_e f, input data_t p1, input data_t p2,
                      input data_t p3, input ercd_t er, input int hi);
    sc(f, p1, p2, p3);
    chk({what, " ercd"}, last_er, int'($signed(er)));
    chk({what, " switch"}, last_hi, hi);
  endtask


  // ------------------------------------------------------------- the model
  typedef enum int {M_DMT, M_RDY, M_WAI} mstat_e;
  mstat_e m_stat [1:NT];
  int     m_pri  [1:NT];
  int     m_in   [1:NT];              // queue the task is in: 0 none, 1 ready, 2.. wait queues
  int     m_act  [1:NT], m_wup [1:NT];
  int     m_wptn [1:NT];
  bit     m_worw [1:NT];
  int     m_wdata[1:NT], m_wercd [1:NT];
  int     q      [1:NQ][$];
  int     m_sem  [NS];
  int     m_flg  [NF];
  int     m_dtq  [ND][$];
  bit     m_sndw [ND];
  int     m_run;                       // 255: idle
  int     ex_er, ex_rpar;
  bit     ex_has_rpar;

  function automatic int ipri(int t); return (t + 1) / 2; endfunction
  function automatic int qsem(int s); return 2 + s; endfunction
  function automatic int qflg(int f); return 2 + NS + f; endfunction
  function automatic int qdtq(int d); return 2 + NS + NF + d; endfunction

  function automatic bit q_fifo(int qn);
    if (qn == 1) return 1'b0;
    if (qn < 2 + NS) return !SEM_TPRI[qn - 2];
    if (qn < 2 + NS + NF) return !FLG_TPRI[qn - 2 - NS];
    return m_sndw[qn - 2 - NS - NF] ? !DTQ_TPRI[qn - 2 - NS - NF] : 1'b1;
  endfunction

  task automatic m_enq(int qn, int t, bit fifo);
    int pos = q[qn].size();
    if (!fifo)
      for (int k = 0; k < q[qn].size(); k++)
        if (m_pri[q[qn][k]] > m_pri[t]) begin pos = k; break; end
    q[qn].insert(pos, t);
    m_in[t] = qn;
  endtask

  task automatic m_deq(int t);
    if (m_in[t] != 0)
      foreach (q[m_in[t]][k])
        if (q[m_in[t]][k] == t) begin q[m_in[t]].delete(k); break; end
    m_in[t] = 0;
  endtask

  task automatic m_ready(int t);
    m_deq(t);
    m_stat[t] = M_RDY;
    m_enq(1, t, 1'b0);
  endtask

  task automatic m_block(int qn, bit fifo);
    m_deq(m_run);
    m_stat[m_run] = M_WAI;
    m_wercd[m_run] = 0;
    if (qn != 0) m_enq(qn, m_run, fifo);
  endtask

  function automatic bit sat(int ptn, int w, bit orw);
    return orw ? (ptn & w) != 0 : (ptn & w) == w;
  endfunction

  task automatic m_reset();
    for (int t = 1; t <= NT; t++) begin
      m_stat[t] = M_DMT; m_pri[t] = ipri(t); m_in[t] = 0; m_act[t] = 0; m_wup[t] = 0;
      m_wptn[t] = 0; m_worw[t] = 0; m_wdata[t] = 0; m_wercd[t] = 0;
    end
    for (int k = 1; k <= NQ; k++) q[k].delete();
    for (int s = 0; s < NS; s++) m_sem[s] = 1;
    for (int f = 0; f < NF; f++) m_flg[f] = 0;
    for (int d = 0; d < ND; d++) begin m_dtq[d].delete(); m_sndw[d] = 0; end
    m_ready(1);
    m_run = 1;
  endtask

  // Apply one call to the model; sets ex_er / ex_rpar and returns the
  // expected switch target.
  task automatic m_call(input fn_e f, input int p1, input int p2, input int p3,
                        input bit irq, output int ex_hi);
    bit is_tsk, self_ok, blocking, is_sem, is_flg, is_dtq;
    int tgt, o, head, old_run;
    ex_er = 0; ex_has_rpar = 0; ex_hi = 0;
    is_tsk = f inside {FN_ACT_TSK, FN_IACT_TSK, FN_CAN_ACT, FN_TER_TSK, FN_CHG_PRI,
                       FN_WUP_TSK, FN_IWUP_TSK, FN_CAN_WUP, FN_REL_WAI, FN_IREL_WAI};
    self_ok = f inside {FN_ACT_TSK, FN_CAN_ACT, FN_TER_TSK, FN_CHG_PRI, FN_WUP_TSK,
                        FN_CAN_WUP, FN_REL_WAI};
    blocking = f inside {FN_EXT_TSK, FN_SLP_TSK, FN_WAI_SEM, FN_WAI_FLG, FN_SND_DTQ, FN_RCV_DTQ};
    is_sem = f inside {[FN_SIG_SEM:FN_POL_SEM]};
    is_flg = f inside {[FN_SET_FLG:FN_POL_FLG]};
    is_dtq = f inside {[FN_SND_DTQ:FN_PRCV_DTQ]};
    tgt = (f inside {FN_EXT_TSK, FN_SLP_TSK} || (is_tsk && p1 == 0)) ? m_run : p1;
    o = p1 - 1;
    // static checks, in the hardware's order
    if (blocking && (irq || m_run == 255)) begin ex_er = -25; return; end
    if (is_tsk && p1 == 0 && (!self_ok || irq || m_run == 255)) begin ex_er = -18; return; end
    if (f == FN_TER_TSK && tgt == m_run) begin ex_er = -28; return; end
    if (is_tsk && p1 > NT) begin ex_er = -18; return; end
    if (is_sem && (p1 == 0 || p1 > NS)) begin ex_er = -18; return; end
    if (is_flg && (p1 == 0 || p1 > NF)) begin ex_er = -18; return; end
    if (is_dtq && (p1 == 0 || p1 > ND)) begin ex_er = -18; return; end
    if (f == FN_CHG_PRI && p2 > 30) begin ex_er = -17; return; end
    if (f inside {FN_WAI_FLG, FN_POL_FLG} && ((p2 & 16'hFFFF) == 0 || p3 > 1)) begin ex_er = -17; return; end

    old_run = m_run;
    case (f)
      FN_ACT_TSK, FN_IACT_TSK:
        if (m_stat[tgt] == M_DMT) begin m_ready(tgt); m_wup[tgt] = 0; end
        else if (m_act[tgt] < 1) m_act[tgt]++;
        else ex_er = -43;
      FN_CAN_ACT: begin ex_has_rpar = 1; ex_rpar = m_act[tgt]; m_act[tgt] = 0; end
      FN_EXT_TSK, FN_TER_TSK:
        if (m_stat[tgt] == M_DMT) ex_er = -41;
        else begin
          m_deq(tgt);
          m_stat[tgt] = M_DMT;
          m_pri[tgt] = ipri(tgt);
          m_wup[tgt] = 0;
          if (m_act[tgt] != 0) begin m_act[tgt]--; m_ready(tgt); end
        end
      FN_CHG_PRI:
        if (m_stat[tgt] == M_DMT) ex_er = -41;
        else begin
          int qn = m_in[tgt];
          bit fifo = (qn != 0) ? q_fifo(qn) : 1'b1;
          m_pri[tgt] = (p2 == 0) ? ipri(tgt) : p2;
          if (qn != 0 && !fifo) begin m_deq(tgt); m_enq(qn, tgt, 1'b0); end
        end
      FN_SLP_TSK:
        if (m_wup[tgt] != 0) m_wup[tgt]--;
        else m_block(0, 1'b1);
      FN_WUP_TSK, FN_IWUP_TSK:
        if (m_stat[tgt] == M_DMT) ex_er = -41;
        else if (m_stat[tgt] == M_WAI && m_in[tgt] == 0) begin m_ready(tgt); m_wercd[tgt] = 0; end
        else if (m_wup[tgt] < 1) m_wup[tgt]++;
        else ex_er = -43;
      FN_CAN_WUP:
        if (m_stat[tgt] == M_DMT) ex_er = -41;
        else begin ex_has_rpar = 1; ex_rpar = m_wup[tgt]; m_wup[tgt] = 0; end
      FN_REL_WAI, FN_IREL_WAI:
        if (m_stat[tgt] != M_WAI) ex_er = -41;
        else begin m_ready(tgt); m_wercd[tgt] = -49; end
      FN_SIG_SEM, FN_ISIG_SEM:
        if (q[qsem(o)].size() != 0) begin
          head = q[qsem(o)][0];
          m_ready(head);
          m_wercd[head] = 0;
        end else if (m_sem[o] < 1) m_sem[o]++;
        else ex_er = -43;
      FN_WAI_SEM, FN_POL_SEM:
        if (m_sem[o] != 0) m_sem[o]--;
        else if (f == FN_WAI_SEM) m_block(qsem(o), !SEM_TPRI[o]);
        else ex_er = -50;
      FN_SET_FLG, FN_ISET_FLG: begin
        int waiters[$] = q[qflg(o)];
        m_flg[o] = m_flg[o] | (p2 & 16'hFFFF);
        foreach (waiters[k]) begin
          int w = waiters[k];
          if (sat(m_flg[o], m_wptn[w], m_worw[w])) begin
            m_wdata[w] = m_flg[o];
            m_wercd[w] = 0;
            m_ready(w);
            if (FLG_CLR[o]) begin m_flg[o] = 0; break; end
          end
        end
      end
      FN_CLR_FLG: m_flg[o] = m_flg[o] & p2 & 16'hFFFF;
      FN_WAI_FLG, FN_POL_FLG:
        if (!FLG_WMUL[o] && q[qflg(o)].size() != 0) ex_er = -28;
        else if (sat(m_flg[o], p2 & 16'hFFFF, p3 == 1)) begin
          ex_has_rpar = 1; ex_rpar = m_flg[o];
          if (f == FN_WAI_FLG) begin m_wdata[m_run] = m_flg[o]; m_wercd[m_run] = 0; end
          if (FLG_CLR[o]) m_flg[o] = 0;
        end else if (f == FN_WAI_FLG) begin
          m_wptn[m_run] = p2 & 16'hFFFF;
          m_worw[m_run] = (p3 == 1);
          m_block(qflg(o), !FLG_TPRI[o]);
        end else ex_er = -50;
      FN_SND_DTQ, FN_PSND_DTQ, FN_IPSND_DTQ, FN_FSND_DTQ, FN_IFSND_DTQ:
        if (q[qdtq(o)].size() != 0 && !m_sndw[o]) begin
          head = q[qdtq(o)][0];
          m_wdata[head] = p2;
          m_wercd[head] = 0;
          m_ready(head);
        end else if (m_dtq[o].size() < DQ) m_dtq[o].push_back(p2);
        else if (f inside {FN_FSND_DTQ, FN_IFSND_DTQ}) begin
          void'(m_dtq[o].pop_front());
          m_dtq[o].push_back(p2);
        end else if (f == FN_SND_DTQ) begin
          m_wdata[m_run] = p2;
          m_sndw[o] = 1;
          m_block(qdtq(o), !DTQ_TPRI[o]);
        end else ex_er = -50;
      FN_RCV_DTQ, FN_PRCV_DTQ:
        if (m_dtq[o].size() != 0) begin
          int v = m_dtq[o].pop_front();
          ex_has_rpar = 1; ex_rpar = v;
          if (f == FN_RCV_DTQ) begin m_wdata[m_run] = v; m_wercd[m_run] = 0; end
          if (q[qdtq(o)].size() != 0 && m_sndw[o]) begin
            head = q[qdtq(o)][0];
            m_dtq[o].push_back(m_wdata[head]);
            m_wercd[head] = 0;
            m_ready(head);
          end
        end else if (q[qdtq(o)].size() != 0 && m_sndw[o]) begin
          head = q[qdtq(o)][0];
          ex_has_rpar = 1; ex_rpar = m_wdata[head];
          if (f == FN_RCV_DTQ) begin m_wdata[m_run] = m_wdata[head]; m_wercd[m_run] = 0; end
          m_wercd[head] = 0;
          m_ready(head);
        end else if (f == FN_RCV_DTQ) begin
          m_sndw[o] = 0;
          m_block(qdtq(o), 1'b1);
        end else ex_er = -50;
      default: ;
    endcase
    if (ex_er == 0) begin
      int top = (q[1].size() != 0) ? q[1][0] : 255;
      if (top != old_run || f == FN_EXT_TSK) begin
        ex_hi = top;
        m_run = top;
      end
    end
  endtask

  // --------------------------------------------------------- random calls
  fn_e task_fns [] = '{FN_ACT_TSK, FN_CAN_ACT, FN_EXT_TSK, FN_TER_TSK, FN_CHG_PRI,
      FN_SLP_TSK, FN_WUP_TSK, FN_CAN_WUP, FN_REL_WAI, FN_SIG_SEM, FN_WAI_SEM, FN_POL_SEM,
      FN_SET_FLG, FN_CLR_FLG, FN_WAI_FLG, FN_POL_FLG, FN_SND_DTQ, FN_PSND_DTQ,
      FN_FSND_DTQ, FN_RCV_DTQ, FN_PRCV_DTQ, FN_ACT_TSK, FN_WUP_TSK, FN_SIG_SEM,
      FN_WAI_SEM, FN_SET_FLG, FN_WAI_FLG, FN_SND_DTQ, FN_RCV_DTQ};
  fn_e irq_fns [] = '{FN_IACT_TSK, FN_IWUP_TSK, FN_IREL_WAI, FN_ISIG_SEM, FN_ISET_FLG,
      FN_IPSND_DTQ, FN_IFSND_DTQ, FN_ACT_TSK};
  int ptns [] = '{1, 2, 4, 3, 5, 6, 7, 8, 16'h8001};

  int n_switch = 0, n_err = 0, n_idle = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m_reset();
    repeat (20) @(negedge clk);
    rdchk("boot", A_RET, 32'h8001_0000);
    for (int n = 0; n < CALLS; n++) begin
      fn_e f;
      int p1, p2, p3, ex_hi, lim;
      bit irq;
      irq = (m_run == 255) || ($urandom_range(0, 9) == 0);
      f = irq ? irq_fns[$urandom_range(0, irq_fns.size() - 1)]
              : task_fns[$urandom_range(0, task_fns.size() - 1)];
      if (f inside {[FN_SIG_SEM:FN_POL_SEM]}) lim = NS;
      else if (f inside {[FN_SET_FLG:FN_POL_FLG]}) lim = NF;
      else if (f inside {[FN_SND_DTQ:FN_PRCV_DTQ]}) lim = ND;
      else lim = NT;
      p1 = ($urandom_range(0, 19) == 0) ? lim + 1 : $urandom_range(0, lim);
      if (lim != NT && p1 == 0 && $urandom_range(0, 3) != 0) p1 = 1;
      case (f)
        FN_CHG_PRI: p2 = ($urandom_range(0, 19) == 0) ? 31 : $urandom_range(0, 6);
        FN_SET_FLG, FN_ISET_FLG, FN_WAI_FLG, FN_POL_FLG, FN_CLR_FLG:
          p2 = ($urandom_range(0, 29) == 0) ? 0 : ptns[$urandom_range(0, ptns.size() - 1)];
        default: p2 = $urandom_range(1, 1000);
      endcase
      if (f == FN_CLR_FLG) p2 = ~p2;
      p3 = ($urandom_range(0, 29) == 0) ? 2 : $urandom_range(0, 1);
      m_call(f, p1, p2, p3, irq, ex_hi);
      irq_ctx = irq;
      call($sformatf("call %0d fn %0d(%0d,%0d,%0d)", n, f, p1, p2, p3), f, p1, p2, p3,
           ercd_t'(ex_er), ex_hi);
      irq_ctx = 1'b0;
      if (ex_has_rpar) rdchk($sformatf("call %0d rpar", n), A_RPAR, ex_rpar);
      chk($sformatf("call %0d run_id", n), int'(run_id), m_run);
      if (m_run != 255) begin
        rdchk($sformatf("call %0d wait data of %0d", n, m_run), A_WDATA, m_wdata[m_run]);
        rdchk($sformatf("call %0d wait code of %0d", n, m_run), A_WERCD, m_wercd[m_run]);
      end
      if (ex_hi != 0) n_switch++;
      if (ex_er != 0) n_err++;
      if (m_run == 255) n_idle++;
      if (failures > 20) break;
    end
    $display("calls=%0d switches=%0d errors=%0d idle=%0d", CALLS, n_switch, n_err, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CALLS * 40 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
