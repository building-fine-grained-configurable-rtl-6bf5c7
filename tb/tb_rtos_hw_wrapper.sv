// tb_rtos_hw_wrapper: directed self-checking test of the system-call state
// machine, driving the wrapper (with the hardware core attached) over its
// memory-mapped registers exactly as the software part of a system call
// does: write the parameters, write the call number, poll the return word
// until bit 31 is set, then split it into the task to switch to and the
// error code.  A scenario with five tasks walks through task activation,
// semaphores, sleeping and waking, forced release, priority change,
// eventflags, data queues, termination and the error checks.  Expected
// values are worked out by hand from the uITRON rules.  The number of
// states a sig_sem call passes through is checked against its state
// sequence: counting the cycle of the issuing write, done is seen after
// 5 cycles without a waiting task (CHECK, SEMHEAD, SEMDEQUEUE, END) and
// after 7 with one (adds READYENQUEUE and PRIHIGHEST).  An act_tsk with a bad
// ID is rejected in the single CHECK cycle: done after 3 cycles.
module tb_rtos_hw_wrapper;
  import rtos_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq_ctx = 1'b0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_addr = '0;
  data_t       bus_wdata = '0, bus_rdata;
  logic        busy;
  id_t         run_id;

  core_op_e core_op;
  obj_t     core_obj;
  id_t      core_id, core_head_id, core_tsk_next;
  pri_t     core_pri, core_head_pri, core_tsk_pri;
  logic     core_fifo, core_we;
  tstat_e   core_stat, core_tsk_stat;
  qid_t     core_tsk_qid;

  rtos_hw_wrapper #(.TSK_EXIST(32'h0F)) dut (
    .clk, .rst_n, .irq_ctx, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .busy, .run_id,
    .core_op, .core_obj, .core_id, .core_pri, .core_fifo, .core_we, .core_stat,
    .core_head_id, .core_tsk_stat, .core_tsk_qid, .core_tsk_next);

  rtos_hw_core u_core (
    .clk, .rst_n, .op(core_op), .obj(core_obj), .id(core_id), .pri(core_pri),
    .fifo(core_fifo), .we(core_we), .stat(core_stat),
    .head_id(core_head_id), .head_pri(core_head_pri), .tsk_stat(core_tsk_stat),
    .tsk_qid(core_tsk_qid), .tsk_pri(core_tsk_pri), .tsk_next(core_tsk_next));

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- start-up: task 1 (TA_ACT) is ready and chosen
    repeat (20) @(negedge clk);
    rdchk("boot return word", A_RET, 32'h8001_0000);
    chk("run_id after boot", run_id, 1);

    // ---- act_tsk / can_act (priorities: t1=1 t2=1 t3=2 t4=2 t5=3)
    call("act 2", FN_ACT_TSK, 2, 0, 0, E_OK, 0);      // same priority: behind task 1
    call("act 3", FN_ACT_TSK, 3, 0, 0, E_OK, 0);
    call("act 2 again", FN_ACT_TSK, 2, 0, 0, E_OK, 0); // queued activation
    call("act 2 overflow", FN_ACT_TSK, 2, 0, 0, E_QOVR, 0);
    call("act bad id", FN_ACT_TSK, 9, 0, 0, E_ID, 0);
    chk("error found in the one CHECK cycle: issue, CHECK, END", last_cycles, 3);
    call("act non-existent", FN_ACT_TSK, 5, 0, 0, E_NOEXS, 0);
    call("act self", FN_ACT_TSK, 0, 0, 0, E_OK, 0);
    call("can_act 2", FN_CAN_ACT, 2, 0, 0, E_OK, 0);
    rdchk("can_act 2 count", A_RPAR, 1);
    call("can_act 2 again", FN_CAN_ACT, 2, 0, 0, E_OK, 0);
    rdchk("can_act 2 count 0", A_RPAR, 0);
    call("can_act self", FN_CAN_ACT, 0, 0, 0, E_OK, 0);
    rdchk("can_act self count", A_RPAR, 1);

    // ---- semaphores (sem 1: TA_TPRI, isemcnt 1, maxsem 1)
    call("sig_sem full", FN_SIG_SEM, 1, 0, 0, E_QOVR, 0);
    chk("sig_sem no waiter: 5 cycles", last_cycles, 5);
    call("pol_sem take", FN_POL_SEM, 1, 0, 0, E_OK, 0);
    call("pol_sem empty", FN_POL_SEM, 1, 0, 0, E_TMOUT, 0);
    call("wai_sem blocks 1", FN_WAI_SEM, 1, 0, 0, E_OK, 2);
    chk("blocking wai_sem: 7 cycles", last_cycles, 7);
    chk("run 2", run_id, 2);
    call("wai_sem blocks 2", FN_WAI_SEM, 1, 0, 0, E_OK, 3);
    chk("run 3", run_id, 3);
    call("sig_sem releases 1", FN_SIG_SEM, 1, 0, 0, E_OK, 1);
    chk("sig_sem with waiter: 7 cycles", last_cycles, 7);
    rdchk("task 1 wait result", A_WERCD, 0);
    call("sig_sem bad id", FN_SIG_SEM, 7, 0, 0, E_ID, 0);

    // ---- forced release, sleep and wake-up (running: 1; ready 1,3; 2 waits)
    call("rel_wai 2", FN_REL_WAI, 2, 0, 0, E_OK, 0);       // ready 1,2,3
    call("rel_wai 3 not waiting", FN_REL_WAI, 3, 0, 0, E_OBJ, 0);
    call("slp_tsk 1", FN_SLP_TSK, 0, 0, 0, E_OK, 2);
    rdchk("task 2 released by rel_wai", A_WERCD, int'($signed(E_RLWAI)));
    call("wup_tsk 1", FN_WUP_TSK, 1, 0, 0, E_OK, 0);       // ready 2,1,3
    call("wup_tsk 3 queued", FN_WUP_TSK, 3, 0, 0, E_OK, 0);
    call("wup_tsk 3 overflow", FN_WUP_TSK, 3, 0, 0, E_QOVR, 0);
    call("can_wup 3", FN_CAN_WUP, 3, 0, 0, E_OK, 0);
    rdchk("can_wup 3 count", A_RPAR, 1);
    call("wup dormant 4", FN_WUP_TSK, 4, 0, 0, E_OBJ, 0);

    // ---- priority change (ready 2,1,3)
    call("chg_pri self to 3", FN_CHG_PRI, 0, 3, 0, E_OK, 1);   // ready 1,3,2
    call("chg_pri bad", FN_CHG_PRI, 3, 31, 0, E_PAR, 0);
    call("chg_pri dormant", FN_CHG_PRI, 4, 2, 0, E_OBJ, 0);
    call("chg_pri 2 to 1", FN_CHG_PRI, 2, 1, 0, E_OK, 0);      // ready 1,2,3
    call("chg_pri 2 back", FN_CHG_PRI, 2, 0, 0, E_OK, 0);      // initial pri 1

    // ---- eventflags (flg 1: TA_TPRI, TA_WMUL)
    call("wai_flg par", FN_WAI_FLG, 1, 0, TWF_ANDW, E_PAR, 0);
    call("wai_flg 1 blocks", FN_WAI_FLG, 1, 3, TWF_ANDW, E_OK, 2);
    call("wai_flg 2 blocks", FN_WAI_FLG, 1, 4, TWF_ORW, E_OK, 3);
    call("set_flg partial", FN_SET_FLG, 1, 1, 0, E_OK, 0);
    call("set_flg releases 1 and 2", FN_SET_FLG, 1, 6, 0, E_OK, 1);
    rdchk("task 1 flag pattern", A_WDATA, 7);
    call("pol_flg miss", FN_POL_FLG, 1, 8, TWF_ORW, E_TMOUT, 0);
    call("pol_flg hit", FN_POL_FLG, 1, 5, TWF_ANDW, E_OK, 0);
    rdchk("pol_flg pattern", A_RPAR, 7);
    call("clr_flg", FN_CLR_FLG, 1, 32'hFFFF_FFFE, 0, E_OK, 0);
    call("pol_flg after clear", FN_POL_FLG, 1, 1, TWF_ORW, E_TMOUT, 0);
    // flg 3: TA_CLR, TA_WSGL
    call("set_flg 3", FN_SET_FLG, 3, 5, 0, E_OK, 0);
    call("wai_flg 3 immediate", FN_WAI_FLG, 3, 1, TWF_ORW, E_OK, 0);
    rdchk("wai_flg 3 pattern", A_RPAR, 5);
    call("flg 3 cleared", FN_POL_FLG, 3, 4, TWF_ORW, E_TMOUT, 0);

    // ---- data queues (dtqcnt 4), running 1, ready 1,2,3
    for (int i = 0; i < 4; i++) call("snd fill", FN_SND_DTQ, 1, 100 + i, 0, E_OK, 0);
    call("psnd full", FN_PSND_DTQ, 1, 104, 0, E_TMOUT, 0);
    call("fsnd overwrites", FN_FSND_DTQ, 1, 105, 0, E_OK, 0);
    begin
      int exp_d [4] = '{101, 102, 103, 105};
      for (int i = 0; i < 4; i++) begin
        call("rcv", FN_RCV_DTQ, 1, 0, 0, E_OK, 0);
        rdchk("rcv data", A_RPAR, exp_d[i]);
      end
    end
    call("prcv empty", FN_PRCV_DTQ, 1, 0, 0, E_TMOUT, 0);
    call("rcv blocks 1", FN_RCV_DTQ, 1, 0, 0, E_OK, 2);
    call("snd hands to 1", FN_SND_DTQ, 1, 77, 0, E_OK, 0);    // run 2, ready 2,1,3
    call("slp 2", FN_SLP_TSK, 0, 0, 0, E_OK, 1);
    rdchk("task 1 received", A_WDATA, 77);
    for (int i = 0; i < 4; i++) call("snd fill 2", FN_SND_DTQ, 2, 10 + i, 0, E_OK, 0);
    call("snd blocks 1", FN_SND_DTQ, 2, 55, 0, E_OK, 3);
    call("rcv releases sender", FN_RCV_DTQ, 2, 0, 0, E_OK, 1);
    rdchk("rcv first", A_RPAR, 10);
    begin
      int exp_d [4] = '{11, 12, 13, 55};
      for (int i = 0; i < 4; i++) begin
        call("rcv rest", FN_PRCV_DTQ, 2, 0, 0, E_OK, 0);
        rdchk("rcv rest data", A_RPAR, exp_d[i]);
      end
    end

    // ---- context and function checks
    irq_ctx = 1'b1;
    call("wai_sem in handler", FN_WAI_SEM, 1, 0, 0, E_CTX, 0);
    call("iact_tsk self in handler", FN_IACT_TSK, 0, 0, 0, E_ID, 0);
    call("iact_tsk 4", FN_IACT_TSK, 4, 0, 0, E_OK, 0);
    irq_ctx = 1'b0;
    call("reserved fn", FN_NONE, 0, 0, 0, E_RSFN, 0);

    // ---- termination (running 1; ready 1,3,4; 2 sleeps)
    call("ter self", FN_TER_TSK, 0, 0, 0, E_ILUSE, 0);
    call("ter 3", FN_TER_TSK, 3, 0, 0, E_OK, 0);
    call("ter 3 again", FN_TER_TSK, 3, 0, 0, E_OBJ, 0);
    call("act self", FN_ACT_TSK, 0, 0, 0, E_OK, 0);
    call("ext 1 re-activates", FN_EXT_TSK, 0, 0, 0, E_OK, 1);  // queued activation: starts again
    call("ext 1", FN_EXT_TSK, 0, 0, 0, E_OK, 4);
    call("ext 4", FN_EXT_TSK, 0, 0, 0, E_OK, 255);             // nothing ready
    chk("run_id idle", run_id, 255);
    call("blocking with no task", FN_SLP_TSK, 0, 0, 0, E_CTX, 0);
    irq_ctx = 1'b1;
    call("iwup_tsk 2 from idle", FN_IWUP_TSK, 2, 0, 0, E_OK, 2);
    irq_ctx = 1'b0;
    chk("run 2 again", run_id, 2);

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
