// tb_rtos_hw: self-checking test of the complete RTOS hardware (wrapper and
// core together) in a reduced configuration, the way a different application
// would configure it: 4 tasks with initial priorities 3,1,2,2 of which tasks
// 1 and 2 start ready, 2 FIFO-ordered semaphores (isemcnt 0, maxsem 2), one
// single-waiter eventflag, no data queues, activation requests queued up to
// 2, and the data-queue calls and can_act left out of the call set.
// System calls are issued over the memory-mapped registers like the software
// part does (parameters, call number, then polling the return word) and each
// result is compared with hand-worked expectations: FIFO release order
// regardless of priority, counting and overflow limits, the disabled calls
// returning E_RSFN, the single-waiter rule (E_ILUSE) and preemption.
module tb_rtos_hw;
  import rtos_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq_ctx = 1'b0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_addr = '0;
  data_t       bus_wdata = '0, bus_rdata;
  logic        busy;
  id_t         run_id;

  localparam ipri_vec_t IPRI = ipri_vec_t'({5'd2, 5'd2, 5'd1, 5'd3});
  localparam logic [NUM_FN-1:0] FNS = ~(NUM_FN'(1) << FN_CAN_ACT)
      & ~(NUM_FN'(1) << FN_SND_DTQ) & ~(NUM_FN'(1) << FN_PSND_DTQ)
      & ~(NUM_FN'(1) << FN_IPSND_DTQ) & ~(NUM_FN'(1) << FN_FSND_DTQ)
      & ~(NUM_FN'(1) << FN_IFSND_DTQ) & ~(NUM_FN'(1) << FN_RCV_DTQ)
      & ~(NUM_FN'(1) << FN_PRCV_DTQ);

  rtos_hw #(
    .NUM_TSK(4), .NUM_SEM(2), .NUM_FLG(1), .NUM_DTQ(0), .TSK_IPRI(IPRI),
    .TSK_ACT(32'h3), .TMAX_ACTCNT(2), .SEM_TPRI(32'h0), .SEM_INIT(0), .SEM_MAX(2),
    .FLG_TPRI(32'h0), .FLG_WMUL(32'h0), .FLG_CLR(32'h0), .FN_EN(FNS), .CHK_ID(1'b0)
  ) dut (
    .clk, .rst_n, .irq_ctx, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .busy, .run_id);

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
    repeat (20) @(negedge clk);
    rdchk("boot: task 2 has the highest priority", A_RET, 32'h8002_0000);
    chk("run 2", run_id, 2);

    call("act 3", FN_ACT_TSK, 3, 0, 0, E_OK, 0);            // ready 2,3,1
    call("act 4", FN_ACT_TSK, 4, 0, 0, E_OK, 0);            // ready 2,3,4,1
    call("act 3 queued 1", FN_ACT_TSK, 3, 0, 0, E_OK, 0);
    call("act 3 queued 2", FN_ACT_TSK, 3, 0, 0, E_OK, 0);
    call("act 3 overflow", FN_ACT_TSK, 3, 0, 0, E_QOVR, 0);
    call("can_act left out", FN_CAN_ACT, 3, 0, 0, E_RSFN, 0);
    call("snd_dtq left out", FN_SND_DTQ, 1, 5, 0, E_RSFN, 0);
    call("prcv_dtq left out", FN_PRCV_DTQ, 1, 0, 0, E_RSFN, 0);

    // FIFO semaphore: waiters join in the order 3, 4, 2
    call("slp 2", FN_SLP_TSK, 0, 0, 0, E_OK, 3);
    call("3 waits", FN_WAI_SEM, 1, 0, 0, E_OK, 4);
    call("4 waits", FN_WAI_SEM, 1, 0, 0, E_OK, 1);
    call("1 wakes 2", FN_WUP_TSK, 2, 0, 0, E_OK, 2);
    call("2 waits", FN_WAI_SEM, 1, 0, 0, E_OK, 1);
    call("sig releases 3 first", FN_SIG_SEM, 1, 0, 0, E_OK, 3);
    call("sig releases 4", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
    call("sig releases 2", FN_SIG_SEM, 1, 0, 0, E_OK, 2);
    call("sig count 1", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
    call("sig count 2", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
    call("sig overflow", FN_SIG_SEM, 1, 0, 0, E_QOVR, 0);
    call("pol 1", FN_POL_SEM, 1, 0, 0, E_OK, 0);
    call("pol 2", FN_POL_SEM, 1, 0, 0, E_OK, 0);
    call("pol empty", FN_POL_SEM, 1, 0, 0, E_TMOUT, 0);
    call("sem 2 empty", FN_POL_SEM, 2, 0, 0, E_TMOUT, 0);

    // single-waiter eventflag (ready: 2, 3, 4, 1)
    call("2 waits on flag", FN_WAI_FLG, 1, 3, TWF_ORW, E_OK, 3);
    call("second waiter", FN_WAI_FLG, 1, 1, TWF_ORW, E_ILUSE, 0);
    call("set releases 2", FN_SET_FLG, 1, 2, 0, E_OK, 2);
    rdchk("2 sees pattern", A_WDATA, 2);
    call("pattern kept", FN_POL_FLG, 1, 2, TWF_ANDW, E_OK, 0);

    // priority change of a waiting task does not reorder a FIFO queue
    call("2 back to initial priority", FN_CHG_PRI, 0, 0, 0, E_OK, 0);
    call("2 sleeps", FN_SLP_TSK, 0, 0, 0, E_OK, 3);
    call("3 waits on sem", FN_WAI_SEM, 2, 0, 0, E_OK, 4);
    call("4 waits on sem", FN_WAI_SEM, 2, 0, 0, E_OK, 1);
    call("raise 4", FN_CHG_PRI, 4, 1, 0, E_OK, 0);
    call("sig: 3 still first", FN_SIG_SEM, 2, 0, 0, E_OK, 3);
    call("sig: 4 preempts", FN_SIG_SEM, 2, 0, 0, E_OK, 4);
    chk("run 4", run_id, 4);

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
