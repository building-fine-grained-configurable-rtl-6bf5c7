// tb_hw_rtos_soc: end-to-end test of the system at its default size.
//
// The testbench plays the processor.  It runs a small five-task application
// whose task contexts (program counter, a value, a loop counter) live in the
// data memory, and issues every system call through the top's memory port
// exactly as the software part of a call does: parameters to 0xffff0104..,
// the call number to 0xffff0100, then polling 0xffff0008 until bit 31 is set.
// When the return word names another task, the running task's context stays
// in memory and the named task's context is loaded; when it says 0xff (no
// task ready) the processor idles and an interrupt handler wakes task 5 with
// iwup_tsk.  A task that resumes after waiting reads its received data from
// 0xffff0124 and its release code from 0xffff0128.
//
// The application (priorities from the default configuration 1,1,2,2,3):
//   task 1  activates 4, 3, 5, 2, sends 1..N through data queue 1 (blocks when the
//           4-entry queue is full), sends 0 as end mark, waits on eventflag 1
//           for bits 0 and 1 (AND), then exits
//   task 2  sleeps three times, counting its wake-ups in memory
//   task 3  receives from data queue 1; each value is added to a sum and
//           logged in memory under semaphore 1; on the end mark sets bit 0
//   task 4  twice takes semaphore 1 and sleeps holding it, so task 3 waits
//           on the semaphore; then sets bit 1
//   task 5  background: wakes 2 and 4, polls semaphore 1, signals the full
//           semaphore 2 (overflow), force-sends to data queue 2 (nobody
//           receives: once full it overwrites), sleeps every other round,
//           and exits once 1..4 are done
// An interrupt handler also sends to data queue 2 with ipsnd_dtq every few
// calls.  Checked: every return code against what the call may return, the
// run_id output against the switch target, the sum, order and count of the
// received values, the wake-up count, the final flag pattern, that all tasks
// finish and the system ends idle.  Each mechanism (context switch,
// preemption, each kind of wait, data hand-over, overwrite, polling failure,
// queueing overflow, idle, interrupt-context call) is counted and one that
// never happened counts as a failure.
module tb_hw_rtos_soc;
  import rtos_pkg::*;

  localparam int N = 12;                 // values sent by task 1

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq_ctx = 1'b0;
  logic [31:0] mem_addr = '0, mem_wdata = '0, mem_rdata;
  logic        mem_we = 1'b0;
  logic [3:0]  mem_be = 4'hF;
  logic        rtos_busy;
  logic [7:0]  run_id;

  hw_rtos_soc dut (.clk, .rst_n, .irq_ctx, .mem_addr, .mem_we, .mem_be, .mem_wdata,
                   .mem_rdata, .rtos_busy, .run_id);

  // data memory layout
  localparam logic [31:0] SUM   = 32'h40, COUNT = 32'h44, DONE = 32'h48, NLOG = 32'h4C;
  localparam logic [31:0] LOG   = 32'h200;
  function automatic logic [31:0] ctx(input int t, input int w);
    return 32'h100 + 32'(16 * t + 4 * w);
  endfunction

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // ------------------------------------------------------------ memory port
  task automatic mwr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    mem_we = 1'b1; mem_addr = a; mem_wdata = d;
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  task automatic mrd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    mem_addr = a;
    #1;
    d = mem_rdata;
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_switch, n_preempt, n_wait_sem, n_wait_flg, n_wait_rcv, n_wait_snd, n_sleep;
  int n_handover, n_overwrite, n_tmout, n_qovr, n_idle, n_irq, n_exit, n_busy;

  always @(posedge clk) if (rtos_busy) n_busy++;

  // ------------------------------------------------------------ system call
  int cur;                               // running task, 0 while idle
  int ret_hi, ret_er;
  logic [31:0] ret_par;

  task automatic syscall(input fn_e f, input logic [31:0] p1 = 0, input logic [31:0] p2 = 0,
                         input logic [31:0] p3 = 0);
    logic [31:0] r;
    int cyc = 0;
    mwr(A_PARAM1, p1);
    mwr(A_PARAM1 + 4, p2);
    mwr(A_PARAM1 + 8, p3);
    mwr(A_ISSUE, 32'(f));
    do begin
      mrd(A_RET, r);
      cyc++;
    end while (!r[31] && cyc < 200);
    chk("call completes", int'(r[31]), 1);
    ret_hi = int'(r[23:16]);
    ret_er = int'($signed(r[7:0]));
    mrd(A_RPAR, ret_par);
    if (ret_hi != 0) begin
      n_switch++;
      chk("run_id follows the switch", int'(run_id), ret_hi);
    end
  endtask

  // A call whose outcome is known exactly.
  task automatic call_ok(input string what, input fn_e f, input logic [31:0] p1 = 0,
                         input logic [31:0] p2 = 0, input logic [31:0] p3 = 0);
    syscall(f, p1, p2, p3);
    chk(what, ret_er, 0);
  endtask

  // ------------------------------------------------------------ interrupts
  int irq_val = 1000;
  localparam int DTQ_FILL = 4;           // dtqcnt of data queue 2
  int dtq2_n = 0;                        // its fill level (nobody receives)
  task automatic interrupt_send();
    irq_ctx = 1'b1;
    syscall(FN_IPSND_DTQ, 2, irq_val++);
    irq_ctx = 1'b0;
    n_irq++;
    if (ret_er == int'($signed(E_TMOUT))) begin
      n_tmout++;
      chk("ipsnd_dtq fails only when full", dtq2_n, DTQ_FILL);
    end else begin
      chk("ipsnd_dtq", ret_er, 0);
      dtq2_n++;
    end
    if (ret_hi != 0) chk("ipsnd_dtq wakes nobody", ret_hi, 0);
  endtask

  // ----------------------------------------------- one step of a task body
  task automatic step(input int t);
    logic [31:0] pc, v, i, d, w;
    int nxt;
    mrd(ctx(t, 0), pc);
    mrd(ctx(t, 1), v);
    mrd(ctx(t, 2), i);
    nxt = int'(pc) + 1;
    ret_hi = 0;
    case (t)
      1: case (pc)
           0: call_ok("act 4", FN_ACT_TSK, 4);
           1: call_ok("act 3", FN_ACT_TSK, 3);
           2: call_ok("act 5", FN_ACT_TSK, 5);
           3: begin call_ok("act 2", FN_ACT_TSK, 2); if (ret_hi != 0) n_preempt++; end
           4: if (int'(i) < N) begin
                call_ok("snd_dtq", FN_SND_DTQ, 1, i + 1);
                if (ret_hi != 0) n_wait_snd++;
                i++;
                nxt = 4;
              end else
                nxt = 5;
           5: begin call_ok("snd end mark", FN_SND_DTQ, 1, 0); if (ret_hi != 0) n_wait_snd++; end
           6: begin call_ok("wai_flg", FN_WAI_FLG, 1, 3, TWF_ANDW); if (ret_hi != 0) n_wait_flg++; end
           7: begin
                mrd(A_WDATA, w);
                chk("task 1 flag pattern", int'(w), 3);
                mrd(A_WERCD, w);
                chk("task 1 released normally", int'(w), 0);
                mrd(DONE, d); mwr(DONE, d | 32'h2);
              end
           default: begin call_ok("ext 1", FN_EXT_TSK); n_exit++; nxt = 99; end
         endcase
      2: if (int'(i) < 3) begin
           if (pc == 0) begin
             call_ok("slp 2", FN_SLP_TSK);
             if (ret_hi != 0) n_sleep++;
             nxt = 1;
           end else begin
             mrd(COUNT, d); mwr(COUNT, d + 1);
             i++;
             nxt = 0;
           end
         end else if (pc != 99) begin
           mrd(DONE, d); mwr(DONE, d | 32'h4);
           call_ok("ext 2", FN_EXT_TSK); n_exit++; nxt = 99;
         end
      3: case (pc)
           0: begin call_ok("rcv_dtq", FN_RCV_DTQ, 1); if (ret_hi != 0) n_wait_rcv++; end
           1: begin
                mrd(A_WDATA, v);
                mrd(A_WERCD, w);
                chk("task 3 receive code", int'(w), 0);
                if (v == 0) nxt = 4;
              end
           2: begin call_ok("wai_sem 3", FN_WAI_SEM, 1); if (ret_hi != 0) n_wait_sem++; end
           3: begin
                mrd(SUM, d); mwr(SUM, d + v);
                mrd(NLOG, d); mwr(LOG + 4 * d, v); mwr(NLOG, d + 1);
                call_ok("sig_sem 3", FN_SIG_SEM, 1);
                if (ret_hi != 0) n_preempt++;
                nxt = 0;
              end
           4: begin
                mrd(DONE, d); mwr(DONE, d | 32'h8);
                call_ok("set_flg bit 0", FN_SET_FLG, 1, 1);
                if (ret_hi != 0) n_preempt++;
              end
           default: begin call_ok("ext 3", FN_EXT_TSK); n_exit++; nxt = 99; end
         endcase
      4: if (int'(i) < 2) case (pc)
           0: begin call_ok("wai_sem 4", FN_WAI_SEM, 1); if (ret_hi != 0) n_wait_sem++; end
           1: begin call_ok("slp 4 holding sem", FN_SLP_TSK); if (ret_hi != 0) n_sleep++; end
           default: begin
             call_ok("sig_sem 4", FN_SIG_SEM, 1);
             if (ret_hi != 0) n_preempt++;
             i++;
             nxt = 0;
           end
         endcase
         else case (pc)
           0: begin
                mrd(DONE, d); mwr(DONE, d | 32'h10);
                call_ok("set_flg bit 1", FN_SET_FLG, 1, 2);
                if (ret_hi != 0) n_preempt++;
              end
           default: begin call_ok("ext 4", FN_EXT_TSK); n_exit++; nxt = 99; end
         endcase
      5: case (pc)
           0: begin
                syscall(FN_WUP_TSK, 2);
                if (ret_er == int'($signed(E_QOVR))) n_qovr++;
                else if (ret_er == int'($signed(E_OBJ))) ;     // 2 already exited
                else chk("wup 2", ret_er, 0);
                if (ret_hi != 0) n_preempt++;
              end
           1: begin
                syscall(FN_WUP_TSK, 4);
                if (ret_er == int'($signed(E_QOVR))) n_qovr++;
                else if (ret_er == int'($signed(E_OBJ))) ;
                else chk("wup 4", ret_er, 0);
                if (ret_hi != 0) n_preempt++;
              end
           2: begin
                syscall(FN_POL_SEM, 1);
                if (ret_er == int'($signed(E_TMOUT))) n_tmout++;
                else begin
                  chk("pol_sem", ret_er, 0);
                  call_ok("give back", FN_SIG_SEM, 1);
                  if (ret_hi != 0) n_preempt++;
                end
                syscall(FN_SIG_SEM, 2);                  // semaphore 2 is full
                chk("sig_sem overflow", ret_er, int'($signed(E_QOVR)));
                n_qovr++;
              end
           3: begin
                call_ok("fsnd_dtq", FN_FSND_DTQ, 2, i);
                if (dtq2_n == DTQ_FILL) n_overwrite++;
                else dtq2_n++;
                i++;
              end
           default: begin
             mrd(DONE, d);
             if ((d & 32'h1E) == 32'h1E) begin
               call_ok("ext 5", FN_EXT_TSK); n_exit++; nxt = 99;
               mwr(DONE, d | 32'h20);
             end else begin
               nxt = 0;
               if (int'(i) % 2 == 1) begin
                 call_ok("slp 5", FN_SLP_TSK);
                 if (ret_hi != 0) n_sleep++;
               end
             end
           end
         endcase
      default: ;
    endcase
    mwr(ctx(t, 0), 32'(nxt));
    mwr(ctx(t, 1), v);
    mwr(ctx(t, 2), i);
  endtask


  // --------------------------------------------------------------- the run
  initial begin
    logic [31:0] r, d;
    int steps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 'h300; a += 4) mwr(32'(a), 0);
    do mrd(A_RET, r); while (!r[31]);
    chk("after reset task 1 runs", int'(r[23:16]), 1);
    cur = 1;
    while (steps < 5000) begin
      steps++;
      if (steps % 7 == 0 && cur != 0) interrupt_send();
      if (cur == 0) begin
        mrd(DONE, d);
        if (d[5]) break;                 // task 5 exited: application done
        n_idle++;
        irq_ctx = 1'b1;
        syscall(FN_IWUP_TSK, 5);
        irq_ctx = 1'b0;
        n_irq++;
        chk("iwup_tsk 5", ret_er, 0);
        chk("idle wake-up switches to 5", ret_hi, 5);
        cur = ret_hi;
        continue;
      end
      step(cur);
      if (ret_hi == 255) cur = 0;
      else if (ret_hi != 0) cur = ret_hi;
      if (cur != 0) begin
        mrd(A_WERCD, d);
        chk("resumed task not force-released", int'(d), 0);
      end
    end

    // --------------------------------------------------------- results
    chk("application finished", steps < 5000, 1);
    chk("ends idle", int'(run_id), 255);
    mrd(SUM, d);   chk("sum of received values", int'(d), N * (N + 1) / 2);
    mrd(NLOG, d);  chk("number of received values", int'(d), N);
    for (int k = 0; k < N; k++) begin
      mrd(LOG + 4 * k, d);
      chk("values arrive in order", int'(d), k + 1);
    end
    mrd(COUNT, d); chk("task 2 woke three times", int'(d), 3);
    mrd(DONE, d);  chk("all tasks done", int'(d), 32'h3E);
    chk("five exits", n_exit, 5);

    $display("mechanisms: switch=%0d preempt=%0d wait_sem=%0d wait_flg=%0d wait_rcv=%0d wait_snd=%0d sleep=%0d",
             n_switch, n_preempt, n_wait_sem, n_wait_flg, n_wait_rcv, n_wait_snd, n_sleep);
    $display("            overwrite=%0d tmout=%0d qovr=%0d idle=%0d irq=%0d busy_cycles=%0d steps=%0d",
             n_overwrite, n_tmout, n_qovr, n_idle, n_irq, n_busy, steps);
    begin
      automatic int counts [13] = '{n_switch, n_preempt, n_wait_sem, n_wait_flg, n_wait_rcv,
          n_wait_snd, n_sleep, n_overwrite, n_tmout, n_qovr, n_idle, n_irq, n_busy};
      foreach (counts[k]) chk($sformatf("mechanism %0d happened", k), int'(counts[k] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
