// app_config_run: test harness that builds the RTOS hardware for one
// application configuration and runs that application's system calls on it.
//
// The configuration is given as the number of tasks, semaphores, eventflags
// and data queues; the call set is cut down to what such an application can
// use (no semaphore calls without semaphores, and so on), as the adaptation
// does.  The harness then plays the software part of the system calls with
// two tasks of equal priority and, for each kind of object present, issues
// the calls whose execution time the evaluation lists, with and without a
// task switch: pol_sem, wai_sem, sig_sem; wai_flg, set_flg, pol_flg, and
// iset_flg from an interrupt that wakes the system out of idle; psnd_dtq,
// fsnd_dtq, prcv_dtq and rcv_dtq.  For each kind of object absent it checks
// that the calls are gone (E_RSFN).  Results, switch targets and the cycle
// counts of sig_sem (5 without and 7 with a waiting task, counting the issue
// cycle) are compared with hand-worked values.  Interface: clk in; done,
// checks and failures out (failures counts mismatches; done rises at the end).
module app_config_run
  import rtos_pkg::*;
#(
  parameter int NT = 5,
  parameter int NS = 4,
  parameter int NF = 3,
  parameter int ND = 3
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  function automatic logic [NUM_FN-1:0] call_set();
    logic [NUM_FN-1:0] m = '1;
    if (NS == 0) for (int f = FN_SIG_SEM; f <= FN_POL_SEM; f++) m[f] = 1'b0;
    if (NF == 0) for (int f = FN_SET_FLG; f <= FN_POL_FLG; f++) m[f] = 1'b0;
    if (ND == 0) for (int f = FN_SND_DTQ; f <= FN_PRCV_DTQ; f++) m[f] = 1'b0;
    return m;
  endfunction

  localparam ipri_vec_t IPRI = '{default: 5'd1};   // all tasks equal priority

  logic        rst_n = 1'b0;
  logic        irq_ctx = 1'b0;
  logic        bus_we = 1'b0;
  logic [31:0] bus_addr = '0;
  data_t       bus_wdata = '0, bus_rdata;
  logic        busy;
  id_t         run_id;

  rtos_hw #(
    .NUM_TSK(NT), .NUM_SEM(NS), .NUM_FLG(NF), .NUM_DTQ(ND), .TSK_IPRI(IPRI),
    .FLG_CLR(32'h0), .FN_EN(call_set())
  ) dut (
    .clk, .rst_n, .irq_ctx, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .busy, .run_id);

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
    done = 1'b0;
    checks = 0;
    failures = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    rdchk("boot", A_RET, 32'h8001_0000);
    call("act 2", FN_ACT_TSK, 2, 0, 0, E_OK, 0);           // running 1, ready 1,2

    if (NS > 0) begin
      call("pol_sem", FN_POL_SEM, 1, 0, 0, E_OK, 0);
      call("wai_sem with switch", FN_WAI_SEM, 1, 0, 0, E_OK, 2);
      call("sig_sem releases 1", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
      chk("sig_sem with waiter cycles", last_cycles, 7);
      call("slp 2", FN_SLP_TSK, 0, 0, 0, E_OK, 1);
      rdchk("1 released normally", A_WERCD, 0);
      call("wup 2", FN_WUP_TSK, 2, 0, 0, E_OK, 0);
      call("sig_sem no waiter", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
      chk("sig_sem no waiter cycles", last_cycles, 5);
      call("wai_sem no switch", FN_WAI_SEM, 1, 0, 0, E_OK, 0);
      call("sig_sem back", FN_SIG_SEM, 1, 0, 0, E_OK, 0);
    end else
      call("sig_sem left out", FN_SIG_SEM, 1, 0, 0, E_RSFN, 0);

    if (NF > 0) begin
      call("wai_flg with switch", FN_WAI_FLG, 1, 1, TWF_ORW, E_OK, 2);
      call("set_flg releases 1", FN_SET_FLG, 1, 1, 0, E_OK, 0);
      call("pol_flg", FN_POL_FLG, 1, 1, TWF_ORW, E_OK, 0);
      rdchk("pol_flg pattern", A_RPAR, 1);
      call("clr_flg", FN_CLR_FLG, 1, 0, 0, E_OK, 0);
      call("slp 2", FN_SLP_TSK, 0, 0, 0, E_OK, 1);
      rdchk("1 got pattern", A_WDATA, 1);
      // iset_flg from an interrupt while nothing runs
      call("wai_flg 1 goes idle", FN_WAI_FLG, 1, 2, TWF_ORW, E_OK, 255);
      irq_ctx = 1'b1;
      call("iset_flg wakes 1", FN_ISET_FLG, 1, 2, 0, E_OK, 1);
      irq_ctx = 1'b0;
      rdchk("1 got pattern 2", A_WDATA, 2);
      call("wai_flg no switch", FN_WAI_FLG, 1, 2, TWF_ORW, E_OK, 0);
      call("clr_flg 2", FN_CLR_FLG, 1, 0, 0, E_OK, 0);
      call("wup 2", FN_WUP_TSK, 2, 0, 0, E_OK, 0);
    end else
      call("set_flg left out", FN_SET_FLG, 1, 1, 0, E_RSFN, 0);

    if (ND > 0) begin
      call("psnd_dtq", FN_PSND_DTQ, 1, 5, 0, E_OK, 0);
      call("fsnd_dtq", FN_FSND_DTQ, 1, 6, 0, E_OK, 0);
      call("prcv_dtq", FN_PRCV_DTQ, 1, 0, 0, E_OK, 0);
      rdchk("prcv data", A_RPAR, 5);
      call("rcv_dtq no switch", FN_RCV_DTQ, 1, 0, 0, E_OK, 0);
      rdchk("rcv data", A_RPAR, 6);
      call("rcv_dtq with switch", FN_RCV_DTQ, 1, 0, 0, E_OK, 2);
      call("fsnd_dtq hands over", FN_FSND_DTQ, 1, 7, 0, E_OK, 0);
      call("slp 2", FN_SLP_TSK, 0, 0, 0, E_OK, 1);
      rdchk("1 received", A_WDATA, 7);
      call("wup 2", FN_WUP_TSK, 2, 0, 0, E_OK, 0);
    end else
      call("snd_dtq left out", FN_SND_DTQ, 1, 1, 0, E_RSFN, 0);

    done = 1'b1;
  end
endmodule
