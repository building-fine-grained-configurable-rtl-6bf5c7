// tb_rtos_tcb: self-checking test of the hardware TCB.
//
// Four TCBs (ids 1..4, priorities 1, 3, 2, 5) and one queue header share an
// OR network as in the RTOS hardware core.  The test builds the queue
// 1 -> 2 -> 4, checks every register against the "before" table of the
// worked example (task 3 not queued, task 4 ending the queue with -1/31),
// then enqueues task 3 with priority 2 and checks, during that cycle, the
// link outputs and OR inputs and afterwards the registers against the
// "on queuing" table.  It then checks dequeue, insertion at the head,
// equal-priority ordering, FIFO ordering in a second queue, PRICHG and the
// status write.
module tb_rtos_tcb;
  import rtos_pkg::*;

  localparam int N = 5;                 // node 0: header of queue 1; 1..4: tasks
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tcb_op_e    op;
  logic       we;
  id_t        id;
  pri_t       pri;
  qid_t       qid;
  logic       fifo;
  tstat_e     stat;
  id_t        nid_out [N+1];
  pri_t       npri_out[N+1];
  pri_t       r_pri   [N+1];
  tcb_state_t r_state [N+1];
  id_t        r_next  [N+1];
  pri_t       r_npri  [N+1];
  id_t        nid_or;
  pri_t       npri_or;

  always_comb begin
    nid_or = '0; npri_or = '0;
    for (int n = 0; n <= N; n++) begin
      nid_or  |= nid_out[n];
      npri_or |= npri_out[n];
    end
  end

  // header of queue 1 (node 0) and of queue 2 (node 5)
  rtos_tcb #(.MY_ID('0), .HEADER(1'b1), .HDR_QID(qid_t'(1)), .INIT_PRI('0)) u_h1 (
    .clk, .rst_n, .operation_in(op), .we_in(1'b0), .id_in(id), .pri_in(pri), .qid_in(qid),
    .fifo_in(fifo), .stat_in(stat), .next_id_in(nid_or), .next_pri_in(npri_or),
    .next_id_out(nid_out[0]), .next_pri_out(npri_out[0]), .pri_q(r_pri[0]),
    .state_q(r_state[0]), .next_id_q(r_next[0]), .next_pri_q(r_npri[0]));
  rtos_tcb #(.MY_ID('0), .HEADER(1'b1), .HDR_QID(qid_t'(2)), .INIT_PRI('0)) u_h2 (
    .clk, .rst_n, .operation_in(op), .we_in(1'b0), .id_in(id), .pri_in(pri), .qid_in(qid),
    .fifo_in(fifo), .stat_in(stat), .next_id_in(nid_or), .next_pri_in(npri_or),
    .next_id_out(nid_out[5]), .next_pri_out(npri_out[5]), .pri_q(r_pri[5]),
    .state_q(r_state[5]), .next_id_q(r_next[5]), .next_pri_q(r_npri[5]));

  localparam pri_t IPRI [1:4] = '{5'd1, 5'd3, 5'd2, 5'd5};
  for (genvar t = 1; t <= 4; t++) begin : g
    rtos_tcb #(.MY_ID(id_t'(t)), .HEADER(1'b0), .HDR_QID('0), .INIT_PRI(IPRI[t])) u (
      .clk, .rst_n, .operation_in(op), .we_in(we), .id_in(id), .pri_in(pri), .qid_in(qid),
      .fifo_in(fifo), .stat_in(stat), .next_id_in(nid_or), .next_pri_in(npri_or),
      .next_id_out(nid_out[t]), .next_pri_out(npri_out[t]), .pri_q(r_pri[t]),
      .state_q(r_state[t]), .next_id_q(r_next[t]), .next_pri_q(r_npri[t]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_op(input tcb_op_e o, input int i, input int p, input int q,
                       input bit f = 1'b0, input bit w = 1'b0, input tstat_e s = TS_DMT);
    @(negedge clk);
    op = o; id = id_t'(i); pri = pri_t'(p); qid = qid_t'(q); fifo = f; we = w; stat = s;
    @(posedge clk); #1;
    op = TOP_NONE; we = 1'b0;
    #1;
  endtask

  // walk queue q from its header, return ids in order
  function automatic string walk(input int hdr);
    string str = "";
    id_t cur = r_next[hdr];
    int guard = 0;
    while (cur != TAIL_ID && guard < 8) begin
      str = {str, $sformatf("%0d ", cur)};
      cur = r_next[cur];
      guard++;
    end
    return str;
  endfunction

  task automatic chk_q(input string what, input int hdr, input string exp);
    string got = walk(hdr);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: queue '%s' expected '%s'", what, got, exp);
    end
  endtask

  initial begin
    op = TOP_NONE; we = 0; id = '0; pri = '0; qid = '0; fifo = 0; stat = TS_DMT;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    do_op(TOP_INIT, 0, 0, 0);
    do_op(TOP_ENQ, 1, 1, 1);
    do_op(TOP_ENQ, 2, 3, 1);
    do_op(TOP_ENQ, 4, 5, 1);

    // ---- "before" table
    chk("T5 next_id 1", r_next[1], 2);  chk("T5 next_pri 1", r_npri[1], 3);
    chk("T5 next_id 2", r_next[2], 4);  chk("T5 next_pri 2", r_npri[2], 5);
    chk("T5 next_id 3", r_next[3], 0);  chk("T5 next_pri 3", r_npri[3], 0);
    chk("T5 next_id 4", r_next[4], 255); chk("T5 next_pri 4", r_npri[4], 31);
    chk("T5 pri 1", r_pri[1], 1); chk("T5 pri 2", r_pri[2], 3);
    chk("T5 pri 3", r_pri[3], 2); chk("T5 pri 4", r_pri[4], 5);
    chk("T5 state 3 not in Q", r_state[3].qid, 0);
    chk("T5 state 1 in Q", r_state[1].qid, 1);
    for (int t = 1; t <= 4; t++) begin
      chk($sformatf("T5 NEXT_ID_OUT %0d", t), nid_out[t], 0);
      chk($sformatf("T5 NEXT_PRI_OUT %0d", t), npri_out[t], 0);
    end

    // ---- "on queuing": task 3, priority 2
    @(negedge clk);
    op = TOP_ENQ; id = 3; pri = 2; qid = 1; fifo = 0;
    #1;
    chk("T6 NEXT_ID_OUT 1", nid_out[1], 2);  chk("T6 NEXT_PRI_OUT 1", npri_out[1], 3);
    chk("T6 NEXT_ID_OUT 2", nid_out[2], 0);  chk("T6 NEXT_PRI_OUT 2", npri_out[2], 0);
    chk("T6 NEXT_ID_OUT 3", nid_out[3], 0);  chk("T6 NEXT_ID_OUT 4", nid_out[4], 0);
    chk("T6 NEXT_ID_IN", nid_or, 2);         chk("T6 NEXT_PRI_IN", npri_or, 3);
    @(posedge clk); #1; op = TOP_NONE; #1;
    chk("T6 next_id 1", r_next[1], 3);  chk("T6 next_pri 1", r_npri[1], 2);
    chk("T6 next_id 3", r_next[3], 2);  chk("T6 next_pri 3", r_npri[3], 3);
    chk("T6 next_id 2", r_next[2], 4);  chk("T6 next_id 4", r_next[4], 255);
    chk("T6 state 3 in Q", r_state[3].qid, 1);
    chk_q("after enqueue 3", 0, "1 3 2 4 ");

    // ---- dequeue from the middle: task 2
    @(negedge clk);
    op = TOP_DEQ; id = 2; qid = 1;
    #1;
    chk("deq NEXT_ID_OUT 2", nid_out[2], 4);
    chk("deq NEXT_PRI_OUT 2", npri_out[2], 5);
    @(posedge clk); #1; op = TOP_NONE; #1;
    chk_q("after dequeue 2", 0, "1 3 4 ");
    chk("deq 2 left queue", r_state[2].qid, 0);
    chk("deq 2 link cleared", r_next[2], 0);

    // ---- dequeue the head: task 1
    do_op(TOP_DEQ, 1, 0, 1);
    chk_q("after dequeue head", 0, "3 4 ");
    chk("header next_pri", r_npri[0], 2);

    // ---- head insertion and equal priority: task 2 gets priority 2
    do_op(TOP_PRICHG, 2, 2, 0);
    chk("prichg", r_pri[2], 2);
    do_op(TOP_ENQ, 2, 2, 1);
    chk_q("equal priority goes behind", 0, "3 2 4 ");
    do_op(TOP_ENQ, 1, 1, 1);
    chk_q("head insertion", 0, "1 3 2 4 ");

    // ---- FIFO queue 2: move 4 then 1 then 3 (key ignores priority)
    do_op(TOP_DEQ, 4, 0, 1);
    do_op(TOP_DEQ, 1, 0, 1);
    do_op(TOP_DEQ, 3, 0, 1);
    chk_q("queue 1 left", 0, "2 ");
    do_op(TOP_ENQ, 4, FIFO_KEY, 2, 1'b1);
    do_op(TOP_ENQ, 1, FIFO_KEY, 2, 1'b1);
    do_op(TOP_ENQ, 3, FIFO_KEY, 2, 1'b1);
    chk_q("fifo order", 5, "4 1 3 ");
    chk_q("queue 1 untouched", 0, "2 ");
    do_op(TOP_DEQ, 1, 0, 2, 1'b1);
    chk_q("fifo after dequeue", 5, "4 3 ");

    // ---- status write
    do_op(TOP_NONE, 3, 0, 0, 1'b0, 1'b1, TS_WAI);
    chk("status write", r_state[3].tstat, TS_WAI);
    chk("status write other", r_state[2].tstat, TS_DMT);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
