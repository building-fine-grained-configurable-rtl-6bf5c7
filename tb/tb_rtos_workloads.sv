// tb_rtos_workloads: runs the application configurations of the evaluation
// side by side, each on RTOS hardware sized and cut down for it (tasks /
// semaphores / eventflags / data queues):
//   semflgdtq 5/4/3/3, semflg 5/4/3/0, sem02 5/4/0/0, flg02 5/0/3/0,
//   dtq 5/0/0/3, Cooker 4/0/1/1, Pot 3/0/2/1, String search 4/0/1/1,
//   Bit count 4/0/0/2.
// Each instance of app_config_run issues the system calls that
// configuration uses and checks their results; this module waits for all of
// them and adds up their checks and failures.
module tb_rtos_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 9;
  logic done [NC];
  int   chk_n [NC], fail_n [NC];

  app_config_run #(.NT(5), .NS(4), .NF(3), .ND(3)) u_semflgdtq (.clk, .done(done[0]), .checks(chk_n[0]), .failures(fail_n[0]));
  app_config_run #(.NT(5), .NS(4), .NF(3), .ND(0)) u_semflg    (.clk, .done(done[1]), .checks(chk_n[1]), .failures(fail_n[1]));
  app_config_run #(.NT(5), .NS(4), .NF(0), .ND(0)) u_sem02     (.clk, .done(done[2]), .checks(chk_n[2]), .failures(fail_n[2]));
  app_config_run #(.NT(5), .NS(0), .NF(3), .ND(0)) u_flg02     (.clk, .done(done[3]), .checks(chk_n[3]), .failures(fail_n[3]));
  app_config_run #(.NT(5), .NS(0), .NF(0), .ND(3)) u_dtq       (.clk, .done(done[4]), .checks(chk_n[4]), .failures(fail_n[4]));
  app_config_run #(.NT(4), .NS(0), .NF(1), .ND(1)) u_cooker    (.clk, .done(done[5]), .checks(chk_n[5]), .failures(fail_n[5]));
  app_config_run #(.NT(3), .NS(0), .NF(2), .ND(1)) u_pot       (.clk, .done(done[6]), .checks(chk_n[6]), .failures(fail_n[6]));
  app_config_run #(.NT(4), .NS(0), .NF(1), .ND(1)) u_strsearch (.clk, .done(done[7]), .checks(chk_n[7]), .failures(fail_n[7]));
  app_config_run #(.NT(4), .NS(0), .NF(0), .ND(2)) u_bitcount  (.clk, .done(done[8]), .checks(chk_n[8]), .failures(fail_n[8]));

  initial begin
    int checks, failures;
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NC; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NC; i++) begin
      checks += chk_n[i];
      failures += fail_n[i];
      if (fail_n[i] != 0) $display("configuration %0d: %0d failures", i, fail_n[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
