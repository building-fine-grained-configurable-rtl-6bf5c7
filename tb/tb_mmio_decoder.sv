// tb_mmio_decoder: self-checking test of the address decoder between the
// processor's data port, the data memory and the RTOS registers.  Every
// address with upper half 0xffff must select the RTOS (its write strobe and
// its read data), every other address the memory.  Checks the RTOS register
// addresses, boundary addresses on both sides and random addresses, with
// the write strobe both high and low.
module tb_mmio_decoder;
  logic [31:0] addr = '0, dmem_rdata = '0, rtos_rdata = '0, rdata;
  logic        we = 1'b0, dmem_we, rtos_we, rtos_sel;

  mmio_decoder dut (.addr, .we, .dmem_rdata, .rtos_rdata, .dmem_we, .rtos_we, .rtos_sel, .rdata);

  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @0x%08h: got 0x%08h expected 0x%08h", what, addr, got, exp);
    end
  endtask

  task automatic probe(input logic [31:0] a);
    automatic bit rt = (a[31:16] == 16'hFFFF);
    for (int w = 0; w < 2; w++) begin
      addr = a; we = w[0]; dmem_rdata = $urandom; rtos_rdata = $urandom;
      #1;
      chk("rtos_sel", 32'(rtos_sel), 32'(rt));
      chk("rtos_we", 32'(rtos_we), 32'(rt && we));
      chk("dmem_we", 32'(dmem_we), 32'(!rt && we));
      chk("rdata", rdata, rt ? rtos_rdata : dmem_rdata);
    end
  endtask

  initial begin
    automatic logic [31:0] fixed [12] = '{32'hFFFF_0008, 32'hFFFF_0100, 32'hFFFF_0104,
        32'hFFFF_0114, 32'hFFFF_0120, 32'hFFFF_0124, 32'hFFFF_0128, 32'hFFFF_0000,
        32'hFFFE_FFFC, 32'h0000_0000, 32'h0000_3FFC, 32'hFF00_0000};
    foreach (fixed[i]) probe(fixed[i]);
    for (int i = 0; i < 500; i++) probe($urandom);
    for (int i = 0; i < 500; i++) probe({16'hFFFF, 16'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
