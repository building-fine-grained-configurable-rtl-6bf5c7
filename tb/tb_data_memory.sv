// tb_data_memory: self-checking test of the data memory at its default size.
// Random byte-enabled writes to random word addresses are mirrored in a
// model array; after each write a random word is read back (the read is
// asynchronous, so it is checked in the same cycle) and at the end every
// word that was touched is compared.  Covers all 16 byte-enable patterns,
// the lowest and highest word, and that a write with we low changes nothing.
module tb_data_memory;
  localparam int WORDS = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we = 1'b0;
  logic [3:0]  be = '0;
  logic [31:0] addr = '0, wdata = '0, rdata;

  data_memory dut (.clk, .we, .be, .addr, .wdata, .rdata);

  logic [31:0] model   [WORDS];
  bit          touched [WORDS];
  int checks = 0, failures = 0;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got 0x%08h expected 0x%08h", what, got, exp);
    end
  endtask

  task automatic write(input int w, input logic [3:0] b, input logic [31:0] d, input bit en);
    @(negedge clk);
    we = en; be = b; addr = 32'(w) << 2 | 32'($urandom_range(0, 3)); wdata = d;
    @(negedge clk);
    we = 1'b0;
    if (en)
      for (int k = 0; k < 4; k++)
        if (b[k]) model[w][8*k +: 8] = d[8*k +: 8];
    touched[w] = 1'b1;
  endtask

  task automatic check_word(input int w);
    addr = 32'(w) << 2;
    #1;
    chk($sformatf("word %0d", w), rdata, model[w]);
  endtask

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      model[w] = '0;
      touched[w] = 1'b0;
    end
    // full-word initialisation of the words used below
    for (int w = 0; w < 64; w++) write(w, 4'hF, $urandom, 1'b1);
    write(WORDS - 1, 4'hF, 32'hCAFE_F00D, 1'b1);
    check_word(WORDS - 1);
    write(WORDS - 1, 4'hF, 32'h1234_5678, 1'b0);      // we low: no change
    check_word(WORDS - 1);
    for (int b = 0; b < 16; b++) begin
      write(b, 4'(b), 32'hA5A5_5A5A ^ 32'(b), 1'b1);
      check_word(b);
    end
    for (int i = 0; i < 2000; i++) begin
      automatic int w = $urandom_range(0, 63);
      write(w, 4'($urandom), $urandom, 1'b1);
      check_word($urandom_range(0, 63));
    end
    for (int w = 0; w < WORDS; w++)
      if (touched[w]) check_word(w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
