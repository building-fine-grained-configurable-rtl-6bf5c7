// data_memory: the processor's data memory.
//
// A word-organised RAM with byte write enables, as a MIPS32 core needs for
// sw/sh/sb.  Writes happen at the rising clock edge when we is high, for
// the bytes selected by be; the read port is asynchronous (rdata follows
// addr in the same cycle), so that the processor's load multiplexer can
// choose between it and the RTOS hardware registers without extra latency.
// The block itself is shown in the design's processor diagram; its size,
// its byte enables and its read timing are own choices (WORDS 32-bit words).
module data_memory #(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,     // byte address
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx  = addr[AW+1:2];
  assign rdata = mem[widx];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
  end

endmodule
