// hw_rtos_soc: data side of the processor with the RTOS hardware attached.
//
// This is the part of the system below the processor core's data port: the
// data memory and the RTOS hardware circuit side by side, an address decoder
// that sends accesses to the 0xffff_xxxx page to the RTOS hardware, and the
// multiplexer that returns the load data of the addressed side.  The MIPS32
// processor core itself (instruction memory, register file, ALU, control) is
// not part of this RTL; its data port is brought out as the ports of this
// module, so a core - or a testbench acting as one - drives mem_addr,
// mem_we, mem_be and mem_wdata and samples mem_rdata in the same cycle.
// irq_ctx tells the RTOS hardware that the core is running an interrupt
// handler.  run_id and rtos_busy are brought out for observation.
//
// The arrangement (data memory and RTOS hardware next to each other, merged
// by a multiplexer, reached by memory-mapped I/O) follows the design; the
// memory size is an own choice.  Parameters keep the RTOS configuration of
// the largest evaluated application: 5 tasks, 4 semaphores, 3 eventflags and
// 3 data queues.
module hw_rtos_soc
  import rtos_pkg::*;
#(
  parameter int DMEM_WORDS = 4096,
  parameter int NUM_TSK    = 5,
  parameter int NUM_SEM    = 4,
  parameter int NUM_FLG    = 3,
  parameter int NUM_DTQ    = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq_ctx,
  input  logic [31:0] mem_addr,
  input  logic        mem_we,
  input  logic [3:0]  mem_be,
  input  logic [31:0] mem_wdata,
  output logic [31:0] mem_rdata,
  output logic        rtos_busy,
  output logic [7:0]  run_id
);

  logic        dmem_we, rtos_we, rtos_sel;
  logic [31:0] dmem_rdata, rtos_rdata;

  mmio_decoder u_dec (
    .addr(mem_addr), .we(mem_we), .dmem_rdata, .rtos_rdata,
    .dmem_we, .rtos_we, .rtos_sel, .rdata(mem_rdata)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(dmem_we), .be(mem_be), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(dmem_rdata)
  );

  rtos_hw #(
    .NUM_TSK(NUM_TSK), .NUM_SEM(NUM_SEM), .NUM_FLG(NUM_FLG), .NUM_DTQ(NUM_DTQ)
  ) u_rtos (
    .clk, .rst_n, .irq_ctx,
    .bus_we(rtos_we), .bus_addr(mem_addr), .bus_wdata(mem_wdata),
    .bus_rdata(rtos_rdata), .busy(rtos_busy), .run_id
  );

endmodule
