// mmio_decoder: address decoder and load multiplexer of the data port.
//
// The processor reaches the RTOS hardware by memory-mapped I/O: stores and
// loads to the page 0xffff_xxxx go to the RTOS hardware registers, all other
// addresses to the data memory.  Stores are steered by gating the write
// enable; for loads the multiplexer after the data memory and the RTOS
// hardware picks the read data of the addressed side.  Purely combinational.
// That the RTOS hardware is memory mapped and that a multiplexer merges the
// two read paths follows the design; the decode on the upper 16 address bits
// is an own choice that covers every RTOS register address.
module mmio_decoder (
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] dmem_rdata,
  input  logic [31:0] rtos_rdata,
  output logic        dmem_we,
  output logic        rtos_we,
  output logic        rtos_sel,
  output logic [31:0] rdata
);

  always_comb begin
    rtos_sel = (addr[31:16] == 16'hFFFF);
    dmem_we  = we && !rtos_sel;
    rtos_we  = we && rtos_sel;
    rdata    = rtos_sel ? rtos_rdata : dmem_rdata;
  end

endmodule
