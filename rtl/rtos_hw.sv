// rtos_hw: the RTOS hardware circuit - wrapper and core together.
//
// The RTOS hardware sits on the processor's data-memory port and is reached
// through memory-mapped registers.  rtos_hw_wrapper decodes the register
// accesses and runs the system-call state machine; rtos_hw_core holds the
// TCBs and the queue headers and performs one queue operation per cycle for
// it.  This module only connects the two and passes the configuration
// parameters on (see rtos_hw_wrapper for the register map, the timing and
// each parameter).  The split into a wrapper and a core is the design's; the
// parameters stand for the configuration that is fixed per application.
module rtos_hw
  import rtos_pkg::*;
#(
  parameter int          NUM_TSK     = 5,
  parameter int          NUM_SEM     = 4,
  parameter int          NUM_FLG     = 3,
  parameter int          NUM_DTQ     = 3,
  parameter ipri_vec_t   TSK_IPRI    = default_ipri(),
  parameter logic [31:0] TSK_EXIST   = '1,
  parameter logic [31:0] TSK_ACT     = 32'h1,
  parameter int          TMAX_TPRI   = 30,
  parameter int          TMAX_ACTCNT = 1,
  parameter int          TMAX_WUPCNT = 1,
  parameter logic [31:0] SEM_EXIST   = '1,
  parameter logic [31:0] SEM_TPRI    = 32'h5,
  parameter int          SEM_INIT    = 1,
  parameter int          SEM_MAX     = 1,
  parameter logic [31:0] FLG_EXIST   = '1,
  parameter logic [31:0] FLG_TPRI    = 32'h1,
  parameter logic [31:0] FLG_WMUL    = 32'h3,
  parameter logic [31:0] FLG_CLR     = 32'h4,
  parameter int          FLG_INIT    = 0,
  parameter int          FLGPTN_W    = 16,
  parameter logic [31:0] DTQ_EXIST   = '1,
  parameter logic [31:0] DTQ_TPRI    = 32'h0,
  parameter int          DTQ_CNT     = 4,
  parameter logic [NUM_FN-1:0] FN_EN = '1,
  parameter bit          CHK_CTX     = 1'b1,
  parameter bit          CHK_ID      = 1'b1,
  parameter bit          CHK_NOEXS   = 1'b1,
  parameter bit          CHK_PAR     = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq_ctx,
  input  logic        bus_we,
  input  logic [31:0] bus_addr,
  input  data_t       bus_wdata,
  output data_t       bus_rdata,
  output logic        busy,
  output id_t         run_id
);

  core_op_e core_op;
  obj_t     core_obj;
  id_t      core_id, core_head_id, core_tsk_next;
  pri_t     core_pri, core_head_pri, core_tsk_pri;
  logic     core_fifo, core_we;
  tstat_e   core_stat, core_tsk_stat;
  qid_t     core_tsk_qid;

  rtos_hw_wrapper #(
    .NUM_TSK(NUM_TSK), .NUM_SEM(NUM_SEM), .NUM_FLG(NUM_FLG), .NUM_DTQ(NUM_DTQ),
    .TSK_IPRI(TSK_IPRI), .TSK_EXIST(TSK_EXIST), .TSK_ACT(TSK_ACT),
    .TMAX_TPRI(TMAX_TPRI), .TMAX_ACTCNT(TMAX_ACTCNT), .TMAX_WUPCNT(TMAX_WUPCNT),
    .SEM_EXIST(SEM_EXIST), .SEM_TPRI(SEM_TPRI), .SEM_INIT(SEM_INIT), .SEM_MAX(SEM_MAX),
    .FLG_EXIST(FLG_EXIST), .FLG_TPRI(FLG_TPRI), .FLG_WMUL(FLG_WMUL), .FLG_CLR(FLG_CLR),
    .FLG_INIT(FLG_INIT), .FLGPTN_W(FLGPTN_W),
    .DTQ_EXIST(DTQ_EXIST), .DTQ_TPRI(DTQ_TPRI), .DTQ_CNT(DTQ_CNT),
    .FN_EN(FN_EN), .CHK_CTX(CHK_CTX), .CHK_ID(CHK_ID), .CHK_NOEXS(CHK_NOEXS),
    .CHK_PAR(CHK_PAR)
  ) u_wrapper (
    .clk, .rst_n, .irq_ctx,
    .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .busy, .run_id,
    .core_op, .core_obj, .core_id, .core_pri, .core_fifo, .core_we, .core_stat,
    .core_head_id, .core_tsk_stat, .core_tsk_qid, .core_tsk_next
  );

  rtos_hw_core #(
    .NUM_TSK(NUM_TSK), .NUM_SEM(NUM_SEM), .NUM_FLG(NUM_FLG), .NUM_DTQ(NUM_DTQ),
    .TSK_IPRI(TSK_IPRI)
  ) u_core (
    .clk, .rst_n,
    .op(core_op), .obj(core_obj), .id(core_id), .pri(core_pri), .fifo(core_fifo),
    .we(core_we), .stat(core_stat),
    .head_id(core_head_id), .head_pri(core_head_pri),
    .tsk_stat(core_tsk_stat), .tsk_qid(core_tsk_qid), .tsk_pri(core_tsk_pri),
    .tsk_next(core_tsk_next)
  );

endmodule
