// mt_hazard_unit: data-hazard detection for the 5-stage multithreaded
// pipeline, aware of the thread each instruction belongs to.
//
// Every pipeline stage carries the hardware-thread identifier of its
// instruction. A source register of the instruction in decode depends on an
// older instruction only if both belong to the same thread and name the same
// architectural register; instructions of different threads use different
// register files and never create a hazard. For a dependency on the
// instruction in execute the value is forwarded from there (fwd = 1), or, if
// that instruction is a load, decode stalls one cycle; a dependency on the
// instruction in memory access forwards from there (fwd = 2). The newest
// producer wins. Combinational.
//
// The thread-tag rule follows the multithreaded datapath description; the
// forwarding network it drives and its encoding are this design's choice.
module mt_hazard_unit #(
  parameter int unsigned TID_W = 3
) (
  input  logic [TID_W-1:0] id_th,
  input  logic [3:0]       id_rn,
  input  logic             id_use_rn,
  input  logic [3:0]       id_rm,
  input  logic             id_use_rm,
  input  logic [TID_W-1:0] ex_th,
  input  logic [3:0]       ex_rd,
  input  logic             ex_we,
  input  logic             ex_load,
  input  logic [TID_W-1:0] mem_th,
  input  logic [3:0]       mem_rd,
  input  logic             mem_we,
  output logic [1:0]       fwd_rn,
  output logic [1:0]       fwd_rm,
  output logic             stall
);
  logic ex_rn, ex_rm, mem_rn, mem_rm;
  assign ex_rn  = id_use_rn && ex_we  && ex_th  == id_th && ex_rd  == id_rn;
  assign ex_rm  = id_use_rm && ex_we  && ex_th  == id_th && ex_rd  == id_rm;
  assign mem_rn = id_use_rn && mem_we && mem_th == id_th && mem_rd == id_rn;
  assign mem_rm = id_use_rm && mem_we && mem_th == id_th && mem_rd == id_rm;

  assign stall  = ex_load && (ex_rn || ex_rm);
  assign fwd_rn = ex_rn ? 2'd1 : (mem_rn ? 2'd2 : 2'd0);
  assign fwd_rm = ex_rm ? 2'd1 : (mem_rm ? 2'd2 : 2'd0);
endmodule
