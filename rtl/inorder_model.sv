// inorder_model: A-Ports performance model of a 5-stage in-order pipeline.
//
// The target is a classic FET-DEC-EXE-MEM-WB pipeline for a MIPS subset with
// one-cycle ("magic") memories, a branch predictor updated after branch
// resolution, and a scoreboard that stalls back-to-back dependent
// instructions. Each stage is one model module; the modules are joined only
// by A-Ports of latency 1, one model cycle of pipeline register each:
//
//     FET --inst--> DEC --decinst--> EXE --execres--> MEM --result--> WB
//      ^                              |                               |
//      +------------resteer-----------+        DEC <------wbinfo------+
//
// There is no central controller and no model-cycle counter. Each module
// begins a model cycle when its own input ports are non-empty and writes its
// outputs when its own output ports have room, so neighbouring modules may be
// on different model cycles (a port then reads heavy or light). The modules
// take different numbers of FPGA cycles per model cycle (FET 3, DEC 2 to 5,
// EXE 2, MEM 2, WB 1), because their large tables sit in block RAMs.
//
// Simulation control (`mode`, `step`) goes to every module:
//   MODE_RUN    : free, decoupled simulation.
//   MODE_RESYNC : a module advances only if it is behind a neighbour; the
//                 model comes to rest with every port balanced, i.e. every
//                 module on the same model cycle (`quiesced`).
//   MODE_STEP   : after quiescence, each `step` pulse lets every module
//                 simulate exactly one model cycle.
//
// Every A-Port has K extra slots beyond its latency (K >= 1; the published design's
// minimum buffering is K = 1). Program and data are loaded with the host
// ports, which must only be used while the model does not run (for example
// in MODE_STEP with no step pending, or before reset is released for IMEM).
//
// The module set, port names, latencies and topology follow the published design;
// the instruction subset, message contents and table sizes are this design's
// own.
module inorder_model
  import aports_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter int unsigned BHT_ENTRIES = 256,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned K           = 1,   // extra slots on every A-Port
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS),
  localparam int unsigned NPORT = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // program load
  input  logic             imem_we,
  input  logic [IAW-1:0]   imem_waddr,
  input  logic [31:0]      imem_wdata,
  // data memory access while paused
  input  logic             dmem_en,
  input  logic             dmem_we,
  input  logic [DAW-1:0]   dmem_addr,
  input  logic [31:0]      dmem_wdata,
  output logic [31:0]      dmem_rdata,
  // observation
  output logic             halted,
  output logic [31:0]      instret,
  output logic [4:0]       cycle_done,   // {WB, MEM, EXE, DEC, FET} finished a model cycle
  output logic             quiesced,     // every port balanced, every module between cycles
  output logic [NPORT-1:0] port_heavy,   // {wbinfo, resteer, result, execres, decinst, inst}
  output logic [NPORT-1:0] port_light,
  output logic [NPORT-1:0] port_full,
  output logic             ev_replay,    // DEC issued a scoreboard stall
  output logic             ev_mispredict,// EXE sent a redirect
  output logic             ev_squash     // EXE dropped a wrong-path instruction
);

  localparam int unsigned LAT = 1;
  localparam int unsigned P_INST = 0, P_DEC = 1, P_EXE = 2, P_RES = 3, P_RS = 4, P_WB = 5;

  logic [NPORT-1:0] p_empty, p_bal, p_enq, p_deq;

  logic [INST_W:0]    inst_s, inst_r;
  logic [DEC_W:0]     dec_s,  dec_r;
  logic [EXE_W:0]     exe_s,  exe_r;
  logic [RES_W:0]     res_s,  res_r;
  logic [RESTEER_W:0] rs_s,   rs_r;
  logic [WB_W:0]      wb_s,   wb_r;

  a_port #(.W(INST_W), .L(LAT), .K(K)) u_p_inst (
    .clk, .rst_n, .send_en(p_enq[P_INST]), .send_data(inst_s), .full(port_full[P_INST]),
    .heavy(port_heavy[P_INST]), .recv_en(p_deq[P_INST]), .recv_data(inst_r),
    .empty(p_empty[P_INST]), .light(port_light[P_INST]), .balanced(p_bal[P_INST]), .elems());
  a_port #(.W(DEC_W), .L(LAT), .K(K)) u_p_decinst (
    .clk, .rst_n, .send_en(p_enq[P_DEC]), .send_data(dec_s), .full(port_full[P_DEC]),
    .heavy(port_heavy[P_DEC]), .recv_en(p_deq[P_DEC]), .recv_data(dec_r),
    .empty(p_empty[P_DEC]), .light(port_light[P_DEC]), .balanced(p_bal[P_DEC]), .elems());
  a_port #(.W(EXE_W), .L(LAT), .K(K)) u_p_execres (
    .clk, .rst_n, .send_en(p_enq[P_EXE]), .send_data(exe_s), .full(port_full[P_EXE]),
    .heavy(port_heavy[P_EXE]), .recv_en(p_deq[P_EXE]), .recv_data(exe_r),
    .empty(p_empty[P_EXE]), .light(port_light[P_EXE]), .balanced(p_bal[P_EXE]), .elems());
  a_port #(.W(RES_W), .L(LAT), .K(K)) u_p_result (
    .clk, .rst_n, .send_en(p_enq[P_RES]), .send_data(res_s), .full(port_full[P_RES]),
    .heavy(port_heavy[P_RES]), .recv_en(p_deq[P_RES]), .recv_data(res_r),
    .empty(p_empty[P_RES]), .light(port_light[P_RES]), .balanced(p_bal[P_RES]), .elems());
  a_port #(.W(RESTEER_W), .L(LAT), .K(K)) u_p_resteer (
    .clk, .rst_n, .send_en(p_enq[P_RS]), .send_data(rs_s), .full(port_full[P_RS]),
    .heavy(port_heavy[P_RS]), .recv_en(p_deq[P_RS]), .recv_data(rs_r),
    .empty(p_empty[P_RS]), .light(port_light[P_RS]), .balanced(p_bal[P_RS]), .elems());
  a_port #(.W(WB_W), .L(LAT), .K(K)) u_p_wbinfo (
    .clk, .rst_n, .send_en(p_enq[P_WB]), .send_data(wb_s), .full(port_full[P_WB]),
    .heavy(port_heavy[P_WB]), .recv_en(p_deq[P_WB]), .recv_data(wb_r),
    .empty(p_empty[P_WB]), .light(port_light[P_WB]), .balanced(p_bal[P_WB]), .elems());

  logic [4:0] idle;

  ip_fet #(.IMEM_WORDS(IMEM_WORDS), .BHT_ENTRIES(BHT_ENTRIES), .BTB_ENTRIES(BTB_ENTRIES)) u_fet (
    .clk, .rst_n, .mode, .step,
    .rs_data(rs_r), .rs_empty(p_empty[P_RS]), .rs_heavy(port_heavy[P_RS]), .rs_deq(p_deq[P_RS]),
    .inst_data(inst_s), .inst_full(port_full[P_INST]), .inst_light(port_light[P_INST]),
    .inst_enq(p_enq[P_INST]),
    .imem_we, .imem_waddr, .imem_wdata,
    .idle(idle[0]), .cycle_done(cycle_done[0]), .redirected()
  );

  ip_dec u_dec (
    .clk, .rst_n, .mode, .step,
    .inst_data(inst_r), .inst_empty(p_empty[P_INST]), .inst_heavy(port_heavy[P_INST]),
    .inst_deq(p_deq[P_INST]),
    .wb_data(wb_r), .wb_empty(p_empty[P_WB]), .wb_heavy(port_heavy[P_WB]), .wb_deq(p_deq[P_WB]),
    .dec_data(dec_s), .dec_full(port_full[P_DEC]), .dec_light(port_light[P_DEC]),
    .dec_enq(p_enq[P_DEC]),
    .idle(idle[1]), .cycle_done(cycle_done[1]), .replay(ev_replay), .busy_regs()
  );

  ip_exe u_exe (
    .clk, .rst_n, .mode, .step,
    .dec_data(dec_r), .dec_empty(p_empty[P_DEC]), .dec_heavy(port_heavy[P_DEC]),
    .dec_deq(p_deq[P_DEC]),
    .exe_data(exe_s), .exe_full(port_full[P_EXE]), .exe_light(port_light[P_EXE]),
    .exe_enq(p_enq[P_EXE]),
    .rs_data(rs_s), .rs_full(port_full[P_RS]), .rs_light(port_light[P_RS]), .rs_enq(p_enq[P_RS]),
    .idle(idle[2]), .cycle_done(cycle_done[2]), .mispredict(ev_mispredict), .squash(ev_squash)
  );

  ip_mem #(.DMEM_WORDS(DMEM_WORDS)) u_mem (
    .clk, .rst_n, .mode, .step,
    .exe_data(exe_r), .exe_empty(p_empty[P_EXE]), .exe_heavy(port_heavy[P_EXE]),
    .exe_deq(p_deq[P_EXE]),
    .res_data(res_s), .res_full(port_full[P_RES]), .res_light(port_light[P_RES]),
    .res_enq(p_enq[P_RES]),
    .host_en(dmem_en), .host_we(dmem_we), .host_addr(dmem_addr), .host_wdata(dmem_wdata),
    .host_rdata(dmem_rdata),
    .idle(idle[3]), .cycle_done(cycle_done[3])
  );

  ip_wb u_wb (
    .clk, .rst_n, .mode, .step,
    .res_data(res_r), .res_empty(p_empty[P_RES]), .res_heavy(port_heavy[P_RES]),
    .res_deq(p_deq[P_RES]),
    .wb_data(wb_s), .wb_full(port_full[P_WB]), .wb_light(port_light[P_WB]), .wb_enq(p_enq[P_WB]),
    .idle(idle[4]), .cycle_done(cycle_done[4]), .halted, .instret
  );

  assign quiesced = (&p_bal) & (&idle);

endmodule
