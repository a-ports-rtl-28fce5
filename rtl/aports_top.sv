// aports_top: the two performance models of this design, side by side.
//
//   * u_inorder : the A-Ports model of a 5-stage in-order MIPS-subset
//                 pipeline (inorder_model). Its five model modules run
//                 decoupled and synchronise only through their A-Ports.
//   * u_rf      : the register-file model (regfile_perf_model), a 2-read /
//                 2-write register file simulated on one 1-read / 1-write
//                 block RAM in 4 FPGA cycles per model cycle.
//
// The two share only the clock and reset; each has its own ports, prefixed
// `ip_` and `rf_`. See the two modules for interface and timing.
module aports_top
  import aports_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter int unsigned BHT_ENTRIES = 256,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned K           = 1,
  parameter int unsigned RF_NREGS    = 32,
  parameter int unsigned RF_WIDTH    = 32,
  localparam int unsigned IAW  = $clog2(IMEM_WORDS),
  localparam int unsigned DAW  = $clog2(DMEM_WORDS),
  localparam int unsigned RAW  = $clog2(RF_NREGS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // 5-stage in-order model
  input  sim_mode_t           ip_mode,
  input  logic                ip_step,
  input  logic                ip_imem_we,
  input  logic [IAW-1:0]      ip_imem_waddr,
  input  logic [31:0]         ip_imem_wdata,
  input  logic                ip_dmem_en,
  input  logic                ip_dmem_we,
  input  logic [DAW-1:0]      ip_dmem_addr,
  input  logic [31:0]         ip_dmem_wdata,
  output logic [31:0]         ip_dmem_rdata,
  output logic                ip_halted,
  output logic [31:0]         ip_instret,
  output logic [4:0]          ip_cycle_done,
  output logic                ip_quiesced,
  output logic [5:0]          ip_port_heavy,
  output logic [5:0]          ip_port_light,
  output logic [5:0]          ip_port_full,
  output logic                ip_ev_replay,
  output logic                ip_ev_mispredict,
  output logic                ip_ev_squash,
  // register-file model
  input  logic [RAW-1:0]      rf_rd_addr1,
  input  logic [RAW-1:0]      rf_rd_addr2,
  input  logic                rf_wr_en1,
  input  logic [RAW-1:0]      rf_wr_addr1,
  input  logic [RF_WIDTH-1:0] rf_wr_val1,
  input  logic                rf_wr_en2,
  input  logic [RAW-1:0]      rf_wr_addr2,
  input  logic [RF_WIDTH-1:0] rf_wr_val2,
  output logic [RF_WIDTH-1:0] rf_rd_val1,
  output logic [RF_WIDTH-1:0] rf_rd_val2,
  output logic [31:0]         rf_cur_cc,
  output logic                rf_cc_done
);

  inorder_model #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
    .BHT_ENTRIES(BHT_ENTRIES), .BTB_ENTRIES(BTB_ENTRIES), .K(K)
  ) u_inorder (
    .clk, .rst_n, .mode(ip_mode), .step(ip_step),
    .imem_we(ip_imem_we), .imem_waddr(ip_imem_waddr), .imem_wdata(ip_imem_wdata),
    .dmem_en(ip_dmem_en), .dmem_we(ip_dmem_we), .dmem_addr(ip_dmem_addr),
    .dmem_wdata(ip_dmem_wdata), .dmem_rdata(ip_dmem_rdata),
    .halted(ip_halted), .instret(ip_instret), .cycle_done(ip_cycle_done),
    .quiesced(ip_quiesced), .port_heavy(ip_port_heavy), .port_light(ip_port_light),
    .port_full(ip_port_full), .ev_replay(ip_ev_replay), .ev_mispredict(ip_ev_mispredict),
    .ev_squash(ip_ev_squash)
  );

  regfile_perf_model #(.NREGS(RF_NREGS), .WIDTH(RF_WIDTH), .CCW(32)) u_rf (
    .clk, .rst_n,
    .rd_addr1(rf_rd_addr1), .rd_addr2(rf_rd_addr2),
    .wr_en1(rf_wr_en1), .wr_addr1(rf_wr_addr1), .wr_val1(rf_wr_val1),
    .wr_en2(rf_wr_en2), .wr_addr2(rf_wr_addr2), .wr_val2(rf_wr_val2),
    .rd_val1(rf_rd_val1), .rd_val2(rf_rd_val2), .cur_cc(rf_cur_cc), .cc_done(rf_cc_done)
  );

endmodule
